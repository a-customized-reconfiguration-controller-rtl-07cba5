// reconfig_controller_top: reconfiguration controller with remote direct ICAP
// access.
//
// The controller sits in the static region of a network-attached FPGA,
// between the packet layer (which terminates Ethernet/IP/UDP) and the ICAP. It
// lets a remote client (a) upload a run-length-compressed partial bitstream in
// acknowledged segments, stored in external SRAM, and have it loaded into the
// reconfigurable region with the module there held in reset, and (b) drive the
// ICAP directly word by word to write or read back configuration registers.
//
// Platform clock domain (clk): Packet Type Classifier, Bitstream Packet
// Handler, SRAM Interface, Bitstream Loader, Direct Access Handler, DPR Flow
// Controller and the reply mux. ICAP clock domain (icap_clk, up to 100 MHz):
// ICAP Interface. Three dual-clock FIFOs join the domains: A (commands to the
// ICAP, 512x36), B (readback from the ICAP, 512x36), C (bitstream, 512x72).
// The ICAP Interface's load result crosses back by a toggle synchroniser; the
// result registers stay stable until the next load ends.
//
// Ports: rx_* carries UDP payload words from the packet layer, tx_* replies to
// it, prm_* forwards ordinary traffic to the Partial Reconfigurable Module
// (PRM). sram_* connect a synchronous SRAM with SRAM_RD_LAT cycles of read
// latency. icap_* connect the ICAP primitive. dpr_mode goes to the Platform
// Manager; prm_reset/prm_init/prm_init_done control the PRM. dpr_ok and
// dpr_cycles give the result and ICAP cycle count of the last load.
//
// The block structure, FIFO sizes, 64-bit RLE symbol with 7-bit run count and
// last flag, STAT readback check and DPR sequencing follow the specification.
// Packet layouts, the SRAM protocol and arbitration are this design's choices.
module reconfig_controller_top
  import rc_pkg::*;
#(
  parameter int unsigned SRAM_AW     = 20,
  parameter int unsigned SRAM_RD_LAT = 2,
  parameter int unsigned FIFO_C_AW   = 9,
  parameter int unsigned FIFO_AB_AW  = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               icap_clk,
  input  logic               icap_rst_n,

  input  logic               rx_valid,
  output logic               rx_ready,
  input  logic [63:0]        rx_data,
  input  logic               rx_last,

  output logic               tx_valid,
  input  logic               tx_ready,
  output logic [63:0]        tx_data,
  output logic               tx_last,

  output logic               prm_valid,
  input  logic               prm_ready,
  output logic [63:0]        prm_data,
  output logic               prm_last,

  output logic               sram_cs,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output bs_word_t           sram_wdata,
  input  bs_word_t           sram_rdata,

  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [31:0]        icap_i,
  input  logic [31:0]        icap_o,
  input  logic               icap_busy,

  output logic               dpr_mode,
  output logic               prm_reset,
  output logic               prm_init,
  input  logic               prm_init_done,
  output logic               dpr_ok,
  output logic [31:0]        dpr_cycles,
  output logic [15:0]        drop_prm_cnt,
  output logic [15:0]        drop_bs_cnt
);

  // ---------------- classifier ----------------
  logic        bs_valid, bs_ready_s, bs_last;
  logic [63:0] bs_data;
  logic        da_valid, da_ready, da_last;
  logic [63:0] da_data;
  logic        bs_block;

  packet_type_classifier u_classifier (
    .clk, .rst_n,
    .s_valid(rx_valid), .s_ready(rx_ready), .s_data(rx_data), .s_last(rx_last),
    .bs_valid, .bs_ready(bs_ready_s), .bs_data, .bs_last,
    .da_valid, .da_ready, .da_data, .da_last,
    .prm_valid, .prm_ready, .prm_data, .prm_last,
    .dpr_mode, .bs_block, .drop_prm_cnt, .drop_bs_cnt
  );

  // ---------------- bitstream path, platform side ----------------
  logic               wr_valid, wr_ready;
  logic [SRAM_AW-1:0] wr_addr;
  bs_word_t           wr_data;
  logic               ack_valid, ack_ready;
  logic [63:0]        ack_data;
  logic               bs_complete;

  bitstream_packet_handler #(.AW(SRAM_AW)) u_bs_handler (
    .clk, .rst_n,
    .s_valid(bs_valid), .s_ready(bs_ready_s), .s_data(bs_data), .s_last(bs_last),
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .ack_valid, .ack_ready, .ack_data,
    .bs_ready(bs_complete)
  );

  logic               rd_valid, rd_ready;
  logic [SRAM_AW-1:0] rd_addr;
  logic               rsp_valid;
  bs_word_t           rsp_data;

  sram_interface #(.AW(SRAM_AW), .RD_LAT(SRAM_RD_LAT)) u_sram_if (
    .clk, .rst_n,
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .rd_valid, .rd_ready, .rd_addr,
    .rsp_valid, .rsp_data,
    .sram_cs, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

  logic               loader_start, loader_done;
  logic               loader_busy;   // not needed here: the flow controller tracks the load
  logic [31:0]        loader_words;  // debug count, not brought out
  logic               c_wr_en;
  bs_word_t           c_wr_data;
  logic [FIFO_C_AW:0] c_level;

  bitstream_loader #(.AW(SRAM_AW), .FIFO_AW(FIFO_C_AW)) u_loader (
    .clk, .rst_n,
    .start(loader_start), .busy(loader_busy), .done(loader_done), .words(loader_words),
    .rd_valid, .rd_ready, .rd_addr,
    .rsp_valid, .rsp_data,
    .fifo_wr_en(c_wr_en), .fifo_wr_data(c_wr_data), .fifo_level(c_level)
  );

  // ---------------- FIFO C: bitstream ----------------
  logic     c_full, c_empty, c_rd_en;  // c_full unused: the loader's space check prevents it
  bs_word_t c_rd_data;

  async_fifo #(.WIDTH($bits(bs_word_t)), .AW(FIFO_C_AW)) u_fifo_c (
    .wclk(clk), .wrst_n(rst_n), .wr_en(c_wr_en), .wr_data(c_wr_data), .full(c_full), .wr_level(c_level),
    .rclk(icap_clk), .rrst_n(icap_rst_n), .rd_en(c_rd_en), .rd_data(c_rd_data), .empty(c_empty)
  );

  // ---------------- direct access, FIFOs A and B ----------------
  logic                a_wr_en, a_full, a_empty, a_rd_en;
  logic [FIFO_AB_AW:0] a_level, b_level;  // fill levels, unused
  icap_cmd_t           a_wr_data, a_rd_data;
  logic                b_wr_en, b_full, b_empty, b_rd_en;
  icap_rb_t            b_wr_data, b_rd_data;
  logic                r_valid, r_ready, r_last;
  logic [63:0]         r_data;

  direct_access_handler u_da_handler (
    .clk, .rst_n,
    .s_valid(da_valid), .s_ready(da_ready), .s_data(da_data), .s_last(da_last),
    .r_valid, .r_ready, .r_data, .r_last,
    .a_wr_en, .a_wr_data, .a_full,
    .b_rd_en, .b_rd_data, .b_empty
  );

  async_fifo #(.WIDTH($bits(icap_cmd_t)), .AW(FIFO_AB_AW)) u_fifo_a (
    .wclk(clk), .wrst_n(rst_n), .wr_en(a_wr_en), .wr_data(a_wr_data), .full(a_full), .wr_level(a_level),
    .rclk(icap_clk), .rrst_n(icap_rst_n), .rd_en(a_rd_en), .rd_data(a_rd_data), .empty(a_empty)
  );

  async_fifo #(.WIDTH($bits(icap_rb_t)), .AW(FIFO_AB_AW)) u_fifo_b (
    .wclk(icap_clk), .wrst_n(icap_rst_n), .wr_en(b_wr_en), .wr_data(b_wr_data), .full(b_full), .wr_level(b_level),
    .rclk(clk), .rrst_n(rst_n), .rd_en(b_rd_en), .rd_data(b_rd_data), .empty(b_empty)
  );

  // ---------------- ICAP clock domain ----------------
  logic        done_tgl, icap_ok;
  logic [31:0] icap_stat, icap_cycles, icap_words;

  icap_interface u_icap_if (
    .clk(icap_clk), .rst_n(icap_rst_n),
    .c_empty, .c_rd_data, .c_rd_en,
    .a_empty, .a_rd_data, .a_rd_en,
    .b_full, .b_wr_en, .b_wr_data,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy,
    .dpr_done_tgl(done_tgl), .dpr_ok(icap_ok), .dpr_stat(icap_stat),
    .dpr_cycles(icap_cycles), .dpr_words(icap_words)
  );

  logic icap_done;
  toggle_sync u_done_sync (.clk, .rst_n, .tgl(done_tgl), .pulse(icap_done));

  // ---------------- DPR flow ----------------
  logic        st_valid, st_ready, st_last;
  logic [63:0] st_data;

  dpr_flow_controller u_flow (
    .clk, .rst_n,
    .bs_ready(bs_complete), .loader_start, .loader_done,
    .icap_done, .icap_ok, .icap_stat, .icap_cycles, .icap_words,
    .dpr_mode, .bs_block, .prm_reset, .prm_init, .prm_init_done,
    .st_valid, .st_ready, .st_data, .st_last
  );

  // Result of the last load, sampled when its completion event arrives.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dpr_ok     <= 1'b0;
      dpr_cycles <= '0;
    end else if (icap_done) begin
      dpr_ok     <= icap_ok;
      dpr_cycles <= icap_cycles;
    end
  end

  // ---------------- replies ----------------
  logic [2:0]       m_valid, m_ready, m_last;
  logic [2:0][63:0] m_data;

  assign m_valid   = {st_valid, r_valid, ack_valid};
  assign m_data    = {st_data, r_data, ack_data};
  assign m_last    = {st_last, r_last, 1'b1};
  assign ack_ready = m_ready[0];
  assign r_ready   = m_ready[1];
  assign st_ready  = m_ready[2];

  reply_mux #(.N(3)) u_reply_mux (
    .clk, .rst_n,
    .s_valid(m_valid), .s_ready(m_ready), .s_data(m_data), .s_last(m_last),
    .m_valid(tx_valid), .m_ready(tx_ready), .m_data(tx_data), .m_last(tx_last)
  );

endmodule
