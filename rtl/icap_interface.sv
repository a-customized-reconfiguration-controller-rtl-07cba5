// icap_interface: drives the ICAP in the ICAP clock domain.
//
// Two kinds of work reach the ICAP:
//
//  * Partial reconfiguration. FIFO C delivers 72-bit bitstream words
//    {last, run, data}. The 64-bit run value is written to the ICAP as two
//    32-bit words, upper half first, and the pair is repeated run+1 times, so
//    the run-length decoding happens inline at one ICAP word per clock. The next
//    FIFO C word is taken in the same cycle as the final write of the current
//    one, so a load costs one cycle more than the words it writes, plus any
//    cycles FIFO C runs empty. A timer counts the cycles from taking the first
//    word to writing the last. After the word flagged last, a fixed
//    16-step sequence re-synchronises the configuration logic, reads the STAT
//    register, and desynchronises again (dummy, bus-width detect, sync word,
//    NOOPs, type-1 read of STAT, switch to read, one read cycle, switch back,
//    DESYNC). The load is judged good when STAT shows neither CRC_ERROR nor
//    ID_ERROR; dpr_ok, dpr_stat, dpr_cycles and dpr_words are then updated and
//    dpr_done_tgl toggles for the platform clock domain to pick up.
//
//  * Direct access. FIFO A delivers 36-bit commands {L, RW, CE, data}; each
//    drives the ICAP pins for one cycle exactly as given (CE active low, RW=1
//    read). A read command (CE=0, RW=1) is followed by waiting for the read
//    data; it is pushed into FIFO B. After a command with L, an end marker is
//    pushed into FIFO B and the session ends.
//
// A waiting bitstream takes precedence over starting a direct session; a
// session that has started runs to its L command first.
//
// ICAP pins are registered. Read data is taken from icap_o when icap_busy is
// low, no sooner than two cycles after the read command was put on the pins.
// Inline RLE decoding over a 64-bit symbol, the STAT readback after the load,
// the success flag, the load timer and the command format follow the
// specification. Half order, the STAT bits tested and the read-wait rule are
// this design's choices.
module icap_interface
  import rc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic        c_empty,
  input  bs_word_t    c_rd_data,
  output logic        c_rd_en,

  input  logic        a_empty,
  input  icap_cmd_t   a_rd_data,
  output logic        a_rd_en,

  input  logic        b_full,
  output logic        b_wr_en,
  output icap_rb_t    b_wr_data,

  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic        icap_busy,

  output logic        dpr_done_tgl,
  output logic        dpr_ok,
  output logic [31:0] dpr_stat,
  output logic [31:0] dpr_cycles,
  output logic [31:0] dpr_words
);

  // STAT readback sequence: {L, RW, CE_n, data}.
  function automatic logic [34:0] rb_rom(logic [3:0] idx);
    unique case (idx)
      4'd0:  return {3'b000, 32'hFFFF_FFFF};  // dummy
      4'd1:  return {3'b000, 32'h0000_00BB};  // bus width sync
      4'd2:  return {3'b000, 32'h1122_0044};  // bus width detect
      4'd3:  return {3'b000, 32'hFFFF_FFFF};  // dummy
      4'd4:  return {3'b000, 32'hAA99_5566};  // sync word
      4'd5:  return {3'b000, 32'h2000_0000};  // NOOP
      4'd6:  return {3'b000, 32'h2800_E001};  // type 1 read, STAT, 1 word
      4'd7:  return {3'b000, 32'h2000_0000};  // NOOP
      4'd8:  return {3'b000, 32'h2000_0000};  // NOOP
      4'd9:  return {3'b011, 32'h0000_0000};  // deselect, switch to read
      4'd10: return {3'b010, 32'h0000_0000};  // read one word
      4'd11: return {3'b001, 32'h0000_0000};  // deselect, switch to write
      4'd12: return {3'b000, 32'h3000_8001};  // type 1 write, CMD
      4'd13: return {3'b000, 32'h0000_000D};  // DESYNC
      4'd14: return {3'b000, 32'h2000_0000};  // NOOP
      default: return {3'b100, 32'h2000_0000};  // NOOP, last
    endcase
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_DPR, S_RB, S_RB_WAIT, S_DA, S_DA_WAIT, S_DA_END} state_e;

  state_e       state;
  bs_word_t     cur;
  logic         cur_valid;
  logic         half;        // 0: upper half next, 1: lower half next
  logic [RUN_W-1:0] rep;     // repetitions done of cur
  logic [3:0]   rb_idx;
  logic         waited;
  logic         da_l;        // current direct read carried L
  logic [31:0]  stat_q;

  logic [34:0]  rb_e;
  assign rb_e = rb_rom(rb_idx);

  logic finish;
  assign finish = cur_valid && half && rep == cur.run;

  logic rd_capture;
  assign rd_capture = waited && !icap_busy;

  // FIFO handshakes
  always_comb begin
    c_rd_en   = 1'b0;
    a_rd_en   = 1'b0;
    b_wr_en   = 1'b0;
    b_wr_data = '0;
    unique case (state)
      S_IDLE:    c_rd_en = !c_empty;
      S_DPR:     c_rd_en = !c_empty && (!cur_valid || (finish && !cur.last));
      S_DA:      a_rd_en = !a_empty;
      S_DA_WAIT: begin
        b_wr_en        = rd_capture && !b_full;
        b_wr_data.data = icap_o;
      end
      S_DA_END: begin
        b_wr_en        = !b_full;
        b_wr_data.endm = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cur          <= '0;
      cur_valid    <= 1'b0;
      half         <= 1'b0;
      rep          <= '0;
      rb_idx       <= '0;
      waited       <= 1'b0;
      da_l         <= 1'b0;
      stat_q       <= '0;
      icap_ce_n    <= 1'b1;
      icap_write_n <= 1'b0;
      icap_i       <= '0;
      dpr_done_tgl <= 1'b0;
      dpr_ok       <= 1'b0;
      dpr_stat     <= '0;
      dpr_cycles   <= '0;
      dpr_words    <= '0;
    end else begin
      icap_ce_n <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (!c_empty) begin
            cur        <= c_rd_data;
            cur_valid  <= 1'b1;
            half       <= 1'b0;
            rep        <= '0;
            dpr_cycles <= 32'd1;
            dpr_words  <= '0;
            icap_write_n <= 1'b0;
            state      <= S_DPR;
          end else if (!a_empty) begin
            state <= S_DA;
          end
        end

        S_DPR: begin
          dpr_cycles <= dpr_cycles + 32'd1;
          if (cur_valid) begin
            icap_ce_n    <= 1'b0;
            icap_write_n <= 1'b0;
            icap_i       <= half ? cur.data[31:0] : cur.data[63:32];
            dpr_words    <= dpr_words + 32'd1;
          end
          if (finish && cur.last) begin
            cur_valid <= 1'b0;
            rb_idx    <= '0;
            state     <= S_RB;
          end else if (!cur_valid || finish) begin
            cur_valid <= !c_empty;
            cur       <= c_rd_data;
            half      <= 1'b0;
            rep       <= '0;
          end else if (half) begin
            half <= 1'b0;
            rep  <= rep + 1'b1;
          end else begin
            half <= 1'b1;
          end
        end

        S_RB: begin
          icap_ce_n    <= rb_e[32];
          icap_write_n <= rb_e[33];
          icap_i       <= rb_e[31:0];
          if (!rb_e[32] && rb_e[33]) begin
            waited <= 1'b0;
            state  <= S_RB_WAIT;
          end else if (rb_e[34]) begin
            dpr_ok       <= !stat_q[STAT_CRC_ERROR] && !stat_q[STAT_ID_ERROR];
            dpr_stat     <= stat_q;
            dpr_done_tgl <= !dpr_done_tgl;
            state        <= S_IDLE;
          end else begin
            rb_idx <= rb_idx + 4'd1;
          end
        end

        S_RB_WAIT: begin
          waited <= 1'b1;
          if (rd_capture) begin
            stat_q <= icap_o;
            rb_idx <= rb_idx + 4'd1;
            state  <= S_RB;
          end
        end

        S_DA: begin
          if (!a_empty) begin
            icap_ce_n    <= a_rd_data.ce_n;
            icap_write_n <= a_rd_data.rw;
            icap_i       <= a_rd_data.data;
            da_l         <= a_rd_data.l;
            if (!a_rd_data.ce_n && a_rd_data.rw) begin
              waited <= 1'b0;
              state  <= S_DA_WAIT;
            end else if (a_rd_data.l) begin
              state <= S_DA_END;
            end
          end
        end

        S_DA_WAIT: begin
          waited <= 1'b1;
          if (rd_capture && !b_full) state <= da_l ? S_DA_END : S_DA;
        end

        S_DA_END: if (!b_full) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // FIFO rules: never pop an empty FIFO, never push a full one.
  a_c_pop:  assert property (@(posedge clk) disable iff (!rst_n) c_rd_en |-> !c_empty);
  a_a_pop:  assert property (@(posedge clk) disable iff (!rst_n) a_rd_en |-> !a_empty);
  a_b_push: assert property (@(posedge clk) disable iff (!rst_n) b_wr_en |-> !b_full);

endmodule
