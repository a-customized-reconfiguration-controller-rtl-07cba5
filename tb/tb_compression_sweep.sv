// tb_compression_sweep: reconfiguration throughput across compression ratios.
//
// Bitstreams compress better the emptier the reconfigurable region is: long
// stretches of zero words in unused logic and memory. This testbench loads
// five generated bitstreams of 12,000 64-bit words each, one after another,
// from nearly incompressible (no zero stretches) to highly compressible (60%
// of the draws are zero stretches). For each it uploads the segments, lets the
// controller load the bitstream, and checks every ICAP write, the success
// report, the return to normal mode and that the load takes at most 17 cycles
// more than its ICAP word count, whatever the ratio. The ratios reached are
// printed. SRAM is reduced to 2^16 words to keep the model small.
module tb_compression_sweep;
  import rc_pkg::*;
  import tb_rle_pkg::*;
  localparam int NWORDS = 12000;
  localparam int AW     = 16;

  logic clk = 0, icap_clk = 0, rst_n = 0, icap_rst_n = 0;
  always #3 clk = ~clk;
  always #5 icap_clk = ~icap_clk;

  logic rx_valid = 0, rx_ready, rx_last = 0;
  logic [63:0] rx_data = '0;
  logic tx_valid, tx_ready = 1, tx_last;
  logic [63:0] tx_data;
  logic prm_valid, prm_ready = 1, prm_last;
  logic [63:0] prm_data;
  logic sram_cs, sram_we;
  logic [AW-1:0] sram_addr;
  bs_word_t sram_wdata, sram_rdata;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  logic [31:0] read_value = 32'h0000_4000;
  logic dpr_mode, prm_reset, prm_init, prm_init_done, dpr_ok;
  logic [31:0] dpr_cycles;
  logic [15:0] drop_prm_cnt, drop_bs_cnt;
  int unsigned icap_writes, icap_reads;

  assign prm_init_done = prm_init;  // module needs no initialisation time

  reconfig_controller_top #(.SRAM_AW(AW)) dut (.*);
  sram_model #(.AW(AW), .DW(72), .RD_LAT(2)) u_sram (.clk, .cs(sram_cs), .we(sram_we),
    .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  icap_model #(.RD_LAT(2)) u_icap (.clk(icap_clk), .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i),
    .o(icap_o), .busy(icap_busy), .read_value, .writes(icap_writes), .reads(icap_reads));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] rb_writes[13] = '{32'hFFFFFFFF, 32'h000000BB, 32'h11220044, 32'hFFFFFFFF, 32'hAA995566,
    32'h20000000, 32'h2800E001, 32'h20000000, 32'h20000000, 32'h30008001, 32'h0000000D, 32'h20000000, 32'h20000000};

  logic [31:0] exp_w[$];
  int n_wr_err = 0;
  always @(posedge icap_clk) if (icap_rst_n && !icap_ce_n && !icap_write_n) begin
    if (exp_w.size() == 0 || icap_i != exp_w[0]) n_wr_err++;
    if (exp_w.size() != 0) void'(exp_w.pop_front());
  end

  logic [64:0] tx_q[$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) tx_q.push_back({tx_last, tx_data});

  task automatic send(w64_q words, int first, int len);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = words[first+k]; rx_last = (k == len - 1);
      do @(posedge clk); while (!rx_ready);
    end
    @(negedge clk) rx_valid = 0;
  endtask

  task automatic run(int zero_pct);
    w64_q bs, vals, words;
    int_q reps, plen, pseg;
    int first, guard, cycles, acks;
    real ratio;
    while (bs.size() < NWORDS) begin
      int sel = $urandom % 100;
      if (sel < zero_pct) repeat (1 + $urandom % 90) bs.push_back(64'd0);
      else repeat (1 + $urandom % 6) bs.push_back({$urandom, $urandom});
    end
    while (bs.size() > NWORDS) void'(bs.pop_back());
    compress(bs, vals, reps);
    packetize(vals, reps, 7, words, plen, pseg);
    ratio = real'(bs.size()) / real'(words.size());
    foreach (bs[k]) begin exp_w.push_back(bs[k][63:32]); exp_w.push_back(bs[k][31:0]); end
    foreach (rb_writes[k]) exp_w.push_back(rb_writes[k]);
    tx_q = {};
    first = 0;
    for (int p = 0; p < plen.size(); p++) begin
      if (p == plen.size() - 1) begin
        // last segment only after all acknowledges
        guard = 0;
        acks = 0;
        while (acks < p && guard < 100000) begin
          @(posedge clk); guard++;
          acks = 0;
          foreach (tx_q[k]) if (tx_q[k][63:56] == PT_ACK) acks++;
        end
        check(acks == p, $sformatf("acknowledges before the last segment: %0d of %0d", acks, p));
      end
      send(words, first, plen[p]);
      first += plen[p];
    end
    guard = 0;
    while (guard < 1000000) begin
      bit found = 0;
      foreach (tx_q[k]) if (tx_q[k][63:56] == PT_DPR_STATUS) begin
        found = 1;
        cycles = int'(tx_q[k][31:0]);
        check(tx_q[k][48] == 1'b1, "success reported");
      end
      if (found) break;
      @(posedge clk); guard++;
    end
    check(guard < 1000000, "status report arrived");
    repeat (5) @(posedge clk);
    check(!dpr_mode && !prm_reset, "normal mode again");
    check(exp_w.size() == 0 && n_wr_err == 0, $sformatf("ICAP stream (%0d left, %0d errors)", exp_w.size(), n_wr_err));
    check(cycles >= 2 * NWORDS + 1 && cycles <= 2 * NWORDS + 17,
          $sformatf("%0d cycles for %0d ICAP words", cycles, 2 * NWORDS));
    $display("zero share %0d%%: compression ratio %0.2f, %0d packets, %0d cycles for %0d words (%0.5f Gbit/s at 100 MHz)",
             zero_pct, ratio, plen.size(), cycles, 2 * NWORDS, real'(2 * NWORDS) * 3.2 / real'(cycles));
  endtask

  int pcts[5] = '{0, 5, 11, 30, 60};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; icap_rst_n = 1;
    repeat (3) @(negedge clk);
    foreach (pcts[k]) run(pcts[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
