// tb_reconfig_controller_top_full: one complete reconfiguration at full size.
//
// Same environment as tb_reconfig_controller_top, with the controller at its
// default parameters (2^20-word SRAM, 512-word FIFOs) and a generated bitstream
// of 190,518 64-bit words (1,524,144 bytes, the size of the bitstreams used to
// measure the controller, rounded up to whole 64-bit words), sent in
// 128-run segments. Only steps 3 and 4 below are run, without the failure:
// upload, load, STAT check, PRM initialisation.
//
// The testbench plays the remote client (tb_rle_pkg compresses and packetises
// the bitstream), the packet layer, the external SRAM (sram_model), the ICAP
// (icap_model) and the Partial Reconfigurable Module. Platform clock 6 ns,
// ICAP clock 10 ns. Sequence:
//   1. PRM traffic in normal mode is forwarded unchanged.
//   2. A direct-access STAT readback session returns the ICAP's read value and
//      an end word; its ICAP writes are checked.
//   3. A bitstream is uploaded in segments (all but the last, one of them twice
//      as a retransmission, then the last after all acknowledges). The device
//      reports a CRC error: the failure report arrives, the PRM stays in reset,
//      PRM traffic and a bitstream packet sent during the load are dropped.
//   4. The last segment is sent again (retry); the load succeeds, the PRM is
//      initialised and normal mode returns.
// Every ICAP write of both loads is compared with the decompressed bitstream
// followed by the readback sequence, and the load time is checked against the
// ICAP word count (at most 17 cycles of overhead). Each mechanism is counted
// and must have happened at least once.
module tb_reconfig_controller_top_full;
  import rc_pkg::*;
  import tb_rle_pkg::*;
  localparam int NWORDS   = 190518;   // 64-bit words of uncompressed bitstream
  localparam int SEG_LOG2 = 7;
  localparam int AW       = 20;
  localparam bit FULL     = 1;
  localparam int ZERO_PCT = 11;     // share of zero stretches in the generated bitstream

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
  logic [31:0] icap_i, icap_o, read_value = 32'h0000_4000;
  logic dpr_mode, prm_reset, prm_init, prm_init_done = 0, dpr_ok;
  logic [31:0] dpr_cycles;
  logic [15:0] drop_prm_cnt, drop_bs_cnt;
  int unsigned icap_writes, icap_reads;

  reconfig_controller_top dut (.*);
  sram_model #(.AW(AW), .DW(72), .RD_LAT(2)) u_sram (.clk, .cs(sram_cs), .we(sram_we),
    .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  icap_model #(.RD_LAT(2)) u_icap (.clk(icap_clk), .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i),
    .o(icap_o), .busy(icap_busy), .read_value, .writes(icap_writes), .reads(icap_reads));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanisms ----------------
  int m_prm_fwd = 0, m_direct = 0, m_retx = 0, m_drop_prm = 0, m_drop_bs = 0, m_fail = 0,
      m_ok = 0, m_init = 0, m_rle = 0, m_fifo_throttle = 0, m_sram_contend = 0;

  // ---------------- ICAP monitor ----------------
  logic [31:0] exp_w[$];
  int n_wr_err = 0;
  always @(posedge icap_clk) if (icap_rst_n) begin
    if (!icap_ce_n && !icap_write_n) begin
      if (exp_w.size() == 0 || icap_i != exp_w[0]) begin
        n_wr_err++;
        if (n_wr_err < 5) $display("ICAP write %h expected %h", icap_i, exp_w.size() ? exp_w[0] : 0);
      end
      if (exp_w.size() != 0) void'(exp_w.pop_front());
    end
    if (dut.c_rd_en && dut.c_rd_data.run != 0) m_rle++;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_loader.busy && dut.u_loader.issuing && !dut.rd_valid) m_fifo_throttle++;
    if (prm_init && !prm_reset) m_init++;
  end

  logic [31:0] rb_writes[13] = '{32'hFFFFFFFF, 32'h000000BB, 32'h11220044, 32'hFFFFFFFF, 32'hAA995566,
    32'h20000000, 32'h2800E001, 32'h20000000, 32'h20000000, 32'h30008001, 32'h0000000D, 32'h20000000, 32'h20000000};

  // ---------------- PRM side ----------------
  logic [64:0] exp_prm[$];
  always @(posedge clk) if (rst_n && prm_valid && prm_ready) begin
    check(exp_prm.size() != 0 && {prm_last, prm_data} == exp_prm[0], "PRM word");
    if (exp_prm.size() != 0) void'(exp_prm.pop_front());
    if (prm_last) m_prm_fwd++;
  end
  // PRM answers an init request after a while
  always @(posedge clk) begin
    if (prm_init && !prm_init_done) begin
      repeat (20) @(posedge clk);
      prm_init_done <= 1;
      @(posedge clk);
      prm_init_done <= 0;
    end
  end

  // ---------------- replies ----------------
  logic [64:0] tx_q[$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) tx_q.push_back({tx_last, tx_data});
  always @(negedge clk) tx_ready = $urandom % 4 != 0;

  // ---------------- packet sending ----------------
  task automatic send(w64_q words, int first, int len);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = words[first+k]; rx_last = (k == len - 1);
      do @(posedge clk); while (!rx_ready);
    end
    @(negedge clk) rx_valid = 0;
  endtask

  task automatic send_prm(int len, bit expect_fwd);
    w64_q w;
    for (int k = 0; k < len; k++) w.push_back({(k == 0) ? 8'h10 : 8'($urandom), 24'($urandom), $urandom});
    if (expect_fwd) foreach (w[k]) exp_prm.push_back({k == len - 1, w[k]});
    send(w, 0, len);
  endtask

  // wait for a reply of a type, return its words
  task automatic get_reply(logic [7:0] t, output w64_q r, input int timeout_cycles);
    int guard = 0;
    r = {};
    forever begin
      while (tx_q.size() == 0 && guard < timeout_cycles) begin @(posedge clk); guard++; end
      if (tx_q.size() == 0) begin check(0, $sformatf("reply %h timed out", t)); return; end
      if (tx_q[0][63:56] == t) begin
        forever begin
          while (tx_q.size() == 0) @(posedge clk);
          r.push_back(tx_q[0][63:0]);
          if (tx_q.pop_front() & 65'h1_0000_0000_0000_0000) return;
        end
      end
      void'(tx_q.pop_front());
    end
  endtask

  // ---------------- bitstream ----------------
  w64_q bs, vals, words, r;
  int_q reps, plen, pseg, pfirst;
  int unsigned n_icap_words;

  task automatic make_bitstream();
    bs.push_back({32'hFFFFFFFF, 32'hAA995566});
    while (bs.size() < NWORDS) begin
      int sel = $urandom % 100;
      if (sel < ZERO_PCT) repeat (1 + $urandom % 90) bs.push_back(64'd0);
      else if (sel < ZERO_PCT + 5) repeat (1 + $urandom % 8) bs.push_back({32'h20000000, 32'h20000000});
      else repeat (1 + $urandom % 6) bs.push_back({$urandom, $urandom});
    end
    while (bs.size() > NWORDS) void'(bs.pop_back());
    compress(bs, vals, reps);
    packetize(vals, reps, SEG_LOG2, words, plen, pseg);
    begin
      int f = 0;
      foreach (plen[p]) begin pfirst.push_back(f); f += plen[p]; end
    end
    n_icap_words = 2 * bs.size();
    $display("bitstream: %0d bytes, %0d runs, %0d packets, %0d packet words (ratio %0.2f)",
             8 * bs.size(), vals.size(), plen.size(), words.size(), real'(bs.size()) / real'(words.size()));
  endtask

  task automatic expect_load();
    foreach (bs[k]) begin exp_w.push_back(bs[k][63:32]); exp_w.push_back(bs[k][31:0]); end
    foreach (rb_writes[k]) exp_w.push_back(rb_writes[k]);
  endtask

  task automatic upload_all_but_last();
    int n = plen.size();
    int nacks = 0;
    for (int p = 0; p < n - 1; p++) begin
      send(words, pfirst[p], plen[p]);
      if (p == 1 && !FULL) begin send(words, pfirst[p], plen[p]); m_retx++; end
    end
  endtask

  task automatic wait_acks(int n);
    int got = 0, guard = 0;
    bit seen[int];
    while (got < n && guard < 200000) begin
      @(posedge clk); guard++;
      while (tx_q.size() != 0 && tx_q[0][63:56] == PT_ACK) begin
        seen[int'(tx_q[0][31:16])] = 1;
        void'(tx_q.pop_front());
        got++;
      end
    end
    check(got == n, $sformatf("%0d acknowledges of %0d", got, n));
  endtask

  task automatic check_report(bit ok, output int cycles);
    get_reply(PT_DPR_STATUS, r, 3000000);
    cycles = 0;
    check(r.size() == 2, "status report of two words");
    if (r.size() == 2) begin
      cycles = int'(r[0][31:0]);
      check(r[0][48] == ok, $sformatf("report ok flag %0d", r[0][48]));
      check(r[1][63:32] == read_value, "report carries STAT");
      check(r[1][31:0] == n_icap_words, $sformatf("report word count %0d", r[1][31:0]));
      check(cycles >= int'(n_icap_words) + 1 && cycles <= int'(n_icap_words) + 17,
            $sformatf("load took %0d cycles for %0d words", cycles, n_icap_words));
    end
  endtask

  initial begin
    int cyc;
    make_bitstream();
    repeat (3) @(negedge clk);
    rst_n = 1; icap_rst_n = 1;
    repeat (3) @(negedge clk);

    if (!FULL) begin
      // 1. PRM traffic
      send_prm(5, 1);
      send_prm(1, 1);
      // 2. direct access
      begin
        w64_q d;
        logic [34:0] seq[16] = '{
          {3'b000, 32'hFFFFFFFF}, {3'b000, 32'h000000BB}, {3'b000, 32'h11220044}, {3'b000, 32'hFFFFFFFF},
          {3'b000, 32'hAA995566}, {3'b000, 32'h20000000}, {3'b000, 32'h2800E001}, {3'b000, 32'h20000000},
          {3'b000, 32'h20000000}, {3'b011, 32'h00000000}, {3'b010, 32'h00000000}, {3'b001, 32'h00000000},
          {3'b000, 32'h30008001}, {3'b000, 32'h0000000D}, {3'b000, 32'h20000000}, {3'b100, 32'h20000000}};
        read_value = 32'h0000_5A5A;
        d.push_back({PT_ICAP_DIRECT, 56'd0});
        foreach (seq[k]) d.push_back({seq[k][31:0], 5'd0, seq[k][34:32], 24'd0});
        foreach (rb_writes[k]) exp_w.push_back(rb_writes[k]);
        send(d, 0, d.size());
        get_reply(PT_ICAP_REPLY, r, 10000);
        check(r.size() == 2 && r[0][31:0] == 32'h0000_5A5A && r[0][32] == 0 && r[1][32] == 1,
              "direct readback reply");
        if (r.size() == 2 && r[0][31:0] == 32'h0000_5A5A) m_direct++;
        check(exp_w.size() == 0, "direct session writes");
      end
      // 3. upload, failing load
      read_value = 32'h0000_4001;  // CRC_ERROR
      upload_all_but_last();
      wait_acks(plen.size() - 1 + 1);
      expect_load();
      send(words, pfirst[plen.size()-1], plen[plen.size()-1]);
      wait_acks(1);
      repeat (5) @(posedge clk);
      check(dpr_mode && prm_reset, "DPR mode during load");
      send_prm(4, 0);                                     // dropped
      send(words, pfirst[0], plen[0]);                    // dropped while loading
      check_report(0, cyc);
      if (drop_bs_cnt != 0) m_drop_bs++;
      if (drop_prm_cnt != 0) m_drop_prm++;
      if (!dpr_ok) m_fail++;
      check(exp_w.size() == 0 && n_wr_err == 0, $sformatf("first load ICAP stream (%0d left, %0d errors)", exp_w.size(), n_wr_err));
      repeat (50) @(posedge clk);
      check(dpr_mode && prm_reset && !prm_init, "failed: PRM held in reset");
      // 4. retry
      read_value = 32'h0000_4000;
    end else begin
      upload_all_but_last();
      wait_acks(plen.size() - 1);
    end

    expect_load();
    send(words, pfirst[plen.size()-1], plen[plen.size()-1]);
    wait_acks(1);
    check_report(1, cyc);
    if (dpr_ok) m_ok++;
    check(exp_w.size() == 0 && n_wr_err == 0, $sformatf("load ICAP stream (%0d left, %0d errors)", exp_w.size(), n_wr_err));
    check(dpr_cycles == 32'(cyc), "dpr_cycles output");
    repeat (10) @(posedge clk);
    check(!dpr_mode && !prm_reset && !prm_init, "normal mode after success");
    $display("load: %0d ICAP words in %0d cycles, %0.5f Gbit/s at 100 MHz", n_icap_words, cyc,
             real'(n_icap_words) * 32.0 * 0.1 / real'(cyc));
    if (!FULL) begin
      send_prm(3, 1);
      repeat (10) @(posedge clk);
      check(exp_prm.size() == 0, "PRM traffic after reconfiguration");
    end

    // mechanisms
    $display("mechanisms: prm_fwd=%0d direct=%0d retx=%0d drop_prm=%0d drop_bs=%0d fail=%0d ok=%0d init=%0d rle=%0d throttle=%0d",
             m_prm_fwd, m_direct, m_retx, m_drop_prm, m_drop_bs, m_fail, m_ok, m_init, m_rle, m_fifo_throttle);
    check(m_ok > 0 && m_init > 0 && m_rle > 0 && m_fifo_throttle > 0, "load mechanisms happened");
    if (!FULL)
      check(m_prm_fwd > 0 && m_direct > 0 && m_retx > 0 && m_drop_prm > 0 && m_drop_bs > 0 && m_fail > 0,
            "platform mechanisms happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(FULL ? 80ms : 20ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
