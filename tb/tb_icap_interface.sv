// tb_icap_interface: inline RLE decoding, STAT readback and direct access.
//
// FIFOs A, B and C are modelled by queues (first-word fall-through, updated on
// falling edges); the ICAP by icap_model with a two-cycle read latency.
//  1. A bitstream of random 64-bit runs (run counts 0..6 and the maximum 127) is
//     preloaded into FIFO C. Every ICAP write is compared with the expected
//     decoded stream (upper half first, run+1 copies), then with the 13 writes
//     of the readback sequence; one read must occur. The load must take
//     words+1 cycles on the timer, STAT must be reported and dpr_ok set.
//  2. The same with FIFO C starved at random and a STAT word with CRC_ERROR set:
//     same write stream, dpr_ok clear, timer covering the stalls.
//  3. A direct-access session (STAT readback commands) through FIFO A: the
//     write list, one read, the read value and the end marker in FIFO B.
module tb_icap_interface;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic c_empty = 1, c_rd_en, a_empty = 1, a_rd_en, b_full = 0, b_wr_en;
  bs_word_t c_rd_data = '0;
  icap_cmd_t a_rd_data = '0;
  icap_rb_t b_wr_data;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o, read_value = 32'h0000_4000;
  logic dpr_done_tgl, dpr_ok;
  logic [31:0] dpr_stat, dpr_cycles, dpr_words;
  int unsigned writes, reads;

  icap_interface dut (.*);
  icap_model #(.RD_LAT(2)) u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i),
    .o(icap_o), .busy(icap_busy), .read_value, .writes, .reads);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bs_word_t  cq[$];
  icap_cmd_t aq[$];
  icap_rb_t  bq[$];
  logic [31:0] exp_w[$];
  bit starve = 0;
  int read_cnt = 0;

  always @(posedge clk) if (rst_n) begin
    if (c_rd_en) begin check(!c_empty, "pop of empty FIFO C"); void'(cq.pop_front()); end
    if (a_rd_en) begin check(!a_empty, "pop of empty FIFO A"); void'(aq.pop_front()); end
    if (b_wr_en) bq.push_back(b_wr_data);
    if (!icap_ce_n && !icap_write_n) begin
      check(exp_w.size() != 0 && icap_i == exp_w[0], $sformatf("ICAP write %h expected %h", icap_i, exp_w.size() ? exp_w[0] : 0));
      if (exp_w.size() != 0) void'(exp_w.pop_front());
    end
    if (!icap_ce_n && icap_write_n) read_cnt++;
  end
  always @(negedge clk) begin
    c_empty   = cq.size() == 0 || (starve && ($urandom % 3 == 0));
    c_rd_data = cq.size() ? cq[0] : '0;
    a_empty   = aq.size() == 0;
    a_rd_data = aq.size() ? aq[0] : '0;
  end

  logic [31:0] rb_writes[13] = '{32'hFFFFFFFF, 32'h000000BB, 32'h11220044, 32'hFFFFFFFF, 32'hAA995566,
    32'h20000000, 32'h2800E001, 32'h20000000, 32'h20000000, 32'h30008001, 32'h0000000D, 32'h20000000, 32'h20000000};

  int unsigned nwords;
  task automatic make_bitstream(int n);
    nwords = 0;
    for (int k = 0; k < n; k++) begin
      bs_word_t w;
      w.data = {$urandom, $urandom};
      w.run  = (k % 17 == 5) ? 7'd127 : 7'($urandom % 7);
      w.last = (k == n - 1);
      cq.push_back(w);
      for (int r = 0; r <= int'(w.run); r++) begin
        exp_w.push_back(w.data[63:32]);
        exp_w.push_back(w.data[31:0]);
        nwords += 2;
      end
    end
    foreach (rb_writes[k]) exp_w.push_back(rb_writes[k]);
  endtask

  task automatic wait_done();
    logic t0 = dpr_done_tgl;
    int guard = 0;
    while (dpr_done_tgl == t0 && guard < 100000) begin @(posedge clk); guard++; end
    check(guard < 100000, "load finished");
    repeat (2) @(posedge clk);
  endtask

  initial begin
    make_bitstream(60);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_done();
    check(exp_w.size() == 0, $sformatf("all writes seen (%0d left)", exp_w.size()));
    check(read_cnt == 1, "one STAT read");
    check(dpr_words == nwords, $sformatf("word count %0d vs %0d", dpr_words, nwords));
    check(dpr_cycles == nwords + 1, $sformatf("timer %0d for %0d words", dpr_cycles, nwords));
    check(dpr_ok && dpr_stat == 32'h0000_4000, "success flagged");

    // 2: starved FIFO, CRC error
    starve = 1; read_value = 32'h0000_4001; read_cnt = 0;
    make_bitstream(40);
    wait_done();
    check(exp_w.size() == 0, "all writes seen, starved");
    check(read_cnt == 1, "one STAT read, starved");
    check(dpr_cycles > nwords + 1, $sformatf("timer %0d counts stalls (%0d words)", dpr_cycles, nwords));
    check(!dpr_ok && dpr_stat == 32'h0000_4001, "CRC error flagged");
    starve = 0;

    // 3: direct access session
    read_value = 32'hC0DE_0042; read_cnt = 0;
    foreach (rb_writes[k]) if (k < 9) exp_w.push_back(rb_writes[k]);
    aq.push_back('{0, 0, 0, 0, 32'hFFFFFFFF}); aq.push_back('{0, 0, 0, 0, 32'h000000BB});
    aq.push_back('{0, 0, 0, 0, 32'h11220044}); aq.push_back('{0, 0, 0, 0, 32'hFFFFFFFF});
    aq.push_back('{0, 0, 0, 0, 32'hAA995566}); aq.push_back('{0, 0, 0, 0, 32'h20000000});
    aq.push_back('{0, 0, 0, 0, 32'h2800E001}); aq.push_back('{0, 0, 0, 0, 32'h20000000});
    aq.push_back('{0, 0, 0, 0, 32'h20000000}); aq.push_back('{0, 0, 1, 1, 32'h0});
    aq.push_back('{0, 0, 1, 0, 32'h0});         aq.push_back('{0, 0, 0, 1, 32'h0});
    aq.push_back('{0, 0, 0, 0, 32'h30008001}); aq.push_back('{0, 0, 0, 0, 32'h0000000D});
    aq.push_back('{0, 0, 0, 0, 32'h20000000}); aq.push_back('{0, 1, 0, 0, 32'h20000000});
    for (int k = 9; k < 13; k++) exp_w.push_back(rb_writes[k]);
    repeat (60) @(posedge clk);
    check(aq.size() == 0, "all commands executed");
    check(exp_w.size() == 0, "direct writes seen");
    check(read_cnt == 1, "one direct read");
    check(bq.size() == 2, $sformatf("two FIFO B entries (%0d)", bq.size()));
    if (bq.size() == 2) begin
      check(!bq[0].endm && bq[0].data == 32'hC0DE_0042, "readback value");
      check(bq[1].endm, "end marker");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
