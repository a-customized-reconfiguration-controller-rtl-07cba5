// tb_packet_type_classifier: routing and DPR-mode dropping.
//
// Sends packets of the three kinds with random lengths and random output
// back-pressure, in normal mode, in DPR mode and with bitstream packets
// blocked. A scoreboard predicts, from the type byte and the mode at the first
// word, which output each packet must appear on (or that it is dropped) and
// checks every word and last flag there, and the drop counters at the end.
module tb_packet_type_classifier;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] s_data = '0;
  logic bs_valid, bs_ready = 0, bs_last, da_valid, da_ready = 0, da_last, prm_valid, prm_ready = 0, prm_last;
  logic [63:0] bs_data, da_data, prm_data;
  logic dpr_mode = 0, bs_block = 0;
  logic [15:0] drop_prm_cnt, drop_bs_cnt;

  packet_type_classifier dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [64:0] exp_bs[$], exp_da[$], exp_prm[$];
  int n_drop_prm = 0, n_drop_bs = 0;

  task automatic send(logic [7:0] t, int len);
    int dest;  // 0 bs 1 da 2 prm 3 drop
    if (t == PT_BITSTREAM)        dest = bs_block ? 3 : 0;
    else if (t == PT_ICAP_DIRECT) dest = 1;
    else                          dest = dpr_mode ? 3 : 2;
    if (dest == 3) begin
      if (t == PT_BITSTREAM) n_drop_bs++; else n_drop_prm++;
    end
    for (int k = 0; k < len; k++) begin
      logic [63:0] w = {(k == 0) ? t : 8'($urandom), 24'($urandom), $urandom};
      @(negedge clk);
      s_valid = 1; s_data = w; s_last = (k == len - 1);
      case (dest)
        0: exp_bs.push_back({s_last, w});
        1: exp_da.push_back({s_last, w});
        2: exp_prm.push_back({s_last, w});
        default: ;
      endcase
      do @(posedge clk); while (!s_ready);
    end
    @(negedge clk) s_valid = 0;
  endtask

  always @(negedge clk) begin
    bs_ready  = $urandom % 3 != 0;
    da_ready  = $urandom % 3 != 0;
    prm_ready = $urandom % 3 != 0;
  end

  always @(posedge clk) begin
    if (bs_valid && bs_ready) begin
      check(exp_bs.size() != 0 && {bs_last, bs_data} == exp_bs[0], "bitstream word");
      void'(exp_bs.pop_front());
    end
    if (da_valid && da_ready) begin
      check(exp_da.size() != 0 && {da_last, da_data} == exp_da[0], "direct word");
      void'(exp_da.pop_front());
    end
    if (prm_valid && prm_ready) begin
      check(exp_prm.size() != 0 && {prm_last, prm_data} == exp_prm[0], "prm word");
      void'(exp_prm.pop_front());
    end
    check(int'(bs_valid) + int'(da_valid) + int'(prm_valid) <= 1, "one output at a time");
  end

  logic [7:0] types[4] = '{PT_BITSTREAM, PT_ICAP_DIRECT, 8'h10, 8'h45};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      @(negedge clk);
      dpr_mode = phase >= 1;
      bs_block = phase == 2;
      for (int p = 0; p < 40; p++) send(types[$urandom % 4], 1 + $urandom % 6);
    end
    repeat (5) @(posedge clk);
    check(exp_bs.size() == 0 && exp_da.size() == 0 && exp_prm.size() == 0, "all expected words delivered");
    check(drop_prm_cnt == 16'(n_drop_prm), $sformatf("prm drops %0d vs %0d", drop_prm_cnt, n_drop_prm));
    check(drop_bs_cnt == 16'(n_drop_bs), $sformatf("bs drops %0d vs %0d", drop_bs_cnt, n_drop_bs));
    check(n_drop_prm > 0 && n_drop_bs > 0, "both drop cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
