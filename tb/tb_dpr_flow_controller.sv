// tb_dpr_flow_controller: reconfiguration sequencing.
//
// Runs a successful reconfiguration, a failed one and a retry, acting as
// loader, ICAP Interface and PRM. Checks per phase: dpr_mode, prm_reset,
// bs_block and prm_init levels, a single loader_start pulse, the two-word
// status report (type, ok flag, cycle count, STAT, word count), the wait for
// prm_init_done, that the failed state keeps the PRM in reset with bitstream
// packets accepted, and the return to normal mode.
module tb_dpr_flow_controller;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bs_ready = 0, loader_start, loader_done = 0, icap_done = 0, icap_ok = 0;
  logic [31:0] icap_stat = '0, icap_cycles = '0, icap_words = '0;
  logic dpr_mode, bs_block, prm_reset, prm_init, prm_init_done = 0;
  logic st_valid, st_ready = 0, st_last;
  logic [63:0] st_data;

  dpr_flow_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int starts = 0;
  logic [64:0] rep[$];
  always @(posedge clk) if (rst_n) begin
    if (loader_start) starts++;
    if (st_valid && st_ready) rep.push_back({st_last, st_data});
  end
  always @(negedge clk) st_ready = $urandom % 2;

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic reconfig(bit ok, int init_wait);
    int s0 = starts;
    rep = {};
    pulse(bs_ready);
    repeat (2) @(posedge clk);
    check(starts == s0 + 1, "one loader start");
    check(dpr_mode && prm_reset && bs_block && !prm_init, "loading: DPR mode, PRM in reset, bitstream blocked");
    repeat (5) @(negedge clk);
    pulse(loader_done);
    repeat (3) @(negedge clk);
    check(dpr_mode && prm_reset, "still loading until the ICAP reports");
    icap_ok = ok; icap_stat = ok ? 32'h0000_4000 : 32'h0000_4001;
    icap_cycles = 32'd1234 + 32'(ok); icap_words = 32'd1233;
    pulse(icap_done);
    if (ok) begin
      @(posedge clk);
      check(prm_init && !prm_reset && dpr_mode, "init phase");
      repeat (init_wait) @(posedge clk);
      check(prm_init && rep.size() == 0, "waits for prm_init_done before reporting");
      @(negedge clk) prm_init_done = 1;
      @(negedge clk) prm_init_done = 0;
    end
    repeat (10) @(posedge clk);
    check(rep.size() == 2, "two-word report");
    if (rep.size() == 2) begin
      check(rep[0] == {1'b0, PT_DPR_STATUS, 7'd0, ok, 16'd0, icap_cycles}, $sformatf("report word 0 %h", rep[0]));
      check(rep[1] == {1'b1, icap_stat, icap_words}, "report word 1");
    end
    if (ok) check(!dpr_mode && !prm_reset && !prm_init && !bs_block, "back to normal");
    else    check(dpr_mode && prm_reset && !bs_block && !prm_init, "failed: PRM held, bitstreams accepted");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!dpr_mode && !prm_reset && !prm_init && !st_valid, "normal after reset");
    reconfig(1, 7);
    reconfig(0, 0);
    repeat (20) @(posedge clk);
    check(dpr_mode && prm_reset && starts == 2, "failed state holds until a retry");
    reconfig(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
