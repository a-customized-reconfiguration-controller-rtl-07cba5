// tb_sram_interface: arbitration and read latency of the SRAM port.
//
// A writer and a reader request at random against sram_model (RD_LAT 2,
// AW 10 to keep the memory small). Writes go to a reference array; every read
// response is compared with the reference value at the read's address and must
// arrive exactly RD_LAT+1 cycles after the read was accepted. With both
// requesting, successive contested grants must alternate.
module tb_sram_interface;
  import rc_pkg::*;
  localparam int AW = 10, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid = 0, wr_ready, rd_valid = 0, rd_ready, rsp_valid;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, sram_addr;
  bs_word_t wr_data = '0, rsp_data, sram_wdata, sram_rdata;
  logic sram_cs, sram_we;

  sram_interface #(.AW(AW), .RD_LAT(RD_LAT)) dut (.*);
  sram_model #(.AW(AW), .DW(72), .RD_LAT(RD_LAT)) u_mem (.clk, .cs(sram_cs), .we(sram_we),
    .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bs_word_t ref_mem [1 << AW];
  bit       written [1 << AW];
  typedef struct { bs_word_t val; bit known; longint due; } exp_t;
  exp_t exp_q[$];
  longint cyc = 0;
  int n_rsp = 0, alt_ok = 0, both = 0;
  logic last_grant_wr;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (wr_valid && rd_valid) begin
      both++;
      if (both > 1 && (wr_ready != last_grant_wr)) alt_ok++;
      last_grant_wr = wr_ready;
    end
    if (rd_valid && rd_ready)
      exp_q.push_back('{ref_mem[rd_addr], written[rd_addr], cyc + RD_LAT + 1});
    if (wr_valid && wr_ready) begin
      ref_mem[wr_addr] = wr_data;
      written[wr_addr] = 1;
    end
    check(!(wr_ready && rd_ready), "one grant per cycle");
    if (rsp_valid) begin
      n_rsp++;
      check(exp_q.size() != 0 && exp_q[0].due == cyc, $sformatf("response latency at %0d", cyc));
      if (exp_q.size() != 0) begin
        if (exp_q[0].known) check(rsp_data == exp_q[0].val, $sformatf("read data %h vs %h", rsp_data, exp_q[0].val));
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    foreach (written[k]) written[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (!wr_valid || wr_ready) begin
        wr_valid = (k < 1500) ? ($urandom % 2) : 1;
        wr_addr  = AW'($urandom % 64);
        wr_data  = {8'($urandom), $urandom, $urandom};
      end
      if (!rd_valid || rd_ready) begin
        rd_valid = (k < 1500) ? ($urandom % 2) : 1;
        rd_addr  = AW'($urandom % 64);
      end
    end
    @(negedge clk) begin wr_valid = 0; rd_valid = 0; end
    repeat (6) @(posedge clk);
    check(exp_q.size() == 0, "all reads answered");
    check(n_rsp > 500, $sformatf("%0d responses", n_rsp));
    check(both > 100 && alt_ok >= both - 2, $sformatf("round robin %0d of %0d", alt_ok, both));
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
