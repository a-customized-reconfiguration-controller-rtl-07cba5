// tb_bitstream_loader: SRAM-to-FIFO C transfer with flow control.
//
// The testbench answers reads from an array (random read grants, fixed
// 3-cycle latency) and models FIFO C as a queue of 8 words (FIFO_AW 3) drained
// at random. Checks: words pushed in address order with the right values, the
// FIFO never overflows, nothing is pushed after the word flagged last, done
// pulses once, the word count, and a second load from a new start.
module tb_bitstream_loader;
  import rc_pkg::*;
  localparam int AW = 12, FIFO_AW = 3, DEPTH = 1 << FIFO_AW, LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, rd_valid, rd_ready = 0, rsp_valid = 0, fifo_wr_en;
  logic [31:0] words;
  logic [AW-1:0] rd_addr;
  bs_word_t rsp_data = '0, fifo_wr_data;
  logic [FIFO_AW:0] fifo_level = '0;

  bitstream_loader #(.AW(AW), .FIFO_AW(FIFO_AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bs_word_t mem [1 << AW];
  bs_word_t fifo[$];
  logic [AW:0] pipe_a [LAT];
  logic        pipe_v [LAT];
  int next_exp = 0, n_done = 0, max_level = 0;
  bit after_last = 0;

  // read responses LAT cycles after the grant
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr_en) begin
      check(!after_last, "no push after the last word");
      check(fifo_wr_data == mem[next_exp], $sformatf("word %0d", next_exp));
      if (fifo_wr_data.last) after_last = 1;
      next_exp++;
      fifo.push_back(fifo_wr_data);
      check(fifo.size() <= DEPTH, "FIFO C overflow");
      if (fifo.size() > max_level) max_level = fifo.size();
    end
    if (done) n_done++;
  end

  always @(negedge clk) begin
    rsp_valid = pipe_v[LAT-1];
    rsp_data  = mem[pipe_a[LAT-1][AW-1:0]];
    rd_ready  = $urandom % 4 != 0;
    if (fifo.size() != 0 && $urandom % 3 == 0) void'(fifo.pop_front());
    fifo_level = (FIFO_AW+1)'(fifo.size());
  end
  always @(posedge clk) begin
    for (int k = LAT - 1; k > 0; k--) begin pipe_v[k] <= pipe_v[k-1]; pipe_a[k] <= pipe_a[k-1]; end
    pipe_v[0] <= rst_n && rd_valid && rd_ready;
    pipe_a[0] <= {1'b0, rd_addr};
  end

  task automatic run(int n);
    foreach (mem[k]) mem[k] = '{last: (k == n - 1), run: 7'($urandom), data: {$urandom, $urandom}};
    next_exp = 0; after_last = 0; n_done = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy after start");
    while (busy) @(posedge clk);
    repeat (10) @(posedge clk);
    check(next_exp == n, $sformatf("%0d words pushed of %0d", next_exp, n));
    check(words == n, "word counter");
    check(n_done == 1, "one done pulse");
  endtask

  initial begin
    foreach (pipe_v[k]) begin pipe_v[k] = 0; pipe_a[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(300);
    run(57);
    check(max_level == DEPTH, $sformatf("FIFO filled to %0d", max_level));
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
