// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writer at 7 ns, reader at 10 ns. Phase 1 fills the FIFO with the reader
// stopped and checks that full rises after exactly 512 words and that
// wr_level then reads 512. Phase 2 drains it while 3000 more random words are
// streamed with random push/pop enables; every popped word is compared with a
// reference queue (order and value). Inputs change on falling edges and are
// sampled on rising edges.
module tb_async_fifo;
  localparam int W = 72, AW = 9, DEPTH = 1 << AW, EXTRA = 3000;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [AW:0] wr_level;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q[$];
  int pushed = 0, popped = 0;
  bit filling = 1;

  always #3.5 wclk = ~wclk;
  always #5   rclk = ~rclk;

  async_fifo #(.WIDTH(W), .AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] rnd();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  // writer
  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(negedge wclk);
    while (filling || pushed < DEPTH + EXTRA) begin
      @(negedge wclk);
      if (filling && full) begin
        wr_en = 0;
        check(pushed == DEPTH, $sformatf("full after %0d words", pushed));
        check(wr_level == (AW+1)'(DEPTH), $sformatf("wr_level %0d when full", wr_level));
        filling = 0;
      end else begin
        wr_en   = filling ? 1'b1 : (($urandom % 3) != 0 && pushed < DEPTH + EXTRA);
        wr_data = rnd();
      end
      @(posedge wclk);
      if (wr_en && !full) begin ref_q.push_back(wr_data); pushed++; end
    end
    @(negedge wclk) wr_en = 0;
  end

  // reader
  initial begin
    wait (!filling);
    forever begin
      @(negedge rclk);
      rd_en = ($urandom % 4) != 0;
      @(posedge rclk);
      if (rd_en && !empty) begin
        check(ref_q.size() != 0 && rd_data == ref_q[0], $sformatf("word %0d", popped));
        if (ref_q.size() != 0) void'(ref_q.pop_front());
        popped++;
        if (popped == DEPTH + EXTRA) begin
          @(negedge rclk) rd_en = 0;
          repeat (3) @(posedge rclk);
          check(empty, "empty at end");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
