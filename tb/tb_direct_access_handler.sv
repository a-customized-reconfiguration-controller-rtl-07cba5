// tb_direct_access_handler: command and reply formatting for direct access.
//
// Sends the 16-command STAT readback session (header word plus commands with
// {L,RW,CE} in bits 26:24 and data in bits 63:32) with FIFO A occasionally
// full, and checks each FIFO A entry against the expected {L,RW,CE,data}. A
// second packet without any L bit checks that its final command is forced to
// L. Then readback words and an end marker are offered on FIFO B and the reply
// words and r_last are checked.
module tb_direct_access_handler;
  import rc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] s_data = '0;
  logic r_valid, r_ready = 0, r_last;
  logic [63:0] r_data;
  logic a_wr_en, a_full = 0;
  icap_cmd_t a_wr_data;
  logic b_rd_en, b_empty = 1;
  icap_rb_t b_rd_data = '0;

  direct_access_handler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // {ctrl, data} of the session
  logic [34:0] seq[16] = '{
    {3'b000, 32'hFFFFFFFF}, {3'b000, 32'h000000BB}, {3'b000, 32'h11220044}, {3'b000, 32'hFFFFFFFF},
    {3'b000, 32'hAA995566}, {3'b000, 32'h20000000}, {3'b000, 32'h2800E001}, {3'b000, 32'h20000000},
    {3'b000, 32'h20000000}, {3'b011, 32'h00000000}, {3'b010, 32'h00000000}, {3'b001, 32'h00000000},
    {3'b000, 32'h30008001}, {3'b000, 32'h0000000D}, {3'b000, 32'h20000000}, {3'b100, 32'h20000000}};

  logic [34:0] exp_a[$];

  always @(negedge clk) a_full = ($urandom % 4) == 0;

  always @(posedge clk) if (a_wr_en) begin
    check(!a_full, "no push while full");
    check(exp_a.size() != 0 && {a_wr_data.l, a_wr_data.rw, a_wr_data.ce_n, a_wr_data.data} == exp_a[0],
          $sformatf("FIFO A entry %h", a_wr_data));
    check(a_wr_data.spare == 1'b0, "spare bit clear");
    void'(exp_a.pop_front());
  end

  task automatic send_word(logic [63:0] w, logic last);
    @(negedge clk);
    s_valid = 1; s_data = w; s_last = last;
    do @(posedge clk); while (!s_ready);
    @(negedge clk) s_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    send_word({PT_ICAP_DIRECT, 56'h0}, 0);
    foreach (seq[k]) begin
      exp_a.push_back(seq[k]);
      send_word({seq[k][31:0], 5'd0, seq[k][34:32], 24'h0}, k == 15);
    end
    // packet without L: last command must be forced to L
    send_word({PT_ICAP_DIRECT, 56'h0}, 0);
    exp_a.push_back({3'b000, 32'h20000000});
    send_word({32'h20000000, 32'h0}, 0);
    exp_a.push_back({3'b100, 32'h12345678});
    send_word({32'h12345678, 32'h0}, 1);
    repeat (4) @(posedge clk);
    check(exp_a.size() == 0, "all commands reached FIFO A");

    // replies
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      b_empty = 0;
      b_rd_data = '{endm: (k == 2), rsvd: 3'b000, data: 32'h0000_4000 + k};
      r_ready = 0;
      @(posedge clk);
      check(r_valid && !b_rd_en, "reply waits for ready");
      @(negedge clk) r_ready = 1;
      @(posedge clk);
      check(b_rd_en, "FIFO B popped on ready");
      if (k < 2) check(r_data == {PT_ICAP_REPLY, 24'd0, 32'h0000_4000 + k} && !r_last, $sformatf("reply word %h", r_data));
      else       check(r_data == {PT_ICAP_REPLY, 23'd0, 1'b1, 32'd0} && r_last, $sformatf("end word %h", r_data));
    end
    @(negedge clk) b_empty = 1;
    @(posedge clk) check(!r_valid, "no reply when FIFO B empty");
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
