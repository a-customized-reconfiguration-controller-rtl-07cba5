// tb_bitstream_packet_handler: packet parsing, run attachment, SRAM layout.
//
// A random bitstream with long zero stretches is compressed and cut into
// 16-run segments by the client model in tb_rle_pkg (independent of the
// handler). The packets are sent with random gaps and SRAM back-pressure; one
// segment is sent twice (a retransmission) and one truncated copy is sent
// first (must be ignored without acknowledge). Checks: every stored word
// {last, run, data} at segment*16+index, one acknowledge per complete packet
// with the right segment number and last flag, and bs_ready pulsing once,
// after the acknowledge of the last segment.
module tb_bitstream_packet_handler;
  import rc_pkg::*;
  import tb_rle_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] s_data = '0;
  logic wr_valid, wr_ready = 0, ack_valid, ack_ready = 0, bs_ready;
  logic [AW-1:0] wr_addr;
  bs_word_t wr_data;
  logic [63:0] ack_data;

  bitstream_packet_handler #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bs_word_t stored [int];
  int acks[$];
  int n_bs_ready = 0, ack_last_seen = 0;

  always @(negedge clk) begin
    wr_ready  = $urandom % 4 != 0;
    ack_ready = $urandom % 2;
  end
  always @(posedge clk) if (rst_n) begin
    if (wr_valid && wr_ready) stored[int'(wr_addr)] = wr_data;
    if (ack_valid && ack_ready) begin
      check(ack_data[63:56] == PT_ACK, "ack type");
      acks.push_back({ack_data[48], ack_data[31:16]});
      if (ack_data[48]) ack_last_seen = 1;
    end
    if (bs_ready) begin
      n_bs_ready++;
      check(ack_last_seen == 1, "bs_ready after the last acknowledge");
    end
  end

  task automatic send_pkt(w64_q words, int first, int len, int cut);
    for (int k = 0; k < len - cut; k++) begin
      @(negedge clk);
      s_valid = $urandom % 5 != 0;
      while (!s_valid) begin @(negedge clk); s_valid = 1; end
      s_data = words[first+k];
      s_last = (k == len - cut - 1);
      do @(posedge clk); while (!s_ready);
      @(negedge clk) s_valid = 0;
    end
  endtask

  initial begin
    w64_q bs, vals, words;
    int_q reps, plen, pseg;
    int first, nseg;
    for (int k = 0; k < 3000; k++) begin
      if ($urandom % 4 == 0) begin
        int n = 1 + $urandom % 60;
        repeat (n) bs.push_back(64'd0);
        k += n - 1;
      end else bs.push_back({$urandom, $urandom % 4 == 0 ? 32'd0 : $urandom});
    end
    compress(bs, vals, reps);
    packetize(vals, reps, 4, words, plen, pseg);
    nseg = plen.size();
    $display("%0d words -> %0d runs in %0d segments", bs.size(), vals.size(), nseg);
    repeat (2) @(negedge clk);
    rst_n = 1;
    first = 0;
    for (int p = 0; p < nseg; p++) begin
      if (p == 2) send_pkt(words, first, plen[p], 3);  // truncated copy
      send_pkt(words, first, plen[p], 0);
      if (p == 1) send_pkt(words, first, plen[p], 0);  // retransmission
      first += plen[p];
    end
    repeat (20) @(posedge clk);
    check(acks.size() == nseg + 1, $sformatf("%0d acknowledges for %0d packets", acks.size(), nseg + 1));
    for (int p = 0, a = 0; p < nseg && a < acks.size(); p++, a++) begin
      check(acks[a] == {p == nseg - 1, 16'(p)}, $sformatf("ack %0d", a));
      if (p == 1) a++;
    end
    check(n_bs_ready == 1, "one bs_ready pulse");
    check(stored.size() == vals.size(), $sformatf("%0d words stored of %0d", stored.size(), vals.size()));
    foreach (vals[j]) begin
      int addr;
      bs_word_t e;
      addr = (j / 16) * 16 + (j % 16);
      e.last = (j == vals.size() - 1);
      e.run  = 7'(reps[j]);
      e.data = vals[j];
      check(stored.exists(addr) && stored[addr] == e, $sformatf("stored word %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
