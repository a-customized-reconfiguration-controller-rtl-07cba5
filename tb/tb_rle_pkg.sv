// tb_rle_pkg: remote client model for the testbenches.
//
// Compresses a bitstream given as 64-bit words into runs (value, extra
// repetitions 0..127), cuts the run list into segments of 2**seg_log2 runs and
// builds one packet per segment: header word, compression header words (four
// {location, length} pairs each, rising location, zero padding), content words.
// Packets go into one flat word queue; pkt_len holds each packet's length.
package tb_rle_pkg;

  typedef logic [63:0] w64_q[$];
  typedef int unsigned int_q[$];

  // runs: value queue and extra-repetition queue
  function automatic void compress(input w64_q bs, output w64_q vals, output int_q reps);
    vals = {};
    reps = {};
    foreach (bs[k]) begin
      if (vals.size() != 0 && vals[$] == bs[k] && reps[$] < 127) reps[$] = reps[$] + 1;
      else begin
        vals.push_back(bs[k]);
        reps.push_back(0);
      end
    end
  endfunction

  function automatic void packetize(input w64_q vals, input int_q reps, input int unsigned seg_log2,
                                    output w64_q words, output int_q pkt_len, output int_q pkt_seg);
    int unsigned seg_size = 1 << seg_log2;
    int unsigned nseg = (vals.size() + seg_size - 1) / seg_size;
    words = {};
    pkt_len = {};
    pkt_seg = {};
    for (int unsigned s = 0; s < nseg; s++) begin
      int unsigned first = s * seg_size;
      int unsigned n = (vals.size() - first < seg_size) ? vals.size() - first : seg_size;
      logic [15:0] pairs[$];
      int unsigned h, start;
      for (int unsigned j = 0; j < n; j++)
        if (reps[first+j] != 0) pairs.push_back({8'(j), 8'(reps[first+j])});
      h = (pairs.size() + 3) / 4;
      start = words.size();
      words.push_back({8'h01, 7'd0, (s == nseg - 1) ? 1'b1 : 1'b0, 8'(h), 8'(n), 16'(s), 4'd0, 4'(seg_log2), 8'd0});
      for (int unsigned q = 0; q < h; q++) begin
        logic [63:0] w = '0;
        for (int unsigned p = 0; p < 4; p++)
          if (4*q + p < pairs.size()) w[63-16*p -: 16] = pairs[4*q+p];
        words.push_back(w);
      end
      for (int unsigned j = 0; j < n; j++) words.push_back(vals[first+j]);
      pkt_len.push_back(words.size() - start);
      pkt_seg.push_back(s);
    end
  endfunction

endpackage
