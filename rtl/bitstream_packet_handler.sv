// bitstream_packet_handler: stores compressed bitstream segments in SRAM.
//
// A partial bitstream reaches the controller as a series of segments, each one
// packet. A packet holds a header word (bs_hdr_t: segment number, segment size,
// number of compression header words H, number of content words N, last-segment
// flag), then H compression header words, then N content words. Each
// compression header word carries four {location, length} byte pairs, pair k in
// bits [63-16k -: 16]: content word `location` of the segment is to be written
// `length`+1 times; words not listed are written once. Pairs come in rising
// location order; a pair of length 0 is padding.
//
// The handler keeps the compression header words in a small buffer and walks
// the pairs while the content streams past, so each content word leaves with its
// run count attached: a 72-bit bs_word_t written to SRAM at
// (segment number << log2 segment size) + index. The last content word of the
// last segment carries the last flag. When every content word of a packet has
// been accepted by the SRAM side, the handler sends a one-word acknowledge
// (PT_ACK, last-segment flag at bit 48, segment number in [31:16]); after the
// last segment it also pulses bs_ready. A packet that ends early is discarded
// without acknowledge; words beyond N are ignored.
//
// The header layout and pair order are this design's reading of the packet
// format; the run count in seven bits, the 64-bit run value, the pair semantics
// and acknowledging each segment follow the specification.
//
// Timing: one content word per cycle when the SRAM side keeps up; one output
// register sits between the packet stream and the SRAM request.
module bitstream_packet_handler
  import rc_pkg::*;
#(
  parameter int unsigned AW            = 20,
  parameter int unsigned MAX_HDR_WORDS = 32
) (
  input  logic          clk,
  input  logic          rst_n,

  input  logic          s_valid,
  output logic          s_ready,
  input  logic [63:0]   s_data,
  input  logic          s_last,

  output logic          wr_valid,
  input  logic          wr_ready,
  output logic [AW-1:0] wr_addr,
  output bs_word_t      wr_data,

  output logic          ack_valid,
  input  logic          ack_ready,
  output logic [63:0]   ack_data,

  output logic          bs_ready
);

  localparam int unsigned HW = $clog2(MAX_HDR_WORDS);

  typedef enum logic [2:0] {S_HDR, S_CHDR, S_DATA, S_DRAIN, S_FLUSH, S_ACK} state_e;

  state_e        state;
  bs_hdr_t       hdr;
  logic [63:0]   chdr [MAX_HDR_WORDS];
  logic [HW-1:0] chdr_wr;       // compression header words stored
  logic [HW+2:0] pair_idx;      // next pair to match
  logic [7:0]    word_idx;      // content word index
  logic [AW-1:0] base;

  // Current pair.
  logic [63:0] pw;
  logic [15:0] pair;
  logic        pair_avail;
  assign pw         = chdr[pair_idx[HW+1:2]];
  assign pair       = pw[63 - 16*pair_idx[1:0] -: 16];
  assign pair_avail = 10'(pair_idx) < {hdr.hdr_words, 2'b00};

  logic hit;
  assign hit = pair_avail && pair[15:8] == word_idx;

  logic       out_free;
  assign out_free = !wr_valid || wr_ready;

  always_comb begin
    unique case (state)
      S_HDR, S_CHDR, S_DRAIN: s_ready = 1'b1;
      S_DATA:                 s_ready = out_free;
      default:                s_ready = 1'b0;
    endcase
  end

  logic beat;
  assign beat = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (state == S_CHDR && beat) chdr[chdr_wr] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      hdr       <= '0;
      chdr_wr   <= '0;
      pair_idx  <= '0;
      word_idx  <= '0;
      base      <= '0;
      wr_valid  <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      ack_valid <= 1'b0;
      ack_data  <= '0;
      bs_ready  <= 1'b0;
    end else begin
      bs_ready <= 1'b0;
      if (wr_valid && wr_ready) wr_valid <= 1'b0;

      unique case (state)
        S_HDR: if (beat) begin
          hdr      <= bs_hdr_t'(s_data);
          base     <= AW'(s_data[31:16]) << s_data[11:8];
          chdr_wr  <= '0;
          pair_idx <= '0;
          word_idx <= '0;
          if (s_last)                                       state <= S_HDR;
          else if (s_data[39:32] == 8'd0)                   state <= S_DRAIN;
          else if (s_data[47:40] > 8'(MAX_HDR_WORDS))       state <= S_DRAIN;
          else if (s_data[47:40] != 8'd0)                   state <= S_CHDR;
          else                                              state <= S_DATA;
        end

        S_CHDR: if (beat) begin
          chdr_wr <= chdr_wr + HW'(1);
          if (s_last)                                       state <= S_HDR;
          else if (8'(chdr_wr) + 8'd1 == hdr.hdr_words)     state <= S_DATA;
        end

        S_DATA: if (beat) begin
          wr_valid      <= 1'b1;
          wr_addr       <= base + AW'(word_idx);
          wr_data.data  <= s_data;
          wr_data.run   <= hit ? pair[RUN_W-1:0] : '0;
          wr_data.last  <= hdr.last_seg && (word_idx + 8'd1 == hdr.n_words);
          if (hit) pair_idx <= pair_idx + 1'b1;
          word_idx <= word_idx + 8'd1;
          if (word_idx + 8'd1 == hdr.n_words)               state <= s_last ? S_FLUSH : S_DRAIN;
          else if (s_last)                                  state <= S_HDR;   // short packet
        end

        S_DRAIN: if (beat && s_last) begin
          // Reached from S_DATA with all content written: acknowledge.
          state <= (word_idx == hdr.n_words && word_idx != 8'd0) ? S_FLUSH : S_HDR;
        end

        S_FLUSH: if (!wr_valid || wr_ready) begin
          ack_valid <= 1'b1;
          ack_data  <= {PT_ACK, 7'd0, hdr.last_seg, 16'd0, hdr.seg_num, 16'd0};
          state     <= S_ACK;
        end

        S_ACK: if (ack_ready) begin
          ack_valid <= 1'b0;
          bs_ready  <= hdr.last_seg;
          state     <= S_HDR;
        end

        default: state <= S_HDR;
      endcase
    end
  end

  // Requests are held unchanged until accepted.
  a_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data));
  a_ack_hold: assert property (@(posedge clk) disable iff (!rst_n)
    ack_valid && !ack_ready |=> ack_valid && $stable(ack_data));

endmodule
