// bitstream_loader: moves the stored bitstream from SRAM into FIFO C.
//
// On a start pulse the loader reads SRAM words from address 0 upward and pushes
// every returned 72-bit word into FIFO C, the dual-clock FIFO towards the ICAP
// Interface. It stops issuing reads once a word with the last flag has come
// back; reads already in flight past that word are discarded. Reading starts at
// address 0 and flow control is done by keeping the FIFO fill, as seen from the
// write side, plus the reads in flight below the FIFO depth, so no returned word
// can find the FIFO full. These mechanisms are this design's; the specification
// states that the loader retrieves the bitstream from SRAM and hands it to the
// ICAP Interface.
//
// Interface: start (pulse), busy, done (pulse one cycle after the last word was
// pushed), words (number of words pushed in this load).
// Timing: one read per cycle while the FIFO has room; with an SRAM shared with
// no writer during a load, one word per cycle reaches FIFO C.
module bitstream_loader
  import rc_pkg::*;
#(
  parameter int unsigned AW      = 20,
  parameter int unsigned FIFO_AW = 9
) (
  input  logic           clk,
  input  logic           rst_n,

  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [31:0]    words,

  output logic           rd_valid,
  input  logic           rd_ready,
  output logic [AW-1:0]  rd_addr,

  input  logic           rsp_valid,
  input  bs_word_t       rsp_data,

  output logic           fifo_wr_en,
  output bs_word_t       fifo_wr_data,
  input  logic [FIFO_AW:0] fifo_level
);

  localparam int unsigned DEPTH = 1 << FIFO_AW;

  logic             issuing;    // reads still to be issued
  logic             seen_last;
  logic [FIFO_AW:0] inflight;   // reads issued, data not yet returned
  logic             issue;

  assign rd_valid = busy && issuing &&
                    ((FIFO_AW+2)'(fifo_level) + (FIFO_AW+2)'(inflight) < (FIFO_AW+2)'(DEPTH));
  assign issue    = rd_valid && rd_ready;

  assign fifo_wr_en   = rsp_valid && busy && !seen_last;
  assign fifo_wr_data = rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      issuing   <= 1'b0;
      seen_last <= 1'b0;
      inflight  <= '0;
      rd_addr   <= '0;
      words     <= '0;
    end else begin
      done <= 1'b0;
      inflight <= inflight + (FIFO_AW+1)'(issue) - (FIFO_AW+1)'(rsp_valid && busy);
      if (issue) rd_addr <= rd_addr + AW'(1);
      if (fifo_wr_en) begin
        words <= words + 32'd1;
        if (rsp_data.last) begin
          seen_last <= 1'b1;
          issuing   <= 1'b0;
        end
      end
      if (busy && seen_last && inflight == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (start && !busy) begin
        busy      <= 1'b1;
        issuing   <= 1'b1;
        seen_last <= 1'b0;
        inflight  <= '0;
        rd_addr   <= '0;
        words     <= '0;
      end
    end
  end

  // The space check must keep FIFO C from ever being pushed while full.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_wr_en |-> fifo_level < (FIFO_AW+1)'(DEPTH));

endmodule
