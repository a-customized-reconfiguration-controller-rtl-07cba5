// direct_access_handler: remote direct access to the ICAP, platform side.
//
// A direct-ICAP packet lets the remote user drive the ICAP word by word, for
// instance to read back a device register. Word 0 of the packet carries the
// packet type and is dropped. Every following word is one ICAP cycle: the ICAP
// data word in bits [63:32] and the control bits {L,RW,CE} in bits [26:24],
// where CE is the active-low chip enable, RW=1 requests a read and L marks the
// last command of the session. Each command becomes a 36-bit icap_cmd_t in
// FIFO A. The final word of a packet is always marked L so that a truncated
// command list cannot leave the ICAP Interface waiting.
//
// The other direction drains FIFO B: each readback word becomes a reply word
// {PT_ICAP_REPLY, data in [31:0]}; the end-of-session marker becomes a reply
// word with bit 32 set and ends the reply packet (r_last).
//
// The control bit meaning and positions follow the sample register-readback
// packet of the specification; the header word, forced L and reply format are
// this design's.
//
// Timing: one command per cycle into FIFO A while it is not full; the reply side
// is a combinational view of the FIFO B head.
module direct_access_handler
  import rc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic        s_valid,
  output logic        s_ready,
  input  logic [63:0] s_data,
  input  logic        s_last,

  output logic        r_valid,
  input  logic        r_ready,
  output logic [63:0] r_data,
  output logic        r_last,

  output logic        a_wr_en,
  output icap_cmd_t   a_wr_data,
  input  logic        a_full,

  output logic        b_rd_en,
  input  icap_rb_t    b_rd_data,
  input  logic        b_empty
);

  logic in_body;  // header word seen, commands follow

  assign s_ready   = !in_body || !a_full;
  assign a_wr_en   = s_valid && in_body && !a_full;
  assign a_wr_data = cmd_from_word(s_data, s_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   in_body <= 1'b0;
    else if (s_valid && s_ready)  in_body <= !s_last;
  end

  assign r_valid = !b_empty;
  assign r_data  = {PT_ICAP_REPLY, 23'd0, b_rd_data.endm, b_rd_data.endm ? 32'd0 : b_rd_data.data};
  assign r_last  = b_rd_data.endm;
  assign b_rd_en = r_valid && r_ready;

endmodule
