// rc_pkg: types and constants shared by the reconfiguration controller.
//
// The controller moves 64-bit packet words (the platform's packet bus width)
// and 32-bit ICAP words. A stored bitstream word is 72 bits, the data field of
// a 64-bit run value plus the 8-bit "parity" field of the memory: seven bits of
// run count and one last-word flag. Direct-ICAP commands and readback words are
// 36 bits, the width of the 512x36 FIFOs used for them.
//
// The packet type codes, the command bit positions and the STAT bit positions
// below are choices of this design where the specification is silent; the
// command bit positions ({L,RW,CE} in bits 26:24 of a command word) follow the
// sample STAT readback packet.
package rc_pkg;

  localparam int unsigned PKT_W  = 64;  // packet bus width
  localparam int unsigned ICAP_W = 32;  // ICAP data width
  localparam int unsigned RUN_W  = 7;   // run count field

  // Packet type, byte 7 of the first payload word.
  localparam logic [7:0] PT_BITSTREAM   = 8'h01;
  localparam logic [7:0] PT_ICAP_DIRECT = 8'h02;
  localparam logic [7:0] PT_ACK         = 8'h81;
  localparam logic [7:0] PT_ICAP_REPLY  = 8'h82;
  localparam logic [7:0] PT_DPR_STATUS  = 8'h83;

  // STAT register bits used to judge a reconfiguration (Virtex-5 layout).
  localparam int unsigned STAT_CRC_ERROR = 0;
  localparam int unsigned STAT_ID_ERROR  = 15;

  // Bitstream word as stored in SRAM and FIFO C.
  typedef struct packed {
    logic             last;  // last word of the partial bitstream
    logic [RUN_W-1:0] run;   // extra repetitions: written run+1 times
    logic [PKT_W-1:0] data;  // run value, upper half goes to the ICAP first
  } bs_word_t;               // 72 bits

  // Direct ICAP command, FIFO A entry.
  typedef struct packed {
    logic              spare;
    logic              l;     // last command of the session
    logic              rw;    // 1 = read
    logic              ce_n;  // chip enable, active low
    logic [ICAP_W-1:0] data;
  } icap_cmd_t;               // 36 bits

  // Readback word, FIFO B entry.
  typedef struct packed {
    logic              endm;  // end-of-session marker, data unused
    logic [2:0]        rsvd;
    logic [ICAP_W-1:0] data;
  } icap_rb_t;                // 36 bits

  // Bitstream packet header word (word 0).
  typedef struct packed {
    logic [7:0]  ptype;
    logic [6:0]  rsvd0;
    logic        last_seg;   // last segment of the bitstream
    logic [7:0]  hdr_words;  // compression header words that follow
    logic [7:0]  n_words;    // bitstream content words that follow
    logic [15:0] seg_num;    // segment number
    logic [3:0]  rsvd1;
    logic [3:0]  seg_log2;   // log2 of the segment size in words
    logic [7:0]  rsvd2;
  } bs_hdr_t;

  // Command word of a direct ICAP packet to FIFO A entry.
  function automatic icap_cmd_t cmd_from_word(logic [PKT_W-1:0] w, logic force_last);
    icap_cmd_t c;
    c.spare = 1'b0;
    c.l     = w[26] | force_last;
    c.rw    = w[25];
    c.ce_n  = w[24];
    c.data  = w[63:32];
    return c;
  endfunction

endpackage
