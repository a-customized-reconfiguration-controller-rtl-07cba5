// packet_type_classifier: steers incoming packets to their consumer.
//
// The packets arriving from the communication layer (UDP payload, 64-bit words,
// last marks the final word) are of three kinds: bitstream segments for the
// Bitstream Packet Handler, direct ICAP command packets, and ordinary traffic for
// the Partial Reconfigurable Module (PRM). The kind is read from byte 7 of the
// first word; the choice is latched for the rest of the packet.
//
// DPR mode, set by the DPR Flow Controller while the PRM is reconfigured, makes
// the classifier drop PRM traffic whole, because the PRM is in reset. bs_block
// drops bitstream packets while a stored bitstream is being read out, so the
// stored copy is not overwritten. Dropped packets are counted. Switching to DPR
// mode is from the specification; the type field, dropping and counters are
// this design's choices.
//
// Timing: combinational pass-through; s_ready follows the selected output's
// ready, or is high for a packet being dropped.
module packet_type_classifier
  import rc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic        s_valid,
  output logic        s_ready,
  input  logic [63:0] s_data,
  input  logic        s_last,

  output logic        bs_valid,
  input  logic        bs_ready,
  output logic [63:0] bs_data,
  output logic        bs_last,

  output logic        da_valid,
  input  logic        da_ready,
  output logic [63:0] da_data,
  output logic        da_last,

  output logic        prm_valid,
  input  logic        prm_ready,
  output logic [63:0] prm_data,
  output logic        prm_last,

  input  logic        dpr_mode,
  input  logic        bs_block,
  output logic [15:0] drop_prm_cnt,
  output logic [15:0] drop_bs_cnt
);

  typedef enum logic [1:0] {D_BS, D_DA, D_PRM, D_DROP} dest_e;

  logic  in_pkt;     // a packet is under way, dest_q holds its route
  dest_e dest_q, dest_new, dest;

  always_comb begin
    unique case (s_data[63:56])
      PT_BITSTREAM:   dest_new = bs_block ? D_DROP : D_BS;
      PT_ICAP_DIRECT: dest_new = D_DA;
      default:        dest_new = dpr_mode ? D_DROP : D_PRM;
    endcase
  end

  assign dest = in_pkt ? dest_q : dest_new;

  assign bs_data  = s_data;
  assign da_data  = s_data;
  assign prm_data = s_data;
  assign bs_last  = s_last;
  assign da_last  = s_last;
  assign prm_last = s_last;

  assign bs_valid  = s_valid && dest == D_BS;
  assign da_valid  = s_valid && dest == D_DA;
  assign prm_valid = s_valid && dest == D_PRM;

  always_comb begin
    unique case (dest)
      D_BS:    s_ready = bs_ready;
      D_DA:    s_ready = da_ready;
      D_PRM:   s_ready = prm_ready;
      default: s_ready = 1'b1;
    endcase
  end

  logic beat;
  assign beat = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt       <= 1'b0;
      dest_q       <= D_DROP;
      drop_prm_cnt <= '0;
      drop_bs_cnt  <= '0;
    end else if (beat) begin
      if (!in_pkt) begin
        dest_q <= dest_new;
        if (dest_new == D_DROP) begin
          if (s_data[63:56] == PT_BITSTREAM) drop_bs_cnt  <= drop_bs_cnt + 16'd1;
          else                               drop_prm_cnt <= drop_prm_cnt + 16'd1;
        end
      end
      in_pkt <= !s_last;
    end
  end

endmodule
