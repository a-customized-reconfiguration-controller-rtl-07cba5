// dpr_flow_controller: sequences one dynamic partial reconfiguration.
//
// Normal operation: the Partial Reconfigurable Module (PRM) runs and the
// platform forwards its traffic. When the Bitstream Packet Handler reports that
// the last segment of a bitstream is stored (bs_ready), the controller
//   1. raises dpr_mode (to the Platform Manager and the Packet Type Classifier),
//      holds the PRM in reset, blocks further bitstream packets and starts the
//      Bitstream Loader;
//   2. waits for the loader to finish and for the ICAP Interface to report the
//      STAT readback result (icap_done, a pulse already in this clock domain);
//   3. on success releases the PRM reset and raises prm_init until the PRM
//      answers prm_init_done, then reports success and returns to normal mode;
//   4. on failure reports it and stays with the PRM in reset and dpr_mode
//      raised, accepting bitstream packets again, until a new complete
//      bitstream arrives for a retry.
// The report is a two-word packet to the Terminal Client: word 0
// {PT_DPR_STATUS, ok at bit 48, ICAP cycles in [31:0]}, word 1 {STAT in
// [63:32], ICAP words written in [31:0]}.
//
// Steps 1 to 4 follow the specification; the init handshake, the report format
// and keeping the PRM in reset after a failure are this design's choices.
module dpr_flow_controller
  import rc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic        bs_ready,
  output logic        loader_start,
  input  logic        loader_done,

  input  logic        icap_done,
  input  logic        icap_ok,
  input  logic [31:0] icap_stat,
  input  logic [31:0] icap_cycles,
  input  logic [31:0] icap_words,

  output logic        dpr_mode,
  output logic        bs_block,
  output logic        prm_reset,
  output logic        prm_init,
  input  logic        prm_init_done,

  output logic        st_valid,
  input  logic        st_ready,
  output logic [63:0] st_data,
  output logic        st_last
);

  typedef enum logic [2:0] {S_NORMAL, S_LOAD, S_INIT, S_REPORT0, S_REPORT1, S_FAILED} state_e;

  state_e state;
  logic   got_loader, got_icap, ok_q;

  assign dpr_mode  = state != S_NORMAL;
  assign bs_block  = state == S_LOAD;
  assign prm_reset = state == S_LOAD || state == S_FAILED || ((state == S_REPORT0 || state == S_REPORT1) && !ok_q);
  assign prm_init  = state == S_INIT;

  assign st_valid = state == S_REPORT0 || state == S_REPORT1;
  assign st_last  = state == S_REPORT1;
  assign st_data  = (state == S_REPORT0) ? {PT_DPR_STATUS, 7'd0, ok_q, 16'd0, icap_cycles}
                                         : {icap_stat, icap_words};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_NORMAL;
      loader_start <= 1'b0;
      got_loader   <= 1'b0;
      got_icap     <= 1'b0;
      ok_q         <= 1'b0;
    end else begin
      loader_start <= 1'b0;
      unique case (state)
        S_NORMAL, S_FAILED: if (bs_ready) begin
          loader_start <= 1'b1;
          got_loader   <= 1'b0;
          got_icap     <= 1'b0;
          state        <= S_LOAD;
        end
        S_LOAD: begin
          if (loader_done) got_loader <= 1'b1;
          if (icap_done) begin
            got_icap <= 1'b1;
            ok_q     <= icap_ok;
          end
          if ((got_loader || loader_done) && (got_icap || icap_done))
            state <= (icap_done ? icap_ok : ok_q) ? S_INIT : S_REPORT0;
        end
        S_INIT:    if (prm_init_done) state <= S_REPORT0;
        S_REPORT0: if (st_ready) state <= S_REPORT1;
        S_REPORT1: if (st_ready) state <= ok_q ? S_NORMAL : S_FAILED;
        default:   state <= S_NORMAL;
      endcase
    end
  end

endmodule
