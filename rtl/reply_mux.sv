// reply_mux: merges the controller's reply packets onto one stream.
//
// Three sources answer the remote Terminal Client: segment acknowledges,
// direct-ICAP readback replies and reconfiguration status reports. Each offers
// packets as valid/data/last words. The mux grants one source at a time in
// round-robin order and keeps the grant until that packet's last word has been
// sent, so packets never interleave; a word once offered stays offered until
// it is taken. Combinational data path; the grant is
// chosen in the cycle a new packet starts.
module reply_mux #(
  parameter int unsigned N = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     s_valid,
  output logic [N-1:0]     s_ready,
  input  logic [N-1:0][63:0] s_data,
  input  logic [N-1:0]     s_last,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [63:0]      m_data,
  output logic             m_last
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] sel_q, sel, last_sel;
  logic          any;

  // round-robin pick starting after the last served source
  always_comb begin
    sel = sel_q;
    any = 1'b0;
    if (locked) begin
      any = 1'b1;
    end else begin
      for (int k = N; k >= 1; k--) begin
        if (s_valid[(int'(last_sel) + k) % N]) begin
          sel = IW'((int'(last_sel) + k) % N);
          any = 1'b1;
        end
      end
    end
  end

  assign m_valid = any && s_valid[sel];
  assign m_data  = s_data[sel];
  assign m_last  = s_last[sel];
  always_comb begin
    s_ready = '0;
    s_ready[sel] = any && m_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      sel_q    <= '0;
      last_sel <= IW'(N - 1);
    end else if (m_valid && m_ready) begin
      locked <= !m_last;
      sel_q  <= sel;
      if (m_last) last_sel <= sel;
    end else if (m_valid) begin
      locked <= 1'b1;  // hold an offered word until it is taken
      sel_q  <= sel;
    end
  end

  // An offered word stays offered, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last));
endmodule
