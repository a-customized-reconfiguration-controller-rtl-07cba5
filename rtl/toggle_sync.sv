// toggle_sync: carries an event across clock domains.
//
// The source domain toggles `tgl` once per event. Two flops bring it into the
// destination clock domain and a third detects the change, so `pulse` is high
// for one destination cycle per event, two to three cycles after the toggle.
// Events must be further apart than that. Data that accompanies the event must
// be held stable by the source until the pulse has been seen.
module toggle_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic tgl,
  output logic pulse
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {tgl, s1, s2};
  end
  assign pulse = s2 ^ s3;
endmodule
