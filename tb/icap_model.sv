// icap_model: behavioural model of the FPGA's internal configuration access
// port (testbench use only; the real port is a vendor hard block).
//
// Pins are sampled at the rising edge. ce_n low with write_n low is a write of
// i; the model counts writes and remembers the last one. ce_n low with write_n
// high is a read: busy rises for RD_LAT-1 cycles, then busy is low and o holds
// read_value (the STAT word the testbench wants the device to report).
module icap_model #(
  parameter int unsigned RD_LAT = 2
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] i,
  output logic [31:0] o,
  output logic        busy,
  input  logic [31:0] read_value,
  output int unsigned writes,
  output int unsigned reads
);
  int unsigned cnt;
  initial begin
    o = '0; busy = 1'b0; writes = 0; reads = 0; cnt = 0;
  end
  always @(posedge clk) begin
    if (!ce_n && !write_n) writes <= writes + 1;
    if (!ce_n && write_n) begin
      reads <= reads + 1;
      if (RD_LAT <= 1) begin
        o <= read_value; busy <= 1'b0;
      end else begin
        busy <= 1'b1; cnt <= RD_LAT - 1;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        o <= read_value; busy <= 1'b0;
      end
    end
  end
endmodule
