// sram_model: behavioural model of the external synchronous SRAM (not
// synthesizable as a part; testbench use only).
//
// One address port. At a rising edge with cs high the model writes wdata (we
// high) or reads the addressed word; read data appears on rdata RD_LAT edges
// after the edge that took the read, and holds until the next read result.
module sram_model #(
  parameter int unsigned AW     = 20,
  parameter int unsigned DW     = 72,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1 << AW];
  logic [DW-1:0] pipe [RD_LAT];
  logic          vld  [RD_LAT];

  initial begin
    for (int k = 0; k < int'(RD_LAT); k++) begin
      vld[k]  = 1'b0;
      pipe[k] = '0;
    end
    rdata = '0;
  end

  always @(posedge clk) begin
    if (cs && we) mem[addr] <= wdata;
    vld[0]  <= cs && !we;
    pipe[0] <= mem[addr];
    for (int k = 1; k < int'(RD_LAT); k++) begin
      vld[k]  <= vld[k-1];
      pipe[k] <= pipe[k-1];
    end
    if (RD_LAT == 1) begin
      if (cs && !we) rdata <= mem[addr];
    end else if (vld[RD_LAT-2]) begin
      rdata <= pipe[RD_LAT-2];
    end
  end
endmodule
