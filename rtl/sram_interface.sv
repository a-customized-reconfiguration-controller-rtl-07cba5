// sram_interface: shares the external bitstream SRAM between writer and reader.
//
// The Bitstream Packet Handler writes 72-bit bitstream words and the Bitstream
// Loader reads them back. The SRAM is modelled as a synchronous pipelined part
// with one address port: a request on its pins is taken at a clock edge and
// read data appears on sram_rdata RD_LAT edges later. This module registers the
// pins, alternates between the two requesters when both ask in the same cycle,
// and tracks reads in a valid pipeline so rsp_valid marks the cycle in which
// sram_rdata holds the data of a read. The specification only names the SRAM
// Interface; the pin protocol, latency and arbitration are this design's.
//
// Interface: valid/ready request ports; at most one request is accepted per
// cycle. Read data: rsp_valid/rsp_data, RD_LAT+1 cycles after rd_ready, in order,
// with no back-pressure.
module sram_interface
  import rc_pkg::*;
#(
  parameter int unsigned AW     = 20,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic          rst_n,

  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  bs_word_t      wr_data,

  input  logic          rd_valid,
  output logic          rd_ready,
  input  logic [AW-1:0] rd_addr,

  output logic          rsp_valid,
  output bs_word_t      rsp_data,

  output logic          sram_cs,
  output logic          sram_we,
  output logic [AW-1:0] sram_addr,
  output bs_word_t      sram_wdata,
  input  bs_word_t      sram_rdata
);

  logic          prefer_rd;  // round-robin pointer
  logic          grant_wr, grant_rd;
  logic [RD_LAT:0] vpipe;    // vpipe[0]: read on the pins this cycle

  assign grant_wr = wr_valid && (!rd_valid || !prefer_rd);
  assign grant_rd = rd_valid && !grant_wr;
  assign wr_ready = grant_wr;
  assign rd_ready = grant_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_cs    <= 1'b0;
      sram_we    <= 1'b0;
      sram_addr  <= '0;
      sram_wdata <= '0;
      prefer_rd  <= 1'b0;
      vpipe      <= '0;
    end else begin
      sram_cs <= grant_wr || grant_rd;
      sram_we <= grant_wr;
      if (grant_wr) begin
        sram_addr  <= wr_addr;
        sram_wdata <= wr_data;
      end else if (grant_rd) begin
        sram_addr  <= rd_addr;
      end
      if (wr_valid && rd_valid) prefer_rd <= !prefer_rd;
      vpipe <= {vpipe[RD_LAT-1:0], grant_rd};
    end
  end

  assign rsp_valid = vpipe[RD_LAT];
  assign rsp_data  = sram_rdata;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(wr_ready && rd_ready));

endmodule
