// async_fifo: dual-clock FIFO, first-word fall-through.
//
// Serves as FIFO A (direct ICAP commands, 36 bits), FIFO B (ICAP readback,
// 36 bits) and FIFO C (compressed bitstream, 72 bits) between the platform clock
// and the ICAP clock. The specification uses 512-deep vendor FIFO primitives
// for this; here a generic FIFO with Gray-coded pointers and two-flop
// synchronisers does the same job. Pointers are AW+1 bits; the extra bit tells
// full from empty.
//
// Write side: wr_en pushes wr_data when full is low. wr_level is the fill as
// seen by the writer; it may over-state the fill for two read-clock cycles
// after a pop, never under-state it.
// Read side: rd_data always shows the head word while empty is low; rd_en
// pops it. empty rises and falls with a two-cycle synchroniser delay.
// Both resets are asynchronous, active low, and are meant to be asserted
// together.
module async_fifo #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned AW    = 9
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [AW:0]      wr_level,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic        push;
  logic [AW:0] wbin_next;
  logic [AW:0] rbin_w;

  assign push      = wr_en && !full;
  assign wbin_next = wbin + (AW+1)'(push);
  assign rbin_w    = gray2bin(rgray_w2);
  assign full      = (wbin - rbin_w) == (AW+1)'(DEPTH);
  assign wr_level  = wbin - rbin_w;

  always_ff @(posedge wclk) begin
    if (push) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read domain ----------------
  logic        pop;
  logic [AW:0] rbin_next;

  assign empty     = (rgray == wgray_r2);
  assign pop       = rd_en && !empty;
  assign rbin_next = rbin + (AW+1)'(pop);
  assign rd_data   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
