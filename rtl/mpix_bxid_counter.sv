// Bunch-crossing ID counter (time stamp generator).
//
// Bunches arrive at 40 MHz and each hit is tagged with its bunch-crossing ID,
// which counts 0 .. BX_PER_ORBIT-1 (3564 values, one orbit of 89.1 us) and
// then starts again; both numbers are the document's. bx_reset (from the
// Timing and Fast Control interface) forces the count to 0 on the next bunch
// crossing edge. The counter runs in the readout clock domain: with
// CLK_PER_BX > 1 (MightyPix2, readout at 160 MHz = 4 x 40 MHz) a divider
// makes a one-cycle bx_en strobe every CLK_PER_BX cycles, and the count
// advances on it. bx_en also paces the 40 MHz link words. tsf is a
// free-running TS2_BITS counter of bunch crossings used to measure the ToT.
module mpix_bxid_counter #(
  parameter int unsigned TS_BITS      = 12,
  parameter int unsigned TS2_BITS     = 8,
  parameter int unsigned BX_PER_ORBIT = 3564,
  parameter int unsigned CLK_PER_BX   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bx_reset,
  output logic               bx_en,
  output logic [TS_BITS-1:0] bxid,
  output logic [TS2_BITS-1:0] tsf
);

  localparam int unsigned DW = (CLK_PER_BX > 1) ? $clog2(CLK_PER_BX) : 1;
  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else if (32'(div) == CLK_PER_BX - 1) div <= '0;
    else div <= div + 1'b1;
  end

  assign bx_en = (32'(div) == CLK_PER_BX - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bxid <= '0;
    else if (bx_en) begin
      if (bx_reset || 32'(bxid) == BX_PER_ORBIT - 1) bxid <= '0;
      else bxid <= bxid + 1'b1;
    end
  end

  // Free-running ToT time base: one count per bunch crossing, never reset
  // by bx_reset or the orbit wrap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tsf <= '0;
    else if (bx_en) tsf <= tsf + 1'b1;
  end

endmodule
