// MightyPix2 gearbox: 48-bit hits in, 32-bit link words out.
//
// The readout FSM writes 48-bit hit words at up to one per 160 MHz cycle into
// a FIFO of FIFO_DEPTH hits (16 in the document). The link takes one 32-bit
// word per 40 MHz bunch crossing (link_en strobe), i.e. 1.28 Gbit/s, so two
// hits fill three link words. A bit buffer keeps what is left of a hit after
// a link word: in each link_en cycle, if fewer than 32 bits wait, the next
// hit is appended to them; if the FIFO is empty, half a word of idle pattern
// (16'hBCBC) fills up a waiting half hit, and an empty buffer sends the idle
// word. The top 32 bits of the buffer go out as link_word, registered.
// A receiver that follows the stream from reset in 16-bit steps sees, at
// each hit boundary, either 16'hBCBC (idle) or the first 16 bits of a hit,
// which never start with the nibble B.
// The FIFO depth, hit size and link rate are the document's; the packing
// and idle scheme are this design's choices.
module mpix_gearbox
  import mpix_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        link_en,
  output logic [31:0] link_word,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level
);

  logic [47:0] f_data;
  logic        f_valid, f_ready;

  mpix_hit_fifo #(.WIDTH(48), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_data, .in_valid, .in_ready,
    .out_data  (f_data),
    .out_valid (f_valid),
    .out_ready (f_ready),
    .level     (fifo_level)
  );

  // Bit buffer, left aligned; fill counts valid bits (0, 16 or 32 between
  // link words).
  logic [79:0] bitbuf, merged;
  logic [6:0]  fill, merged_fill;

  always_comb begin
    merged      = bitbuf;
    merged_fill = fill;
    f_ready     = 1'b0;
    if (link_en && fill < 7'd32) begin
      if (f_valid) begin
        f_ready     = 1'b1;
        merged      = (fill == 7'd0) ? {f_data, 32'h0} : {bitbuf[79:64], f_data, 16'h0};
        merged_fill = fill + 7'd48;
      end else if (fill == 7'd16) begin
        merged      = {bitbuf[79:64], IDLE_HALF, 48'h0};
        merged_fill = 7'd32;
      end else begin
        merged      = {IDLE_WORD, 48'h0};
        merged_fill = 7'd32;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitbuf    <= '0;
      fill      <= '0;
      link_word <= IDLE_WORD;
    end else if (link_en) begin
      link_word <= merged[79:48];
      bitbuf    <= {merged[47:0], 32'h0};
      fill      <= merged_fill - 7'd32;
    end
  end

endmodule
