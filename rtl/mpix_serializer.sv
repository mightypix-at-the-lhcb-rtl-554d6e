// Serializer of the 1.28 Gbit/s readout link.
//
// The chip sends one 32-bit word per 40 MHz bunch crossing; this block shifts
// it out MSB first on the bit clock clk_ser (32 x 40 MHz = 1.28 GHz, made by
// the on-chip PLL). The parallel word comes from the 40 MHz word domain and
// is captured at bit count CAPTURE_AT, half a word period away from the word
// clock edge, where it is stable; the two clocks are assumed phase locked
// (both come from the PLL). The captured word is loaded into the shift
// register after the last bit of the previous word. frame is high during the
// first bit of each word. The link rate and word size are the document's;
// MSB-first order, no line code and the frame marker are this design's
// choices.
module mpix_serializer #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned CAPTURE_AT = WIDTH / 2
) (
  input  logic             clk_ser,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] word_in,
  output logic             sdata,
  output logic             frame
);

  localparam int unsigned BW = $clog2(WIDTH);

  logic [BW-1:0]    cnt;
  logic [WIDTH-1:0] capt, shreg;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      capt  <= '0;
      shreg <= '0;
    end else begin
      if (32'(cnt) == CAPTURE_AT) capt <= word_in;
      if (32'(cnt) == WIDTH - 1) begin
        cnt   <= '0;
        shreg <= capt;
      end else begin
        cnt   <= cnt + 1'b1;
        shreg <= {shreg[WIDTH-2:0], 1'b0};
      end
    end
  end

  assign sdata = shreg[WIDTH-1];
  assign frame = (cnt == '0);

endmodule
