// Column priority logic.
//
// Of all pixels in a column whose hit buffer holds a ready hit, the one in
// the lowest row wins (row 0 has the highest priority), as the document
// describes for MightyPix1. Purely combinational: req is one bit per row,
// valid says some bit is set, idx is the row number of the lowest set bit.
module mpix_priority_enc #(
  parameter int unsigned N = 320,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          valid,
  output logic [IW-1:0] idx
);

  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        valid = 1'b1;
        idx   = IW'(i);
      end
    end
  end

endmodule
