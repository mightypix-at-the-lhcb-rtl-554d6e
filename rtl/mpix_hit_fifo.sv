// Synchronous FIFO of the MightyPix2 gearbox.
//
// Holds up to DEPTH hits (16 in the document) between the readout FSM and the
// link. Write side: in_data / in_valid / in_ready, a word is taken in a cycle
// with both high. Read side: out_data / out_valid / out_ready, first word
// fall-through, a word leaves in a cycle with both high. One read and one
// write can happen in the same cycle. Storage is a plain array.
module mpix_hit_fifo #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign in_ready  = (32'(level) < DEPTH);
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= incr(wp);
      if (pop)  rp <= incr(rp);
      level <= level + {{($bits(level)-1){1'b0}}, push} - {{($bits(level)-1){1'b0}}, pop};
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) 32'(level) <= DEPTH);

endmodule
