// End-of-column (EoC) buffer.
//
// One per column: holds a single hit (row address, leading-edge time stamp TS1 and ToT) read from the
// column's hit buffers until the readout FSM has taken it. load writes the
// buffer and sets full; clr empties it. Loading a full buffer is not allowed
// (the readout only loads empty buffers; an assertion checks it). One entry
// per column follows the document; the record layout is this design's.
module mpix_eoc_buffer #(
  parameter int unsigned ROW_BITS = 9,
  parameter int unsigned TS_BITS  = 12,
  parameter int unsigned TS2_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [ROW_BITS-1:0] row_in,
  input  logic [TS_BITS-1:0]  ts1_in,
  input  logic [TS2_BITS-1:0] tot_in,
  input  logic                clr,
  output logic                full,
  output logic [ROW_BITS-1:0] row,
  output logic [TS_BITS-1:0]  ts1,
  output logic [TS2_BITS-1:0] tot
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      row  <= '0;
      ts1  <= '0;
      tot  <= '0;
    end else if (load) begin
      full <= 1'b1;
      row  <= row_in;
      ts1  <= ts1_in;
      tot  <= tot_in;
    end else if (clr) begin
      full <= 1'b0;
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) load |-> !full || clr)
    else $error("EoC buffer loaded while full");

endmodule
