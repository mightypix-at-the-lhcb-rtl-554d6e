// One pixel column of the matrix, seen from the readout.
//
// ROWS hit buffers share the column's time stamp busses. The priority logic
// picks the ready hit in the lowest row. When the readout FSM pulses load and
// the column's end-of-column buffer is empty, that hit is copied into the EoC
// buffer (row, TS1 and ToT = TS2 at the trailing edge minus TS2 at the
// leading edge) and its hit buffer is freed in the same clock edge, so the pixel can
// take a new hit from the next cycle on. The FSM reads the EoC buffer and
// empties it with eoc_clr. This structure (hit buffer per pixel, one EoC
// buffer per column, lowest row first) is the document's; the single-cycle
// transfer is this design's choice.
module mpix_column #(
  parameter int unsigned ROWS     = 320,
  parameter int unsigned TS_BITS  = 12,
  parameter int unsigned TS2_BITS = 8,
  localparam int unsigned ROW_BITS = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ROWS-1:0]     comp,
  input  logic [TS_BITS-1:0]  ts1_in,
  input  logic [TS2_BITS-1:0] ts2_in,
  input  logic                load,
  input  logic                eoc_clr,
  output logic                eoc_full,
  output logic [ROW_BITS-1:0] eoc_row,
  output logic [TS_BITS-1:0]  eoc_ts1,
  output logic [TS2_BITS-1:0] eoc_tot,
  output logic [ROWS-1:0]     pix_busy
);

  logic [ROWS-1:0]     ready, clr;
  logic [TS_BITS-1:0]  ts1 [ROWS];
  logic [TS2_BITS-1:0] tsr [ROWS];
  logic [TS2_BITS-1:0] ts2 [ROWS];
  logic                sel_valid;
  logic [ROW_BITS-1:0] sel_row;
  logic                take;

  for (genvar r = 0; r < ROWS; r++) begin : g_pix
    mpix_hit_buffer #(.TS_BITS(TS_BITS), .TS2_BITS(TS2_BITS)) u_hb (
      .clk, .rst_n,
      .comp   (comp[r]),
      .ts1_in, .ts2_in,
      .clr    (clr[r]),
      .ready  (ready[r]),
      .busy   (pix_busy[r]),
      .ts1    (ts1[r]),
      .tsr    (tsr[r]),
      .ts2    (ts2[r])
    );
  end

  mpix_priority_enc #(.N(ROWS)) u_prio (
    .req   (ready),
    .valid (sel_valid),
    .idx   (sel_row)
  );

  assign take = load && !eoc_full && sel_valid;

  always_comb begin
    clr = '0;
    if (take) clr[sel_row] = 1'b1;
  end

  mpix_eoc_buffer #(.ROW_BITS(ROW_BITS), .TS_BITS(TS_BITS), .TS2_BITS(TS2_BITS)) u_eoc (
    .clk, .rst_n,
    .load   (take),
    .row_in (sel_row),
    .ts1_in (ts1[sel_row]),
    .tot_in (ts2[sel_row] - tsr[sel_row]),
    .clr    (eoc_clr),
    .full   (eoc_full),
    .row    (eoc_row),
    .ts1    (eoc_ts1),
    .tot    (eoc_tot)
  );

endmodule
