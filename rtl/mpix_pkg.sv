// Shared types and constants of the MightyPix readout.
//
// A hit leaves the matrix as an EoC record (row, leading-edge time stamp TS1,
// trailing-edge time stamp TS2). The readout FSM adds the column address and
// turns it into the off-chip data format:
//   MightyPix1: two 32-bit words per hit, sent one per 40 MHz cycle,
//     word 0 = {4'h4, col[5:0], row[9:0], ts[11:0]}
//     word 1 = {4'h5, tot[7:0], 20'h0}
//   MightyPix2: one 48-bit word per hit,
//     {4'h6, col[5:0], row[9:0], ts[11:0], tot[7:0], 8'h0}
// The 2x32-bit / 48-bit sizes and the content (pixel address, time stamp, ToT)
// follow the document; the field order, widths and tag nibbles are this
// design's choice. ToT = TS2 - TS1 modulo 2^TS2_BITS, in bunch crossings.
// An idle link word is 32'hBCBC_BCBC (16'hBCBC for half a word in the
// gearbox); no hit word starts with the nibble B.
package mpix_pkg;

  localparam int COL_FIELD  = 6;
  localparam int ROW_FIELD  = 10;
  localparam int TS_FIELD   = 12;
  localparam int TOT_FIELD  = 8;


  localparam logic [3:0] TAG_W0  = 4'h4;
  localparam logic [3:0] TAG_W1  = 4'h5;
  localparam logic [3:0] TAG_H48 = 4'h6;

  localparam logic [31:0] IDLE_WORD = 32'hBCBC_BCBC;
  localparam logic [15:0] IDLE_HALF = 16'hBCBC;

  localparam int BX_PER_ORBIT = 3564;  // BXID runs 0 .. 3563

  // Decoded hit as it leaves the readout FSM.
  typedef struct packed {
    logic [COL_FIELD-1:0] col;
    logic [ROW_FIELD-1:0] row;
    logic [TS_FIELD-1:0]  ts;
    logic [TOT_FIELD-1:0] tot;
  } hit_t;

  function automatic logic [31:0] hit_word0(hit_t h);
    return {TAG_W0, h.col, h.row, h.ts};
  endfunction

  function automatic logic [31:0] hit_word1(hit_t h);
    return {TAG_W1, h.tot, 20'h0};
  endfunction

  function automatic logic [47:0] hit_word48(hit_t h);
    return {TAG_H48, h.col, h.row, h.ts, h.tot, 8'h0};
  endfunction

endpackage
