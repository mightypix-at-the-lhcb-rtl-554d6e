// MightyPix readout: pixel hit buffers to the 1.28 Gbit/s link.
//
// The comparator outputs of the COLS x ROWS pixel matrix (320 rows x 29
// columns on MightyPix1) enter as comp[col][row]. Each pixel stores its hit
// in its own hit buffer; per column, the priority logic moves the hit of the
// lowest row into the column's single end-of-column (EoC) buffer whenever the
// readout FSM asks for it; the FSM then reads the EoC buffers one by one and
// formats each hit (column, row, bunch-crossing ID, ToT). Two readout
// variants are built, selected by MP2:
//   MP2 = 0, MightyPix1 (default): clk is 40 MHz, the FSM puts out 32 bits
//     per cycle and a hit is two 32-bit words.
//   MP2 = 1, MightyPix2: clk is 160 MHz, a hit is one 48-bit word that goes
//     into a 16-hit FIFO; a gearbox packs the stream into 32-bit words.
// Either way one 32-bit link word leaves per 40 MHz bunch crossing
// (link_word, new when link_strobe is high) and is serialised MSB first on
// clk_ser (32 x 40 MHz, 1.28 Gbit/s; phase locked to clk) to ser_out.
// bx_reset comes from the Timing and Fast Control interface and restarts the
// bunch-crossing ID. The analogue pixel front end, PLL, bias DACs and the
// slow-control interfaces are outside this RTL.
module mpix_top
  import mpix_pkg::*;
#(
  parameter int unsigned ROWS        = 320,
  parameter int unsigned COLS        = 29,
  parameter int unsigned TS_BITS     = 12,
  parameter int unsigned TS2_BITS    = 8,
  parameter int unsigned LOAD_CYCLES = 2,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter bit          MP2         = 1'b0
) (
  input  logic                         clk,
  input  logic                         clk_ser,
  input  logic                         rst_n,
  input  logic                         bx_reset,
  input  logic [COLS-1:0][ROWS-1:0]    comp,
  output logic [TS_BITS-1:0]           bxid,
  output logic [31:0]                  link_word,
  output logic                         link_strobe,
  output logic                         ser_out,
  output logic                         ser_frame,
  output logic [COLS-1:0][ROWS-1:0]    pix_busy,
  output logic                         fsm_stall,
  output logic                         fsm_reading,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level
);

  localparam int unsigned ROW_BITS   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CLK_PER_BX = MP2 ? 4 : 1;

  logic                bx_en;
  logic                load;
  logic [COLS-1:0]     eoc_full, eoc_clr;
  logic [ROW_BITS-1:0] eoc_row [COLS];
  logic [TS_BITS-1:0]  eoc_ts1 [COLS];
  logic [TS2_BITS-1:0] eoc_tot [COLS];
  logic [TS2_BITS-1:0] tsf;
  logic [31:0]         fsm_word;
  hit_t                hit;
  logic                hit_valid, hit_ready;

  mpix_bxid_counter #(
    .TS_BITS(TS_BITS), .TS2_BITS(TS2_BITS), .BX_PER_ORBIT(BX_PER_ORBIT), .CLK_PER_BX(CLK_PER_BX)
  ) u_bxid (
    .clk, .rst_n, .bx_reset,
    .bx_en,
    .bxid,
    .tsf
  );

  for (genvar c = 0; c < COLS; c++) begin : g_col
    mpix_column #(.ROWS(ROWS), .TS_BITS(TS_BITS), .TS2_BITS(TS2_BITS)) u_col (
      .clk, .rst_n,
      .comp     (comp[c]),
      .ts1_in   (bxid),
      .ts2_in   (tsf),
      .load,
      .eoc_clr  (eoc_clr[c]),
      .eoc_full (eoc_full[c]),
      .eoc_row  (eoc_row[c]),
      .eoc_ts1  (eoc_ts1[c]),
      .eoc_tot  (eoc_tot[c]),
      .pix_busy (pix_busy[c])
    );
  end

  mpix_readout_fsm #(
    .COLS(COLS), .ROW_BITS(ROW_BITS), .TS_BITS(TS_BITS), .TS2_BITS(TS2_BITS),
    .LOAD_CYCLES(LOAD_CYCLES), .MP2(MP2)
  ) u_fsm (
    .clk, .rst_n,
    .load,
    .eoc_full, .eoc_row, .eoc_ts1, .eoc_tot, .eoc_clr,
    .word_out  (fsm_word),
    .hit_out   (hit),
    .hit_valid,
    .hit_ready,
    .reading   (fsm_reading)
  );

  assign fsm_stall = hit_valid && !hit_ready;

  if (MP2) begin : g_mp2
    logic [31:0] gb_word;
    mpix_gearbox #(.FIFO_DEPTH(FIFO_DEPTH)) u_gearbox (
      .clk, .rst_n,
      .in_data    (hit_word48(hit)),
      .in_valid   (hit_valid),
      .in_ready   (hit_ready),
      .link_en    (bx_en),
      .link_word  (gb_word),
      .fifo_level
    );
    assign link_word = gb_word;
  end else begin : g_mp1
    assign hit_ready  = 1'b1;
    assign fifo_level = '0;
    assign link_word  = fsm_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link_strobe <= 1'b0;
    else        link_strobe <= bx_en;
  end

  mpix_serializer #(.WIDTH(32)) u_ser (
    .clk_ser,
    .rst_n,
    .word_in (link_word),
    .sdata   (ser_out),
    .frame   (ser_frame)
  );

endmodule
