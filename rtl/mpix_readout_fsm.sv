// Readout state machine of the chip periphery.
//
// The FSM alternates between two phases, as in the column-drain readout the
// document describes:
//   LOAD  LOAD_CYCLES cycles; in the last one it pulses load, and every
//         column whose end-of-column (EoC) buffer is empty takes the ready
//         hit of its lowest row from the hit buffers.
//   READ  it scans the EoC buffers, lowest column first, and sends one hit
//         after the other off the matrix, emptying each EoC buffer it reads.
//         When no EoC buffer is full it returns to LOAD.
// Hits in low rows are therefore read first and a column yields at most one
// hit per LOAD/READ round.
//
// Output formats (see mpix_pkg):
//   MP2 = 0 (MightyPix1): 32-bit data path. A hit takes two cycles, word 0
//     then word 1; in any other cycle the idle word is sent. Running at
//     40 MHz, one 32-bit word per cycle is exactly the 1.28 Gbit/s link.
//     word_out is registered and valid in every cycle.
//   MP2 = 1 (MightyPix2): 48-bit data path at 160 MHz. A hit is offered on
//     hit_out / hit_valid and leaves in the cycle hit_ready is high (the
//     gearbox FIFO has room); the FSM waits otherwise.
// The two phases, priorities and data-path widths follow the document; the
// LOAD duration, column order and record layout are this design's choices.
module mpix_readout_fsm
  import mpix_pkg::*;
#(
  parameter int unsigned COLS        = 29,
  parameter int unsigned ROW_BITS    = 9,
  parameter int unsigned TS_BITS     = 12,
  parameter int unsigned TS2_BITS    = 8,
  parameter int unsigned LOAD_CYCLES = 2,
  parameter bit          MP2         = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  // column side
  output logic                load,
  input  logic [COLS-1:0]     eoc_full,
  input  logic [ROW_BITS-1:0] eoc_row [COLS],
  input  logic [TS_BITS-1:0]  eoc_ts1 [COLS],
  input  logic [TS2_BITS-1:0] eoc_tot [COLS],
  output logic [COLS-1:0]     eoc_clr,
  // MightyPix1 output
  output logic [31:0]         word_out,
  // MightyPix2 output
  output hit_t                hit_out,
  output logic                hit_valid,
  input  logic                hit_ready,
  // status
  output logic                reading
);

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned LW = (LOAD_CYCLES > 1) ? $clog2(LOAD_CYCLES) : 1;

  typedef enum logic [1:0] {S_LOAD, S_READ, S_WORD1} fsm_state_e;
  fsm_state_e state;
  logic [LW-1:0] load_cnt;

  logic          col_valid;
  logic [CW-1:0] col_sel;
  hit_t          cur, held;

  mpix_priority_enc #(.N(COLS)) u_col_prio (
    .req   (eoc_full),
    .valid (col_valid),
    .idx   (col_sel)
  );

  // Hit record of the selected EoC buffer.
  always_comb begin
    cur.col = COL_FIELD'(col_sel);
    cur.row = ROW_FIELD'(eoc_row[col_sel]);
    cur.ts  = TS_FIELD'(eoc_ts1[col_sel]);
    cur.tot = TOT_FIELD'(eoc_tot[col_sel]);
  end

  assign load      = (state == S_LOAD) && (32'(load_cnt) == LOAD_CYCLES - 1);
  assign reading   = (state != S_LOAD);
  assign hit_out   = cur;
  assign hit_valid = MP2 && (state == S_READ) && col_valid;

  always_comb begin
    eoc_clr = '0;
    if (state == S_READ && col_valid && (!MP2 || hit_ready)) eoc_clr[col_sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      load_cnt <= '0;
      word_out <= IDLE_WORD;
      held     <= '0;
    end else begin
      word_out <= IDLE_WORD;
      unique case (state)
        S_LOAD: begin
          if (32'(load_cnt) == LOAD_CYCLES - 1) begin
            load_cnt <= '0;
            state    <= S_READ;
          end else begin
            load_cnt <= load_cnt + 1'b1;
          end
        end
        S_READ: begin
          if (!col_valid) begin
            state <= S_LOAD;
          end else if (!MP2) begin
            word_out <= hit_word0(cur);
            held     <= cur;
            state    <= S_WORD1;
          end
        end
        S_WORD1: begin
          word_out <= hit_word1(held);
          state    <= S_READ;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
