// Hit buffer of one pixel.
//
// Every pixel owns one hit buffer. When the pixel's comparator output goes
// high the buffer stores the current bunch-crossing ID as the leading-edge
// time stamp TS1; when the comparator falls it stores the low TS2_BITS of the
// bunch-crossing ID as the trailing-edge time stamp TS2 and flags the hit as
// ready for readout. A hit becomes readable only after its time over
// threshold has passed. While the buffer holds a hit (from the leading edge
// until the readout FSM clears it) further comparator pulses are lost: the
// pixel is dead until its buffer is freed, as the document describes.
//
// The ToT is measured with a second, free-running time stamp (ts2_in, one
// count per bunch crossing, not reset with the bunch-crossing ID): its value
// is stored at both edges (tsr, ts2) and ToT = ts2 - tsr, so a pulse that
// spans the end of an orbit still gets the right length.
//
// On the chip the hit information sits in DRAM cells; here it is held in
// flip-flops, which have the same logical behaviour for the O(1 s) retention
// the document reports. The comparator output is sampled on clk and its edges
// are found by comparing with the previous sample (this design's choice).
//
// Interface: comp (comparator output), ts1_in / ts2_in (time stamp busses
// shared by the column), clr (one-cycle pulse: the hit was moved to the EoC
// buffer). Outputs ready, ts1, ts2 are registered. A pulse that rises in the
// cycle the buffer is cleared is lost.
module mpix_hit_buffer #(
  parameter int unsigned TS_BITS  = 12,
  parameter int unsigned TS2_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                comp,
  input  logic [TS_BITS-1:0]  ts1_in,
  input  logic [TS2_BITS-1:0] ts2_in,
  input  logic                clr,
  output logic                ready,
  output logic                busy,
  output logic [TS_BITS-1:0]  ts1,
  output logic [TS2_BITS-1:0] tsr,
  output logic [TS2_BITS-1:0] ts2
);

  typedef enum logic [1:0] {EMPTY, ABOVE_THR, READY} hb_state_e;
  hb_state_e state;
  logic      comp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= EMPTY;
      comp_q <= 1'b0;
      ts1    <= '0;
      tsr    <= '0;
      ts2    <= '0;
    end else begin
      comp_q <= comp;
      unique case (state)
        EMPTY:
          if (comp && !comp_q) begin
            state <= ABOVE_THR;
            ts1   <= ts1_in;
            tsr   <= ts2_in;
          end
        ABOVE_THR:
          if (!comp) begin
            state <= READY;
            ts2   <= ts2_in;
          end
        READY:
          if (clr) state <= EMPTY;
        default: state <= EMPTY;
      endcase
    end
  end

  assign ready = (state == READY);
  assign busy  = (state != EMPTY);

endmodule
