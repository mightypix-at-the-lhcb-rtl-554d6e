// Test of the readout FSM in both variants, with 4 columns whose EoC buffers
// are modelled in the test. Checks the LOAD/READ cycle: load pulses after
// LOAD_CYCLES cycles, the EoC buffers are read lowest column first, each hit
// gives word 0 and word 1 on consecutive cycles (MightyPix1) or one 48-bit
// hit per cycle while the FIFO side is ready (MightyPix2), and the FSM
// returns to LOAD when all EoC buffers are empty.
module tb_mpix_readout_fsm;
  import mpix_pkg::*;
  localparam int COLS = 4;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // EoC models, one set per variant
  logic [COLS-1:0] full1, full2, clr1, clr2;
  logic [8:0]  row1 [COLS], row2 [COLS];
  logic [11:0] ts1 [COLS], ts2 [COLS];
  logic [7:0]  tot1 [COLS], tot2 [COLS];
  logic load1, load2, rd1, rd2, hv1, hv2, hr2 = 0;
  logic [31:0] w1, w2;
  hit_t h1, h2;

  mpix_readout_fsm #(.COLS(COLS), .MP2(1'b0)) u1 (
    .clk, .rst_n, .load(load1), .eoc_full(full1), .eoc_row(row1), .eoc_ts1(ts1),
    .eoc_tot(tot1), .eoc_clr(clr1), .word_out(w1), .hit_out(h1), .hit_valid(hv1),
    .hit_ready(1'b1), .reading(rd1));
  mpix_readout_fsm #(.COLS(COLS), .MP2(1'b1)) u2 (
    .clk, .rst_n, .load(load2), .eoc_full(full2), .eoc_row(row2), .eoc_ts1(ts2),
    .eoc_tot(tot2), .eoc_clr(clr2), .word_out(w2), .hit_out(h2), .hit_valid(hv2),
    .hit_ready(hr2), .reading(rd2));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // EoC buffer behaviour: on load, fill with the next pattern; clr empties.
  logic [COLS-1:0] pat1 = '0, pat2 = '0;
  always @(posedge clk) begin
    for (int c = 0; c < COLS; c++) begin
      if (clr1[c]) full1[c] <= 0;
      if (clr2[c]) full2[c] <= 0;
    end
    if (load1) for (int c = 0; c < COLS; c++) if (pat1[c] && !full1[c]) full1[c] <= 1;
    if (load2) for (int c = 0; c < COLS; c++) if (pat2[c] && !full2[c]) full2[c] <= 1;
  end

  initial begin
    full1 = '0; full2 = '0;
    for (int c = 0; c < COLS; c++) begin
      row1[c] = 9'(17 * c + 3); ts1[c] = 12'(100 * c + 7); tot1[c] = 8'(c + 40);
      row2[c] = 9'(23 * c + 1); ts2[c] = 12'(300 * c + 9); tot2[c] = 8'(c + 80);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- MightyPix1: two full columns (1 and 3) ----
    pat1 = 4'b1010;
    // LOAD: load on the second cycle
    chk(!load1, "no load in first LOAD cycle");
    @(negedge clk);
    chk(load1, "load pulse in second LOAD cycle");
    @(negedge clk);
    pat1 = '0;
    // READ: column 1 selected, word0 registered at next edge
    chk(clr1 == 4'b0010, "column 1 read first");
    @(negedge clk);
    chk(w1 == {TAG_W0, 6'd1, 10'(row1[1]), ts1[1]}, $sformatf("word0 col1 %h", w1));
    @(negedge clk);
    chk(w1 == {TAG_W1, tot1[1], 20'h0}, $sformatf("word1 col1 %h", w1));
    chk(clr1 == 4'b1000, "column 3 next");
    @(negedge clk);
    chk(w1 == {TAG_W0, 6'd3, 10'(row1[3]), ts1[3]}, "word0 col3");
    @(negedge clk);
    chk(w1 == {TAG_W1, tot1[3], 20'h0}, "word1 col3");
    @(negedge clk);  // READ sees nothing -> LOAD
    chk(w1 == IDLE_WORD && !rd1, "idle and back to LOAD");
    @(negedge clk);
    chk(load1, "next load after two LOAD cycles");
    // ---- MightyPix2: three columns, FIFO side stalls one cycle ----
    pat2 = 4'b1101;
    do @(negedge clk); while (!load2);
    @(negedge clk);
    pat2 = '0;
    chk(hv2 && h2.col == 6'd0 && h2.row == 10'(row2[0]) && h2.ts == ts2[0] && h2.tot == tot2[0], "MP2 hit col0 offered");
    chk(clr2 == '0, "no clr while not ready");
    @(negedge clk);
    chk(hv2 && h2.col == 6'd0, "MP2 hit col0 held while stalled");
    hr2 = 1;
    #1 chk(clr2 == 4'b0001, "col0 taken when ready");
    @(negedge clk);
    chk(hv2 && h2.col == 6'd2 && clr2 == 4'b0100, "col2 next cycle");
    @(negedge clk);
    chk(hv2 && h2.col == 6'd3 && h2.tot == tot2[3] && clr2 == 4'b1000, "col3 next cycle");
    @(negedge clk);
    chk(!hv2, "no more hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
