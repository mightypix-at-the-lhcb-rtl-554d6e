// End-to-end test of the MightyPix readout at reduced matrix size, in both
// readout variants side by side: MightyPix1 (32-bit words at 40 MHz) and
// MightyPix2 (48-bit words at 160 MHz, 16-hit FIFO and gearbox). Each runs the
// directed and random sequences of tb_mpix_env (burst with priority order,
// dead pixel, bx_reset, bunch-crossing ID wrap, random hits at a high rate,
// serial link check; for MightyPix2 also FIFO full, FSM stall and gearbox
// padding).
module tb_mpix_top;
  import mpix_pkg::*;

  localparam int ROWS = 40, COLS = 8;

  logic clk1, clks1, rst1, bxr1, clk2, clks2, rst2, bxr2;
  logic [COLS-1:0][ROWS-1:0] comp1, comp2, busy1, busy2;
  logic [11:0] bxid1, bxid2;
  logic [31:0] lw1, lw2;
  logic ls1, ls2, so1, so2, sf1, sf2, st1, st2, rd1, rd2;
  logic [4:0] fl1, fl2;
  logic done1, done2;
  int   chk1, chk2, fail1, fail2;

  mpix_top #(.ROWS(ROWS), .COLS(COLS), .MP2(1'b0)) u_mp1 (
    .clk(clk1), .clk_ser(clks1), .rst_n(rst1), .bx_reset(bxr1), .comp(comp1),
    .bxid(bxid1), .link_word(lw1), .link_strobe(ls1), .ser_out(so1), .ser_frame(sf1),
    .pix_busy(busy1), .fsm_stall(st1), .fsm_reading(rd1), .fifo_level(fl1));

  tb_mpix_env #(.MP2(1'b0), .ROWS(ROWS), .COLS(COLS), .N_BX(4000), .HITS_PER_KBX(300),
                .SEED(11)) u_env1 (
    .clk(clk1), .clk_ser(clks1), .rst_n(rst1), .bx_reset(bxr1), .comp(comp1),
    .bxid(bxid1), .link_word(lw1), .link_strobe(ls1), .ser_out(so1), .ser_frame(sf1),
    .pix_busy(busy1), .fsm_stall(st1), .fifo_level(fl1),
    .done(done1), .checks(chk1), .failures(fail1));

  mpix_top #(.ROWS(ROWS), .COLS(COLS), .MP2(1'b1)) u_mp2 (
    .clk(clk2), .clk_ser(clks2), .rst_n(rst2), .bx_reset(bxr2), .comp(comp2),
    .bxid(bxid2), .link_word(lw2), .link_strobe(ls2), .ser_out(so2), .ser_frame(sf2),
    .pix_busy(busy2), .fsm_stall(st2), .fsm_reading(rd2), .fifo_level(fl2));

  tb_mpix_env #(.MP2(1'b1), .ROWS(ROWS), .COLS(COLS), .N_BX(4000), .HITS_PER_KBX(400),
                .SEED(22)) u_env2 (
    .clk(clk2), .clk_ser(clks2), .rst_n(rst2), .bx_reset(bxr2), .comp(comp2),
    .bxid(bxid2), .link_word(lw2), .link_strobe(ls2), .ser_out(so2), .ser_frame(sf2),
    .pix_busy(busy2), .fsm_stall(st2), .fifo_level(fl2),
    .done(done2), .checks(chk2), .failures(fail2));

  int rd_cycles = 0;
  always @(posedge clk1) if (rd1) rd_cycles++;

  initial begin
    #10;
    wait (done1 === 1'b1 && done2 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", chk1 + chk2 + 1, fail1 + fail2 + (rd_cycles == 0));
    $finish;
  end

  // watchdog: 20000 bunch crossings of 64 time units
  initial begin
    #(64 * 20000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk1 + chk2 + 1, fail1 + fail2 + 1);
    $finish;
  end
endmodule
