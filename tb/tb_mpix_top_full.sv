// Full-size run of the MightyPix readout with every parameter at its default
// (MightyPix1 readout, 320 rows x 29 columns). Random hits arrive at
// 17 MHz/cm2 (0.358 hits per bunch crossing on the 0.8422 cm2 matrix) with
// a ToT of 2 us (80 bunch crossings), after the directed burst, dead-pixel and
// bx_reset sequences of tb_mpix_env; every hit must arrive exactly once.
module tb_mpix_top_full;
  import mpix_pkg::*;

  localparam int ROWS = 320, COLS = 29;

  logic clk, clk_ser, rst_n, bx_reset;
  logic [COLS-1:0][ROWS-1:0] comp, busy;
  logic [11:0] bxid;
  logic [31:0] lw;
  logic ls, so, sf, st, rd;
  logic [4:0] fl;
  logic done;
  int   checks, failures;

  mpix_top u_dut (
    .clk, .clk_ser, .rst_n, .bx_reset, .comp,
    .bxid, .link_word(lw), .link_strobe(ls), .ser_out(so), .ser_frame(sf),
    .pix_busy(busy), .fsm_stall(st), .fsm_reading(rd), .fifo_level(fl));

  tb_mpix_env #(.MP2(1'b0), .ROWS(ROWS), .COLS(COLS), .N_BX(5000), .HITS_PER_KBX(358),
                .TOT_MAX_BX(80), .SEED(5)) u_env (
    .clk, .clk_ser, .rst_n, .bx_reset, .comp,
    .bxid, .link_word(lw), .link_strobe(ls), .ser_out(so), .ser_frame(sf),
    .pix_busy(busy), .fsm_stall(st), .fifo_level(fl),
    .done, .checks, .failures);

  initial begin
    #10;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64 * 40000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
