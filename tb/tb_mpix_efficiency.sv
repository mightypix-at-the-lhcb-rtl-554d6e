// Hit-rate study of both readout variants on the full 320 x 29 matrix with a
// 2 us ToT: MightyPix1 and MightyPix2 at 17 MHz/cm2 (the highest rate expected
// in the tracker), near their readout limits (link bandwidth over 64 or 48
// bits per hit: 23.75 and 31.66 MHz/cm2) and at 40 MHz/cm2. Checks: above
// 99 % efficiency at 17 MHz/cm2 for both; no run delivers more hits than the
// link can carry in its time; clear losses at 40 MHz/cm2; MightyPix2 better
// than MightyPix1 at 30 MHz/cm2 (between the two readout limits).
module tb_mpix_efficiency;
  logic d1, d2;
  int   c1, c2, f1, f2;
  real  e1 [3], e2 [3];

  tb_mpix_eff_run #(.MP2(1'b0), .RATE0(17), .RATE1(30), .RATE2(40), .SEED(1)) u_mp1 (
    .done(d1), .checks(c1), .failures(f1), .eff(e1));
  tb_mpix_eff_run #(.MP2(1'b1), .RATE0(17), .RATE1(30), .RATE2(40), .SEED(2)) u_mp2 (
    .done(d2), .checks(c2), .failures(f2), .eff(e2));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10;
    wait (d1 === 1'b1 && d2 === 1'b1);
    checks += c1 + c2; failures += f1 + f2;
    chk(e1[0] > 0.99, $sformatf("MP1 17 MHz/cm2 efficiency %0.4f", e1[0]));
    chk(e2[0] > 0.99, $sformatf("MP2 17 MHz/cm2 efficiency %0.4f", e2[0]));
    chk(e1[2] < 0.9, $sformatf("MP1 40 MHz/cm2 efficiency %0.4f: no loss above the readout limit", e1[2]));
    chk(e2[2] < 0.9, $sformatf("MP2 40 MHz/cm2 efficiency %0.4f: no loss above the readout limit", e2[2]));
    chk(e2[1] > e1[1], "MP2 better than MP1 at 30 MHz/cm2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64 * 100000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
