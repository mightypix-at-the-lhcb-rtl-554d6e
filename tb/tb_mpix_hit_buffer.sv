// Test of one pixel hit buffer: a comparator pulse stores TS1 at the leading
// edge and TS2 at the trailing edge, the hit is ready only after the trailing
// edge, pulses while the buffer is busy are lost, and clr frees the buffer.
// Time stamp busses are driven with values the test chooses.
module tb_mpix_hit_buffer;
  logic clk = 0, rst_n = 0, comp = 0, clr = 0;
  logic [11:0] ts1_in = '0, ts1;
  logic [7:0]  ts2_in = '0, tsr, ts2;
  logic ready, busy;
  int checks = 0, failures = 0;

  mpix_hit_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one hit: rise with (a, ar), fall after len cycles with b
  task automatic hit(logic [11:0] a, logic [7:0] ar, logic [7:0] b, int len);
    @(negedge clk); ts1_in = a; ts2_in = ar; comp = 1;
    @(negedge clk); ts1_in = ~a; ts2_in = ~ar;
    chk(busy && !ready, "busy, not ready, after leading edge");
    repeat (len - 1) @(negedge clk);
    chk(!ready, "not ready during ToT");
    ts2_in = b; comp = 0;
    @(negedge clk); ts2_in = ~b;
    chk(ready, "ready after trailing edge");
    chk(ts1 == a && tsr == ar && ts2 == b, $sformatf("stamps %h %h %h", ts1, tsr, ts2));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !ready, "empty after reset");
    for (int i = 0; i < 20; i++) begin
      logic [11:0] a; logic [7:0] ar, b;
      a = 12'($urandom); ar = 8'($urandom); b = 8'($urandom);
      hit(a, ar, b, 1 + int'($urandom % 6));
      // a second pulse while the hit waits is lost
      comp = 1; ts1_in = 12'hABC;
      @(negedge clk); comp = 0;
      @(negedge clk);
      chk(ready && ts1 == a, "second pulse ignored while busy");
      // stays until cleared
      repeat (3) @(negedge clk);
      chk(ready, "hit kept until clr");
      clr = 1; @(negedge clk); clr = 0;
      chk(!busy && !ready, "empty after clr");
    end
    // comparator still high when freed: no new hit until a new leading edge
    @(negedge clk); comp = 1; ts1_in = 12'h111;
    @(negedge clk); comp = 0;
    @(negedge clk); clr = 1; comp = 1;
    @(negedge clk); clr = 0;
    repeat (2) @(negedge clk);
    chk(!busy, "no hit without a new leading edge");
    comp = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
