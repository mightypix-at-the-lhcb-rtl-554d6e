// Test of the bunch-crossing ID counter with 4 clock cycles per bunch
// crossing (MightyPix2 readout clock): bx_en every 4th cycle, the ID wraps
// from 3563 to 0 (89.1 us orbit), bx_reset restarts it, and the free-running
// ToT time base ignores both.
module tb_mpix_bxid_counter;
  logic clk = 0, rst_n = 0, bx_reset = 0, bx_en;
  logic [11:0] bxid;
  logic [7:0] tsf;
  int checks = 0, failures = 0;
  int exp_id = 0, exp_tsf = 0, ncyc = 0, wraps = 0;

  mpix_bxid_counter #(.CLK_PER_BX(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 1; c <= 4 * 8000; c++) begin
      bit rs;
      rs = (c > 4 * 5000 && c <= 4 * 5001);
      bx_reset = rs;
      @(negedge clk);
      // bx_en was high on the edge just passed if c is a multiple of 4
      if (c % 4 == 0) begin
        if (rs || exp_id == 3563) begin exp_id = 0; if (!rs) wraps++; end
        else exp_id++;
        exp_tsf = (exp_tsf + 1) % 256;
      end
      chk(int'(bxid) == exp_id && int'(tsf) == exp_tsf, $sformatf("cycle %0d bxid %0d exp %0d", c, bxid, exp_id));
      chk(bx_en == ((c + 1) % 4 == 0), "bx_en every 4th cycle");
    end
    chk(wraps == 1, "one orbit wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
