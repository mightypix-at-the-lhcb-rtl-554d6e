// Test of the end-of-column buffer: load fills it with a record, the record
// stays through cycles without load or clr, clr empties it.
module tb_mpix_eoc_buffer;
  logic clk = 0, rst_n = 0, load = 0, clr = 0;
  logic [8:0] row_in = '0, row;
  logic [11:0] ts1_in = '0, ts1;
  logic [7:0] tot_in = '0, tot;
  logic full;
  int checks = 0, failures = 0;

  mpix_eoc_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!full, "empty after reset");
    repeat (50) begin
      logic [8:0] r; logic [11:0] t; logic [7:0] o;
      r = 9'($urandom); t = 12'($urandom); o = 8'($urandom);
      row_in = r; ts1_in = t; tot_in = o; load = 1;
      @(negedge clk); load = 0; row_in = ~r; ts1_in = ~t; tot_in = ~o;
      chk(full && row == r && ts1 == t && tot == o, "record stored");
      repeat (1 + $urandom % 4) @(negedge clk);
      chk(full && row == r && ts1 == t && tot == o, "record held");
      clr = 1; @(negedge clk); clr = 0;
      chk(!full, "empty after clr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
