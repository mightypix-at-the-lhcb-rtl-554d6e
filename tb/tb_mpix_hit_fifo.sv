// Test of the 16-hit FIFO: random pushes and pops against a queue model;
// checks order, level, full (in_ready low at 16 entries) and empty.
module tb_mpix_hit_fifo;
  logic clk = 0, rst_n = 0;
  logic [47:0] in_data, out_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [4:0] level;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [47:0] model[$];

  mpix_hit_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 2;  // alternate push-heavy and pop-heavy phases
      in_valid  = ($urandom % 100) < (phase ? 30 : 80);
      out_ready = ($urandom % 100) < (phase ? 80 : 30);
      in_data   = {16'($urandom), 32'($urandom)};
      #1;
      chk(int'(level) == model.size(), $sformatf("level %0d model %0d", level, model.size()));
      chk(in_ready == (model.size() < 16), "in_ready");
      chk(out_valid == (model.size() > 0), "out_valid");
      if (out_valid && model.size() > 0) chk(out_data == model[0], "data order");
      if (model.size() == 16) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    chk(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
