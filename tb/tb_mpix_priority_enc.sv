// Test of the column priority logic at the MightyPix1 column height (320
// rows): the lowest requesting row must win. Random and single-bit request
// patterns are compared with a reference scan written in the test.
module tb_mpix_priority_enc;
  localparam int N = 320;
  logic [N-1:0] req;
  logic valid;
  logic [8:0] idx;
  int checks = 0, failures = 0;

  mpix_priority_enc #(.N(N)) dut (.*);

  task automatic check_one();
    int exp_i = -1;
    for (int i = N - 1; i >= 0; i--) if (req[i]) exp_i = i;
    #1;
    checks++;
    if (valid != (exp_i >= 0) || (exp_i >= 0 && int'(idx) != exp_i)) begin
      failures++;
      $display("FAIL: req lowest %0d got valid %b idx %0d", exp_i, valid, idx);
    end
  endtask

  initial begin
    req = '0; check_one();
    for (int i = 0; i < N; i++) begin req = '0; req[i] = 1; check_one(); end
    for (int i = 0; i < N; i++) begin req = '1 << i; check_one(); end
    repeat (500) begin
      for (int w = 0; w < N; w += 32) req[w +: 32] = $urandom & $urandom & $urandom;
      check_one();
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
