// Test of the link serializer: a new random 32-bit word per word clock
// (32 bit clocks), phase locked to the bit clock; the serial output,
// deserialised with frame, must repeat the words in order, MSB first, one
// word per 32 bit clocks (1.28 Gbit/s at a 40 MHz word clock).
module tb_mpix_serializer;
  logic clk_ser = 0, wclk = 0, rst_n = 0;
  logic [31:0] word_in = '0;
  logic sdata, frame;
  int checks = 0, failures = 0;
  logic [31:0] sent[$], got[$];

  mpix_serializer dut (.*);
  always #1 clk_ser = ~clk_ser;
  always #32 wclk = ~wclk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge wclk) if (rst_n) begin
    word_in <= $urandom;
  end
  always @(negedge wclk) if (rst_n) sent.push_back(word_in);

  logic [31:0] sh;
  int nb = -1, last_frame = -1, nclk = 0;
  always @(negedge clk_ser) if (rst_n) begin
    nclk++;
    if (frame) begin
      if (last_frame >= 0) chk(nclk - last_frame == 32, "frame every 32 bit clocks");
      last_frame = nclk;
      if (nb == 32) got.push_back(sh);
      nb = 0;
    end
    if (nb >= 0) begin sh = {sh[30:0], sdata}; nb++; end
  end

  initial begin
    int off;
    repeat (3) @(negedge wclk);
    rst_n = 1;
    repeat (300) @(negedge wclk);
    // find the fixed latency, then all words must match
    off = -1;
    for (int k = 0; k < 4 && off < 0; k++)
      if (got.size() > k + 10 && got[k] == sent[0]) off = k;
    for (int k = 1; k < 4 && off < 0; k++)
      if (got.size() > 10 && got[0] == sent[k]) off = -k - 10;
    chk(off != -1, "serial words found");
    if (off >= 0) begin
      for (int i = 0; i + off < got.size() && i < sent.size(); i++)
        chk(got[i + off] == sent[i], $sformatf("word %0d", i));
    end else if (off != -1) begin
      for (int i = 0; i < got.size() && i + (-off - 10) < sent.size(); i++)
        chk(got[i] == sent[i + (-off - 10)], $sformatf("word %0d", i));
    end
    chk(checks > 250, "enough words compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
