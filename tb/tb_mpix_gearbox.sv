// Test of the MightyPix2 gearbox: 48-bit hits (random, tag nibble 6) are
// written at random times at up to one per cycle; link_en comes every 4th
// cycle (40 MHz link words at a 160 MHz clock). The 32-bit link words are
// decoded in 16-bit steps and must give back every hit in order. While the
// FIFO stays filled, 3 link words must carry exactly 2 hits (1.28 Gbit/s
// divided by 48 bits per hit).
module tb_mpix_gearbox;
  import mpix_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [47:0] in_data;
  logic in_valid = 0, in_ready, link_en;
  logic [31:0] link_word;
  logic [4:0] fifo_level;
  int checks = 0, failures = 0;
  logic [47:0] sent[$];
  int n_rx = 0, ngran = 0, cyc = 0, n_idle_half = 0;
  logic [15:0] gran[3];

  mpix_gearbox dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end
  assign link_en = (cyc % 4 == 3);

  // decoder: link_word is new in the cycle after link_en
  logic le_q = 0;
  always @(posedge clk) le_q <= link_en;
  always @(negedge clk) if (rst_n && le_q) begin
    for (int h = 0; h < 2; h++) begin
      logic [15:0] g;
      g = (h == 0) ? link_word[31:16] : link_word[15:0];
      if (ngran == 0 && g == IDLE_HALF) begin
        if (h == 1) n_idle_half++;
      end else begin
        gran[ngran] = g; ngran++;
        if (ngran == 3) begin
          chk(sent.size() > 0 && {gran[0], gran[1], gran[2]} == sent[0],
              $sformatf("hit %0d mismatch", n_rx));
          if (sent.size() > 0) void'(sent.pop_front());
          n_rx++; ngran = 0;
        end
      end
    end
  end

  task automatic push(logic [47:0] d);
    in_data = d; in_valid = 1;
    do @(posedge clk); while (!in_ready);
    sent.push_back(d);
    #1 in_valid = 0;
  endtask

  function automatic logic [47:0] rnd_hit();
    return {TAG_H48, 12'($urandom), 32'($urandom)};
  endfunction

  initial begin
    int rx0, t0;
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sparse hits: idle words and half-word padding
    repeat (60) begin
      push(rnd_hit());
      repeat ($urandom % 24) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    chk(sent.size() == 0, "sparse hits all delivered");
    // backlog: keep the FIFO filled and measure the rate
    fork
      repeat (300) push(rnd_hit());
      begin
        repeat (200) @(negedge clk);
        rx0 = n_rx; t0 = cyc;
        repeat (4 * 3 * 50) @(negedge clk);  // 150 link words
        chk(n_rx - rx0 == 100, $sformatf("%0d hits in 150 link words, expected 100", n_rx - rx0));
        chk(fifo_level >= 5'd14, "FIFO kept nearly full under backlog");
      end
    join
    repeat (4 * 400) @(negedge clk);
    chk(sent.size() == 0 && n_rx == 360, $sformatf("received %0d of 360", n_rx));
    chk(n_idle_half > 0, "half-word padding used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
