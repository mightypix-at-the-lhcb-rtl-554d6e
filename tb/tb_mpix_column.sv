// Test of one pixel column (16 rows): hits in several rows become ready
// after their ToT; each load pulse moves the ready hit of the lowest row
// into the EoC buffer (only when it is empty), with its TS1 and ToT, and
// frees that pixel.
module tb_mpix_column;
  localparam int ROWS = 16;
  logic clk = 0, rst_n = 0, load = 0, eoc_clr = 0;
  logic [ROWS-1:0] comp = '0, pix_busy;
  logic [11:0] ts1_in = '0, eoc_ts1;
  logic [7:0] ts2_in = '0, eoc_tot;
  logic eoc_full;
  logic [3:0] eoc_row;
  int checks = 0, failures = 0;

  mpix_column #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  // time stamp busses: TS1 counts cycles, TS2 counts cycles too
  always @(posedge clk) begin ts1_in <= ts1_in + 1; ts2_in <= ts2_in + 1; end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int rise_ts [ROWS];
  int tot_len [ROWS];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (30) begin
      logic [ROWS-1:0] set;
      int nexp;
      set = 16'($urandom) | 16'h1;
      // all chosen pixels rise together, each with its own ToT
      @(negedge clk);
      foreach (rise_ts[r]) if (set[r]) begin rise_ts[r] = int'(ts1_in); tot_len[r] = 1 + int'($urandom % 5); end
      comp = set;
      for (int k = 1; k <= 5; k++) begin
        @(negedge clk);
        foreach (tot_len[r]) if (set[r] && tot_len[r] == k) comp[r] = 0;
      end
      @(negedge clk);
      chk(pix_busy == set, "busy pattern");
      // load must not take a hit while the EoC buffer is full
      nexp = 0;
      for (int r = 0; r < ROWS; r++) if (set[r]) begin
        load = 1; @(negedge clk); load = 0;
        chk(eoc_full && int'(eoc_row) == r, $sformatf("expected row %0d got %0d full %b", r, eoc_row, eoc_full));
        chk(int'(eoc_ts1) == rise_ts[r] && int'(eoc_tot) == tot_len[r],
            $sformatf("row %0d ts %0d/%0d tot %0d/%0d", r, eoc_ts1, rise_ts[r], eoc_tot, tot_len[r]));
        chk(!pix_busy[r], "pixel freed");
        load = 1; @(negedge clk); load = 0;
        chk(int'(eoc_row) == r, "full EoC buffer not overwritten");
        eoc_clr = 1; @(negedge clk); eoc_clr = 0;
        nexp++;
      end
      chk(pix_busy == '0 && !eoc_full, "column empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
