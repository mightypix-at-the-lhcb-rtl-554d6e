// Hit-rate points of the efficiency study (three rates, one after the other
// with a reset in between), on a full-size matrix
// (320 x 29 pixels, 0.8422 cm2). Every bunch crossing (25 ns) brings a
// Poisson-distributed number of hits with mean rate x 0.8422 x 25 ns,
// on random pixels, each with a ToT of TOT_BX bunch crossings (2 us = 80).
// A hit on a pixel that still holds one is lost, as on the chip. A hit counts
// as detected when a link record with its column, row and bunch-crossing ID
// arrives less than one orbit (3564 bunch crossings, 89.1 us) after it; the
// efficiency is detected / injected. After N_BX bunch crossings injection
// stops and the readout drains for one orbit.
module tb_mpix_eff_run
  import mpix_pkg::*;
#(
  parameter bit          MP2          = 1'b0,
  parameter int unsigned RATE0        = 17,
  parameter int unsigned RATE1        = 30,
  parameter int unsigned RATE2        = 40,
  parameter int unsigned N_BX         = 12000,
  parameter int unsigned TOT_BX       = 80,
  parameter int unsigned SEED         = 1
) (
  output logic  done,
  output int    checks,
  output int    failures,
  output real   eff [3]
);
  localparam int ROWS = 320, COLS = 29;
  localparam int CPB = MP2 ? 4 : 1;
  localparam real AREA_CM2 = 0.8422;

  logic clk = 0, clk_ser = 0, rst_n = 0, bx_reset = 0;
  logic [COLS-1:0][ROWS-1:0] comp, busy;
  logic [11:0] bxid;
  logic [31:0] lw;
  logic ls, so, sf, st, rd;
  logic [4:0] fl;

  always #(32 / CPB) clk = ~clk;
  always #1 clk_ser = ~clk_ser;

  mpix_top #(.MP2(MP2)) u_dut (
    .clk, .clk_ser, .rst_n, .bx_reset, .comp,
    .bxid, .link_word(lw), .link_strobe(ls), .ser_out(so), .ser_frame(sf),
    .pix_busy(busy), .fsm_stall(st), .fsm_reading(rd), .fifo_level(fl));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // injected hits not yet detected, by (col, row, bxid)
  longint inj[longint][$];
  int n_inj = 0, n_det = 0, n_late = 0, n_unmatched = 0;
  int rate = 0;
  longint max_rt = 0;

  typedef struct { int col, row; longint t_off; } pulse_t;
  pulse_t active[$];

  function automatic longint key(int c, int r, int ts);
    return (longint'(c) * ROWS + r) * 4096 + ts;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL[eff %s %0d]: %s", MP2 ? "MP2" : "MP1", rate, what); end
  endtask

  task automatic detected(int c, int r, int ts);
    longint k, rt;
    k = key(c, r, ts);
    if (!inj.exists(k) || inj[k].size() == 0) begin n_unmatched++; return; end
    rt = (cyc - inj[k].pop_front()) / CPB;
    if (rt > max_rt) max_rt = rt;
    if (rt < BX_PER_ORBIT) n_det++; else n_late++;
  endtask

  // link decoder
  logic [31:0] w0;
  bit have_w0 = 0;
  logic [15:0] gran[3];
  int ngran = 0;
  always @(negedge clk) if (rst_n && ls) begin
    if (!MP2) begin
      if (!have_w0) begin
        if (lw != IDLE_WORD) begin w0 = lw; have_w0 = 1; end
      end else begin
        chk(w0[31:28] == TAG_W0 && lw[31:28] == TAG_W1, "word tags");
        chk(int'(lw[27:20]) == TOT_BX, "ToT");
        detected(int'(w0[27:22]), int'(w0[21:12]), int'(w0[11:0]));
        have_w0 = 0;
      end
    end else begin
      for (int h = 0; h < 2; h++) begin
        logic [15:0] g;
        g = h == 0 ? lw[31:16] : lw[15:0];
        if (!(ngran == 0 && g == IDLE_HALF)) begin
          gran[ngran] = g; ngran++;
          if (ngran == 3) begin
            logic [47:0] hw;
            hw = {gran[0], gran[1], gran[2]};
            chk(hw[47:44] == TAG_H48, "hit tag");
            chk(int'(hw[15:8]) == TOT_BX, "ToT");
            detected(int'(hw[43:38]), int'(hw[37:28]), int'(hw[27:16]));
            ngran = 0;
          end
        end
      end
    end
  end

  // pulse ends
  always @(negedge clk) begin
    for (int i = active.size() - 1; i >= 0; i--)
      if (active[i].t_off == cyc) begin
        comp[active[i].col][active[i].row] = 1'b0;
        active.delete(i);
      end
  end

  function automatic int poisson(real lambda);
    real l, p;
    int k;
    l = $exp(-lambda); p = 1.0; k = 0;
    do begin k++; p = p * (real'($urandom) / 4294967296.0); end while (p > l);
    return k - 1;
  endfunction

  task automatic run_rate(int r_mhz, output real e);
    real lambda;
    rate = r_mhz;
    rst_n = 0;
    comp = '0;
    active.delete();
    inj.delete();
    n_inj = 0; n_det = 0; n_late = 0; n_unmatched = 0; max_rt = 0;
    have_w0 = 0; ngran = 0;
    lambda = real'(r_mhz) * AREA_CM2 * 0.025;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2 * CPB) @(negedge clk);
    for (int b = 0; b < int'(N_BX); b++) begin
      int n;
      n = poisson(lambda);
      for (int i = 0; i < n; i++) begin
        int c, r;
        c = int'($urandom % COLS); r = int'($urandom % ROWS);
        n_inj++;
        if (!comp[c][r]) begin
          comp[c][r] = 1'b1;
          active.push_back('{col: c, row: r, t_off: cyc + longint'(TOT_BX * CPB)});
        end
        inj[key(c, r, int'(bxid))].push_back(cyc);
      end
      repeat (CPB) @(negedge clk);
    end
    repeat (CPB * BX_PER_ORBIT) @(negedge clk);
    e = real'(n_det) / real'(n_inj);
    // the link carries one hit per 2 bunch crossings (2 x 32 bit) or 2 hits
    // per 3 (48 bit); nothing can beat that over the whole run
    chk(real'(n_det + n_late) <= real'(N_BX + BX_PER_ORBIT + 10) * (MP2 ? 2.0 / 3.0 : 0.5),
        $sformatf("%0d hits delivered, more than the link can carry", n_det + n_late));
    chk(n_unmatched == 0, $sformatf("%0d records match no injected hit", n_unmatched));
    $display("[eff %s %0d MHz/cm2] injected %0d detected %0d late %0d efficiency %0.4f max readout %0d BX",
             MP2 ? "MP2" : "MP1", r_mhz, n_inj, n_det, n_late, e, max_rt);
  endtask

  initial begin
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 0;
    run_rate(RATE0, eff[0]);
    run_rate(RATE1, eff[1]);
    run_rate(RATE2, eff[2]);
    done = 1;
  end
endmodule
