// Test environment for the MightyPix readout top (used by tb_mpix_top and
// tb_mpix_top_full; connects to an mpix_top instance through its ports).
//
// Makes the clocks (bunch crossing = 64 time units, clk = BX / CLK_PER_BX,
// bit clock period 2 = 32 bits per BX), drives the comparator outputs and
// bx_reset, and checks what leaves on the link against its own list of
// injected hits:
//  * directed part: a burst of simultaneous hits in every column (rows
//    0..BURST_ROWS-1 and the top row of column 0), then a second pulse on the
//    top pixel of column 0 while its first hit still waits; it must be lost
//    (dead pixel). Each column must deliver its hits lowest row first.
//    Then a bx_reset, after which the bunch-crossing ID must be 0.
//  * random part: N_BX bunch crossings with on average HITS_PER_KBX hits per
//    1000 bunch crossings on random pixels that hold no hit. Every such hit
//    must arrive exactly once with its column, row, time stamp (bunch-
//    crossing ID at the leading edge) and ToT (in bunch crossings).
// The link is decoded from link_word (MightyPix1: word pairs; MightyPix2:
// 48-bit hits in 16-bit steps) and the serial output is deserialised and
// compared with the parallel words. Mechanisms seen are counted; one that
// never happens counts as a failure.
module tb_mpix_env
  import mpix_pkg::*;
#(
  parameter bit          MP2          = 1'b0,
  parameter int unsigned ROWS         = 320,
  parameter int unsigned COLS         = 29,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned N_BX         = 4000,
  parameter int unsigned HITS_PER_KBX = 358,
  parameter int unsigned TOT_MAX_BX   = 20,
  parameter int unsigned BURST_ROWS   = 6,
  parameter int unsigned SEED         = 1
) (
  output logic                      clk,
  output logic                      clk_ser,
  output logic                      rst_n,
  output logic                      bx_reset,
  output logic [COLS-1:0][ROWS-1:0] comp,
  input  logic [11:0]               bxid,
  input  logic [31:0]               link_word,
  input  logic                      link_strobe,
  input  logic                      ser_out,
  input  logic                      ser_frame,
  input  logic [COLS-1:0][ROWS-1:0] pix_busy,
  input  logic                      fsm_stall,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level,
  output logic                      done,
  output int                        checks,
  output int                        failures
);

  localparam int unsigned CPB = MP2 ? 4 : 1;     // clk cycles per BX
  localparam int unsigned CLK_HALF = 32 / CPB;

  initial begin clk = 0; forever #(CLK_HALF) clk = ~clk; end
  initial begin clk_ser = 0; forever #1 clk_ser = ~clk_ser; end

  typedef struct {
    int col, row, ts, tot;
    longint t_rise;
  } exp_t;

  exp_t   expq[$];
  bit     pending [COLS][ROWS];
  typedef struct { int col, row; longint t_off; } pulse_t;
  pulse_t active[$];

  longint cyc = 0;
  int     n_injected = 0, n_received = 0, n_unexpected = 0;
  int     m_prio = 0, m_dead = 0, m_wrap = 0, m_bxreset = 0, m_stall = 0,
          m_fifo_full = 0, m_idle_half = 0, m_multi_round = 0, m_ser_words = 0;
  int     last_row [COLS];
  longint max_latency_bx = 0;
  int     burst_left = 0;
  bit     in_burst = 0;
  logic [11:0] prev_bxid = '0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL[%s] t=%0t: %s", MP2 ? "MP2" : "MP1", $time, what);
    end
  endtask

  // Start a comparator pulse at this negedge lasting tot_cyc clk cycles.
  task automatic pulse(int c, int r, int tot_cyc);
    comp[c][r] = 1'b1;
    active.push_back('{col: c, row: r, t_off: cyc + tot_cyc});
  endtask

  // Cycle count (rising edge) and pulse ends (falling edge).
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    for (int i = active.size() - 1; i >= 0; i--)
      if (active[i].t_off == cyc) begin
        comp[active[i].col][active[i].row] = 1'b0;
        active.delete(i);
      end
    if (rst_n && bxid == 12'd0 && prev_bxid == 12'(BX_PER_ORBIT - 1)) m_wrap++;
    if (rst_n) chk(bxid < 12'(BX_PER_ORBIT), "bxid out of range");
    prev_bxid = bxid;
    if (fsm_stall) m_stall++;
    if (32'(fifo_level) == FIFO_DEPTH) m_fifo_full++;
  end

  // ---------------- link decoder ----------------
  logic [31:0] words[$];
  logic [31:0] w0;
  bit          have_w0 = 0;
  logic [15:0] gran[3];
  int          ngran = 0;

  task automatic got_hit(int c, int r, int ts, int tot);
    int idx = -1;
    n_received++;
    foreach (expq[i]) if (idx < 0 && expq[i].col == c && expq[i].row == r) idx = i;
    if (idx < 0) begin
      n_unexpected++;
      chk(0, $sformatf("unexpected hit col %0d row %0d ts %0d", c, r, ts));
      return;
    end
    chk(expq[idx].ts == ts, $sformatf("col %0d row %0d ts %0d expected %0d", c, r, ts, expq[idx].ts));
    chk(expq[idx].tot == tot, $sformatf("col %0d row %0d tot %0d expected %0d", c, r, tot, expq[idx].tot));
    if ((cyc - expq[idx].t_rise) / CPB > max_latency_bx) max_latency_bx = (cyc - expq[idx].t_rise) / CPB;
    chk((cyc - expq[idx].t_rise) / CPB < BX_PER_ORBIT, "readout took longer than one orbit");
    if (in_burst) begin
      chk(r > last_row[c], $sformatf("priority: col %0d row %0d after row %0d", c, r, last_row[c]));
      if (c == 0 && r > last_row[c]) m_prio++;
      if (last_row[c] >= 0) m_multi_round++;
      last_row[c] = r;
      burst_left--;
    end
    pending[c][r] = 0;
    expq.delete(idx);
  endtask

  always @(negedge clk) if (rst_n && link_strobe) begin
    words.push_back(link_word);
    if (!MP2) begin
      if (!have_w0) begin
        if (link_word != IDLE_WORD) begin
          chk(link_word[31:28] == TAG_W0, $sformatf("bad first word %h", link_word));
          w0 = link_word;
          have_w0 = 1;
        end
      end else begin
        chk(link_word[31:28] == TAG_W1 && link_word[19:0] == 20'h0,
            $sformatf("bad second word %h", link_word));
        got_hit(int'(w0[27:22]), int'(w0[21:12]), int'(w0[11:0]), int'(link_word[27:20]));
        have_w0 = 0;
      end
    end else begin
      for (int h = 0; h < 2; h++) begin
        logic [15:0] g;
        g = h == 0 ? link_word[31:16] : link_word[15:0];
        if (ngran == 0 && g == IDLE_HALF) begin
          if (h == 1) m_idle_half++;
        end else begin
          gran[ngran] = g;
          ngran++;
          if (ngran == 3) begin
            logic [47:0] hw;
            hw = {gran[0], gran[1], gran[2]};
            chk(hw[47:44] == TAG_H48 && hw[7:0] == 8'h0, $sformatf("bad hit word %h", hw));
            got_hit(int'(hw[43:38]), int'(hw[37:28]), int'(hw[27:16]), int'(hw[15:8]));
            ngran = 0;
          end
        end
      end
    end
  end

  // ---------------- serial link ----------------
  logic [31:0] sh;
  int          nbits = -1;
  logic [31:0] swords[$];
  always @(negedge clk_ser) if (rst_n) begin
    if (ser_frame) begin
      if (nbits == 32) swords.push_back(sh);
      nbits = 0;
    end
    if (nbits >= 0) begin
      sh = {sh[30:0], ser_out};
      nbits++;
    end
  end

  task automatic check_serial();
    int best = -99, best_err = 1 << 30;
    for (int k = -4; k <= 4; k++) begin
      int err = 0, n = 0;
      for (int i = 0; i < swords.size(); i++)
        if (i + k >= 0 && i + k < words.size()) begin
          n++;
          if (swords[i] != words[i + k]) err++;
        end
      if (n > 100 && err < best_err) begin best_err = err; best = k; end
    end
    chk(best > -99 && best_err == 0, $sformatf("serial stream differs from link words (%0d errors)", best_err));
    if (best > -99)
      for (int i = 0; i < swords.size(); i++)
        if (i + best >= 0 && i + best < words.size() && swords[i] != IDLE_WORD) m_ser_words++;
  endtask

  // ---------------- stimulus ----------------
  task automatic inject(int c, int r, int tot_bx);
    exp_t e;
    e.col = c; e.row = r; e.ts = int'(bxid);
    e.tot = (tot_bx * 1) & 8'hFF;
    e.t_rise = cyc;
    pulse(c, r, tot_bx * CPB);
    pending[c][r] = 1;
    expq.push_back(e);
    n_injected++;
  endtask

  task automatic wait_bx(int n);
    repeat (n * CPB) @(negedge clk);
  endtask

  task automatic drain(int limit_bx);
    int t = 0;
    while (expq.size() != 0 && t < limit_bx) begin wait_bx(1); t++; end
    chk(expq.size() == 0, $sformatf("%0d hits never arrived", expq.size()));
  endtask

  initial begin
    int unsigned s;
    s = $urandom(SEED);
    checks = 0; failures = 0; done = 0;
    rst_n = 0; bx_reset = 0; comp = '0;
    foreach (pending[c, r]) pending[c][r] = 0;
    foreach (last_row[c]) last_row[c] = -1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait_bx(10);
    // --- burst: priority logic, several LOAD/READ rounds, FIFO full ---
    // The ToT of each hit is an exact number of bunch crossings when the
    // pulse starts on a BX boundary; align to it.
    while (MP2 && cyc % CPB != 0) @(negedge clk);
    in_burst = 1;
    for (int c = 0; c < int'(COLS); c++)
      for (int r = 0; r < int'(BURST_ROWS); r++) begin inject(c, r, 8); burst_left++; end
    inject(0, ROWS - 1, 8); burst_left++;
    wait_bx(10);
    // the top pixel of column 0 is still waiting for readout: a new pulse is lost
    chk(pix_busy[0][ROWS-1] == 1'b1, "top pixel of column 0 should be busy");
    pulse(0, ROWS - 1, 2 * CPB);
    m_dead++;
    drain(200000);
    in_burst = 0;
    chk(burst_left == 0, "burst hits missing");
    // --- bx_reset ---
    wait_bx(3);
    chk(bxid > 12'd5, "bxid should be running before bx_reset");
    bx_reset = 1;
    wait_bx(1);
    bx_reset = 0;
    chk(bxid == 12'd0, $sformatf("bxid %0d after bx_reset", bxid));
    if (bxid == 12'd0) m_bxreset++;
    // --- random hits ---
    for (int b = 0; b < int'(N_BX); b++) begin
      for (int k = 0; k < 4; k++)
        if (($urandom() % 4000) < HITS_PER_KBX) begin
          int c, r;
          c = int'($urandom() % COLS);
          r = int'($urandom() % ROWS);
          if (!pending[c][r] && !comp[c][r]) inject(c, r, 1 + int'($urandom() % TOT_MAX_BX));
        end
      wait_bx(1);
    end
    drain(200000);
    chk(n_unexpected == 0, "unexpected hits");
    check_serial();
    $display("[%s] injected %0d received %0d max readout time %0d BX", MP2 ? "MP2" : "MP1",
             n_injected, n_received, max_latency_bx);
    $display("[%s] mechanisms: priority %0d multi-round %0d dead-pixel %0d bxid-wrap %0d bx-reset %0d serial-words %0d stall %0d fifo-full %0d idle-half %0d",
             MP2 ? "MP2" : "MP1", m_prio, m_multi_round, m_dead, m_wrap, m_bxreset, m_ser_words,
             m_stall, m_fifo_full, m_idle_half);
    chk(m_prio > 0, "priority order never seen");
    chk(m_multi_round > 0, "no column gave several hits");
    chk(m_wrap > 0, "bxid never wrapped");
    chk(m_bxreset > 0, "bx_reset never worked");
    chk(m_ser_words > 0, "no hit words on the serial link");
    if (MP2) begin
      chk(m_stall > 0, "readout FSM never stalled on a full FIFO");
      chk(m_fifo_full > 0, "FIFO never full");
      chk(m_idle_half > 0, "gearbox never padded half a word");
    end
    done = 1;
  end

endmodule
