// End-to-end testbench of xtalk_bidir_bus at its default size (six wires,
// 32-entry defect library).
//
// A reference kept here mirrors both parameter files (nominal couplings,
// threshold writes, injected and restored defects) and both directions of
// the bus, and predicts every received word, effect code, hold mask and
// error flag two clocks after the vector was driven.
//
// Phases:
//   A  nominal couplings, A drives: no crosstalk error may appear
//      (wire 3 sees at most 1.098 pF against 1.1529 pF).
//   B  lower thresholds are calibrated into the B-to-A file; B drives a
//      random stream, so errors appear in that direction only.
//   C  the validation experiment: 200 cases, each a random defect that
//      scales the five couplings of wire 3 by -20 .. +30 % (effective
//      coupling 0.88 .. 1.43 pF, about the spread of the published cases),
//      followed by
//      the vector pair that makes wire 3 rise against falling aggressors;
//      a rising delay must appear exactly when the perturbed sum reaches
//      the threshold.
//   D  random defects over all pairs, injected and restored, with random
//      traffic, idle gaps and direction switches in between.
// Each mechanism is counted and must occur at least once: the six error
// effects, a speedup hitting the word before, defect injection and restore,
// threshold calibration, a direction switch, an ignored vector from the
// non-driving side and an idle gap.
module tb_xtalk_bidir_bus;
  import xtalk_pkg::*;

  localparam int unsigned N      = 6;
  localparam int unsigned DEPTH  = 32;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          dir = 0;
  logic          a_tx_valid = 0, b_tx_valid = 0;
  logic [N-1:0]  a_tx_data = '0, b_tx_data = '0;
  logic          a_rx_valid, b_rx_valid, a_rx_err, b_rx_err;
  logic [N-1:0]  a_rx_data, b_rx_data, a_rx_hold_mask, b_rx_hold_mask;
  effect_e       a_rx_effect [N];
  effect_e       b_rx_effect [N];
  logic          cfg_en = 0, cfg_sel = 0, cfg_ready;
  param_wr_t     cfg_wr;
  logic          lib_we = 0;
  logic [AW-1:0] lib_addr = '0;
  defect_entry_t lib_wdata;
  logic          inj_start = 0, inj_restore = 0;
  logic [AW-1:0] inj_idx = '0;
  logic          inj_busy, inj_done;

  xtalk_bidir_bus dut (
    .clk, .rst_n, .dir,
    .a_tx_valid, .a_tx_data, .a_rx_valid, .a_rx_data, .a_rx_effect,
    .a_rx_hold_mask, .a_rx_err,
    .b_tx_valid, .b_tx_data, .b_rx_valid, .b_rx_data, .b_rx_effect,
    .b_rx_hold_mask, .b_rx_err,
    .cfg_en, .cfg_sel, .cfg_wr, .cfg_ready,
    .lib_we, .lib_addr, .lib_wdata, .inj_start, .inj_idx, .inj_restore,
    .inj_busy, .inj_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_eff [7];
  int n_hold = 0, n_inject = 0, n_restore = 0, n_calib = 0, n_switch = 0;
  int n_ignored = 0, n_gap = 0;
  int fig7_err = 0;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- reference state: index 0 = A-to-B, 1 = B-to-A ------------------
  int           r_cap [2][N][N];
  int           r_cth [2][N][6];
  logic [N-1:0] r_prev [2];
  bit           p_valid [2];
  logic [N-1:0] p_rx [2];
  int           p_eff [2][N];
  // library copy
  int l_a [DEPTH], l_b [DEPTH], l_p [DEPTH], l_last [DEPTH];

  function automatic int nominal(int a, int b);
    int lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (lo == 0 && hi == 2) return 2000;
    if (lo == 1 && hi == 2) return 3000;
    if (lo == 2 && hi == 3) return 3000;
    if (lo == 2 && hi == 4) return 2000;
    if (lo == 2 && hi == 5) return 980;
    return 0;
  endfunction

  function automatic int eff_of(int d, logic p, logic c, int ccv, int i);
    int t[6];
    for (int f = 0; f < 6; f++) t[f] = r_cth[d][i][f];
    if (!p && !c) return (t[0] != 0 && ccv >=  t[0]) ? 1 : 0;
    if ( p &&  c) return (t[1] != 0 && ccv <= -t[1]) ? 2 : 0;
    if (!p &&  c) return (t[2] != 0 && ccv <= -t[2]) ? 3 :
                         (t[4] != 0 && ccv >=  t[4]) ? 5 : 0;
    return (t[3] != 0 && ccv >= t[3]) ? 4 : (t[5] != 0 && ccv <= -t[5]) ? 6 : 0;
  endfunction

  // One clock: drive, then check both receivers against the reference.
  task automatic step(logic d_dir, bit av, logic [N-1:0] ad, bit bv, logic [N-1:0] bd,
                      string tag);
    bit           v   [2];
    logic [N-1:0] x   [2];
    logic [N-1:0] rx  [2];
    logic [N-1:0] sp  [2];
    int           eff [2][N];
    if (d_dir != dir) n_switch++;
    dir = d_dir;
    a_tx_valid = av; a_tx_data = ad;
    b_tx_valid = bv; b_tx_data = bd;
    v[0] = av && !d_dir;  x[0] = ad;
    v[1] = bv &&  d_dir;  x[1] = bd;
    if ((av && d_dir) || (bv && !d_dir)) n_ignored++;
    if (!v[0] && !v[1]) n_gap++;
    for (int d = 0; d < 2; d++) begin
      sp[d] = '0;
      for (int i = 0; i < N; i++) begin
        int cc;
        cc = 0;
        for (int j = 0; j < N; j++)
          if (j != i) cc += (int'(x[d][j]) - int'(r_prev[d][j])) * r_cap[d][i][j];
        eff[d][i] = eff_of(d, r_prev[d][i], x[d][i], cc, i);
        case (eff[d][i])
          1: rx[d][i] = 1'b1;
          2: rx[d][i] = 1'b0;
          3, 4: rx[d][i] = r_prev[d][i];
          default: rx[d][i] = x[d][i];
        endcase
        if (v[d] && (eff[d][i] == 5 || eff[d][i] == 6)) sp[d][i] = 1'b1;
      end
    end
    @(posedge clk);
    #1;
    for (int d = 0; d < 2; d++) begin
      logic         o_valid, o_err;
      logic [N-1:0] o_data, o_mask;
      int           o_eff [N];
      string        s;
      s = $sformatf("%s %s", tag, d == 0 ? "A->B" : "B->A");
      o_valid = d == 0 ? b_rx_valid : a_rx_valid;
      o_err   = d == 0 ? b_rx_err   : a_rx_err;
      o_data  = d == 0 ? b_rx_data  : a_rx_data;
      o_mask  = d == 0 ? b_rx_hold_mask : a_rx_hold_mask;
      for (int i = 0; i < N; i++) o_eff[i] = d == 0 ? int'(b_rx_effect[i]) : int'(a_rx_effect[i]);
      check({s, " valid"}, int'(o_valid), int'(p_valid[d]));
      if (p_valid[d]) begin
        bit exp_err;
        exp_err = (sp[d] != 0);
        check({s, " data"}, int'(o_data), int'((p_rx[d] & ~sp[d]) | (x[d] & sp[d])));
        check({s, " hold mask"}, int'(o_mask), int'(sp[d]));
        for (int i = 0; i < N; i++) begin
          check($sformatf("%s effect[%0d]", s, i), o_eff[i], p_eff[d][i]);
          n_eff[p_eff[d][i]]++;
          if (p_eff[d][i] != 0) exp_err = 1;
        end
        check({s, " err"}, int'(o_err), int'(exp_err));
        if (sp[d] != 0) n_hold++;
      end
      p_valid[d] = v[d];
      if (v[d]) begin
        p_rx[d]   = rx[d];
        r_prev[d] = x[d];
        for (int i = 0; i < N; i++) p_eff[d][i] = eff[d][i];
      end
    end
  endtask

  task automatic idle(int n);
    for (int k = 0; k < n; k++) step(dir, 0, '0, 0, '0, "idle");
  endtask

  // Threshold calibration of one receiver fault in one direction's file.
  task automatic calibrate(int d, int i, int f, int value);
    @(negedge clk);
    check("cfg_ready when idle", int'(cfg_ready), 1);
    cfg_en = 1; cfg_sel = d[0];
    cfg_wr.kind = PW_CTH; cfg_wr.a = IDX_W'(i); cfg_wr.b = IDX_W'(f);
    cfg_wr.data = cap_t'(value);
    @(negedge clk);
    cfg_en = 0;
    r_cth[d][i][f] = value;
    n_calib++;
  endtask

  task automatic load_entry(int k, int a, int b, int p, int last);
    @(negedge clk);
    lib_we = 1; lib_addr = AW'(k);
    lib_wdata.a = IDX_W'(a); lib_wdata.b = IDX_W'(b);
    lib_wdata.pct = 8'(p); lib_wdata.last = 1'(last);
    l_a[k] = a; l_b[k] = b; l_p[k] = p; l_last[k] = last;
    @(negedge clk);
    lib_we = 0;
  endtask

  // Inject (or restore) the defect starting at entry k; the bus is idle
  // meanwhile. The reference applies the same writes to both files.
  task automatic inject(int k, bit rest);
    int cyc, e;
    @(negedge clk);
    inj_start = 1; inj_idx = AW'(k); inj_restore = rest;
    @(negedge clk);
    inj_start = 0;
    cyc = 0;
    while (inj_busy) begin
      check("cfg_ready low while injecting", int'(cfg_ready), 0);
      @(negedge clk);
      cyc++;
    end
    e = k;
    while (1) begin
      int val;
      if (rest || l_p[e] == 0) val = nominal(l_a[e], l_b[e]);
      else if (100 + l_p[e] <= 0) val = 0;
      else val = nominal(l_a[e], l_b[e]) * (100 + l_p[e]) / 100;
      if (l_a[e] != l_b[e] && l_a[e] < N && l_b[e] < N)
        for (int d = 0; d < 2; d++) begin
          r_cap[d][l_a[e]][l_b[e]] = val;
          r_cap[d][l_b[e]][l_a[e]] = val;
        end
      if (l_last[e] != 0 || e == DEPTH - 1) break;
      e++;
    end
    check("injection takes one clock per entry", cyc, e - k + 1);
    if (rest) n_restore++; else n_inject++;
  endtask

  initial begin
    for (int k = 0; k < 7; k++) n_eff[k] = 0;
    for (int d = 0; d < 2; d++) begin
      r_prev[d] = '0; p_valid[d] = 0; p_rx[d] = '0;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) r_cap[d][i][j] = (i == j) ? 0 : nominal(i, j);
        for (int f = 0; f < 6; f++) r_cth[d][i][f] = 11529;
      end
    end
    cfg_wr = '0; lib_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- A: nominal, A drives
    for (int t = 0; t < 500; t++)
      step(0, $urandom_range(4) != 0, N'($urandom), $urandom_range(3) == 0, N'($urandom), "A");
    begin
      int errs;
      errs = 0;
      for (int k = 1; k < 7; k++) errs += n_eff[k];
      check("phase A: no crosstalk error at nominal couplings", errs, 0);
    end

    // ---- B: calibrate lower thresholds for the B-to-A receivers
    for (int i = 0; i < N; i++)
      for (int f = 0; f < 6; f++) calibrate(1, i, f, $urandom_range(1500, 6000));
    for (int t = 0; t < 1500; t++)
      step(1, $urandom_range(3) == 0, N'($urandom), $urandom_range(4) != 0, N'($urandom), "B");
    idle(2);

    // ---- C: validation experiment on wire 3 (bit 2), A drives
    for (int c = 0; c < 200; c++) begin
      int p [5];
      int ceff;
      int a3 [5];
      a3 = '{0, 1, 3, 4, 5};
      for (int q = 0; q < 5; q++) begin
        p[q] = $urandom_range(50) - 20;
        load_entry(q, 2, a3[q], p[q], q == 4);
      end
      inject(0, 0);
      ceff = 0;
      for (int q = 0; q < 5; q++) ceff += r_cap[0][2][a3[q]];
      step(0, 1, 6'b111011, 0, '0, "C setup");
      step(0, 1, 6'b000100, 0, '0, "C rise");
      idle(2);
      check($sformatf("case %0d rising delay iff Ceff >= Cth", c),
            p_eff[0][2] == 3, ceff >= r_cth[0][2][FT_RD]);
      if (p_eff[0][2] == 3) fig7_err++;
      inject(0, 1);
    end
    $display("validation: %0d of 200 cases give a rising delay on wire 3", fig7_err);

    // ---- D: random defects, traffic in both directions
    for (int round = 0; round < 40; round++) begin
      int k, len;
      k = 0;
      len = $urandom_range(1, 6);
      for (int e = 0; e < len; e++) begin
        int a, b;
        a = $urandom_range(N - 1);
        b = $urandom_range(N - 1);
        if (a == b) b = (a + 1) % N;
        load_entry(e, a, b, $urandom_range(170) - 50, e == len - 1);
      end
      inject(0, 0);
      for (int t = 0; t < 100; t++) begin
        logic nd;
        nd = ($urandom_range(15) == 0) ? ~dir : dir;
        step(nd, $urandom_range(3) != 0, N'($urandom), $urandom_range(3) != 0, N'($urandom), "D");
      end
      idle(2);
      if (round % 2 == 1) inject(0, 1);
    end
    idle(3);

    for (int k = 1; k < 7; k++) check($sformatf("effect %0d occurred", k), n_eff[k] > 0, 1);
    check("speedup hit the word before", n_hold > 0, 1);
    check("defect injected", n_inject > 0, 1);
    check("defect restored", n_restore > 0, 1);
    check("threshold calibrated", n_calib > 0, 1);
    check("direction switched", n_switch > 0, 1);
    check("vector on the non-driving side ignored", n_ignored > 0, 1);
    check("idle gap", n_gap > 0, 1);
    check("validation cases with and without error", (fig7_err > 0) && (fig7_err < 200), 1);
    $display("effects: PG=%0d NG=%0d RD=%0d FD=%0d SR=%0d SF=%0d hold=%0d",
             n_eff[1], n_eff[2], n_eff[3], n_eff[4], n_eff[5], n_eff[6], n_hold);
    $display("injections=%0d restores=%0d calibrations=%0d switches=%0d ignored=%0d gaps=%0d",
             n_inject, n_restore, n_calib, n_switch, n_ignored, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
