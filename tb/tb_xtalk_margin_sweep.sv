// Workload testbench: the validation sweep of the six-wire bus.
//
// Three buses are built side by side with thresholds calibrated for design
// margins of 5, 10 and 15 % (1.1529, 1.2080 and 1.2627 pF) and driven with
// the same stimulus from core A. For each perturbation range of 10, 15,
// 20, 25 and 30 % and each of five random vector pairs V0..V4 (wire 3 made
// to switch in every pair), 40 random defects are injected, each scaling
// the five couplings C13, C23, C34, C35, C36 by a random amount within
// +/- the range. The pair is driven, and both received words of every bus
// are compared with a reference formed here (effective coupling, error
// criteria, glitch / delay / speedup applied to the sampled words).
// The number of cases with a crosstalk error on wire 3 is printed for every
// margin and range, the layout of the published accuracy tables.
module tb_xtalk_margin_sweep;
  import xtalk_pkg::*;

  localparam int unsigned N  = 6;
  localparam int unsigned AW = 5;
  localparam int NM = 3;
  localparam int MARGIN [NM] = '{5, 10, 15};
  localparam int CTH    [NM] = '{11529, 12080, 12627};

  logic          clk = 0, rst_n = 0;
  logic          a_tx_valid = 0;
  logic [N-1:0]  a_tx_data = '0;
  logic          lib_we = 0;
  logic [AW-1:0] lib_addr = '0;
  defect_entry_t lib_wdata;
  logic          inj_start = 0, inj_restore = 0;
  param_wr_t     cfg_wr;

  logic          rx_valid [NM];
  logic [N-1:0]  rx_data  [NM];
  logic [N-1:0]  rx_mask  [NM];
  effect_e       rx_eff   [NM][N];
  logic          busy     [NM];

  for (genvar g = 0; g < NM; g++) begin : g_bus
    logic          a_rx_valid, a_rx_err, b_rx_err, cfg_ready, inj_done;
    logic [N-1:0]  a_rx_data, a_rx_hold_mask;
    effect_e       a_rx_effect [N];
    xtalk_bidir_bus #(.DESIGN_MARGIN(MARGIN[g])) u_bus (
      .clk, .rst_n, .dir(1'b0),
      .a_tx_valid, .a_tx_data, .a_rx_valid, .a_rx_data, .a_rx_effect,
      .a_rx_hold_mask, .a_rx_err,
      .b_tx_valid(1'b0), .b_tx_data('0), .b_rx_valid(rx_valid[g]),
      .b_rx_data(rx_data[g]), .b_rx_effect(rx_eff[g]),
      .b_rx_hold_mask(rx_mask[g]), .b_rx_err,
      .cfg_en(1'b0), .cfg_sel(1'b0), .cfg_wr, .cfg_ready,
      .lib_we, .lib_addr, .lib_wdata, .inj_start, .inj_idx('0),
      .inj_restore, .inj_busy(busy[g]), .inj_done);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int r_cap [N][N];
  logic [N-1:0] r_prev;
  int hits [NM][5];

  initial begin
    #100000000;
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

  // Effect code (0 none, 1 PG, 2 NG, 3 RD, 4 FD, 5 SR, 6 SF) of wire i.
  function automatic int eff_of(logic [N-1:0] p, logic [N-1:0] c, int i, int t);
    int cc;
    cc = 0;
    for (int j = 0; j < N; j++) if (j != i) cc += (int'(c[j]) - int'(p[j])) * r_cap[i][j];
    if (!p[i] && !c[i]) return (cc >=  t) ? 1 : 0;
    if ( p[i] &&  c[i]) return (cc <= -t) ? 2 : 0;
    if (!p[i] &&  c[i]) return (cc <= -t) ? 3 : (cc >= t) ? 5 : 0;
    return (cc >= t) ? 4 : (cc <= -t) ? 6 : 0;
  endfunction

  function automatic logic [N-1:0] rx_of(logic [N-1:0] p, logic [N-1:0] c, int t);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++)
      case (eff_of(p, c, i, t))
        1: r[i] = 1'b1;
        2: r[i] = 1'b0;
        3, 4: r[i] = p[i];
        default: r[i] = c[i];
      endcase
    return r;
  endfunction

  function automatic logic [N-1:0] sp_of(logic [N-1:0] p, logic [N-1:0] c, int t);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = eff_of(p, c, i, t) inside {5, 6};
    return s;
  endfunction

  task automatic run_injector(bit rest);
    @(negedge clk);
    inj_start = 1; inj_restore = rest;
    @(negedge clk);
    inj_start = 0;
    while (busy[0]) @(negedge clk);
  endtask

  task automatic drive(bit v, logic [N-1:0] d);
    @(negedge clk);
    a_tx_valid = v;
    a_tx_data  = d;
  endtask

  localparam int PA [5] = '{0, 1, 2, 2, 2};
  localparam int PB [5] = '{2, 2, 3, 4, 5};

  initial begin
    logic [N-1:0] v1 [5];
    logic [N-1:0] v2 [5];
    int ranges [5];
    ranges = '{10, 15, 20, 25, 30};
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) r_cap[i][j] = (i == j) ? 0 : nominal(i, j);
    r_prev = '0;
    for (int m = 0; m < NM; m++) for (int r = 0; r < 5; r++) hits[m][r] = 0;
    cfg_wr = '0; lib_wdata = '0;
    // V0: wire 3 rises against falling aggressors (the calibration vector);
    // V1..V4: random pairs in which wire 3 switches.
    v1[0] = 6'b111011; v2[0] = 6'b000100;
    for (int k = 1; k < 5; k++) begin
      v1[k] = N'($urandom);
      v2[k] = N'($urandom);
      v2[k][2] = ~v1[k][2];
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < 5; k++) begin
        for (int t = 0; t < 40; t++) begin
          logic [N-1:0] p0;
          // defect: the five couplings, each within +/- range
          for (int e = 0; e < 5; e++) begin
            int pct;
            pct = $urandom_range(2 * ranges[r]) - ranges[r];
            @(negedge clk);
            lib_we = 1; lib_addr = AW'(e);
            lib_wdata.a = IDX_W'(PA[e]); lib_wdata.b = IDX_W'(PB[e]);
            lib_wdata.pct = 8'(pct); lib_wdata.last = (e == 4);
            r_cap[PA[e]][PB[e]] = nominal(PA[e], PB[e]) * (100 + pct) / 100;
            r_cap[PB[e]][PA[e]] = r_cap[PA[e]][PB[e]];
          end
          @(negedge clk);
          lib_we = 0;
          run_injector(0);
          // drive the pair on consecutive clocks, then idle
          p0 = r_prev;
          drive(1, v1[k]);
          drive(1, v2[k]);
          drive(0, '0);
          // word 1 leaves now (two clocks after it entered)
          #1;
          for (int m = 0; m < NM; m++) begin
            logic [N-1:0] sp, w1;
            sp = sp_of(v1[k], v2[k], CTH[m]);
            w1 = (rx_of(p0, v1[k], CTH[m]) & ~sp) | (v2[k] & sp);
            check("word 1 valid", int'(rx_valid[m]), 1);
            check($sformatf("margin %0d word 1 data", MARGIN[m]), int'(rx_data[m]), int'(w1));
            check($sformatf("margin %0d word 1 hold mask", MARGIN[m]), int'(rx_mask[m]), int'(sp));
            for (int i = 0; i < N; i++)
              check($sformatf("margin %0d word 1 effect %0d", MARGIN[m], i),
                    int'(rx_eff[m][i]), eff_of(p0, v1[k], i, CTH[m]));
          end
          drive(0, '0);
          #1;
          for (int m = 0; m < NM; m++) begin
            int e3;
            check("word 2 valid", int'(rx_valid[m]), 1);
            check($sformatf("margin %0d word 2 data", MARGIN[m]), int'(rx_data[m]),
                  int'(rx_of(v1[k], v2[k], CTH[m])));
            check($sformatf("margin %0d word 2 hold mask", MARGIN[m]), int'(rx_mask[m]), 0);
            for (int i = 0; i < N; i++)
              check($sformatf("margin %0d word 2 effect %0d", MARGIN[m], i),
                    int'(rx_eff[m][i]), eff_of(v1[k], v2[k], i, CTH[m]));
            e3 = eff_of(v1[k], v2[k], 2, CTH[m]);
            if (e3 != 0) hits[m][r]++;
          end
          r_prev = v2[k];
          run_injector(1);
          for (int e = 0; e < 5; e++) begin
            r_cap[PA[e]][PB[e]] = nominal(PA[e], PB[e]);
            r_cap[PB[e]][PA[e]] = r_cap[PA[e]][PB[e]];
          end
        end
      end
    end

    $display("cases (of 200 per cell) with a crosstalk error on wire 3:");
    $display("margin | +/-10%%  +/-15%%  +/-20%%  +/-25%%  +/-30%%");
    for (int m = 0; m < NM; m++)
      $display("  %2d%%  | %5d   %5d   %5d   %5d   %5d", MARGIN[m],
               hits[m][0], hits[m][1], hits[m][2], hits[m][3], hits[m][4]);
    // Within +/-10 % the couplings of wire 3 sum to at most 1.2078 pF, below
    // the 10 % and 15 % thresholds (1.2080, 1.2627 pF): no error is possible.
    check("no error at +/-10 % with margins of 10 and 15 %", hits[1][0] + hits[2][0], 0);
    check("errors appear at the widest range, 5 % margin", hits[0][4] > 0, 1);
    check("wider ranges give no fewer errors (5 % margin)", hits[0][4] >= hits[0][0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
