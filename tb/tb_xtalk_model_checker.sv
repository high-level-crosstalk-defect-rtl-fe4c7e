// Checker for xtalk_coupling_model at bus width N, used by
// tb_xtalk_coupling_model.
//
// A reference kept here recomputes, for every accepted vector, each wire's
// effective coupling capacitance from the coupling matrix, applies the
// error-criteria table and forms the receiver word: glitches invert the bit,
// delays keep the old bit, and a speedup of the next vector (if it follows
// on the very next clock) overwrites the bit of the word before. The DUT's
// output must match it word for word, two clocks after the vector entered.
//
// Phases: (1) for the six-wire bus only, directed cases of the validation
// bus: wire 3 rising with all its aggressors falling, at the nominal
// couplings (1.098 pF, no error against 1.1529 pF) and scaled by +30 %
// (1.4274 pF, rising delay), plus a falling speedup; (2) a long random
// stream with random gaps, random couplings and thresholds, changed between
// bursts. `done` rises when the checks are complete.
module tb_xtalk_model_checker
  import xtalk_pkg::*;
#(
  parameter int unsigned N = 6
) (
  output int checks,
  output int failures,
  output bit done
);

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0;
  logic [N-1:0] in_data = '0;
  cap_t         cap [N][N];
  cap_t         cth [N][NUM_FAULTS];
  logic         out_valid, out_err;
  logic [N-1:0] out_data, out_hold_mask;
  effect_e      out_effect [N];

  int seen [7];
  int hold_hits = 0;

  xtalk_coupling_model #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .cap(cap), .cth(cth), .out_valid(out_valid), .out_data(out_data),
    .out_effect(out_effect), .out_hold_mask(out_hold_mask), .out_err(out_err));

  always #5 clk = ~clk;


  // ---- reference -----------------------------------------------------
  logic [N-1:0] r_prev;       // last accepted vector
  bit           p_valid;      // word accepted on the previous clock
  logic [N-1:0] p_rx;
  int           p_eff [N];

  function automatic int cc_of(logic [N-1:0] pv, logic [N-1:0] cv, int i);
    int s = 0;
    for (int j = 0; j < N; j++)
      if (j != i) s += (int'(cv[j]) - int'(pv[j])) * int'(cap[i][j]);
    return s;
  endfunction

  function automatic int eff_of(logic p, logic c, int ccv, int i);
    int t[6];
    for (int f = 0; f < 6; f++) t[f] = int'(cth[i][f]);
    if (!p && !c) return (t[0] != 0 && ccv >=  t[0]) ? 1 : 0;
    if ( p &&  c) return (t[1] != 0 && ccv <= -t[1]) ? 2 : 0;
    if (!p &&  c) return (t[2] != 0 && ccv <= -t[2]) ? 3 :
                         (t[4] != 0 && ccv >=  t[4]) ? 5 : 0;
    return (t[3] != 0 && ccv >= t[3]) ? 4 : (t[5] != 0 && ccv <= -t[5]) ? 6 : 0;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply one clock with the given input and check the output word.
  task automatic step(bit v, logic [N-1:0] d, string tag);
    logic [N-1:0] rx, sp;
    int           eff [N];
    in_valid = v;
    in_data  = d;
    #1;
    sp = '0;
    for (int i = 0; i < N; i++) begin
      eff[i] = eff_of(r_prev[i], d[i], cc_of(r_prev, d, i), i);
      case (eff[i])
        1: rx[i] = 1'b1;
        2: rx[i] = 1'b0;
        3, 4: rx[i] = r_prev[i];
        default: rx[i] = d[i];
      endcase
      if (v && (eff[i] == 5 || eff[i] == 6)) sp[i] = 1'b1;
    end
    @(posedge clk);
    #1;
    check({tag, " out_valid"}, int'(out_valid), int'(p_valid));
    if (p_valid) begin
      logic [N-1:0] exp_data;
      bit           exp_err;
      exp_data = (p_rx & ~sp) | (d & sp);
      exp_err  = (sp != 0);
      check({tag, " out_data"}, int'(out_data), int'(exp_data));
      check({tag, " out_hold_mask"}, int'(out_hold_mask), int'(sp));
      for (int i = 0; i < N; i++) begin
        check($sformatf("%s out_effect[%0d]", tag, i), int'(out_effect[i]), p_eff[i]);
        seen[p_eff[i]]++;
        if (p_eff[i] != 0) exp_err = 1;
      end
      check({tag, " out_err"}, int'(out_err), int'(exp_err));
      if (sp != 0) hold_hits++;
    end
    p_valid = v;
    if (v) begin
      p_rx   = rx;
      r_prev = d;
      for (int i = 0; i < N; i++) p_eff[i] = eff[i];
    end
  endtask

  task automatic nominal_params();
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) cap[i][j] = (i == j) ? '0 : default_cap(i, j);
      for (int f = 0; f < NUM_FAULTS; f++) cth[i][f] = cap_t'(11529);
    end
  endtask

  task automatic random_params();
    for (int i = 0; i < N; i++) begin
      for (int j = i + 1; j < N; j++) begin
        cap[i][j] = cap_t'($urandom_range(4000));
        cap[j][i] = cap[i][j];
      end
      cap[i][i] = cap_t'($urandom);
      for (int f = 0; f < NUM_FAULTS; f++)
        cth[i][f] = ($urandom_range(20) == 0) ? '0 : cap_t'($urandom_range(1000, 9000));
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    for (int k = 0; k < 7; k++) seen[k] = 0;
    nominal_params();
    r_prev = '0; p_valid = 0; p_rx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    if (N == 6) begin
      // (1) wire 3 is bit 2; aggressors bits 0,1,3,4,5 fall while bit 2 rises.
      step(1, N'(6'b111011), "setup");
      step(1, N'(6'b000100), "nominal rise");       // CC = -1.098 pF: no error
      step(0, N'(6'b000000), "gap");
      check("nominal: no effect on wire 3", p_eff[2], 0);
      step(1, N'(6'b111011), "back");
      // perturb the five couplings of wire 3 by +30 %
      cap[2][0] = 2600; cap[0][2] = 2600;
      cap[2][1] = 3900; cap[1][2] = 3900;
      cap[2][3] = 3900; cap[3][2] = 3900;
      cap[2][4] = 2600; cap[4][2] = 2600;
      cap[2][5] = 1274; cap[5][2] = 1274;
      step(1, N'(6'b000100), "perturbed rise");     // CC = -1.4274 pF: rising delay
      check("+30%: rising delay on wire 3", p_eff[2], 3);
      step(0, N'(6'b000000), "gap");
      // falling speedup on wire 3: it falls together with its aggressors
      step(1, N'(6'b111111), "all high");
      step(1, N'(6'b000000), "all fall");
      step(0, N'(6'b000000), "gap");
      check("falling speedup hit the word before", hold_hits > 0, 1);
    end

    // (2) random stream
    for (int burst = 0; burst < 60; burst++) begin
      random_params();
      for (int t = 0; t < 200; t++)
        step($urandom_range(4) != 0, N'($urandom), $sformatf("burst %0d step %0d", burst, t));
    end
    step(0, '0, "drain");
    step(0, '0, "drain");

    for (int k = 1; k < 7; k++) check($sformatf("effect %0d produced", k), seen[k] > 0, 1);
    check("speedup corrupted an earlier word", hold_hits > 0, 1);
    $display("N=%0d effects seen: PG=%0d NG=%0d RD=%0d FD=%0d SR=%0d SF=%0d, hold hits=%0d",
             N, seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], hold_hits);
    done = 1;
  end
endmodule
