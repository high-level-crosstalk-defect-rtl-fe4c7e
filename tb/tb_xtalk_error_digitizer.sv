// Self-checking testbench of xtalk_error_digitizer.
// Each wire's expected effect is worked out here from the error-criteria
// table in plain integers, first for directed cases on the threshold
// boundary (CC_eff = +/-Cth gives an error, one unit less does not), then
// for random vectors, CC_eff values and thresholds. It also counts that
// every one of the six effects was produced.
module tb_xtalk_error_digitizer;
  import xtalk_pkg::*;

  localparam int unsigned N = 6;
  localparam int unsigned W = CAP_W + $clog2(N) + 1;

  logic [N-1:0]        prev, cur;
  logic signed [W-1:0] cc  [N];
  cap_t                cth [N][NUM_FAULTS];
  effect_e             eff [N];

  int checks = 0, failures = 0;
  int seen [7];

  xtalk_error_digitizer dut (
    .prev(prev), .cur(cur), .cc_eff(cc), .cth(cth), .effect(eff));

  // Expected effect code: 0 none, 1 PG, 2 NG, 3 RD, 4 FD, 5 SR, 6 SF.
  function automatic int expect_eff(logic p, logic c, int ccv, int t[6]);
    if (!p && !c) return (t[0] != 0 && ccv >=  t[0]) ? 1 : 0;
    if ( p &&  c) return (t[1] != 0 && ccv <= -t[1]) ? 2 : 0;
    if (!p &&  c) begin
      if (t[2] != 0 && ccv <= -t[2]) return 3;
      if (t[4] != 0 && ccv >=  t[4]) return 5;
      return 0;
    end
    if (t[3] != 0 && ccv >=  t[3]) return 4;
    if (t[5] != 0 && ccv <= -t[5]) return 6;
    return 0;
  endfunction

  task automatic check_all(string what);
    #1;
    for (int i = 0; i < N; i++) begin
      int t[6];
      int e;
      for (int f = 0; f < 6; f++) t[f] = int'(cth[i][f]);
      e = expect_eff(prev[i], cur[i], int'(cc[i]), t);
      checks++;
      if (int'(eff[i]) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s wire %0d %b->%b cc=%0d: effect %0d expected %0d",
                   what, i, prev[i], cur[i], cc[i], int'(eff[i]), e);
      end
      seen[e]++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 7; k++) seen[k] = 0;
    // Directed: wire i gets transition class i%4, CC exactly at +/-threshold.
    for (int i = 0; i < N; i++) for (int f = 0; f < 6; f++) cth[i][f] = cap_t'(11529);
    for (int pat = 0; pat < 4; pat++) begin
      for (int sign = -1; sign <= 1; sign += 2) begin
        for (int delta = 0; delta <= 1; delta++) begin
          prev = {N{pat[1]}};
          cur  = {N{pat[0]}};
          for (int i = 0; i < N; i++) cc[i] = W'(sign * (11529 - delta));
          check_all($sformatf("boundary pat=%0d sign=%0d delta=%0d", pat, sign, delta));
        end
      end
    end
    // Disabled fault: threshold 0 never fires.
    prev = '0; cur = '0;
    for (int i = 0; i < N; i++) begin cth[i][FT_PG] = '0; cc[i] = W'(50000); end
    check_all("disabled positive glitch");

    // Random.
    for (int t = 0; t < 5000; t++) begin
      prev = N'($urandom);
      cur  = N'($urandom);
      for (int i = 0; i < N; i++) begin
        cc[i] = W'($signed($urandom_range(60000)) - 30000);
        for (int f = 0; f < 6; f++)
          cth[i][f] = ($urandom_range(15) == 0) ? '0 : cap_t'($urandom_range(30000));
      end
      check_all($sformatf("random %0d", t));
    end

    for (int k = 1; k < 7; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL effect %0d never produced", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
