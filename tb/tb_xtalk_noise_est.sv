// Self-checking testbench of xtalk_noise_est.
// 1. The four-wire example of the method: vector 0010 -> 0101 (wire 1
//    written first) makes wire 1 a stable victim with CC_eff = C12 - C13 + C14.
// 2. Random coupling matrices and directions on a six-wire bus, compared
//    with a sum formed here in plain integers, including the extremes where
//    every aggressor pulls the same way with the largest capacitance.
module tb_xtalk_noise_est;
  import xtalk_pkg::*;

  localparam int unsigned N4 = 4;
  localparam int unsigned N6 = 6;
  localparam int unsigned W4 = CAP_W + $clog2(N4) + 1;
  localparam int unsigned W6 = CAP_W + $clog2(N6) + 1;

  dir_e                 dir4 [N4];
  cap_t                 cap4 [N4][N4];
  logic signed [W4-1:0] cc4  [N4];
  dir_e                 dir6 [N6];
  cap_t                 cap6 [N6][N6];
  logic signed [W6-1:0] cc6  [N6];

  int checks = 0, failures = 0;

  xtalk_noise_est #(.N(N4)) dut4 (.dir(dir4), .cap(cap4), .cc_eff(cc4));
  xtalk_noise_est #(.N(N6)) dut6 (.dir(dir6), .cap(cap6), .cc_eff(cc6));

  function automatic int s_of(dir_e d);
    return (d == DIR_RISING) ? 1 : (d == DIR_FALLING) ? -1 : 0;
  endfunction

  function automatic dir_e rand_dir();
    case ($urandom_range(2))
      0: return DIR_STABLE;
      1: return DIR_RISING;
      default: return DIR_FALLING;
    endcase
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
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
    // --- the four-wire example: C12=1000, C13=700, C14=300, C23=500 ...
    int c12 = 1000, c13 = 700, c14 = 300, c23 = 500, c24 = 400, c34 = 900;
    int c[4][4];
    c = '{'{0, c12, c13, c14}, '{c12, 0, c23, c24},
          '{c13, c23, 0, c34}, '{c14, c24, c34, 0}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) cap4[i][j] = cap_t'(c[i][j]);
    // wire1 0->0, wire2 0->1, wire3 1->0, wire4 0->1
    dir4 = '{DIR_STABLE, DIR_RISING, DIR_FALLING, DIR_RISING};
    #1;
    check("example CC_eff wire 1", int'(cc4[0]), c12 - c13 + c14);
    // wire 2 (rising): C12*0 + C23*(-1) + C24*(+1)
    check("example CC_eff wire 2", int'(cc4[1]), -c23 + c24);

    // --- random six-wire cases
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = $urandom_range(9);
      for (int i = 0; i < N6; i++) begin
        for (int j = i; j < N6; j++) begin
          cap_t v;
          v = (mode == 0) ? cap_t'(16'hFFFF) : cap_t'($urandom_range(20000));
          cap6[i][j] = (i == j) ? cap_t'($urandom) : v;  // diagonal must not matter
          cap6[j][i] = (i == j) ? cap6[i][j] : v;
        end
        dir6[i] = (mode == 0) ? DIR_RISING : (mode == 1) ? DIR_FALLING : rand_dir();
      end
      if (mode == 1) for (int i = 0; i < N6; i++) for (int j = 0; j < N6; j++)
        if (i != j) cap6[i][j] = cap_t'(16'hFFFF);
      #1;
      for (int i = 0; i < N6; i++) begin
        int exp;
        exp = 0;
        for (int j = 0; j < N6; j++) if (j != i) exp += s_of(dir6[j]) * int'(cap6[i][j]);
        check($sformatf("random case %0d wire %0d", t, i), int'(cc6[i]), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
