// Self-checking testbench of xtalk_defect_injector.
// A library of random defects (1 to 4 entries each, perturbations from -40 %
// to +60 % on random pairs of a six-wire bus, plus a -100 % and a +127 %
// entry) is loaded. Each defect is injected and then restored; every
// parameter write is compared with nominal * (100 + pct) / 100 computed here
// from the nominal couplings of the six-wire bus, and the number of clocks
// the injector stays busy must equal the number of entries of the defect.
module tb_xtalk_defect_injector;
  import xtalk_pkg::*;

  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0;
  logic          lib_we = 0;
  logic [AW-1:0] lib_addr = '0;
  defect_entry_t lib_wdata;
  logic          start = 0, restore = 0;
  logic [AW-1:0] start_idx = '0;
  logic          busy, done, pw_en;
  param_wr_t     pw;

  int checks = 0, failures = 0;
  int ent_a [DEPTH], ent_b [DEPTH], ent_p [DEPTH], ent_last [DEPTH];
  int first [$];

  xtalk_defect_injector dut (
    .clk(clk), .rst_n(rst_n), .lib_we(lib_we), .lib_addr(lib_addr),
    .lib_wdata(lib_wdata), .start(start), .start_idx(start_idx),
    .restore(restore), .busy(busy), .done(done), .pw_en(pw_en), .pw(pw));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_defect(int idx, bit rest);
    int n, k, cyc;
    @(negedge clk);
    start = 1; start_idx = AW'(idx); restore = rest;
    @(negedge clk);
    start = 0;
    check("busy after start", int'(busy), 1);
    k = idx;
    cyc = 0;
    while (busy) begin
      int exp;
      if (rest || ent_p[k] == 0) exp = nominal(ent_a[k], ent_b[k]);
      else if (100 + ent_p[k] <= 0) exp = 0;
      else exp = nominal(ent_a[k], ent_b[k]) * (100 + ent_p[k]) / 100;
      check($sformatf("defect %0d entry %0d write enable", idx, k), int'(pw_en), 1);
      check($sformatf("defect %0d entry %0d kind", idx, k), int'(pw.kind), int'(PW_CAP));
      check($sformatf("defect %0d entry %0d a", idx, k), int'(pw.a), ent_a[k]);
      check($sformatf("defect %0d entry %0d b", idx, k), int'(pw.b), ent_b[k]);
      check($sformatf("defect %0d entry %0d value", idx, k), int'(pw.data), exp);
      cyc++;
      @(negedge clk);
      if (ent_last[k] != 0) break;
      k++;
    end
    n = k - idx + 1;
    check($sformatf("defect %0d done pulse", idx), int'(done), 1);
    check($sformatf("defect %0d busy cycles", idx), cyc, n);
    check($sformatf("defect %0d idle after", idx), int'(busy), 0);
    check($sformatf("defect %0d no write after", idx), int'(pw_en), 0);
  endtask

  initial begin
    lib_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Build the library: random defects, each a run ending in `last`.
    begin
      int i;
      i = 0;
      while (i < DEPTH) begin
        int len;
        len = $urandom_range(1, 4);
        first.push_back(i);
        for (int e = 0; e < len && i < DEPTH; e++) begin
          int a, b;
          a = $urandom_range(5);
          b = $urandom_range(5);
          if (b == a) b = (a + 1) % 6;
          ent_a[i] = a; ent_b[i] = b;
          ent_p[i] = $urandom_range(100) - 40;
          if (i == 1) begin ent_a[i] = 2; ent_b[i] = 3; ent_p[i] = -100; end
          if (i == 2) begin ent_a[i] = 1; ent_b[i] = 2; ent_p[i] = 127; end
          ent_last[i] = (e == len - 1 || i == DEPTH - 1) ? 1 : 0;
          i++;
        end
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      lib_we = 1;
      lib_addr = AW'(i);
      lib_wdata.a = IDX_W'(ent_a[i]);
      lib_wdata.b = IDX_W'(ent_b[i]);
      lib_wdata.pct = 8'(ent_p[i]);
      lib_wdata.last = ent_last[i][0];
    end
    @(negedge clk);
    lib_we = 0;
    check("idle after reset", int'(busy), 0);

    foreach (first[d]) begin
      run_defect(first[d], 1'b0);
      run_defect(first[d], 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
