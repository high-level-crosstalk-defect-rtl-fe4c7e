// Self-checking testbench of xtalk_param_file: after reset the couplings
// must be the nominal six-wire values (0.20, 0.30, 0.30, 0.20, 0.098 pF for
// C13, C23, C34, C35, C36, zero elsewhere) and every threshold 1.1529 pF;
// coupling writes must land symmetrically, diagonal and out-of-range writes
// must change nothing, and threshold writes must hit only their entry.
// A shadow copy kept here is compared with all outputs after every write.
// Three more instances check the thresholds of the 0, 10 and 15 % design
// margins: 1.0980, 1.2080 and 1.2627 pF.
module tb_xtalk_param_file;
  import xtalk_pkg::*;

  localparam int unsigned N = 6;

  logic      clk = 0, rst_n = 0, wr_en = 0;
  param_wr_t wr;
  cap_t      cap [N][N];
  cap_t      cth [N][NUM_FAULTS];
  int        exp_cap [N][N];
  int        exp_cth [N][NUM_FAULTS];
  int        checks = 0, failures = 0;

  xtalk_param_file dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr(wr), .cap(cap), .cth(cth));

  // Instances calibrated for the other design margins of the method.
  cap_t cap_m0  [N][N];
  cap_t cth_m0  [N][NUM_FAULTS];
  cap_t cap_m10 [N][N];
  cap_t cth_m10 [N][NUM_FAULTS];
  cap_t cap_m15 [N][N];
  cap_t cth_m15 [N][NUM_FAULTS];

  xtalk_param_file #(.DESIGN_MARGIN(0)) dut_m0 (
    .clk(clk), .rst_n(rst_n), .wr_en(1'b0), .wr(wr), .cap(cap_m0), .cth(cth_m0));
  xtalk_param_file #(.DESIGN_MARGIN(10)) dut_m10 (
    .clk(clk), .rst_n(rst_n), .wr_en(1'b0), .wr(wr), .cap(cap_m10), .cth(cth_m10));
  xtalk_param_file #(.DESIGN_MARGIN(15)) dut_m15 (
    .clk(clk), .rst_n(rst_n), .wr_en(1'b0), .wr(wr), .cap(cap_m15), .cth(cth_m15));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) if (i != j) begin
        checks++;
        if (int'(cap[i][j]) != exp_cap[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL %s: C[%0d][%0d]=%0d expected %0d",
                                      what, i, j, cap[i][j], exp_cap[i][j]);
        end
      end
      for (int f = 0; f < NUM_FAULTS; f++) begin
        checks++;
        if (int'(cth[i][f]) != exp_cth[i][f]) begin
          failures++;
          if (failures < 10) $display("FAIL %s: Cth[%0d][%0d]=%0d expected %0d",
                                      what, i, f, cth[i][f], exp_cth[i][f]);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) exp_cap[i][j] = 0;
      for (int f = 0; f < NUM_FAULTS; f++) exp_cth[i][f] = 11529;
    end
    exp_cap[0][2] = 2000; exp_cap[2][0] = 2000;
    exp_cap[1][2] = 3000; exp_cap[2][1] = 3000;
    exp_cap[2][3] = 3000; exp_cap[3][2] = 3000;
    exp_cap[2][4] = 2000; exp_cap[4][2] = 2000;
    exp_cap[2][5] =  980; exp_cap[5][2] =  980;
    wr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare("reset values");
    // thresholds of the other margins: 1.0980, 1.2080 and 1.2627 pF
    for (int i = 0; i < N; i++)
      for (int f = 0; f < NUM_FAULTS; f++) begin
        checks += 3;
        if (cth_m0[i][f]  != 16'd10980) failures++;
        if (cth_m10[i][f] != 16'd12080) failures++;
        if (cth_m15[i][f] != 16'd12627) failures++;
      end

    for (int t = 0; t < 400; t++) begin
      int a, b, d;
      logic k;
      a = $urandom_range(N + 1);
      b = $urandom_range(N + 1);
      d = $urandom_range(65535);
      k = 1'($urandom);
      wr.kind = k ? PW_CTH : PW_CAP;
      wr.a    = IDX_W'(a);
      wr.b    = IDX_W'(b);
      wr.data = cap_t'(d);
      wr_en   = ($urandom_range(4) != 0);
      @(posedge clk);
      #1;
      if (wr_en) begin
        if (!k && a < N && b < N && a != b) begin
          exp_cap[a][b] = d;
          exp_cap[b][a] = d;
        end
        if (k && a < N && b < NUM_FAULTS) exp_cth[a][b] = d;
      end
      compare($sformatf("write %0d", t));
    end

    // Reset brings back the nominal values.
    wr_en = 0;
    rst_n = 0;
    @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) exp_cap[i][j] = int'(default_cap(i, j));
      for (int f = 0; f < NUM_FAULTS; f++) exp_cth[i][f] = 11529;
    end
    for (int i = 0; i < N; i++) exp_cap[i][i] = 0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
