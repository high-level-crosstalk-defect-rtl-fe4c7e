// Self-checking testbench of xtalk_transition_dir: every pair of 6-bit
// vectors is applied and each wire's direction is compared with +1 for a
// 0->1 change, -1 for 1->0 and 0 otherwise.
module tb_xtalk_transition_dir;
  import xtalk_pkg::*;

  localparam int unsigned N = 6;

  logic [N-1:0] prev, cur;
  dir_e         dir [N];
  int           checks = 0, failures = 0;

  xtalk_transition_dir dut (.prev(prev), .cur(cur), .dir(dir));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << N); p++) begin
      for (int c = 0; c < (1 << N); c++) begin
        prev = N'(p);
        cur  = N'(c);
        #1;
        for (int i = 0; i < N; i++) begin
          int s_exp, s_got;
          s_exp = int'(cur[i]) - int'(prev[i]);
          s_got = (dir[i] == DIR_RISING) ? 1 : (dir[i] == DIR_FALLING) ? -1 :
                  (dir[i] == DIR_STABLE) ? 0 : 99;
          checks++;
          if (s_got != s_exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL prev=%b cur=%b wire %0d: S=%0d expected %0d",
                       prev, cur, i, s_got, s_exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
