// Self-checking testbench of xtalk_coupling_model. The model is checked at
// the six-wire width of the validation bus and at 24 wires, since it is a
// template for any bus width; see tb_xtalk_model_checker for the reference
// and the stimulus.
module tb_xtalk_coupling_model;
  int checks6, failures6, checks24, failures24;
  bit done6, done24;

  tb_xtalk_model_checker #(.N(6))  u_n6  (.checks(checks6),  .failures(failures6),  .done(done6));
  tb_xtalk_model_checker #(.N(24)) u_n24 (.checks(checks24), .failures(failures24), .done(done24));

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks6 + checks24, failures6 + failures24 + 1);
    $finish;
  end

  initial begin
    wait (done6 && done24);
    $display("TB_RESULT checks=%0d failures=%0d", checks6 + checks24, failures6 + failures24);
    $finish;
  end
endmodule
