// Noise estimation by superposition: effective coupling capacitance.
//
// For every victim wire i the module forms
//   CC_eff[i] = sum over aggressors j != i of S_j * C_ij,
// where S_j is the transition direction factor of wire j (+1, -1, 0) and
// C_ij the coupling capacitance between wires i and j. By the monotone
// property of capacitive crosstalk, the glitch or delay seen by the victim
// is proportional to this sum, so CC_eff divided by a calibrated threshold
// capacitance is the victim's effective capacitance ratio. The formula is
// the method's; doing all N victims at once with an adder tree per victim,
// rather than one wire after another, is this design's choice.
//
// Purely combinational. `cap` is the full coupling matrix in 0.1 fF units;
// only off-diagonal entries are used. `cc_eff` is two's complement, CC_W
// bits wide, which holds the largest possible sum without overflow.
module xtalk_noise_est
  import xtalk_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter int unsigned CC_W = CAP_W + $clog2(N) + 1
) (
  input  dir_e               dir    [N],
  input  cap_t               cap    [N][N],
  output logic signed [CC_W-1:0] cc_eff [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [CC_W-1:0] acc;
      acc = '0;
      for (int j = 0; j < N; j++) begin
        if (j != i) begin
          unique case (dir[j])
            DIR_RISING:  acc = acc + $signed({{(CC_W-CAP_W){1'b0}}, cap[i][j]});
            DIR_FALLING: acc = acc - $signed({{(CC_W-CAP_W){1'b0}}, cap[i][j]});
            default:     acc = acc;
          endcase
        end
      end
      cc_eff[i] = acc;
    end
  end

endmodule
