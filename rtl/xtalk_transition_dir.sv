// Transition direction of every wire of an N-wire bus.
//
// For one input event, the bus goes from the previous driver vector `prev`
// to the new one `cur`. Each wire gets the transition direction factor S of
// the coupling model: rising (+1), falling (-1) or stable (0). This is the
// "calculate transition direction" step of the noise-estimation process and
// follows the method directly. Purely combinational; the encoding of S is
// the dir_e type of xtalk_pkg.
module xtalk_transition_dir
  import xtalk_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] prev,
  input  logic [N-1:0] cur,
  output dir_e         dir [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      unique case ({prev[i], cur[i]})
        2'b01:   dir[i] = DIR_RISING;
        2'b10:   dir[i] = DIR_FALLING;
        default: dir[i] = DIR_STABLE;
      endcase
    end
  end

endmodule
