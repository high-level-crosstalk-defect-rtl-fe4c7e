// Physical parameter file of one coupling defect-simulation model.
//
// Holds the coupling capacitance between every pair of wires and, for every
// receiver, the threshold capacitance of each of the six crosstalk faults.
// The contents are read by the model continuously. Calibration writes the
// thresholds; a coupling defect is injected by overwriting a coupling
// capacitance with a perturbed value. Holding these numbers and perturbing
// them to inject defects follows the method; a register file with one write
// port per cycle is this design's choice.
//
// Interface: `wr_en` with `wr` writes one entry at the rising clock edge.
// A PW_CAP write of pair (a, b) with a != b sets both C_ab and C_ba, keeping
// the matrix symmetric; writes to the diagonal or to wires >= N are ignored.
// A PW_CTH write sets threshold b (a fault_e index) of receiver a.
// Reset (active low, synchronous) loads the nominal couplings of
// xtalk_pkg::default_cap and CTH_DEFAULT in every threshold. CTH_DEFAULT is
// the threshold calibrated for DESIGN_MARGIN percent (0, 5, 10 or 15; 5 by
// default, the margin of the published accuracy figures).
module xtalk_param_file
  import xtalk_pkg::*;
#(
  parameter int unsigned N             = 6,
  parameter int unsigned DESIGN_MARGIN = 5,
  parameter cap_t        CTH_DEFAULT   = cth_for_margin(DESIGN_MARGIN)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  param_wr_t wr,
  output cap_t      cap [N][N],
  output cap_t      cth [N][NUM_FAULTS]
);

  if (CTH_DEFAULT == '0) begin : g_bad_margin
    $error("DESIGN_MARGIN %0d has no calibrated threshold", DESIGN_MARGIN);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++)
          cap[i][j] <= (i == j) ? '0 : default_cap(i, j);
        for (int f = 0; f < NUM_FAULTS; f++)
          cth[i][f] <= CTH_DEFAULT;
      end
    end else if (wr_en) begin
      // Decode the write address against every entry; addresses that
      // match no entry (diagonal, out of range) change nothing.
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          if (wr.kind == PW_CAP && i != j &&
              ((int'(wr.a) == i && int'(wr.b) == j) ||
               (int'(wr.a) == j && int'(wr.b) == i)))
            cap[i][j] <= wr.data;
        end
        for (int f = 0; f < NUM_FAULTS; f++) begin
          if (wr.kind == PW_CTH && int'(wr.a) == i && int'(wr.b) == f)
            cth[i][f] <= wr.data;
        end
      end
    end
  end

endmodule
