// Coupling defect-simulation model of an N-wire bus, one direction.
//
// The model sits between the drivers and the receivers of a bus and
// replaces the plain wires. Every accepted driver vector is an input event:
// the model finds the transition direction of each wire, estimates the
// crosstalk noise on each wire as its effective coupling capacitance
// CC_eff = sum_j S_j * C_ij, compares it with the receiver's threshold
// capacitances and turns the outcome into a digitized error effect, which it
// applies to the value the receiver samples:
//   positive / negative glitch : this word's bit is sampled inverted
//   rising / falling delay     : this word's bit is sampled at its old value
//   rising / falling speedup   : the edge arrives early and breaks the hold
//                                time of the previous sample, so the
//                                previous word's bit takes the new value
// The noise estimate and the error criteria are the method's; how each
// digitized effect shows in a cycle-level receiver word, and in particular
// the hold-time reading of a speedup, is this design's choice.
//
// Timing: one vector per clock when `in_valid` is high. The estimate for all
// N wires is made in the cycle the vector arrives (the method walks the
// wires one at a time in software; the result is the same). A word is held
// one cycle so that the next vector's speedups can still reach it, then
// leaves on `out_*` exactly two clocks after it entered, whether or not a
// vector follows. `out_effect` is the effect of the transition into the
// word; `out_hold_mask` marks the bits a speedup of the next transition
// overwrote. The bus is taken to rest at all zeros after the active-low
// synchronous reset. `cap` and `cth` come from a parameter file and are
// read every cycle, so an injected defect acts from the next vector on.
module xtalk_coupling_model
  import xtalk_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter int unsigned CC_W = CAP_W + $clog2(N) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // driver end
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  // parameter file
  input  cap_t         cap [N][N],
  input  cap_t         cth [N][NUM_FAULTS],
  // receiver end
  output logic         out_valid,
  output logic [N-1:0] out_data,
  output effect_e      out_effect [N],
  output logic [N-1:0] out_hold_mask,
  output logic         out_err
);

  logic [N-1:0]           prev_q;
  dir_e                   dir    [N];
  logic signed [CC_W-1:0] cc_eff [N];
  effect_e                effect [N];

  xtalk_transition_dir #(.N(N)) u_dir (
    .prev (prev_q),
    .cur  (in_data),
    .dir  (dir)
  );

  xtalk_noise_est #(.N(N), .CC_W(CC_W)) u_noise (
    .dir    (dir),
    .cap    (cap),
    .cc_eff (cc_eff)
  );

  xtalk_error_digitizer #(.N(N), .CC_W(CC_W)) u_digitize (
    .prev   (prev_q),
    .cur    (in_data),
    .cc_eff (cc_eff),
    .cth    (cth),
    .effect (effect)
  );

  // Receiver sample of the incoming word and the hold-time damage its
  // transition does to the word before it.
  logic [N-1:0] rx_now;
  logic [N-1:0] speedup;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      unique case (effect[i])
        EFF_PG:  rx_now[i] = 1'b1;
        EFF_NG:  rx_now[i] = 1'b0;
        EFF_RD,
        EFF_FD:  rx_now[i] = prev_q[i];
        default: rx_now[i] = in_data[i];
      endcase
      speedup[i] = in_valid && (effect[i] == EFF_SR || effect[i] == EFF_SF);
    end
  end

  // Word held for one cycle.
  logic         h_valid;
  logic [N-1:0] h_data;
  effect_e      h_effect [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_q        <= '0;
      h_valid       <= 1'b0;
      h_data        <= '0;
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_hold_mask <= '0;
      out_err       <= 1'b0;
      for (int i = 0; i < N; i++) begin
        h_effect[i]   <= EFF_NONE;
        out_effect[i] <= EFF_NONE;
      end
    end else begin
      h_valid <= in_valid;
      if (in_valid) begin
        prev_q <= in_data;
        h_data <= rx_now;
        for (int i = 0; i < N; i++) h_effect[i] <= effect[i];
      end

      out_valid <= h_valid;
      if (h_valid) begin
        out_data      <= (h_data & ~speedup) | (in_data & speedup);
        out_hold_mask <= speedup;
        out_err       <= 1'b0;
        for (int i = 0; i < N; i++) begin
          out_effect[i] <= h_effect[i];
          if (h_effect[i] != EFF_NONE || speedup[i]) out_err <= 1'b1;
        end
      end
    end
  end

endmodule
