// Digitization of crosstalk errors against threshold capacitances.
//
// For each wire, the logic values before and after the input event select
// which faults can occur, and the effective coupling capacitance CC_eff is
// compared with that wire's threshold capacitance of each such fault:
//   0 -> 0 : positive glitch  if CC_eff >=  Cth_pg
//   1 -> 1 : negative glitch  if CC_eff <= -Cth_ng
//   0 -> 1 : rising delay     if CC_eff <= -Cth_rd,
//            rising speedup   if CC_eff >=  Cth_sr
//   1 -> 0 : falling delay    if CC_eff >=  Cth_fd,
//            falling speedup  if CC_eff <= -Cth_sf
// Comparing CC_eff with +/-Cth is the same as comparing the effective
// capacitance ratio CR = CC_eff/Cth with +/-1, without a divider. These
// criteria are the method's. A threshold of zero disables its fault; that
// rule is this design's own, as the ratio is undefined then.
//
// Purely combinational. `cth[i][f]` is receiver i's threshold of fault f,
// indexed by fault_e; the output is one effect_e code per wire.
module xtalk_error_digitizer
  import xtalk_pkg::*;
#(
  parameter int unsigned N    = 6,
  parameter int unsigned CC_W = CAP_W + $clog2(N) + 1
) (
  input  logic [N-1:0]           prev,
  input  logic [N-1:0]           cur,
  input  logic signed [CC_W-1:0] cc_eff [N],
  input  cap_t                   cth    [N][NUM_FAULTS],
  output effect_e                effect [N]
);

  // Threshold as a positive signed number of the CC_eff width.
  function automatic logic signed [CC_W-1:0] pos(cap_t c);
    return $signed({{(CC_W-CAP_W){1'b0}}, c});
  endfunction

  // True when the fault with threshold c is enabled and CC_eff >= c.
  function automatic logic over(logic signed [CC_W-1:0] cc, cap_t c);
    return (c != '0) && (cc >= pos(c));
  endfunction

  // True when the fault with threshold c is enabled and CC_eff <= -c.
  function automatic logic under(logic signed [CC_W-1:0] cc, cap_t c);
    return (c != '0) && (cc <= -pos(c));
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      effect[i] = EFF_NONE;
      unique case ({prev[i], cur[i]})
        2'b00: if (over (cc_eff[i], cth[i][FT_PG])) effect[i] = EFF_PG;
        2'b11: if (under(cc_eff[i], cth[i][FT_NG])) effect[i] = EFF_NG;
        2'b01: begin
          if      (under(cc_eff[i], cth[i][FT_RD])) effect[i] = EFF_RD;
          else if (over (cc_eff[i], cth[i][FT_SR])) effect[i] = EFF_SR;
        end
        2'b10: begin
          if      (over (cc_eff[i], cth[i][FT_FD])) effect[i] = EFF_FD;
          else if (under(cc_eff[i], cth[i][FT_SF])) effect[i] = EFF_SF;
        end
        default: effect[i] = EFF_NONE;
      endcase
    end
  end

endmodule
