// Shared types and constants of the crosstalk coupling-defect model.
//
// Capacitances are unsigned fixed-point numbers in units of 0.1 fF
// (1 pF = 10000 units), wide enough for the pF-range couplings of an on-chip
// bus. The nominal couplings are those of the six-wire bus used to validate
// the method, all of them couplings of wire 3: C13 = 0.20 pF, C23 = 0.30 pF,
// C34 = 0.30 pF, C35 = 0.20 pF, C36 = 0.098 pF (sum 1.098 pF); every other
// pair is 0. Thresholds are the published calibration of the rising delay
// on wire 3 for design margins of 0, 5, 10 and 15 %, which are 1.098 pF
// times (1 + margin). Wire k (1-based) is bit k-1 of every bus vector here.
// The fixed-point unit, the encodings and the use of one threshold for all
// fault types and receivers are this design's own choices.
package xtalk_pkg;

  // Width of a stored capacitance value.
  parameter int unsigned CAP_W = 16;

  typedef logic [CAP_W-1:0] cap_t;

  // Transition direction factor S of eq. (1): +1 rising, -1 falling, 0 stable.
  typedef enum logic [1:0] {
    DIR_STABLE  = 2'b00,
    DIR_RISING  = 2'b01,
    DIR_FALLING = 2'b11
  } dir_e;

  // The six crosstalk error types. The value of each is also its index in
  // a receiver's threshold table.
  typedef enum logic [2:0] {
    FT_PG = 3'd0,  // positive glitch,  victim 0 -> 0, CR >= 1
    FT_NG = 3'd1,  // negative glitch,  victim 1 -> 1, CR <= -1
    FT_RD = 3'd2,  // rising delay,     victim 0 -> 1, CR <= -1
    FT_FD = 3'd3,  // falling delay,    victim 1 -> 0, CR >= 1
    FT_SR = 3'd4,  // rising speedup,   victim 0 -> 1, CR >= 1
    FT_SF = 3'd5   // falling speedup,  victim 1 -> 0, CR <= -1
  } fault_e;

  parameter int unsigned NUM_FAULTS = 6;

  // Digitized error effect on one wire for one input event.
  typedef enum logic [2:0] {
    EFF_NONE = 3'd0,
    EFF_PG   = 3'd1,  // "0" -> "1" -> "0": receiver samples 1
    EFF_NG   = 3'd2,  // "1" -> "0" -> "1": receiver samples 0
    EFF_RD   = 3'd3,  // rising edge late: receiver samples the old 0
    EFF_FD   = 3'd4,  // falling edge late: receiver samples the old 1
    EFF_SR   = 3'd5,  // rising edge early: the previous sample becomes 1
    EFF_SF   = 3'd6   // falling edge early: the previous sample becomes 0
  } effect_e;

  // Width of a wire index in a parameter-file write; buses of up to 256
  // wires can be configured.
  parameter int unsigned IDX_W = 8;

  // Kind of parameter-file entry a write addresses.
  typedef enum logic {
    PW_CAP = 1'b0,  // coupling capacitance C_ab (a != b), written symmetric
    PW_CTH = 1'b1   // threshold capacitance of fault b on receiver a
  } pw_kind_e;

  // One write into a parameter file.
  typedef struct packed {
    pw_kind_e         kind;
    logic [IDX_W-1:0] a;
    logic [IDX_W-1:0] b;
    cap_t             data;
  } param_wr_t;

  // Threshold capacitance calibrated for a design margin in percent
  // (Table II of the method): 0 % 1.0980 pF, 5 % 1.1529 pF, 10 % 1.2080 pF,
  // 15 % 1.2627 pF. Other margins were not calibrated and give 0.
  function automatic cap_t cth_for_margin(int unsigned margin_pct);
    case (margin_pct)
      0:       return cap_t'(10980);
      5:       return cap_t'(11529);
      10:      return cap_t'(12080);
      15:      return cap_t'(12627);
      default: return '0;
    endcase
  endfunction

  // One entry of the coupling defect library: coupling C_ab is scaled by
  // (100 + pct) / 100. A defect is a run of entries ending at one with
  // `last` set, so it can perturb several couplings at once.
  typedef struct packed {
    logic [IDX_W-1:0] a;
    logic [IDX_W-1:0] b;
    logic signed [7:0] pct;
    logic             last;
  } defect_entry_t;

  // Nominal coupling capacitance between wires a and b (0-based bit indices),
  // from the six-wire validation bus; zero for every other pair.
  function automatic cap_t default_cap(int unsigned a, int unsigned b);
    int unsigned lo;
    int unsigned hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (lo == 0 && hi == 2) return cap_t'(2000);  // C13
    if (lo == 1 && hi == 2) return cap_t'(3000);  // C23
    if (lo == 2 && hi == 3) return cap_t'(3000);  // C34
    if (lo == 2 && hi == 4) return cap_t'(2000);  // C35
    if (lo == 2 && hi == 5) return cap_t'(980);   // C36
    return '0;
  endfunction

endpackage
