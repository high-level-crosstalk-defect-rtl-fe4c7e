// Coupling defect library and defect injector.
//
// A coupling defect is a change of one or more coupling capacitances, for
// example from process variation or a manufacturing flaw. The library holds
// pregenerated defects as runs of entries; each entry names a wire pair
// (a, b) and a signed perturbation in percent, and the last entry of a defect
// has `last` set. On a start command the injector walks the run beginning at
// `start_idx` and, one entry per clock, writes the perturbed value
//   C_ab' = C_ab,nominal * (100 + pct) / 100      (clamped to 0 .. max)
// into the parameter files through `pw`. With `restore` set it writes the
// nominal values of the same pairs instead, removing the defect. Nominal
// values are the calibrated couplings of xtalk_pkg::default_cap. Injecting
// defects by perturbing coupling capacitances in the parameter file follows
// the method; the entry format, percent scaling and library size are this
// design's own.
//
// Interface: `lib_we` writes `lib_wdata` to entry `lib_addr` (load the
// library before use). `start` is taken when `busy` is low. While busy, one
// parameter write (`pw_en`, `pw`) is issued per clock; `done` pulses with
// the write of the last entry. A defect longer than the library stops at
// its end. Active-low synchronous reset.
module xtalk_defect_injector
  import xtalk_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // library load port
  input  logic          lib_we,
  input  logic [AW-1:0] lib_addr,
  input  defect_entry_t lib_wdata,
  // command
  input  logic          start,
  input  logic [AW-1:0] start_idx,
  input  logic          restore,
  output logic          busy,
  output logic          done,
  // parameter-file write
  output logic          pw_en,
  output param_wr_t     pw
);

  defect_entry_t lib [DEPTH];

  always_ff @(posedge clk) begin
    if (lib_we) lib[lib_addr] <= lib_wdata;
  end

  logic [AW-1:0] ptr_q;
  logic          restore_q;
  defect_entry_t ent;

  assign ent = lib[ptr_q];

  // Perturbed coupling value of the current entry.
  localparam int unsigned PROD_W = CAP_W + 9;

  cap_t               nominal;
  logic signed [8:0]  scale;
  logic [PROD_W-1:0]  scaled;
  cap_t               value;

  always_comb begin
    nominal = default_cap(int'(ent.a), int'(ent.b));
    scale   = 9'sd100 + 9'(ent.pct);
    if (restore_q || ent.pct == '0) begin
      value  = nominal;
      scaled = '0;
    end else if (scale <= 0) begin
      value  = '0;
      scaled = '0;
    end else begin
      scaled = (PROD_W'(nominal) * PROD_W'(unsigned'(scale))) / PROD_W'(100);
      value  = (scaled > PROD_W'({CAP_W{1'b1}})) ? {CAP_W{1'b1}} : scaled[CAP_W-1:0];
    end
  end

  assign pw_en   = busy;
  assign pw.kind = PW_CAP;
  assign pw.a    = ent.a;
  assign pw.b    = ent.b;
  assign pw.data = value;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      ptr_q     <= '0;
      restore_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          ptr_q     <= start_idx;
          restore_q <= restore;
        end
      end else begin
        if (ent.last || int'(ptr_q) == DEPTH - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          ptr_q <= ptr_q + 1'b1;
        end
      end
    end
  end

endmodule
