// Bidirectional N-wire SoC bus between core A and core B with crosstalk
// defect simulation.
//
// The wires are driven by core A in one direction and by core B in the
// other. As drivers and receivers swap with the direction, the bus has two
// coupling defect-simulation models, one per direction, each with its own
// parameter file: the coupling capacitances are those of the same wires,
// but the threshold capacitances belong to the receivers of that direction.
// A shared defect library and injector perturbs a coupling capacitance in
// both parameter files at once, since a physical defect affects the wires in
// either direction. Two models for a bidirectional bus, parameter files and
// a defect library with injection follow the method; the direction port,
// the broadcast of defects to both files and the host configuration port
// are this design's own.
//
// Interface and timing:
//   dir = 0: core A drives (a_tx_*), core B receives (b_rx_*);
//   dir = 1: core B drives (b_tx_*), core A receives (a_rx_*).
//   A vector offered on the side that does not drive is ignored. Each model
//   remembers the last vector it carried, and a received word leaves two
//   clocks after it was driven (see xtalk_coupling_model).
//   cfg_en/cfg_sel/cfg_wr write one entry of the parameter file of the
//   A-to-B model (cfg_sel = 0) or the B-to-A model (cfg_sel = 1); a write is
//   allowed only while cfg_ready is high, i.e. while no defect is being
//   injected.
//   lib_*/inj_* load the defect library and start an injection (see
//   xtalk_defect_injector). DESIGN_MARGIN selects the threshold both
//   parameter files start from (see xtalk_param_file). Active-low synchronous reset restores the
//   nominal parameters; the library keeps its contents.
module xtalk_bidir_bus
  import xtalk_pkg::*;
#(
  parameter int unsigned N             = 6,
  parameter int unsigned DESIGN_MARGIN = 5,
  parameter int unsigned LIB_DEPTH     = 32,
  parameter int unsigned LIB_AW        = $clog2(LIB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dir,
  // core A side
  input  logic              a_tx_valid,
  input  logic [N-1:0]      a_tx_data,
  output logic              a_rx_valid,
  output logic [N-1:0]      a_rx_data,
  output effect_e           a_rx_effect [N],
  output logic [N-1:0]      a_rx_hold_mask,
  output logic              a_rx_err,
  // core B side
  input  logic              b_tx_valid,
  input  logic [N-1:0]      b_tx_data,
  output logic              b_rx_valid,
  output logic [N-1:0]      b_rx_data,
  output effect_e           b_rx_effect [N],
  output logic [N-1:0]      b_rx_hold_mask,
  output logic              b_rx_err,
  // parameter-file configuration (calibration)
  input  logic              cfg_en,
  input  logic              cfg_sel,
  input  param_wr_t         cfg_wr,
  output logic              cfg_ready,
  // coupling defect library and injection
  input  logic              lib_we,
  input  logic [LIB_AW-1:0] lib_addr,
  input  defect_entry_t     lib_wdata,
  input  logic              inj_start,
  input  logic [LIB_AW-1:0] inj_idx,
  input  logic              inj_restore,
  output logic              inj_busy,
  output logic              inj_done
);

  // ---- defect library and injector --------------------------------------
  logic      inj_pw_en;
  param_wr_t inj_pw;

  xtalk_defect_injector #(.DEPTH(LIB_DEPTH), .AW(LIB_AW)) u_inject (
    .clk       (clk),
    .rst_n     (rst_n),
    .lib_we    (lib_we),
    .lib_addr  (lib_addr),
    .lib_wdata (lib_wdata),
    .start     (inj_start),
    .start_idx (inj_idx),
    .restore   (inj_restore),
    .busy      (inj_busy),
    .done      (inj_done),
    .pw_en     (inj_pw_en),
    .pw        (inj_pw)
  );

  assign cfg_ready = !inj_busy;

  // ---- parameter files ---------------------------------------------------
  logic      ab_wr_en, ba_wr_en;
  param_wr_t pf_wr;

  assign pf_wr    = inj_pw_en ? inj_pw : cfg_wr;
  assign ab_wr_en = inj_pw_en || (cfg_en && cfg_ready && !cfg_sel);
  assign ba_wr_en = inj_pw_en || (cfg_en && cfg_ready &&  cfg_sel);

  cap_t ab_cap [N][N];
  cap_t ab_cth [N][NUM_FAULTS];
  cap_t ba_cap [N][N];
  cap_t ba_cth [N][NUM_FAULTS];

  xtalk_param_file #(.N(N), .DESIGN_MARGIN(DESIGN_MARGIN)) u_pf_ab (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (ab_wr_en),
    .wr    (pf_wr),
    .cap   (ab_cap),
    .cth   (ab_cth)
  );

  xtalk_param_file #(.N(N), .DESIGN_MARGIN(DESIGN_MARGIN)) u_pf_ba (
    .clk   (clk),
    .rst_n (rst_n),
    .wr_en (ba_wr_en),
    .wr    (pf_wr),
    .cap   (ba_cap),
    .cth   (ba_cth)
  );

  // ---- one coupling defect-simulation model per direction ----------------
  xtalk_coupling_model #(.N(N)) u_model_ab (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (a_tx_valid && !dir),
    .in_data       (a_tx_data),
    .cap           (ab_cap),
    .cth           (ab_cth),
    .out_valid     (b_rx_valid),
    .out_data      (b_rx_data),
    .out_effect    (b_rx_effect),
    .out_hold_mask (b_rx_hold_mask),
    .out_err       (b_rx_err)
  );

  xtalk_coupling_model #(.N(N)) u_model_ba (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (b_tx_valid && dir),
    .in_data       (b_tx_data),
    .cap           (ba_cap),
    .cth           (ba_cth),
    .out_valid     (a_rx_valid),
    .out_data      (a_rx_data),
    .out_effect    (a_rx_effect),
    .out_hold_mask (a_rx_hold_mask),
    .out_err       (a_rx_err)
  );

  // Host rule: configuration writes only while no injection runs.
  a_cfg_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    cfg_en |-> cfg_ready)
    else $error("parameter-file write while a defect is being injected");

endmodule
