// controller: distributed controller of one reconfigurable region.
//
// It joins the three modules that handle the region's self-adaptivity:
// monitoring (battery and user performance level -> threshold flags),
// decision (the mode-automaton that requests, answers suggestions and orders
// loads) and reconfiguration (the register the processor reads to load a
// bitstream). Only the decision module talks to the coordinator, over a
// point-to-point link; the controller knows nothing of the other regions,
// which is what lets the same controller be reused for every region of the
// same kind.
//
// Timing: monitoring adds one register stage; see decision_module and
// reconfig_module for the rest. A change of battery level can raise a request
// two cycles later at the earliest.
module controller
  import sdc_pkg::*;
#(
  parameter int              N_MODES      = 3,
  parameter int              BATT_W       = 32,
  parameter longint unsigned FULL_BATTERY = 1_000_000,
  parameter int unsigned     POWER  [N_MODES]   = '{60, 40, 20},
  parameter int unsigned     A_FRAC [N_MODES-1] = '{7500, 5625},
  parameter int unsigned     B_FRAC       = 500,
  parameter mode_t           INIT_MODE    = mode_t'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // external events
  input  logic [BATT_W-1:0] battery_level,
  input  mode_t             perf_level,
  // coordinator link
  input  logic              coord_inprogress,
  input  coord2ctrl_t       from_coord,
  output ctrl2coord_t       to_coord,
  // processor side of the reconfiguration register
  output mode_t             reg_mode,
  output logic              reg_pending,
  input  logic              proc_loaded,
  input  mode_t             proc_loaded_mode,
  // status
  output mode_t             cur_mode,
  output mode_flags_t       refused,
  output logic              waiting_decision
);

  monitor_t mon;
  logic     load_valid, loaded_valid;
  mode_t    load_mode, loaded_mode;

  monitoring_module #(
    .N_MODES(N_MODES), .BATT_W(BATT_W), .FULL_BATTERY(FULL_BATTERY),
    .POWER(POWER), .A_FRAC(A_FRAC), .B_FRAC(B_FRAC)
  ) u_monitor (
    .clk, .rst_n, .battery_level, .perf_level, .mon
  );

  decision_module #(.N_MODES(N_MODES), .INIT_MODE(INIT_MODE)) u_decision (
    .clk, .rst_n, .mon,
    .coord_inprogress, .from_coord, .to_coord,
    .load_valid, .load_mode, .loaded_valid, .loaded_mode,
    .cur_mode, .refused, .waiting_decision
  );

  reconfig_module #(.INIT_MODE(INIT_MODE)) u_reconfig (
    .clk, .rst_n,
    .load_valid, .load_mode, .loaded_valid, .loaded_mode,
    .reg_mode, .reg_pending, .proc_loaded, .proc_loaded_mode
  );

endmodule
