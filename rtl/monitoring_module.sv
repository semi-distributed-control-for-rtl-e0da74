// monitoring_module: monitoring part of one distributed controller.
//
// It samples the battery level given by the battery sensor every clock cycle
// and the performance level required by the user, and turns them into the
// monitoring data the decision module works on: for every mode j of the
// controlled region, whether the available energy is too low to stay in mode j
// (eq. 1 of the control model) and whether it is high enough to move up to
// mode j (eq. 2):
//
//   must_leave[j]:  AB <  a_j       * FB * P_j / P_1
//   may_enter[j]:   AB >= (a_j + b) * FB * P_j / P_1
//
// AB is the available battery energy, FB a full battery, P_j the energy per
// cycle of mode j and a_j the threshold between mode j and mode j+1. The
// hysteresis b keeps a region that has just moved up from falling back at
// once. The least consuming mode can always be entered and never has to be
// left. The flag vectors are indexed by mode number and sized for the largest
// mode count the package allows, so bit 0 and the bits above N_MODES are
// constant 0 and may_enter[N_MODES] is constant 1. The thresholds are constants computed at elaboration, so the module is
// one comparator per threshold and a register stage.
//
// The default fractions (a_1 = 75 %, a_2 = 75 % x 75 %, b = 5 %) and the
// power figures of the horizontal filter (60/40/20 mW) are the reference
// design's; the battery width and the full-battery value are this design's
// choice.
//
// Timing: the outputs are registered; they reflect the inputs of the
// previous cycle. Reset clears them to "nothing to leave, nothing allowed".
module monitoring_module
  import sdc_pkg::*;
#(
  parameter int              N_MODES       = 3,
  parameter int              BATT_W        = 32,
  parameter longint unsigned FULL_BATTERY  = 1_000_000,
  parameter int unsigned     POWER  [N_MODES]   = '{60, 40, 20},
  parameter int unsigned     A_FRAC [N_MODES-1] = '{7500, 5625},
  parameter int unsigned     B_FRAC        = 500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BATT_W-1:0] battery_level,  // AB, from the battery sensor
  input  mode_t             perf_level,     // user performance level, 1..N_MODES
  output monitor_t          mon
);

  if (N_MODES < 2 || N_MODES > MAX_MODES) begin : g_bad_modes
    $error("monitoring_module: N_MODES must lie in 2..%0d", MAX_MODES);
  end

  mode_flags_t must_leave_d, may_enter_d;

  always_comb begin
    must_leave_d = '0;
    may_enter_d  = '0;
    for (int j = 1; j < N_MODES; j++) begin
      must_leave_d[j] = 64'(battery_level) <
          battery_threshold(FULL_BATTERY, 64'(A_FRAC[j-1]),
                            64'(POWER[j-1]), 64'(POWER[0]));
      may_enter_d[j]  = 64'(battery_level) >=
          battery_threshold(FULL_BATTERY, 64'(A_FRAC[j-1] + B_FRAC),
                            64'(POWER[j-1]), 64'(POWER[0]));
    end
    may_enter_d[N_MODES] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon <= '{perf_level: mode_t'(1), must_leave: '0, may_enter: '0};
    end else begin
      mon.perf_level <= perf_level;
      mon.must_leave <= must_leave_d;
      mon.may_enter  <= may_enter_d;
    end
  end

endmodule
