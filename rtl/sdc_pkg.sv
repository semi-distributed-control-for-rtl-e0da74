// sdc_pkg: types and constants shared by the semi-distributed control model.
//
// The control model splits the self-adaptation of a partially reconfigurable
// FPGA into one controller per reconfigurable region (monitoring, decision and
// reconfiguration modules) and one coordinator that checks every requested
// reconfiguration against a table of allowed global configurations.
//
// Modes are numbered from 1, as in the mode-automata they come from; the value
// 0 means "no mode" (no request, no suggestion). Three bits hold up to seven
// modes per region; the reference system uses three. Performance levels use
// the same numbering: level j asks for the performance of mode j.
//
// The point-to-point link between a controller and the coordinator is carried
// by two structs, one per direction. All pulses in them last one clock cycle.
// The coordinator's "coordination in progress" flag is broadcast to all
// controllers beside these structs.
package sdc_pkg;

  localparam int MODE_W    = 3;
  localparam int MAX_MODES = (1 << MODE_W) - 1;

  // Fixed-point base for the threshold fractions a and b of the battery rules:
  // a fraction is given in hundredths of a percent (7500 = 75 %).
  localparam int unsigned FRAC_ONE = 10000;

  typedef logic [MODE_W-1:0] mode_t;
  localparam mode_t NO_MODE = '0;

  // Controller -> coordinator.
  typedef struct packed {
    logic  req_valid;    // reconfiguration request, one cycle
    mode_t req_mode;     // requested mode of the own region
    logic  resp_valid;   // response to a suggestion, one cycle
    logic  resp_accept;  // 1 = acceptance, 0 = refusal
  } ctrl2coord_t;

  // Coordinator -> controller.
  typedef struct packed {
    logic  sugg_valid;   // reconfiguration suggestion, one cycle
    mode_t sugg_mode;    // suggested mode
    logic  dec_valid;    // final decision, one cycle
    logic  dec_auth;     // 1 = authorization, 0 = refusal
    mode_t dec_mode;     // mode the decision is about
  } coord2ctrl_t;

  // One flag per mode, indexed by the mode number; bit 0 (no mode) is unused
  // and kept at 0.
  typedef logic [MAX_MODES:0] mode_flags_t;

  // Monitoring data passed from a monitoring module to its decision module.
  typedef struct packed {
    mode_t       perf_level;  // user performance level (1 = highest)
    mode_flags_t must_leave;  // eq. (1): energy too low to stay in mode j
    mode_flags_t may_enter;   // eq. (2): energy allows moving up to mode j
  } monitor_t;

  // Battery level below which a region in mode j has to leave it, and level
  // from which it may move up to mode j (eq. 1 and 2):
  //   AB < a * FB * P_j / P_1         and   AB >= (a + b) * FB * P_j / P_1
  // where P_j is the energy per cycle of mode j and a, b are fractions of
  // FRAC_ONE. The quotient is rounded up, so that comparing the integer
  // battery level against it gives the same answer as comparing against the
  // exact fraction. Computed at elaboration time.
  function automatic longint unsigned battery_threshold(
      longint unsigned full, longint unsigned frac,
      longint unsigned p_mode, longint unsigned p_first);
    longint unsigned num, den;
    num = full * frac * p_mode;
    den = p_first * FRAC_ONE;
    return (num + den - 1) / den;
  endfunction

endpackage
