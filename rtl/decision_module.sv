// decision_module: mode-automaton of one distributed controller.
//
// The automaton has one mode per configuration of the controlled region and
// holds the region's current mode. From the monitoring data it decides
// whether the region should move to another mode, asks the coordinator for
// it, answers the coordinator's suggestions, and on an authorization orders
// the reconfiguration module to load the new mode. The current mode changes
// only when the reconfiguration module reports that a mode has been loaded.
//
// Request rules (current mode c, user performance level p, mode 1 consumes
// most), a request for mode t being sent only when no coordination is in
// progress and t has not been refused before:
//   p > c                       -> request p   (user wants less performance)
//   energy too low to stay in c -> request c+1 (eq. 1)
//   p < c and may_enter[p]      -> request p   (eq. 2)
// tried in this order; the first whose target has not been refused is sent.
// A suggestion to a less (or equally) consuming mode is accepted at once; a
// suggestion to a more consuming mode is accepted only if eq. 2 holds for it.
// An authorization for mode t sends load(t); a refusal for t sets refused[t].
// These rules are those of the reference controller of the horizontal and
// vertical filters. This design's own choices: the refused flags are cleared
// whenever the region's mode changes, and no new request is sent while an
// authorized load is still waiting for its "loaded" report.
//
// Interface and timing: a request is combinational from registered state and
// from the registered coordination flag, so the coordinator samples it in the
// same cycle it is raised; the controller then waits for the decision. A
// response follows a suggestion by one cycle. load_valid follows an
// authorization by one cycle. The current mode follows loaded_valid by one
// cycle.
module decision_module
  import sdc_pkg::*;
#(
  parameter int    N_MODES   = 3,
  parameter mode_t INIT_MODE = mode_t'(1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  monitor_t    mon,
  // coordination
  input  logic        coord_inprogress,
  input  coord2ctrl_t from_coord,
  output ctrl2coord_t to_coord,
  // reconfiguration module
  output logic        load_valid,
  output mode_t       load_mode,
  input  logic        loaded_valid,
  input  mode_t       loaded_mode,
  // status
  output mode_t       cur_mode,
  output mode_flags_t refused,
  output logic        waiting_decision
);

  typedef enum logic {ST_RUN, ST_WAIT_DECISION} state_e;

  state_e state;
  logic   awaiting_load;
  mode_t  load_target;
  logic   resp_valid_q, resp_accept_q;

  // ---- request target ----------------------------------------------------
  mode_t perf, target;
  mode_t cand [3];

  always_comb begin
    perf = mon.perf_level;
    if (perf == NO_MODE) perf = mode_t'(1);
    if (int'(perf) > N_MODES) perf = mode_t'(N_MODES);

    cand[0] = (perf > cur_mode) ? perf : NO_MODE;
    cand[1] = (int'(cur_mode) < N_MODES && mon.must_leave[cur_mode])
              ? mode_t'(cur_mode + 1'b1) : NO_MODE;
    cand[2] = (perf < cur_mode && mon.may_enter[perf]) ? perf : NO_MODE;

    target = NO_MODE;
    for (int k = 2; k >= 0; k--) begin
      if (cand[k] != NO_MODE && !refused[cand[k]]) target = cand[k];
    end
  end

  logic send_request;
  assign send_request = state == ST_RUN && !coord_inprogress && !awaiting_load &&
                        target != NO_MODE;

  // ---- response to a suggestion ------------------------------------------
  logic accept_d;
  always_comb begin
    if (from_coord.sugg_mode >= cur_mode) accept_d = 1'b1;
    else accept_d = mon.may_enter[from_coord.sugg_mode];
  end

  always_comb begin
    to_coord.req_valid   = send_request;
    to_coord.req_mode    = send_request ? target : NO_MODE;
    to_coord.resp_valid  = resp_valid_q;
    to_coord.resp_accept = resp_accept_q;
  end

  assign waiting_decision = state == ST_WAIT_DECISION;

  // ---- state -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_RUN;
      cur_mode      <= INIT_MODE;
      refused       <= '0;
      awaiting_load <= 1'b0;
      load_target   <= NO_MODE;
      load_valid    <= 1'b0;
      load_mode     <= NO_MODE;
      resp_valid_q  <= 1'b0;
      resp_accept_q <= 1'b0;
    end else begin
      load_valid   <= 1'b0;
      resp_valid_q <= 1'b0;

      if (send_request) state <= ST_WAIT_DECISION;

      if (from_coord.sugg_valid) begin
        resp_valid_q  <= 1'b1;
        resp_accept_q <= accept_d;
      end

      if (from_coord.dec_valid) begin
        state <= ST_RUN;
        if (from_coord.dec_auth) begin
          load_valid    <= 1'b1;
          load_mode     <= from_coord.dec_mode;
          load_target   <= from_coord.dec_mode;
          awaiting_load <= 1'b1;
        end else begin
          refused[from_coord.dec_mode] <= 1'b1;
        end
      end

      if (loaded_valid && loaded_mode != NO_MODE) begin
        if (loaded_mode != cur_mode) refused <= '0;
        cur_mode <= loaded_mode;
        if (loaded_mode == load_target && !(from_coord.dec_valid && from_coord.dec_auth))
          awaiting_load <= 1'b0;
      end
    end
  end

  // ---- rules of the coordination protocol --------------------------------
  // A controller waiting for a decision is a requester of the running
  // coordination and is never asked for a response.
  a_no_sugg_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
      from_coord.sugg_valid |-> state == ST_RUN);
  // No request while a coordination is in progress.
  a_no_req_in_progress: assert property (@(posedge clk) disable iff (!rst_n)
      to_coord.req_valid |-> !coord_inprogress);
  // Decisions and suggestions name a real mode.
  a_dec_mode_valid: assert property (@(posedge clk) disable iff (!rst_n)
      from_coord.dec_valid |-> from_coord.dec_mode != NO_MODE &&
                               int'(from_coord.dec_mode) <= N_MODES);

endmodule
