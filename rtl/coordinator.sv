// coordinator: coordinates the reconfiguration decisions of the distributed
// controllers so that the system always stays in an allowed global
// configuration.
//
// Three-mode automaton:
//   Idle            waits for requests. Requests raised in the same cycle are
//                   taken together; coord_inprogress is raised so that the
//                   controllers stop sending requests.
//   TreatRequests   looks the requests up in the GC table together with the
//                   current modes of the other regions. If the best allowed
//                   configuration needs no other region to change, the
//                   requests are authorized at once. If none holds the
//                   requests, they are refused. Otherwise the regions that
//                   would have to change receive suggestions.
//   TreatResponses  waits for every suggested controller to answer. If all
//                   accept, the requesters and the suggested controllers are
//                   authorized. If one refuses, the next possibility in the
//                   ordered list is tried; when none is left the requests are
//                   refused.
// Every decision ends the coordination: coord_inprogress drops and the
// automaton is back in Idle. The automaton, its mode names and the ordering of
// possibilities by number of partial reconfigurations follow the reference
// control model. This design's own choices: the coordinator keeps its own
// record of the current global configuration (updated on every authorization
// and starting from configuration INIT_CONFIG), a coordination step waits for
// all responses before it is judged, and a request that no configuration
// holds is refused without any suggestion.
//
// Links: point-to-point, one ctrl2coord_t / coord2ctrl_t pair per controller,
// so all requests and responses of a step are seen in parallel. Timing: a
// request sampled in Idle gives, two cycles later, either a decision or the
// first suggestions; each step then takes the controllers' response time plus
// one cycle.
module coordinator
  import sdc_pkg::*;
#(
  parameter int    N_REGIONS   = 4,
  parameter int    K_CONFIGS   = 3,
  parameter mode_t [N_REGIONS-1:0][K_CONFIGS-1:0] GC = {N_REGIONS{3'd3, 3'd2, 3'd1}},
  parameter int    INIT_CONFIG = 0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ctrl2coord_t [N_REGIONS-1:0] to_coord,
  output coord2ctrl_t [N_REGIONS-1:0] from_coord,
  output logic                        coord_inprogress,
  output mode_t       [N_REGIONS-1:0] config_modes   // current global configuration
);

  localparam int K_W   = (K_CONFIGS > 1) ? $clog2(K_CONFIGS) : 1;

  typedef enum logic [1:0] {IDLE, TREAT_REQUESTS, TREAT_RESPONSES} coord_state_e;

  coord_state_e               state;
  mode_t [N_REGIONS-1:0]      req_q;
  logic  [K_CONFIGS-1:0]      tried;
  logic  [N_REGIONS-1:0]      pending;
  logic                       rejected;
  mode_t [N_REGIONS-1:0]      step_modes;
  logic  [N_REGIONS-1:0]      step_change;

  // ---- table lookup -------------------------------------------------------
  logic                  best_valid;
  logic  [K_W-1:0]       best_k;
  mode_t [N_REGIONS-1:0] best_modes;
  logic  [N_REGIONS-1:0] best_change, best_others;

  gc_lookup #(.N_REGIONS(N_REGIONS), .K_CONFIGS(K_CONFIGS), .GC(GC)) u_lookup (
    .req_mode(req_q), .cur_mode(config_modes), .tried,
    .match(), .best_valid, .best_k, .best_cost(), .best_modes, .best_change, .best_others
  );

  // ---- link decoding ------------------------------------------------------
  logic [N_REGIONS-1:0] req_v, resp_v, resp_ok, requester;
  always_comb begin
    for (int i = 0; i < N_REGIONS; i++) begin
      req_v[i]     = to_coord[i].req_valid;
      resp_v[i]    = to_coord[i].resp_valid;
      resp_ok[i]   = to_coord[i].resp_accept;
      requester[i] = req_q[i] != NO_MODE;
    end
  end

  logic [N_REGIONS-1:0] pending_next;
  logic                 rejected_next;
  assign pending_next  = pending & ~resp_v;
  assign rejected_next = rejected | |(pending & resp_v & ~resp_ok);

  assign coord_inprogress = state != IDLE;

  // ---- automaton ----------------------------------------------------------
  // Outcome of looking at the best untried possibility (TreatRequests, and
  // TreatResponses after a refused step).
  typedef enum logic [1:0] {NEXT_REFUSE, NEXT_AUTHORIZE, NEXT_SUGGEST} next_e;
  next_e next_action;
  always_comb begin
    if (!best_valid)            next_action = NEXT_REFUSE;
    else if (best_others == '0) next_action = NEXT_AUTHORIZE;
    else                        next_action = NEXT_SUGGEST;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      req_q       <= '0;
      tried       <= '0;
      pending     <= '0;
      rejected    <= 1'b0;
      step_modes  <= '0;
      step_change <= '0;
      from_coord  <= '0;
      for (int i = 0; i < N_REGIONS; i++) config_modes[i] <= GC[i][INIT_CONFIG];
    end else begin
      // suggestions and decisions are one-cycle pulses
      for (int i = 0; i < N_REGIONS; i++) begin
        from_coord[i].sugg_valid <= 1'b0;
        from_coord[i].dec_valid  <= 1'b0;
      end

      unique case (state)
        IDLE: begin
          if (|req_v) begin
            for (int i = 0; i < N_REGIONS; i++)
              req_q[i] <= req_v[i] ? to_coord[i].req_mode : NO_MODE;
            tried <= '0;
            state <= TREAT_REQUESTS;
          end
        end

        TREAT_REQUESTS, TREAT_RESPONSES: begin
          if (state == TREAT_RESPONSES) begin
            pending  <= pending_next;
            rejected <= rejected_next;
          end
          if (state == TREAT_RESPONSES && pending_next == '0 && !rejected_next) begin
            // every suggested controller accepted: authorize the whole step
            for (int i = 0; i < N_REGIONS; i++) begin
              if (step_change[i] || requester[i]) begin
                from_coord[i].dec_valid <= 1'b1;
                from_coord[i].dec_auth  <= 1'b1;
                from_coord[i].dec_mode  <= step_modes[i];
                config_modes[i]         <= step_modes[i];
              end
            end
            state <= IDLE;
          end else if (state == TREAT_REQUESTS || pending_next == '0) begin
            unique case (next_action)
              NEXT_REFUSE: begin
                for (int i = 0; i < N_REGIONS; i++) begin
                  if (requester[i]) begin
                    from_coord[i].dec_valid <= 1'b1;
                    from_coord[i].dec_auth  <= 1'b0;
                    from_coord[i].dec_mode  <= req_q[i];
                  end
                end
                state <= IDLE;
              end
              NEXT_AUTHORIZE: begin
                for (int i = 0; i < N_REGIONS; i++) begin
                  if (best_change[i] || requester[i]) begin
                    from_coord[i].dec_valid <= 1'b1;
                    from_coord[i].dec_auth  <= 1'b1;
                    from_coord[i].dec_mode  <= best_modes[i];
                    config_modes[i]         <= best_modes[i];
                  end
                end
                state <= IDLE;
              end
              NEXT_SUGGEST: begin
                for (int i = 0; i < N_REGIONS; i++) begin
                  if (best_others[i]) begin
                    from_coord[i].sugg_valid <= 1'b1;
                    from_coord[i].sugg_mode  <= best_modes[i];
                  end
                end
                tried[best_k] <= 1'b1;
                step_modes    <= best_modes;
                step_change   <= best_change;
                pending       <= best_others;
                rejected      <= 1'b0;
                state         <= TREAT_RESPONSES;
              end
              default: state <= IDLE;
            endcase
          end
        end

        default: state <= IDLE;
      endcase
    end
  end

  // ---- rules of the coordination protocol --------------------------------
  // Responses come only from controllers that were sent a suggestion.
  a_resp_only_when_asked: assert property (@(posedge clk) disable iff (!rst_n)
      |resp_v |-> state == TREAT_RESPONSES && (resp_v & ~pending) == '0);
  // Requests are only raised while no coordination is in progress.
  a_req_only_idle: assert property (@(posedge clk) disable iff (!rst_n)
      |req_v |-> state == IDLE);

endmodule
