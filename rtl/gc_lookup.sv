// gc_lookup: global configurations table (GC) and the search the coordinator
// makes in it.
//
// GC[i][k] is the mode of region i in global configuration k; only the
// combinations listed in the table respect the global system constraints
// (safety, performance, consumption). The table is fixed at design time and
// given as a parameter; its default is the reference four-region system,
// where every region must run the same mode number (configuration k = all
// regions in mode k).
//
// Given the modes requested in the current coordination (NO_MODE = region did
// not ask) and the current mode of every region, the module finds the
// configurations that contain every request, counts the partial
// reconfigurations each would need, and returns the best one not yet tried:
// fewest reconfigurations first, lower configuration number on a tie. This
// ordering is the reference coordinator's strategy (minimise reconfiguration
// time); walking the ordered list one possibility at a time through the
// `tried` mask is this design's way of holding the list without sorting it.
// For the chosen configuration it also gives the regions that must change and
// those among them that did not ask (they receive suggestions).
//
// Purely combinational: N_REGIONS x K_CONFIGS mode comparators, one
// population count per configuration and a K-way minimum search.
module gc_lookup
  import sdc_pkg::*;
#(
  parameter int    N_REGIONS = 4,
  parameter int    K_CONFIGS = 3,
  parameter mode_t [N_REGIONS-1:0][K_CONFIGS-1:0] GC = {N_REGIONS{3'd3, 3'd2, 3'd1}},
  localparam int   CNT_W = $clog2(N_REGIONS + 1),
  localparam int   K_W   = (K_CONFIGS > 1) ? $clog2(K_CONFIGS) : 1
) (
  input  mode_t [N_REGIONS-1:0] req_mode,
  input  mode_t [N_REGIONS-1:0] cur_mode,
  input  logic  [K_CONFIGS-1:0] tried,
  output logic  [K_CONFIGS-1:0] match,        // configurations holding all requests
  output logic                  best_valid,   // an untried match exists
  output logic  [K_W-1:0]       best_k,       // its number, 0-based
  output logic  [CNT_W-1:0]     best_cost,    // partial reconfigurations it needs
  output mode_t [N_REGIONS-1:0] best_modes,   // its column of the table
  output logic  [N_REGIONS-1:0] best_change,  // regions whose mode changes
  output logic  [N_REGIONS-1:0] best_others   // changing regions that did not ask
);

  logic [K_CONFIGS-1:0][N_REGIONS-1:0] change;
  logic [K_CONFIGS-1:0][CNT_W-1:0]     cost;
  logic [N_REGIONS-1:0]                requester;

  always_comb begin
    for (int i = 0; i < N_REGIONS; i++) requester[i] = req_mode[i] != NO_MODE;

    for (int k = 0; k < K_CONFIGS; k++) begin
      match[k] = |requester;
      cost[k]  = '0;
      for (int i = 0; i < N_REGIONS; i++) begin
        if (requester[i] && GC[i][k] != req_mode[i]) match[k] = 1'b0;
        change[k][i] = GC[i][k] != cur_mode[i];
        cost[k] = cost[k] + CNT_W'(change[k][i]);
      end
    end

    best_valid = 1'b0;
    best_k     = '0;
    best_cost  = '0;
    for (int k = 0; k < K_CONFIGS; k++) begin
      if (match[k] && !tried[k] && (!best_valid || cost[k] < best_cost)) begin
        best_valid = 1'b1;
        best_k     = K_W'(k);
        best_cost  = cost[k];
      end
    end

    for (int i = 0; i < N_REGIONS; i++) begin
      best_modes[i]  = NO_MODE;
      best_change[i] = 1'b0;
      for (int k = 0; k < K_CONFIGS; k++) begin
        if (best_k == K_W'(k)) begin
          best_modes[i]  = GC[i][k];
          best_change[i] = change[k][i];
        end
      end
    end
    best_others = best_change & ~requester;
  end

endmodule
