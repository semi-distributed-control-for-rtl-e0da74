// scenario_bench: the reference scenario of the end-to-end testbench (see
// tb_semi_distributed_control) for a control model of N regions, the first
// half horizontal-filter regions and the second half vertical-filter
// regions, with the global-configuration table "all regions in the same
// mode". It raises done when its checks are complete and reports its check
// and failure counts; the instantiating testbench prints the result.
module scenario_bench
  import sdc_pkg::*;
#(
  parameter int N = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NH = N / 2;

  logic         rst_n = 0;
  logic  [31:0] battery;
  logic         charging;
  logic         proc_valid, proc_we, proc_rvalid;
  logic  [7:0]  proc_addr, proc_wdata, proc_rdata;
  mode_t [N-1:0] region_mode, config_modes;
  mode_flags_t [N-1:0] region_refused;
  logic  [N-1:0] region_waiting;
  ctrl2coord_t [N-1:0] to_coord;
  coord2ctrl_t [N-1:0] from_coord;
  logic         busy;
  logic         perf_cmd = 0;
  mode_t        perf_cmd_level = 1;
  int           n_loads, n_perf_writes;

  initial begin checks = 0; failures = 0; done = 0; end

  semi_distributed_control #(.N_REGIONS(N)) dut (
    .clk, .rst_n, .battery_level(battery),
    .proc_valid, .proc_we, .proc_addr, .proc_wdata, .proc_rdata, .proc_rvalid,
    .region_mode, .config_modes, .coord_inprogress(busy),
    .region_refused, .region_waiting, .to_coord, .from_coord
  );

  battery_model #(.N_REGIONS(N), .N_HFILTER(NH)) u_battery (
    .clk, .rst_n, .region_mode, .level(battery), .charging);

  processor_model #(.N_REGIONS(N)) u_cpu (
    .clk, .rst_n, .proc_valid, .proc_we, .proc_addr, .proc_wdata, .proc_rdata, .proc_rvalid,
    .perf_cmd, .perf_cmd_level, .n_loads, .n_perf_writes);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d t=%0t %s", N, $time, msg);
    end
  endtask

  // ---- observation of the coordination links ------------------------------
  typedef struct {
    int          start_cycle;
    int unsigned battery;
    logic [N-1:0] requesters;
    mode_t       req_mode;
    int          n_sugg;
    int          n_accept;
    int          n_reject;
    logic        authorized;
    logic        decided;
  } process_t;

  process_t procs[$];
  int cycle = 0;
  int n_direct = 0, n_sugg = 0, n_accept = 0, n_reject = 0, n_refusal = 0, n_flat = 0;
  logic charging_q = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    charging_q <= charging;
    if (charging && !charging_q) n_flat++;
    if (!busy) begin
      logic [N-1:0] rq;
      mode_t m;
      rq = '0; m = 0;
      for (int i = 0; i < N; i++)
        if (to_coord[i].req_valid) begin rq[i] = 1; m = to_coord[i].req_mode; end
      if (rq != 0) procs.push_back('{cycle, battery, rq, m, 0, 0, 0, 0, 0});
    end
    for (int i = 0; i < N; i++) begin
      if (from_coord[i].sugg_valid) begin procs[$].n_sugg++; n_sugg++; end
      if (to_coord[i].resp_valid) begin
        if (to_coord[i].resp_accept) begin procs[$].n_accept++; n_accept++; end
        else begin procs[$].n_reject++; n_reject++; end
      end
      if (from_coord[i].dec_valid && !procs[$].decided) begin
        procs[$].decided    = 1;
        procs[$].authorized = from_coord[i].dec_auth;
        if (!from_coord[i].dec_auth) n_refusal++;
        else if (procs[$].n_sugg == 0) n_direct++;
      end
    end
  end

  // user performance level 2 once the battery has started charging (t4)
  initial begin
    wait (rst_n && charging);
    repeat (100) @(posedge clk);
    perf_cmd_level = 2;
    perf_cmd = 1;
    @(posedge clk);
    perf_cmd = 0;
  end

  function automatic logic [N-1:0] regions(input int lo, input int hi);
    logic [N-1:0] r = '0;
    for (int i = lo; i <= hi; i++) r[i] = 1;
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run until the fourth coordination has been decided and its loads done
    wait (procs.size() == 4 && procs[3].decided);
    wait (region_mode == config_modes && !busy);
    repeat (2000) @(posedge clk);   // nothing else may happen afterwards
    #1;

    chk(procs.size() == 4, $sformatf("four coordination processes (saw %0d)", procs.size()));
    if (procs.size() >= 4) begin
      // p1: all regions ask for mode 2 just below 75 %, authorized directly
      chk(procs[0].requesters == '1 && procs[0].req_mode == 2, "p1 requests: all, mode 2");
      chk(procs[0].battery < 750_000 && procs[0].battery > 740_000,
          $sformatf("p1 at 75 %% (battery %0d)", procs[0].battery));
      chk(procs[0].authorized && procs[0].n_sugg == 0, "p1 authorized without suggestions");
      // p2: vertical regions ask for mode 3 below 56.25 % x 50/70 = 401786
      chk(procs[1].requesters == regions(NH, N - 1) && procs[1].req_mode == 3, "p2 requests: V, mode 3");
      chk(procs[1].battery < 401_786 && procs[1].battery > 375_000,
          $sformatf("p2 between the V and H thresholds (battery %0d)", procs[1].battery));
      chk(procs[1].authorized && procs[1].n_sugg == NH && procs[1].n_accept == NH,
          "p2 suggestions to H accepted, authorized");
      // p3: horizontal regions ask for mode 2 at 61.25 % x 40/60 = 408334
      chk(procs[2].requesters == regions(0, NH - 1) && procs[2].req_mode == 2, "p3 requests: H, mode 2");
      chk(procs[2].battery >= 408_334 && procs[2].battery < 437_500,
          $sformatf("p3 between the H and V thresholds (battery %0d)", procs[2].battery));
      chk(!procs[2].authorized && procs[2].n_sugg == N - NH && procs[2].n_reject == N - NH,
          "p3 suggestions refused by V, request refused");
      // p4: vertical regions ask for mode 2 at 61.25 % x 50/70 = 437500
      chk(procs[3].requesters == regions(NH, N - 1) && procs[3].req_mode == 2, "p4 requests: V, mode 2");
      chk(procs[3].battery >= 437_500 && procs[3].battery < 440_000,
          $sformatf("p4 at the V threshold (battery %0d)", procs[3].battery));
      chk(procs[3].authorized && procs[3].n_accept == NH, "p4 suggestions accepted, authorized");
      chk(procs[0].start_cycle < procs[1].start_cycle && procs[1].start_cycle < procs[2].start_cycle
          && procs[2].start_cycle < procs[3].start_cycle, "processes in order");
    end
    chk(config_modes == {N{3'd2}} && region_mode == {N{3'd2}}, "ends in global configuration 2");
    chk(n_loads == 3 * N, $sformatf("3 x N partial reconfigurations (saw %0d)", n_loads));
    chk(region_refused[0][2] == 0 && region_refused[N-1] == '0,
        "refused flags cleared once the regions reached mode 2");

    // every mechanism happened at least once
    chk(n_direct > 0,      "mechanism: direct authorization");
    chk(n_sugg > 0,        "mechanism: suggestion");
    chk(n_accept > 0,      "mechanism: suggestion accepted");
    chk(n_reject > 0,      "mechanism: suggestion refused");
    chk(n_refusal > 0,     "mechanism: request refused");
    chk(n_loads > 0,       "mechanism: bitstream load");
    chk(n_flat > 0,        "mechanism: flat battery, charging");
    chk(n_perf_writes > 0, "mechanism: performance level change");
    $display("N=%0d mechanisms: direct=%0d suggestions=%0d accepted=%0d refused=%0d request_refusals=%0d loads=%0d flat=%0d level_writes=%0d cycles=%0d",
             N, n_direct, n_sugg, n_accept, n_reject, n_refusal, n_loads, n_flat, n_perf_writes, cycle);
    done = 1;
  end
endmodule
