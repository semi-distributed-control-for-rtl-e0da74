// tb_coordinator: checks the coordinator automaton with stand-in controllers.
// Part 1 (default four-region table) replays the coordination processes of
// the reference scenario: all regions asking for mode 2 (authorized without
// suggestions, decision two cycles after the request), the vertical regions
// asking for mode 3 (suggestions to the horizontal ones, accepted after
// different delays, then authorization of all four), the horizontal regions
// asking for mode 2 (one suggested region refuses: refusal to the requesters
// only), and two conflicting requests (refused at once).
// Part 2 uses a three-region table whose ordered list for one request has
// three possibilities needing 2, 3 and 3 reconfigurations, and checks that
// refused steps move on to the next possibility, that an accepted step is
// authorized, and that exhausting the list ends in a refusal.
module tb_coordinator;
  import sdc_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // ---- part 1: default table, four regions -------------------------------
  localparam int NA = 4;
  ctrl2coord_t [NA-1:0] to_a;
  coord2ctrl_t [NA-1:0] from_a;
  logic                 busy_a;
  mode_t       [NA-1:0] cfg_a, req_a;
  mode_flags_t          acc_a [NA];
  int                   dly_a [NA];
  logic        [NA-1:0] rv_a, ra_a, auth_a;
  int                   ns_a [NA], nd_a [NA];
  mode_t                ls_a [NA], ld_a [NA];

  coordinator dut_a (.clk, .rst_n, .to_coord(to_a), .from_coord(from_a),
                     .coord_inprogress(busy_a), .config_modes(cfg_a));

  for (genvar i = 0; i < NA; i++) begin : g_a
    coord_stub u_stub (.clk, .rst_n, .from_coord(from_a[i]), .accept_mask(acc_a[i]),
                       .resp_delay(dly_a[i]), .resp_valid(rv_a[i]), .resp_accept(ra_a[i]),
                       .n_sugg(ns_a[i]), .last_sugg(ls_a[i]), .n_dec(nd_a[i]),
                       .last_auth(auth_a[i]), .last_dec_mode(ld_a[i]));
    assign to_a[i] = '{req_valid: req_a[i] != 0, req_mode: req_a[i],
                       resp_valid: rv_a[i], resp_accept: ra_a[i]};
  end

  // ---- part 2: three regions, four configurations -------------------------
  // configuration:   k0  k1  k2  k3
  // region 0          1   2   2   3
  // region 1          1   2   2   2
  // region 2          1   1   2   3
  localparam int NB = 3;
  localparam mode_t [2:0][3:0] GC_B = {{3'd3, 3'd2, 3'd1, 3'd1},
                                       {3'd2, 3'd2, 3'd2, 3'd1},
                                       {3'd3, 3'd2, 3'd2, 3'd1}};
  ctrl2coord_t [NB-1:0] to_b;
  coord2ctrl_t [NB-1:0] from_b;
  logic                 busy_b;
  mode_t       [NB-1:0] cfg_b, req_b;
  mode_flags_t          acc_b [NB];
  int                   dly_b [NB];
  logic        [NB-1:0] rv_b, ra_b, auth_b;
  int                   ns_b [NB], nd_b [NB];
  mode_t                ls_b [NB], ld_b [NB];

  coordinator #(.N_REGIONS(NB), .K_CONFIGS(4), .GC(GC_B)) dut_b (
    .clk, .rst_n, .to_coord(to_b), .from_coord(from_b),
    .coord_inprogress(busy_b), .config_modes(cfg_b));

  for (genvar i = 0; i < NB; i++) begin : g_b
    coord_stub u_stub (.clk, .rst_n, .from_coord(from_b[i]), .accept_mask(acc_b[i]),
                       .resp_delay(dly_b[i]), .resp_valid(rv_b[i]), .resp_accept(ra_b[i]),
                       .n_sugg(ns_b[i]), .last_sugg(ls_b[i]), .n_dec(nd_b[i]),
                       .last_auth(auth_b[i]), .last_dec_mode(ld_b[i]));
    assign to_b[i] = '{req_valid: req_b[i] != 0, req_mode: req_b[i],
                       resp_valid: rv_b[i], resp_accept: ra_b[i]};
  end

  // one-cycle request from the listed regions of part 1; returns the number of
  // cycles from the request to the end of the coordination
  task automatic request_a(input mode_t [NA-1:0] r, output int cycles);
    int start;
    req_a = r;
    @(posedge clk); #1;
    req_a = '0;
    start = cycle;
    chk(busy_a, "coordination flag raised after a request");
    while (busy_a) begin @(posedge clk); #1; end
    cycles = cycle - start + 1;
    @(posedge clk); #1;   // decision registered by the stubs
  endtask

  task automatic request_b(input mode_t [NB-1:0] r);
    req_b = r;
    @(posedge clk); #1;
    req_b = '0;
    while (busy_b) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  int n0 [NA], cyc;

  initial begin
    req_a = '0; req_b = '0;
    for (int i = 0; i < NA; i++) begin acc_a[i] = '1; dly_a[i] = 1; end
    for (int i = 0; i < NB; i++) begin acc_b[i] = '1; dly_b[i] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!busy_a && cfg_a == {4{3'd1}}, "starts idle in configuration 1");

    // t1: all ask for mode 2, authorized without suggestions
    request_a({4{3'd2}}, cyc);
    chk(cyc == 2, $sformatf("direct authorization takes 2 cycles (took %0d)", cyc));
    for (int i = 0; i < NA; i++)
      chk(nd_a[i] == 1 && auth_a[i] && ld_a[i] == 2 && ns_a[i] == 0,
          $sformatf("t1 region %0d authorized for mode 2", i));
    chk(cfg_a == {4{3'd2}}, "t1 configuration 2");

    // t2: vertical regions ask for mode 3; H regions answer after 1 and 3 cycles
    dly_a[0] = 1; dly_a[1] = 3;
    request_a({3'd3, 3'd3, 3'd0, 3'd0}, cyc);
    chk(cyc == 6, $sformatf("one step with a 3-cycle answer takes 6 cycles (took %0d)", cyc));
    for (int i = 0; i < 2; i++)
      chk(ns_a[i] == 1 && ls_a[i] == 3, $sformatf("t2 region %0d suggested mode 3", i));
    for (int i = 2; i < 4; i++) chk(ns_a[i] == 0, "t2 requesters get no suggestion");
    for (int i = 0; i < NA; i++)
      chk(nd_a[i] == 2 && auth_a[i] && ld_a[i] == 3, $sformatf("t2 region %0d authorized", i));
    chk(cfg_a == {4{3'd3}}, "t2 configuration 3");

    // t5: H regions ask for mode 2; region 3 refuses -> refusal to 0 and 1 only
    dly_a[1] = 1;
    acc_a[3] = 8'b0000_1000;   // region 3 accepts only mode 3
    for (int i = 0; i < NA; i++) n0[i] = nd_a[i];
    request_a({3'd0, 3'd0, 3'd2, 3'd2}, cyc);
    for (int i = 2; i < 4; i++) chk(ns_a[i] == 1 && ls_a[i] == 2, "t5 V regions suggested mode 2");
    for (int i = 0; i < 2; i++)
      chk(nd_a[i] == n0[i] + 1 && !auth_a[i] && ld_a[i] == 2, "t5 requesters refused");
    for (int i = 2; i < 4; i++) chk(nd_a[i] == n0[i], "t5 suggested regions get no decision");
    chk(cfg_a == {4{3'd3}}, "t5 configuration unchanged");

    // t6: V regions ask for mode 2, H regions accept
    acc_a[3] = '1;
    request_a({3'd2, 3'd2, 3'd0, 3'd0}, cyc);
    chk(cfg_a == {4{3'd2}} && auth_a == 4'b1111, "t6 configuration 2 authorized");

    // conflicting requests: refused without suggestions
    for (int i = 0; i < NA; i++) n0[i] = ns_a[i];
    request_a({3'd0, 3'd0, 3'd3, 3'd1}, cyc);
    chk(cyc == 2 && auth_a[1:0] == 2'b00 && ns_a[2] == n0[2] && ns_a[3] == n0[3],
        "conflicting requests refused at once");
    chk(cfg_a == {4{3'd2}}, "conflict leaves the configuration");

    // ---- part 2 ----------------------------------------------------------
    chk(cfg_b == {3'd1, 3'd1, 3'd1}, "part 2 starts in k0");
    // region 1 asks for mode 2: k1 (suggest r0->2), then k2 (r0->2, r2->2),
    // then k3 (r0->3, r2->3). r2 refuses mode 2 and r0 refuses its first
    // suggestion only by accepting nothing but mode 3 -> k1, k2 refused, k3 taken.
    acc_b[0] = 8'b0000_1000; acc_b[2] = 8'b0000_1000;
    request_b({3'd0, 3'd2, 3'd0});
    chk(ns_b[0] == 3 && ns_b[2] == 2 && ns_b[1] == 0, $sformatf(
        "three steps of suggestions (got %0d/%0d/%0d)", ns_b[0], ns_b[1], ns_b[2]));
    chk(ls_b[0] == 3 && ls_b[2] == 3, "last step suggests k3");
    chk(auth_b == 3'b111 && ld_b[0] == 3 && ld_b[1] == 2 && ld_b[2] == 3,
        "k3 authorized to requester and suggested regions");
    chk(cfg_b == {3'd3, 3'd2, 3'd3}, "configuration k3");
    // region 1 asks for mode 1 from k3: only k0 holds it, others refuse -> refusal
    acc_b[0] = '0; acc_b[2] = '0;
    request_b({3'd0, 3'd1, 3'd0});
    chk(!auth_b[1] && ld_b[1] == 1 && nd_b[1] == 2, "list exhausted -> refusal");
    chk(cfg_b == {3'd3, 3'd2, 3'd3}, "configuration kept after refusal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
