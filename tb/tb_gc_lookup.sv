// tb_gc_lookup: checks the global-configuration lookup.
// Part 1 uses the default table (four regions, configuration k = every region
// in mode k) with the request patterns of the reference scenario and with
// random requests, comparing against a brute-force search written here.
// Part 2 uses a table of three regions and four configurations built so that
// the possibilities holding one request need 1, 3 and 2 reconfigurations; it
// walks the ordered list by marking possibilities as tried and checks that
// they come out fewest-reconfigurations first.
module tb_gc_lookup;
  import sdc_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ---- part 1: default table ---------------------------------------------
  mode_t [3:0] req_a, cur_a, modes_a;
  logic  [2:0] tried_a, match_a;
  logic        valid_a;
  logic  [1:0] k_a;
  logic  [2:0] cost_a;
  logic  [3:0] change_a, others_a;

  gc_lookup dut_a (.req_mode(req_a), .cur_mode(cur_a), .tried(tried_a), .match(match_a),
                   .best_valid(valid_a), .best_k(k_a), .best_cost(cost_a),
                   .best_modes(modes_a), .best_change(change_a), .best_others(others_a));

  // ---- part 2: ordering table -----------------------------------------------
  // configuration:   k0       k1       k2       k3
  // region 0         1        2        2        2
  // region 1         1        1        2        3
  // region 2         1        1        2        1
  localparam mode_t [2:0][3:0] GC_B = {{3'd1, 3'd2, 3'd1, 3'd1},
                                       {3'd3, 3'd2, 3'd1, 3'd1},
                                       {3'd2, 3'd2, 3'd2, 3'd1}};
  mode_t [2:0] req_b, cur_b, modes_b;
  logic  [3:0] tried_b, match_b;
  logic        valid_b;
  logic  [1:0] k_b;
  logic  [1:0] cost_b;
  logic  [2:0] change_b, others_b;

  gc_lookup #(.N_REGIONS(3), .K_CONFIGS(4), .GC(GC_B)) dut_b (
    .req_mode(req_b), .cur_mode(cur_b), .tried(tried_b), .match(match_b),
    .best_valid(valid_b), .best_k(k_b), .best_cost(cost_b),
    .best_modes(modes_b), .best_change(change_b), .best_others(others_b));

  // brute force over the default table: configuration k has every region in
  // mode k+1
  task automatic check_default(input string tag);
    int best = -1, bestc = 99;
    for (int k = 0; k < 3; k++) begin
      bit ok = 0;
      int c = 0;
      for (int i = 0; i < 4; i++) if (req_a[i] != 0) ok = 1;
      for (int i = 0; i < 4; i++) if (req_a[i] != 0 && req_a[i] != mode_t'(k + 1)) ok = 0;
      for (int i = 0; i < 4; i++) if (cur_a[i] != mode_t'(k + 1)) c++;
      chk(match_a[k] == ok, {tag, " match"});
      if (ok && !tried_a[k] && c < bestc) begin best = k; bestc = c; end
    end
    chk(valid_a == (best >= 0), {tag, " valid"});
    if (best >= 0) begin
      logic [3:0] ch = '0, ot = '0;
      for (int i = 0; i < 4; i++) begin
        ch[i] = cur_a[i] != mode_t'(best + 1);
        ot[i] = ch[i] && req_a[i] == 0;
      end
      chk(k_a == 2'(best) && cost_a == 3'(bestc) && change_a == ch && others_a == ot,
          $sformatf("%s best k=%0d cost=%0d ch=%b ot=%b (got k=%0d cost=%0d ch=%b ot=%b)",
                    tag, best, bestc, ch, ot, k_a, cost_a, change_a, others_a));
      for (int i = 0; i < 4; i++) chk(modes_a[i] == mode_t'(best + 1), {tag, " modes"});
    end
  endtask

  initial begin
    // t1: all four ask for mode 2 from configuration 1 -> configuration 2, no others
    cur_a = {4{3'd1}}; req_a = {4{3'd2}}; tried_a = 0; #1;
    check_default("t1");
    chk(valid_a && k_a == 1 && others_a == 0 && cost_a == 4, "t1 direct authorization");
    // t2: the vertical regions (2, 3) ask for mode 3 -> suggest to regions 0, 1
    cur_a = {4{3'd2}}; req_a = {3'd3, 3'd3, 3'd0, 3'd0}; #1;
    check_default("t2");
    chk(valid_a && k_a == 2 && others_a == 4'b0011, "t2 suggestions to the H regions");
    // t5: the horizontal regions ask for mode 2 -> suggest to regions 2, 3; once
    // refused nothing is left
    cur_a = {4{3'd3}}; req_a = {3'd0, 3'd0, 3'd2, 3'd2}; #1;
    chk(valid_a && k_a == 1 && others_a == 4'b1100, "t5 suggestions to the V regions");
    tried_a = 3'b010; #1;
    chk(!valid_a, "t5 no possibility left");
    // conflicting requests: no configuration holds them
    tried_a = 0; req_a = {3'd1, 3'd2, 3'd0, 3'd0}; #1;
    chk(!valid_a && match_a == 0, "conflicting requests match nothing");
    req_a = 0; #1;
    chk(!valid_a && match_a == 0, "no request matches nothing");
    repeat (300) begin
      for (int i = 0; i < 4; i++) begin
        cur_a[i] = mode_t'($urandom_range(1, 3));
        req_a[i] = ($urandom_range(0, 2) == 0) ? mode_t'($urandom_range(1, 3)) : 3'd0;
      end
      tried_a = 3'($urandom_range(0, 7));
      #1;
      check_default("random");
    end

    // ---- ordering ------------------------------------------------------
    cur_b = {3'd1, 3'd1, 3'd1}; req_b = {3'd0, 3'd0, 3'd2}; tried_b = 0; #1;
    chk(match_b == 4'b1110, "ordering: matches k1..k3");
    chk(valid_b && k_b == 1 && cost_b == 1 && others_b == 3'b000, "ordering: first k1 (1 change)");
    tried_b = 4'b0010; #1;
    chk(valid_b && k_b == 3 && cost_b == 2 && others_b == 3'b010 && modes_b[1] == 3,
        "ordering: then k3 (2 changes)");
    tried_b = 4'b1010; #1;
    chk(valid_b && k_b == 2 && cost_b == 3 && others_b == 3'b110, "ordering: then k2 (3 changes)");
    tried_b = 4'b1110; #1;
    chk(!valid_b, "ordering: list exhausted");
    // tie: from {2,2,1}, asking region 0 -> 2 gives k1 (cost 1) and k2 (cost 1)
    cur_b = {3'd1, 3'd2, 3'd2}; req_b = {3'd0, 3'd0, 3'd2}; tried_b = 0; #1;
    chk(valid_b && k_b == 1, "tie: lower configuration number first");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
