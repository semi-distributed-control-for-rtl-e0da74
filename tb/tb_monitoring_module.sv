// tb_monitoring_module: checks the battery threshold flags of the monitoring
// module for a horizontal-filter region (60/40/20 mW) and a vertical-filter
// region (70/50/30 mW) against thresholds worked out here in exact integer arithmetic:
//   leave mode 1 below 75 % FB, leave mode 2 below 56.25 % FB * P2/P1,
//   enter mode 1 from 80 % FB,  enter mode 2 from 61.25 % FB * P2/P1.
// Battery levels are swept around every threshold and drawn at random; the
// flags must follow one cycle after the inputs.
module tb_monitoring_module;
  import sdc_pkg::*;

  localparam longint unsigned FB = 1_000_000;

  logic        clk = 0, rst_n = 0;
  logic [31:0] ab;
  mode_t       perf;
  monitor_t    mon_h, mon_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  monitoring_module u_h (.clk, .rst_n, .battery_level(ab), .perf_level(perf), .mon(mon_h));
  monitoring_module #(.POWER('{70, 50, 30})) u_v (
    .clk, .rst_n, .battery_level(ab), .perf_level(perf), .mon(mon_v));

  // Exact comparison without division: AB < frac/10000 * FB * p2/p1
  // <=> AB * p1 * 10000 < frac * FB * p2.
  function automatic logic below(input longint unsigned lvl, input longint unsigned frac,
                                 input longint unsigned p1, input longint unsigned p2);
    return lvl * p1 * 10000 < frac * FB * p2;
  endfunction

  function automatic void expect_flags(input monitor_t m, input longint unsigned p1,
                                       input longint unsigned p2,
                                       input longint unsigned lvl, input mode_t pl,
                                       input string tag);
    logic exp_l1 = below(lvl, 7500, 1, 1);
    logic exp_l2 = below(lvl, 5625, p1, p2);
    logic exp_e1 = !below(lvl, 8000, 1, 1);
    logic exp_e2 = !below(lvl, 6125, p1, p2);
    checks++;
    if (m.must_leave[1] !== exp_l1 || m.must_leave[2] !== exp_l2 || m.must_leave[3] !== 1'b0 ||
        m.may_enter[1] !== exp_e1 || m.may_enter[2] !== exp_e2 || m.may_enter[3] !== 1'b1 ||
        m.perf_level !== pl) begin
      failures++;
      $display("FAIL %s AB=%0d: leave=%b enter=%b perf=%0d (exp leave %b%b enter %b%b perf %0d)",
               tag, lvl, m.must_leave, m.may_enter, m.perf_level, exp_l2, exp_l1,
               exp_e2, exp_e1, pl);
    end
  endfunction

  task automatic apply(input longint unsigned lvl, input mode_t pl);
    ab   = 32'(lvl);
    perf = pl;
    @(posedge clk); #1;
    expect_flags(mon_h, 60, 40, lvl, pl, "H");
    expect_flags(mon_v, 70, 50, lvl, pl, "V");
  endtask

  initial begin
    longint unsigned pts[$];
    ab = 0; perf = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // around every threshold of both regions
    pts = '{750000, 800000, 375000, 408334, 401786, 437500, 0, FB};
    foreach (pts[n]) begin
      for (int d = -2; d <= 2; d++) apply(64'(longint'(pts[n]) + d), mode_t'(1 + (d + 2) % 3));
    end
    repeat (400) apply(64'($urandom_range(0, 1_000_000)), mode_t'($urandom_range(1, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
