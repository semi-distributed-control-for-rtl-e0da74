// tb_scaling: runs the reference scenario on control models of 2, 6, 8 and
// 10 regions (the sizes besides the default 4 for which the control model was
// scaled by adding controllers and widening the global-configuration table),
// all in parallel. Each size must go through the same four coordination
// processes with the same outcomes as the four-region system.
module tb_scaling;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NS = 4;
  localparam int SIZES [NS] = '{2, 6, 8, 10};
  logic [NS-1:0] done;
  int c [NS], f [NS];

  for (genvar s = 0; s < NS; s++) begin : g_size
    scenario_bench #(.N(SIZES[s])) u_bench (.clk, .done(done[s]), .checks(c[s]), .failures(f[s]));
  end

  initial begin
    int checks = 0, failures = 0;
    @(posedge clk);
    wait (&done);
    for (int s = 0; s < NS; s++) begin checks += c[s]; failures += f[s]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks = 0, failures = 1;
    repeat (200_000) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks += c[s]; failures += f[s];
      if (!done[s]) $display("FAIL watchdog: size %0d did not finish", SIZES[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
