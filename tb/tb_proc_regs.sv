// tb_proc_regs: checks the processor command interface: the performance
// level register (write, read back, out-of-range writes ignored), the read
// of every region's reconfiguration register ({pending, 0000, mode}, valid
// one cycle after the access), the one-cycle "loaded" strobe to the addressed
// region only, and reads of unused addresses.
module tb_proc_regs;
  import sdc_pkg::*;

  localparam int N = 4;

  logic         clk = 0, rst_n = 0;
  logic         proc_valid, proc_we, proc_rvalid;
  logic [7:0]   proc_addr, proc_wdata, proc_rdata;
  mode_t        perf_level, loaded_mode;
  mode_t [N-1:0] reg_mode;
  logic  [N-1:0] reg_pending, loaded;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  proc_regs #(.N_REGIONS(N)) dut (.clk, .rst_n, .proc_valid, .proc_we, .proc_addr, .proc_wdata,
                                  .proc_rdata, .proc_rvalid, .perf_level, .reg_mode,
                                  .reg_pending, .loaded, .loaded_mode);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s: rdata=%h rvalid=%b perf=%0d loaded=%b/%0d", $time, msg,
               proc_rdata, proc_rvalid, perf_level, loaded, loaded_mode);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    proc_valid = 1; proc_we = 1; proc_addr = a; proc_wdata = d;
    @(posedge clk); #1;
    proc_valid = 0; proc_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    proc_valid = 1; proc_we = 0; proc_addr = a;
    @(posedge clk); #1;
    proc_valid = 0;
    chk(proc_rvalid, "read data valid one cycle after the access");
    d = proc_rdata;
    @(posedge clk); #1;
    chk(!proc_rvalid, "rvalid is a one-cycle pulse");
  endtask

  initial begin
    logic [7:0] d;
    proc_valid = 0; proc_we = 0; proc_addr = 0; proc_wdata = 0;
    reg_mode = '0; reg_pending = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(perf_level == 1, "performance level resets to 1");
    wr(0, 2);
    chk(perf_level == 2, "performance level written");
    rd(0, d);
    chk(d == 8'd2, "performance level read back");
    wr(0, 0);
    chk(perf_level == 2, "level 0 ignored");
    wr(0, 7);
    chk(perf_level == 2, "level above the mode count ignored");
    wr(0, 3);
    chk(perf_level == 3, "level 3 written");
    for (int i = 0; i < N; i++) begin
      reg_mode[i] = mode_t'((i % 3) + 1);
      reg_pending[i] = i[0];
    end
    for (int i = 0; i < N; i++) begin
      rd(8'(1 + i), d);
      chk(d == {reg_pending[i], 4'b0, reg_mode[i]}, $sformatf("region %0d register read", i));
    end
    rd(8'(N + 1), d);
    chk(d == 0, "unused address reads 0");
    for (int i = 0; i < N; i++) begin
      proc_valid = 1; proc_we = 1; proc_addr = 8'(1 + i); proc_wdata = 8'((i % 3) + 1);
      @(posedge clk); #1;
      proc_valid = 0; proc_we = 0;
      chk(loaded == N'(1 << i) && loaded_mode == mode_t'((i % 3) + 1),
          $sformatf("loaded strobe to region %0d", i));
      @(posedge clk); #1;
      chk(loaded == '0, "loaded strobe lasts one cycle");
    end
    wr(8'(N + 1), 1);
    chk(loaded == '0 && perf_level == 3, "write to an unused address does nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
