// processor_model: behavioural model of the processor that owns the
// configuration port (not synthesizable, testbench only). Once per frame it
// writes a pending user performance level, then reads the reconfiguration
// register of every region in turn; for each pending register it spends
// LOAD_CYCLES cycles "loading the partial bitstream" (one region at a time,
// as with a single configuration port) and then writes the loaded report.
// It counts the loads it made.
module processor_model
  import sdc_pkg::*;
#(
  parameter int N_REGIONS   = 4,
  parameter int FRAME       = 64,
  parameter int LOAD_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       proc_valid,
  output logic       proc_we,
  output logic [7:0] proc_addr,
  output logic [7:0] proc_wdata,
  input  logic [7:0] proc_rdata,
  input  logic       proc_rvalid,
  // user command: new performance level, taken at the next frame
  input  logic       perf_cmd,
  input  mode_t      perf_cmd_level,
  output int         n_loads,
  output int         n_perf_writes
);
  logic  perf_pending = 0;
  mode_t perf_value   = 1;

  always @(posedge clk) if (perf_cmd) begin perf_pending = 1; perf_value = perf_cmd_level; end

  // Bus signals change 1 time unit after a rising edge and are sampled by the
  // design at the next one.
  task automatic bus_write(input logic [7:0] a, input logic [7:0] d);
    proc_valid = 1; proc_we = 1; proc_addr = a; proc_wdata = d;
    @(posedge clk); #1;
    proc_valid = 0; proc_we = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [7:0] d);
    proc_valid = 1; proc_we = 0; proc_addr = a;
    @(posedge clk); #1;
    proc_valid = 0;
    if (!proc_rvalid) $display("processor_model: read of address %0d got no data", a);
    d = proc_rdata;
  endtask

  initial begin
    logic [7:0] d;
    proc_valid = 0; proc_we = 0; proc_addr = 0; proc_wdata = 0;
    n_loads = 0; n_perf_writes = 0;
    @(posedge rst_n); #1;
    forever begin
      repeat (FRAME) @(posedge clk);
      #1;
      if (perf_pending) begin
        bus_write(8'd0, 8'(perf_value));
        perf_pending = 0;
        n_perf_writes++;
      end
      for (int i = 0; i < N_REGIONS; i++) begin
        bus_read(8'(1 + i), d);
        if (d[7]) begin
          repeat (LOAD_CYCLES) @(posedge clk);
          #1;
          bus_write(8'(1 + i), {5'b0, d[2:0]});
          n_loads++;
        end
      end
    end
  end
endmodule
