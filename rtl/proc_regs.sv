// proc_regs: command interface between the processor and the control model.
//
// The processor that owns the configuration port uses three commands: set the
// performance level the user requires, read the reconfiguration register of a
// region, and tell a region's reconfiguration module that a bitstream has been
// loaded. This module decodes them from a simple register bus:
//
//   address 0          performance level, read/write (reset value 1)
//   address 1 + i      region i: read  -> {pending, 4'b0, mode}
//                                write -> "mode wdata[2:0] has been loaded"
//
// The commands are the reference system's; the bus, the address map and the
// data layout are this design's choice.
//
// Timing: writes take effect at the clock edge of the access; the loaded
// strobe to the region is a one-cycle pulse in the cycle after the write.
// Read data is registered and valid (rvalid) the cycle after the access.
// Accesses to unused addresses read 0 and write nothing.
module proc_regs
  import sdc_pkg::*;
#(
  parameter int N_REGIONS = 4,
  parameter int N_MODES   = 3,
  parameter int ADDR_W    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor bus
  input  logic                        proc_valid,
  input  logic                        proc_we,
  input  logic [ADDR_W-1:0]           proc_addr,
  input  logic [7:0]                  proc_wdata,
  output logic [7:0]                  proc_rdata,
  output logic                        proc_rvalid,
  // control model
  output mode_t                       perf_level,
  input  mode_t [N_REGIONS-1:0]       reg_mode,
  input  logic  [N_REGIONS-1:0]       reg_pending,
  output logic  [N_REGIONS-1:0]       loaded,
  output mode_t                       loaded_mode
);

  if (N_REGIONS + 1 > (1 << ADDR_W)) begin : g_bad_addr
    $error("proc_regs: ADDR_W too small for %0d regions", N_REGIONS);
  end

  localparam int REGION_BASE = 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_level  <= mode_t'(1);
      loaded      <= '0;
      loaded_mode <= NO_MODE;
      proc_rdata  <= '0;
      proc_rvalid <= 1'b0;
    end else begin
      loaded      <= '0;
      proc_rvalid <= proc_valid && !proc_we;
      if (proc_valid && proc_we) begin
        if (proc_addr == '0) begin
          if (proc_wdata[MODE_W-1:0] != NO_MODE && int'(proc_wdata[MODE_W-1:0]) <= N_MODES)
            perf_level <= proc_wdata[MODE_W-1:0];
        end
        for (int i = 0; i < N_REGIONS; i++) begin
          if (int'(proc_addr) == REGION_BASE + i) begin
            loaded[i]   <= 1'b1;
            loaded_mode <= proc_wdata[MODE_W-1:0];
          end
        end
      end
      if (proc_valid && !proc_we) begin
        proc_rdata <= '0;
        if (proc_addr == '0) proc_rdata <= 8'(perf_level);
        for (int i = 0; i < N_REGIONS; i++) begin
          if (int'(proc_addr) == REGION_BASE + i)
            proc_rdata <= {reg_pending[i], 4'b0, reg_mode[i]};
        end
      end
    end
  end

endmodule
