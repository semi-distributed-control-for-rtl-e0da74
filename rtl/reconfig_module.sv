// reconfig_module: reconfiguration module of one distributed controller.
//
// It holds the reconfiguration register of its region: the mode to be loaded
// and a pending flag. The decision module writes it with a load command; the
// processor that drives the configuration port reads it, loads the partial
// bitstream of that mode into the region, and then reports the loaded mode.
// The module passes that report on to the decision module, which then moves
// its automaton to the loaded mode. Keeping the register here and leaving the
// bitstream transfer to the processor is the sequential, single-port
// arrangement of the reference system (one configuration port per FPGA).
//
// Interface:
//   load_valid/load_mode    decision module -> register (a newer command
//                           overwrites an older one that is still pending)
//   reg_mode/reg_pending    register contents, read by the processor
//   proc_loaded/_mode       processor -> module: "mode has been loaded"
//   loaded_valid/_mode      module -> decision module
// Timing: the register changes the cycle after load_valid. loaded_valid is a
// one-cycle pulse the cycle after proc_loaded. The pending flag is cleared by
// a report of the mode the register holds; a report of any other mode is
// still passed on, since the region does hold that mode now.
module reconfig_module
  import sdc_pkg::*;
#(
  parameter mode_t INIT_MODE = mode_t'(1)
) (
  input  logic  clk,
  input  logic  rst_n,
  // decision module
  input  logic  load_valid,
  input  mode_t load_mode,
  output logic  loaded_valid,
  output mode_t loaded_mode,
  // processor side
  output mode_t reg_mode,
  output logic  reg_pending,
  input  logic  proc_loaded,
  input  mode_t proc_loaded_mode
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_mode     <= INIT_MODE;
      reg_pending  <= 1'b0;
      loaded_valid <= 1'b0;
      loaded_mode  <= INIT_MODE;
    end else begin
      loaded_valid <= 1'b0;
      if (proc_loaded) begin
        loaded_valid <= 1'b1;
        loaded_mode  <= proc_loaded_mode;
        if (proc_loaded_mode == reg_mode) reg_pending <= 1'b0;
      end
      // A new command wins over a report in the same cycle.
      if (load_valid) begin
        reg_mode    <= load_mode;
        reg_pending <= 1'b1;
      end
    end
  end

endmodule
