// semi_distributed_control: semi-distributed control model for a partially
// reconfigurable FPGA.
//
// One controller per reconfigurable region decides, from local monitoring
// data only, when its region should switch to another configuration (mode).
// Before switching, it asks the coordinator, which checks the request against
// the table of allowed global configurations and, if other regions have to
// change too, asks their controllers through suggestions. Authorized changes
// are written to each region's reconfiguration register; a processor reads
// those registers, loads the partial bitstreams through the configuration
// port one after the other, and reports each loaded mode back.
//
// Default configuration: the reference video downscaler with four regions,
// the first half running the horizontal filter (60/40/20 mW in modes 1/2/3)
// and the second half the vertical filter (70/50/30 mW), three modes per
// region, three allowed global configurations (all regions in the same mode)
// and a battery sensor giving the available energy every cycle. The
// performance level is shared by all regions. Regions start in global
// configuration INIT_CONFIG.
//
// Ports: battery_level from the battery sensor; a register bus for the
// processor (see proc_regs for the address map); status outputs giving each
// region's current mode, the coordinator's view of the global configuration,
// the coordination flag, per controller the modes it has seen refused and
// whether it is waiting for a decision, and the coordination links themselves
// (requests, responses, suggestions, decisions), which a multi-FPGA or
// debug setup may want to see.
module semi_distributed_control
  import sdc_pkg::*;
#(
  parameter int              N_REGIONS    = 4,
  parameter int              N_HFILTER    = N_REGIONS / 2,
  parameter int              N_MODES      = 3,
  parameter int              K_CONFIGS    = 3,
  parameter mode_t [N_REGIONS-1:0][K_CONFIGS-1:0] GC = {N_REGIONS{3'd3, 3'd2, 3'd1}},
  parameter int              INIT_CONFIG  = 0,
  parameter int unsigned     H_POWER [N_MODES]   = '{60, 40, 20},
  parameter int unsigned     V_POWER [N_MODES]   = '{70, 50, 30},
  parameter int unsigned     A_FRAC  [N_MODES-1] = '{7500, 5625},
  parameter int unsigned     B_FRAC       = 500,
  parameter int              BATT_W       = 32,
  parameter longint unsigned FULL_BATTERY = 1_000_000,
  parameter int              ADDR_W       = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [BATT_W-1:0]     battery_level,
  // processor bus
  input  logic                  proc_valid,
  input  logic                  proc_we,
  input  logic [ADDR_W-1:0]     proc_addr,
  input  logic [7:0]            proc_wdata,
  output logic [7:0]            proc_rdata,
  output logic                  proc_rvalid,
  // status
  output mode_t [N_REGIONS-1:0] region_mode,
  output mode_t [N_REGIONS-1:0] config_modes,
  output logic                  coord_inprogress,
  output mode_flags_t [N_REGIONS-1:0] region_refused,  // refused modes per controller
  output logic  [N_REGIONS-1:0] region_waiting,         // controller waits for a decision
  // copies of the point-to-point coordination links, for observation
  output ctrl2coord_t [N_REGIONS-1:0] to_coord,
  output coord2ctrl_t [N_REGIONS-1:0] from_coord
);
  mode_t       [N_REGIONS-1:0] reg_mode;
  logic        [N_REGIONS-1:0] reg_pending, loaded;
  mode_t                       loaded_mode, perf_level;

  coordinator #(
    .N_REGIONS(N_REGIONS), .K_CONFIGS(K_CONFIGS), .GC(GC), .INIT_CONFIG(INIT_CONFIG)
  ) u_coordinator (
    .clk, .rst_n, .to_coord, .from_coord, .coord_inprogress, .config_modes
  );

  for (genvar i = 0; i < N_REGIONS; i++) begin : g_ctrl
    localparam mode_t INIT_MODE = GC[i][INIT_CONFIG];
    if (i < N_HFILTER) begin : g_h
      controller #(
        .N_MODES(N_MODES), .BATT_W(BATT_W), .FULL_BATTERY(FULL_BATTERY),
        .POWER(H_POWER), .A_FRAC(A_FRAC), .B_FRAC(B_FRAC),
        .INIT_MODE(INIT_MODE)
      ) u_controller (
        .clk, .rst_n, .battery_level, .perf_level,
        .coord_inprogress, .from_coord(from_coord[i]), .to_coord(to_coord[i]),
        .reg_mode(reg_mode[i]), .reg_pending(reg_pending[i]),
        .proc_loaded(loaded[i]), .proc_loaded_mode(loaded_mode),
        .cur_mode(region_mode[i]), .refused(region_refused[i]),
        .waiting_decision(region_waiting[i])
      );
    end else begin : g_v
      controller #(
        .N_MODES(N_MODES), .BATT_W(BATT_W), .FULL_BATTERY(FULL_BATTERY),
        .POWER(V_POWER), .A_FRAC(A_FRAC), .B_FRAC(B_FRAC),
        .INIT_MODE(INIT_MODE)
      ) u_controller (
        .clk, .rst_n, .battery_level, .perf_level,
        .coord_inprogress, .from_coord(from_coord[i]), .to_coord(to_coord[i]),
        .reg_mode(reg_mode[i]), .reg_pending(reg_pending[i]),
        .proc_loaded(loaded[i]), .proc_loaded_mode(loaded_mode),
        .cur_mode(region_mode[i]), .refused(region_refused[i]),
        .waiting_decision(region_waiting[i])
      );
    end
  end

  proc_regs #(.N_REGIONS(N_REGIONS), .N_MODES(N_MODES), .ADDR_W(ADDR_W)) u_proc_regs (
    .clk, .rst_n,
    .proc_valid, .proc_we, .proc_addr, .proc_wdata, .proc_rdata, .proc_rvalid,
    .perf_level, .reg_mode, .reg_pending, .loaded, .loaded_mode
  );

endmodule
