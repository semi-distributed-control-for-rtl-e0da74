// battery_model: behavioural model of the battery and its sensor (testbench
// only). Each cycle the available energy falls by the energy per cycle of the
// mode every region is in (horizontal-filter regions 60/40/20, vertical
// 70/50/30, as the power figures of the reference system). When the battery
// is flat it switches to charging and gains CHARGE per cycle up to FULL.
module battery_model
  import sdc_pkg::*;
#(
  parameter int N_REGIONS = 4,
  parameter int N_HFILTER = 2,
  parameter int FULL      = 1_000_000,
  parameter int CHARGE    = 200
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mode_t [N_REGIONS-1:0] region_mode,
  output logic  [31:0]          level,
  output logic                  charging
);
  function automatic int drain();
    int d = 0;
    for (int i = 0; i < N_REGIONS; i++) begin
      int h = (i < N_HFILTER) ? 60 : 70;
      d += h - 20 * (int'(region_mode[i]) - 1);
    end
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= FULL; charging <= 0;
    end else if (charging) begin
      level <= (int'(level) + CHARGE > FULL) ? FULL : level + CHARGE;
    end else if (int'(level) <= drain()) begin
      level <= 0; charging <= 1;
    end else begin
      level <= level - drain();
    end
  end
endmodule
