// coord_stub: stand-in for the coordination side of one controller, used by
// the coordinator testbench. It answers each suggestion after RESP_DELAY
// cycles (at least one), accepting it when the bit of the suggested mode is
// set in accept_mask, and records the suggestions and decisions it receives.
module coord_stub
  import sdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  coord2ctrl_t from_coord,
  input  mode_flags_t accept_mask,
  input  int          resp_delay,
  output logic        resp_valid,
  output logic        resp_accept,
  output int          n_sugg,
  output mode_t       last_sugg,
  output int          n_dec,
  output logic        last_auth,
  output mode_t       last_dec_mode
);
  int    countdown;
  logic  answer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      countdown <= 0; answer <= 0; resp_valid <= 0; resp_accept <= 0;
      n_sugg <= 0; last_sugg <= 0; n_dec <= 0; last_auth <= 0; last_dec_mode <= 0;
    end else begin
      resp_valid <= 0;
      if (from_coord.sugg_valid) begin
        n_sugg    <= n_sugg + 1;
        last_sugg <= from_coord.sugg_mode;
        answer    <= accept_mask[from_coord.sugg_mode];
        if (resp_delay <= 1) begin
          resp_valid  <= 1;
          resp_accept <= accept_mask[from_coord.sugg_mode];
        end else countdown <= resp_delay - 1;
      end else if (countdown > 0) begin
        countdown <= countdown - 1;
        if (countdown == 1) begin
          resp_valid  <= 1;
          resp_accept <= answer;
        end
      end
      if (from_coord.dec_valid) begin
        n_dec         <= n_dec + 1;
        last_auth     <= from_coord.dec_auth;
        last_dec_mode <= from_coord.dec_mode;
      end
    end
  end
endmodule
