// tb_decision_module: directed test of the controller mode-automaton.
// The testbench plays the monitoring module (drives the monitoring flags),
// the coordinator (coordination flag, suggestions, decisions) and the
// reconfiguration module (loaded reports), and checks every request,
// response, load command and mode change against the rules of the
// horizontal/vertical filter controller:
//   - energy below the threshold of the current mode -> request next mode
//   - user level lower than the current mode -> request that level's mode
//   - user level higher and energy sufficient -> request it
//   - no request during a coordination, for a refused mode, or while a load
//     is pending
//   - suggestions to less consuming modes accepted, to more consuming modes
//     only if the energy allows it
// It also checks the cycle timing: request in the same cycle, response one
// cycle after a suggestion, load one cycle after an authorization.
module tb_decision_module;
  import sdc_pkg::*;

  logic        clk = 0, rst_n = 0;
  monitor_t    mon;
  logic        coord_inprogress;
  coord2ctrl_t from_coord;
  ctrl2coord_t to_coord;
  logic        load_valid, loaded_valid, waiting_decision;
  mode_t       load_mode, loaded_mode, cur_mode;
  mode_flags_t refused;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  decision_module dut (
    .clk, .rst_n, .mon, .coord_inprogress, .from_coord, .to_coord,
    .load_valid, .load_mode, .loaded_valid, .loaded_mode,
    .cur_mode, .refused, .waiting_decision
  );

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s (req=%b/%0d resp=%b/%b load=%b/%0d mode=%0d refused=%b)",
               $time, msg, to_coord.req_valid, to_coord.req_mode, to_coord.resp_valid,
               to_coord.resp_accept, load_valid, load_mode, cur_mode, refused);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic expect_request(input mode_t m, input string msg);
    #0 chk(to_coord.req_valid && to_coord.req_mode == m, msg);
  endtask

  task automatic expect_silence(input int cycles, input string msg);
    repeat (cycles) begin
      chk(!to_coord.req_valid, msg);
      tick();
    end
  endtask

  // coordinator decision pulse
  task automatic decide(input logic auth, input mode_t m);
    from_coord.dec_valid = 1; from_coord.dec_auth = auth; from_coord.dec_mode = m;
    tick();
    from_coord.dec_valid = 0;
  endtask

  // reconfiguration module report
  task automatic report_loaded(input mode_t m);
    loaded_valid = 1; loaded_mode = m;
    tick();
    loaded_valid = 0;
    chk(cur_mode == m, "current mode follows the loaded report");
  endtask

  // suggestion pulse and response one cycle later
  task automatic suggest(input mode_t m, input logic exp_accept, input string msg);
    from_coord.sugg_valid = 1; from_coord.sugg_mode = m;
    tick();
    from_coord.sugg_valid = 0;
    chk(to_coord.resp_valid && to_coord.resp_accept == exp_accept, msg);
    tick();
    chk(!to_coord.resp_valid, "response is a one-cycle pulse");
  endtask

  initial begin
    mon = '{perf_level: 1, must_leave: '0, may_enter: 8'b0000_1000};
    coord_inprogress = 0;
    from_coord = '0;
    loaded_valid = 0; loaded_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    tick();
    chk(cur_mode == 1, "reset mode is 1");
    expect_silence(3, "no request at full battery and level 1");

    // --- battery below 75 %: request mode 2, authorized, loaded ----------
    mon.must_leave[1] = 1;
    expect_request(2, "eq.1 request for mode 2 in the same cycle");
    tick();
    chk(waiting_decision, "waits for the decision");
    coord_inprogress = 1;
    expect_silence(2, "no request while waiting");
    coord_inprogress = 0;
    decide(1, 2);
    chk(load_valid && load_mode == 2, "authorization -> load(mode 2) next cycle");
    tick();
    chk(!load_valid, "load is a one-cycle pulse");
    expect_silence(3, "no request while the load is pending");
    mon.must_leave = '0;
    report_loaded(2);
    expect_silence(3, "no request in mode 2 at level 1 without eq.2");

    // --- user level 3: request mode 3, refused -------------------------
    mon.perf_level = 3;
    expect_request(3, "user level 3 -> request mode 3");
    tick();
    coord_inprogress = 1;
    tick();
    decide(0, 3);
    chk(refused[3], "refusal sets refused_mode3");
    coord_inprogress = 0;
    expect_silence(4, "refused mode is not requested again");

    // --- suggestions ---------------------------------------------------
    coord_inprogress = 1;
    suggest(1, 0, "suggestion to mode 1 refused without energy");
    mon.may_enter[1] = 1;
    suggest(1, 1, "suggestion to mode 1 accepted with energy (eq.2)");
    mon.may_enter[1] = 0;
    suggest(3, 1, "suggestion to less consuming mode 3 accepted");
    decide(1, 3);
    chk(load_valid && load_mode == 3, "authorized suggestion -> load(mode 3)");
    coord_inprogress = 0;
    tick();
    report_loaded(3);
    chk(refused == '0, "mode change clears the refused flags");

    // --- from mode 3 ---------------------------------------------------
    expect_silence(2, "level 3 in mode 3: nothing to do");
    mon.perf_level = 2;
    expect_silence(2, "level 2 without eq.2 energy: nothing to do");
    suggest(2, 0, "suggestion to mode 2 refused without energy");
    mon.may_enter[2] = 1;
    coord_inprogress = 1;
    expect_silence(2, "no request during a coordination");
    coord_inprogress = 0;
    expect_request(2, "level 2 with eq.2 energy -> request mode 2");
    tick();
    decide(0, 2);
    expect_silence(2, "mode 2 refused, no new request");
    mon.perf_level = 1;
    expect_silence(2, "level 1 without energy for mode 1: nothing");
    mon.may_enter[1] = 1;
    expect_request(1, "level 1 with eq.2 energy -> request mode 1");
    tick();
    decide(1, 1);
    chk(load_valid && load_mode == 1, "load(mode 1)");
    tick();
    report_loaded(1);

    // --- user level first, then the battery step ------------------------
    mon.perf_level = 3;
    mon.must_leave[1] = 1;
    expect_request(3, "user level 3 wins over the battery step");
    tick();
    decide(0, 3);
    expect_request(2, "mode 3 refused: the battery step to mode 2 remains");
    tick();
    decide(1, 2);
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
