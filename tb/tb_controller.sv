// tb_controller: one horizontal-filter controller (monitoring, decision and
// reconfiguration modules together) driven through its external ports.
// The testbench plays the battery sensor, the user, the coordinator and the
// processor. It checks the whole local loop: a battery fall below 75 % of a
// full battery raises a request for mode 2 one cycle later; the authorization
// fills the reconfiguration register (mode 2, pending); the processor's
// loaded report moves the automaton to mode 2 and clears pending. A fall below
// 56.25 % x 40/60 of a full battery asks for mode 3, which is refused and
// never asked again; suggestions back to mode 1 are refused below 80 % and
// accepted above it; the accepted suggestion is authorized and loaded.
module tb_controller;
  import sdc_pkg::*;

  localparam int FB = 1_000_000;

  logic        clk = 0, rst_n = 0;
  logic [31:0] battery;
  mode_t       perf, reg_mode, proc_loaded_mode, cur_mode;
  logic        busy, reg_pending, proc_loaded, waiting;
  coord2ctrl_t from_coord;
  ctrl2coord_t to_coord;
  mode_flags_t refused;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller dut (.clk, .rst_n, .battery_level(battery), .perf_level(perf),
                  .coord_inprogress(busy), .from_coord, .to_coord,
                  .reg_mode, .reg_pending, .proc_loaded, .proc_loaded_mode,
                  .cur_mode, .refused, .waiting_decision(waiting));

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s: req=%b/%0d resp=%b/%b reg=%0d/%b mode=%0d", $time, msg,
               to_coord.req_valid, to_coord.req_mode, to_coord.resp_valid,
               to_coord.resp_accept, reg_mode, reg_pending, cur_mode);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // waits for a request; returns the mode and the cycles it took
  task automatic wait_request(output mode_t m, output int cycles);
    cycles = 0;
    while (!to_coord.req_valid && cycles < 20) begin tick(); cycles++; end
    m = to_coord.req_mode;
    tick();
  endtask

  task automatic decide(input logic auth, input mode_t m);
    busy = 1;
    tick();
    from_coord.dec_valid = 1; from_coord.dec_auth = auth; from_coord.dec_mode = m;
    busy = 0;
    tick();
    from_coord.dec_valid = 0;
    tick();
  endtask

  task automatic processor_load();
    chk(reg_pending, "register pending before the load");
    proc_loaded = 1; proc_loaded_mode = reg_mode;
    tick();
    proc_loaded = 0;
    tick();
    chk(!reg_pending && cur_mode == proc_loaded_mode, "loaded: pending cleared, mode updated");
  endtask

  task automatic suggest(input mode_t m, input logic exp);
    logic was_busy = busy;
    busy = 1;
    from_coord.sugg_valid = 1; from_coord.sugg_mode = m;
    tick();
    from_coord.sugg_valid = 0;
    chk(to_coord.resp_valid && to_coord.resp_accept == exp,
        $sformatf("suggestion of mode %0d answered %0d", m, exp));
    tick();
    busy = was_busy;
  endtask

  initial begin
    mode_t m;
    int    cyc;
    battery = FB; perf = 1; busy = 0; from_coord = '0;
    proc_loaded = 0; proc_loaded_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) tick();
    chk(cur_mode == 1 && !to_coord.req_valid && !reg_pending, "idle in mode 1 at full battery");

    battery = FB * 3 / 4;            // exactly 75 %: not below
    repeat (3) tick();
    chk(!to_coord.req_valid, "no request at exactly 75 %");
    battery = FB * 3 / 4 - 1;
    #0;
    wait_request(m, cyc);
    chk(m == 2 && cyc == 1, $sformatf("below 75 %%: request mode 2 after one cycle (%0d, %0d)", m, cyc));
    decide(1, 2);
    chk(reg_mode == 2 && reg_pending, "authorization fills the reconfiguration register");
    repeat (3) begin chk(!to_coord.req_valid, "silent while the load is pending"); tick(); end
    processor_load();

    battery = 375_000;               // 56.25 % * 40/60 = 37.5 %: not below
    repeat (3) tick();
    chk(!to_coord.req_valid, "no request at exactly 37.5 %");
    battery = 374_999;
    wait_request(m, cyc);
    chk(m == 3, "below 37.5 %: request mode 3");
    decide(0, 3);
    chk(refused[3] && !reg_pending, "refusal recorded, nothing to load");
    repeat (5) begin chk(!to_coord.req_valid, "refused mode not asked again"); tick(); end

    battery = 799_999;
    tick(); tick();
    suggest(1, 0);
    busy = 1;                        // a coordination is running: no own request
    battery = 800_000;
    tick(); tick();
    suggest(1, 1);
    busy = 1;
    decide(1, 1);
    chk(reg_mode == 1 && reg_pending, "suggested mode to be loaded");
    processor_load();
    chk(refused == '0, "refused flags cleared by the mode change");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
