// tb_reconfig_module: drives random load commands (decision side) and loaded
// reports (processor side) into the reconfiguration module and checks, every
// cycle, the register contents, the pending flag and the one-cycle loaded
// pulse towards the decision module against a cycle model kept here: a load
// command writes the register and sets pending on the next edge; a report
// is forwarded one cycle later and clears pending only when it names the
// registered mode; a command wins over a report in the same cycle.
module tb_reconfig_module;
  import sdc_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  load_valid, loaded_valid, reg_pending, proc_loaded;
  mode_t load_mode, loaded_mode, reg_mode, proc_loaded_mode;
  int checks = 0, failures = 0;
  int n_loads = 0, n_clears = 0, n_mismatch = 0;

  mode_t m_reg = 1;
  logic  m_pend = 0, m_lv = 0;
  mode_t m_lm = 1;

  always #5 clk = ~clk;

  reconfig_module dut (.clk, .rst_n, .load_valid, .load_mode, .loaded_valid, .loaded_mode,
                       .reg_mode, .reg_pending, .proc_loaded, .proc_loaded_mode);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s: reg=%0d pend=%b lv=%b lm=%0d (model %0d %b %b %0d)", $time, msg,
               reg_mode, reg_pending, loaded_valid, loaded_mode, m_reg, m_pend, m_lv, m_lm);
    end
  endtask

  initial begin
    load_valid = 0; load_mode = 0; proc_loaded = 0; proc_loaded_mode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(reg_mode == 1 && !reg_pending && !loaded_valid, "reset state");
    repeat (500) begin
      // drive this cycle's inputs
      load_valid  = ($urandom_range(0, 3) == 0);
      load_mode   = mode_t'($urandom_range(1, 3));
      proc_loaded = m_pend ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 9) == 0);
      proc_loaded_mode = ($urandom_range(0, 3) == 0) ? mode_t'($urandom_range(1, 3)) : m_reg;
      // model of the next state
      m_lv = proc_loaded;
      if (proc_loaded) begin
        m_lm = proc_loaded_mode;
        if (proc_loaded_mode == m_reg) begin
          if (m_pend && !load_valid) n_clears++;
          m_pend = 0;
        end else n_mismatch++;
      end
      if (load_valid) begin
        m_reg = load_mode; m_pend = 1; n_loads++;
      end
      @(posedge clk); #1;
      chk(reg_mode == m_reg && reg_pending == m_pend, "register and pending flag");
      chk(loaded_valid == m_lv && (!m_lv || loaded_mode == m_lm), "loaded pulse");
    end
    chk(n_loads > 0 && n_clears > 0 && n_mismatch > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
