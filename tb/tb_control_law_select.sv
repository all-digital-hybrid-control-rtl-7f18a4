// tb_control_law_select -- drives slack-code trajectories (random walks that
// cross the direct-drive window in both directions, with dd_enable toggled)
// and a random PWM input, and checks mode, bridge drive and the entry
// counter against a reference of the control law: enter DD_HIGH when the
// code is below tdc_min and falling, DD_LOW when above tdc_max and rising,
// leave on the first code step in the opposite direction. Every transition
// (linear->DD_HIGH->linear, linear->DD_LOW->linear, forced exit by
// dd_enable) must occur.
module tb_control_law_select;
  import buck_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dd_enable;
  logic [7:0] code_cur, tdc_min, tdc_max;
  logic code_up, code_down, pwm;
  mode_e mode;
  logic dd_active, bridge_drive;
  logic [15:0] dd_entries;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_exit_hi = 0, n_exit_lo = 0, n_forced = 0;

  control_law_select dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, prev, step, m_mode, m_next, m_cnt;
    dd_enable = 1'b1; code_cur = 8'd100; code_up = 0; code_down = 0; pwm = 0;
    tdc_min = 8'd90; tdc_max = 8'd110;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    c = 100; m_mode = 0; m_cnt = 0;
    for (int k = 0; k < 100000; k++) begin
      @(negedge clk);
      prev = c;
      // slow random walk biased in phases so that both thresholds are crossed
      step = 0;
      if ($urandom % 4 == 0) begin
        case ((k / 700) % 3)
          0: step = ($urandom % 3 == 0) ? 1 : -1;
          1: step = ($urandom % 3 == 0) ? -1 : 1;
          default: step = ($urandom % 2 == 0) ? -1 : 1;
        endcase
      end
      c = c + step;
      if (c < 60) c = 60;
      if (c > 140) c = 140;
      code_cur  = 8'(c);
      code_up   = c > prev;
      code_down = c < prev;
      pwm       = $urandom % 2;
      dd_enable = !((k % 5000) > 4900);
      // reference
      m_next = m_mode;
      if (!dd_enable) begin
        if (m_mode != 0) n_forced++;
        m_next = 0;
      end else if (m_mode == 0) begin
        if (c < int'(tdc_min) && code_down) m_next = 1;
        else if (c > int'(tdc_max) && code_up) m_next = 2;
      end else if (m_mode == 1) begin
        if (code_up) begin m_next = 0; n_exit_hi++; end
      end else begin
        if (code_down) begin m_next = 0; n_exit_lo++; end
      end
      if (m_mode == 0 && m_next == 1) n_hi++;
      if (m_mode == 0 && m_next == 2) n_lo++;
      if (m_mode == 0 && m_next != 0) m_cnt++;
      // outputs before the edge
      #0.2;
      checks++;
      if (bridge_drive != ((m_mode == 1) ? 1'b1 : (m_mode == 2) ? 1'b0 : pwm) ||
          dd_active != (m_mode != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d bridge=%b mode=%0d", k, bridge_drive, m_mode);
      end
      @(posedge clk);
      m_mode = m_next;
      #0.1;
      checks++;
      if (int'(mode) != m_mode || int'(dd_entries) != m_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d mode=%0d expected %0d entries=%0d/%0d", k, mode, m_mode, dd_entries, m_cnt);
      end
    end
    $display("DD_HIGH entries %0d exits %0d, DD_LOW entries %0d exits %0d, forced exits %0d",
             n_hi, n_exit_hi, n_lo, n_exit_lo, n_forced);
    checks++;
    if (n_hi == 0 || n_lo == 0 || n_exit_hi == 0 || n_exit_lo == 0 || n_forced == 0) begin
      failures++; $display("FAIL some transition never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
