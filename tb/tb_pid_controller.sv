// tb_pid_controller -- random errors, derivatives, update strobes and
// freeze against a reference PID: u = 2048*e + I - 256*deriv,
// I += 128*e (clamped to 0..1023*256, held while frozen), duty =
// clamp(u >> 8, 0, 1023), registered only on update. Also checks the reset
// value, saturation at both ends and that freeze holds the integrator.
module tb_pid_controller;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic update, freeze;
  logic signed [8:0]  err;
  logic signed [11:0] deriv;
  logic [9:0]         duty_cmd;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_frozen = 0;

  pid_controller dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m_i, m_u, m_duty, i_next;
    update = 0; freeze = 0; err = '0; deriv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m_i = 512 * 256; m_duty = 512;
    checks++;
    if (duty_cmd != 10'd512) begin failures++; $display("FAIL reset duty %0d", duty_cmd); end
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      update = ($urandom % 3) == 0;
      freeze = (k / 500) % 4 == 3;
      // phases of steady positive/negative error drive the integrator to its limits
      case ((k / 2000) % 4)
        0: err = 9'($signed($urandom % 9) - 4);
        1: err = 9'($signed($urandom % 40));
        2: err = 9'(-$signed($urandom % 40));
        default: err = 9'($signed($urandom % 200) - 100);
      endcase
      deriv = ($urandom % 4 == 0) ? 12'($signed($urandom % 1024) - 512) : 12'sd0;
      @(posedge clk);
      if (update) begin
        i_next = m_i + 128 * longint'(err);
        if (i_next < 0) i_next = 0;
        if (i_next > 1023 * 256) i_next = 1023 * 256;
        m_u = 2048 * longint'(err) + m_i - 256 * longint'(deriv);
        m_u = m_u >>> 8;
        m_duty = (m_u < 0) ? 0 : (m_u > 1023) ? 1023 : m_u;
        if (!freeze) m_i = i_next;
        else n_frozen++;
        if (m_duty == 1023) n_sat_hi++;
        if (m_duty == 0) n_sat_lo++;
      end
      #0.1;
      checks++;
      if (longint'(duty_cmd) != m_duty) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d duty=%0d expected %0d", k, duty_cmd, m_duty);
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_frozen == 0) begin
      failures++;
      $display("FAIL coverage sat_hi=%0d sat_lo=%0d frozen=%0d", n_sat_hi, n_sat_lo, n_frozen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
