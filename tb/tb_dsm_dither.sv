// tb_dsm_dither -- checks the residue-accumulation dither: for every 10-bit
// duty command held for 8 updates, the 7-bit codes must sum to exactly the
// command (average = command/8, 3 extra bits of resolution), each code must
// be floor(cmd/8) or one more, and the code must saturate at 127. A random
// sequence is also checked cycle by cycle against a reference accumulator.
module tb_dsm_dither;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic update;
  logic [9:0] duty_cmd;
  logic [6:0] duty_code;
  int checks = 0, failures = 0;

  dsm_dither dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [9:0] cmd);
    @(negedge clk) duty_cmd = cmd; update = 1'b1;
    @(negedge clk) update = 1'b0;
  endtask

  initial begin
    int sum, m_res, m_code, s;
    update = 0; duty_cmd = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m_res = 0;
    for (int cmd = 0; cmd < 1016; cmd += 7) begin
      sum = 0;
      for (int k = 0; k < 8; k++) begin
        step(10'(cmd));
        s = m_res + (cmd % 8);
        m_res = s % 8;
        sum += duty_code;
        checks++;
        if (int'(duty_code) != cmd / 8 && int'(duty_code) != cmd / 8 + 1) begin
          failures++; $display("FAIL cmd=%0d code=%0d", cmd, duty_code);
        end
      end
      // the residue carries across commands, so compare the 8-period sum
      // with the command up to the residue change
      checks++;
      if (sum < cmd - 7 || sum > cmd + 7) begin
        failures++; $display("FAIL cmd=%0d 8-period sum=%0d", cmd, sum);
      end
    end
    // saturation
    for (int k = 0; k < 8; k++) begin
      step(10'd1023);
      checks++;
      if (duty_code != 7'd127) begin failures++; $display("FAIL saturation code=%0d", duty_code); end
    end
    // exact reference, random commands and gaps between updates
    m_res = 0;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      duty_cmd = 10'($urandom % 1024);
      step(duty_cmd);
      s = m_res + int'(duty_cmd[2:0]);
      m_res = s % 8;
      m_code = int'(duty_cmd[9:3]) + s / 8;
      if (m_code > 127) m_code = 127;
      checks++;
      if (int'(duty_code) != m_code) begin
        failures++;
        if (failures < 10) $display("FAIL cmd=%0d code=%0d expected %0d", duty_cmd, duty_code, m_code);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
