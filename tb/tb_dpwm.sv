// tb_dpwm -- samples the DPWM output in every half-cycle of the core clock
// and checks, for each period, that it is 64 clocks long, that period_start
// marks its first clock, and that the output is high for exactly duty_code
// half-cycles starting at the beginning of the period (a contiguous pulse).
// Every duty code 0..127 is used, the code changes only at period
// boundaries, and the switching rate (1 GHz / 64 = 15.6 MHz) is checked.
module tb_dpwm;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [6:0] duty_code;
  logic pwm, period_start;
  int checks = 0, failures = 0;

  dpwm dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   wave[128];
    int   hi, exp_d, cycles;
    realtime t0, t1;
    duty_code = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // align: wait for the middle of a period's first clock, then run to
    // the rising edge that starts the next period
    @(negedge clk iff period_start);
    for (int i = 0; i < 63; i++) @(negedge clk);
    @(posedge clk);
    exp_d = 0;
    for (int p = 0; p < 400; p++) begin
      int next_d;
      next_d = (p < 128) ? p : $urandom_range(0, 127);
      cycles = 0;
      t0 = $realtime;
      for (int c = 0; c < 64; c++) begin
        #0.25 wave[2*c] = pwm;
        checks++;
        if (period_start != (c == 0)) begin failures++; $display("FAIL period_start at cycle %0d t=%t cnt=%0d", c, $realtime, dut.cnt); end
        #0.5 wave[2*c+1] = pwm;
        // the code for the next period arrives mid-period; it must not
        // disturb the running one
        if (c == 20) duty_code = 7'(next_d);
        @(posedge clk);
        cycles++;
      end
      t1 = $realtime;
      hi = 0;
      for (int h = 0; h < 128; h++) hi += wave[h];
      checks++;
      if (hi != exp_d) begin failures++; $display("FAIL period %0d high %0d half-cycles expected %0d", p, hi, exp_d); end
      checks++;
      for (int h = 0; h < 128; h++)
        if (wave[h] != (h < exp_d)) begin
          failures++; $display("FAIL period %0d pulse shape at half-cycle %0d", p, h); break;
        end
      checks++;
      if (cycles != 64 || (t1 - t0) < 63.9 || (t1 - t0) > 64.1) begin
        failures++; $display("FAIL period length %0d clocks", cycles);
      end
      exp_d = next_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
