// tb_deriv_unit -- feeds code steps at chosen and random intervals and
// checks the derivative estimate against a reference: on a step of delta
// after an interval of c clocks, delta * round(512/(lo+hi)) where [lo,hi] is
// the interval bucket (bucket edges 1,2,3,4,6,8,12,...,256,384), zero past
// 383 clocks, and the decay rule while the code is quiet for longer than the
// last interval. Also checks the 16 table values the hardware must hold.
module tb_deriv_unit;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [8:0]  delta;
  logic               changed;
  logic signed [11:0] deriv;
  int checks = 0, failures = 0;

  deriv_unit dut (.*);

  always #0.5 clk = ~clk;

  int edges[17] = '{1, 2, 3, 4, 6, 8, 12, 16, 24, 32, 48, 64, 96, 128, 192, 256, 384};

  function automatic int rate_of(input int c);
    for (int i = 0; i < 16; i++)
      if (c >= edges[i] && c < edges[i+1]) begin
        int lo, hi;
        lo = edges[i]; hi = edges[i+1] - 1;
        return (512 + (lo + hi) / 2) / (lo + hi);
      end
    return 0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int m_age, m_last_int, m_last_d, m_deriv;
  int n_nonzero;

  initial begin
    int gap, d;
    int exp_tab[16] = '{256, 128, 85, 57, 39, 27, 19, 13, 9, 6, 5, 3, 2, 2, 1, 1};
    // table values from the formula, spelled out
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (rate_of(edges[i]) != exp_tab[i]) begin
        failures++; $display("FAIL reference table entry %0d", i);
      end
    end
    delta = '0; changed = 1'b0;
    m_age = 511; m_last_int = 511; m_last_d = 0; m_deriv = 0;
    n_nonzero = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 1500; k++) begin
      if (k < 40)        gap = (k % 20) + 1;                  // short, exact buckets
      else if (k < 60)   gap = edges[(k - 40) % 17];           // every bucket edge
      else if (k < 80)   gap = edges[(k - 60) % 17] - 1 + ((k - 60) % 17 == 0 ? 1 : 0);
      else               gap = 1 + ($urandom % ((k % 7 == 0) ? 600 : 60));
      // gap-1 quiet clocks, then one step
      for (int q = 0; q < gap; q++) begin
        @(negedge clk);
        if (q == gap - 1) begin
          d = ($urandom % 2) ? 1 : -1;
          if (k % 50 == 3) d = 9;      // clamped to +7
          if (k % 50 == 4) d = -2;
          delta = 9'(d); changed = 1'b1;
        end else begin
          delta = '0; changed = 1'b0;
        end
        @(posedge clk);
        // reference update (same edge)
        if (changed) begin
          int dc;
          dc = (d > 7) ? 7 : (d < -7) ? -7 : d;
          m_deriv    = dc * rate_of(m_age);
          m_last_int = m_age;
          m_last_d   = dc;
          m_age      = 1;
        end else begin
          if (m_age > m_last_int) m_deriv = m_last_d * rate_of(m_age);
          if (m_age != 511) m_age++;
        end
        #0.1;
        checks++;
        if (int'(deriv) != m_deriv) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d gap=%0d deriv=%0d expected %0d", k, gap, deriv, m_deriv);
        end
        if (deriv != 0) n_nonzero++;
      end
    end
    checks++;
    if (n_nonzero == 0) begin failures++; $display("FAIL derivative never nonzero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
