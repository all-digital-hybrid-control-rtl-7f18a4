// tb_tdc_code_manager -- random TDC code sequences (mostly +/-1 steps with
// occasional jumps) against a reference model of the current/previous code
// registers, the step flags and the truncated error (1 bit dropped).
module tb_tdc_code_manager;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [7:0]  code_in, target;
  logic [7:0]  code_cur, code_prev;
  logic signed [8:0] delta, coarse_err;
  logic        code_up, code_down, changed;
  int checks = 0, failures = 0;

  tdc_code_manager dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_cur, m_prev, e_delta, e_err;
    int c;
    code_in = 8'd100; target = 8'd101;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #0.1;       // first sample taken
    m_cur = 100;
    c = 100;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      case ($urandom % 8)
        0: c = c + 1;
        1: c = c - 1;
        2: c = $urandom % 256;
        default: ;
      endcase
      if (c < 0) c = 0;
      if (c > 255) c = 255;
      code_in = 8'(c);
      if (k % 500 == 0) target = 8'($urandom);
      @(posedge clk); #0.1;
      m_prev = m_cur;
      m_cur  = c;
      e_delta = m_cur - m_prev;
      e_err   = int'(target >> 1) - (m_cur >> 1);
      checks++;
      if (int'(code_cur) != m_cur || int'(code_prev) != m_prev || int'(delta) != e_delta ||
          code_up != (e_delta > 0) || code_down != (e_delta < 0) || changed != (e_delta != 0) ||
          int'(coarse_err) != e_err) begin
        failures++;
        if (failures < 10)
          $display("FAIL k=%0d cur=%0d/%0d prev=%0d/%0d delta=%0d/%0d err=%0d/%0d",
                   k, code_cur, m_cur, code_prev, m_prev, delta, e_delta, coarse_err, e_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
