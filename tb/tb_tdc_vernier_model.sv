// tb_tdc_vernier_model -- drives CPM delays into the vernier TDC model and
// checks the registered code against floor((1000 ps - delay) / 2.6 ps),
// clamped to 0..255, one clock later. Also checks a delay sweep that walks
// the code through every value with no missing codes.
module tb_tdc_vernier_model;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] delay_fs;
  logic [7:0]  code;
  int checks = 0, failures = 0;

  tdc_vernier_model dut (.clk, .rst_n, .delay_fs, .code);

  always #0.5 clk = ~clk;

  // expected code with integer arithmetic in femtoseconds
  function automatic int exp_code(input int unsigned d);
    int slack;
    slack = 1000000 - int'(d);
    if (slack < 2600) return 0;
    if (slack / 2600 > 255) return 255;
    return slack / 2600;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned d;
    int seen[256];
    delay_fs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed points, including both saturation ends
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < 400; k++) begin
      case (k)
        0: d = 1200000;
        1: d = 1000000;
        2: d = 997500;
        3: d = 997400;
        4: d = 0;
        5: d = 300000;
        default: d = 300000 + 1000 * (k - 6) + ($urandom % 1000);
      endcase
      @(negedge clk) delay_fs = d;
      @(posedge clk); #0.1;
      checks++;
      if (int'(code) != exp_code(d)) begin
        failures++;
        $display("FAIL delay=%0d code=%0d expected %0d", d, code, exp_code(d));
      end
      seen[code]++;
    end
    // sweep from 700 ps to 1000 ps: every code from 0 to 115 must appear
    for (d = 1000000; d >= 700000; d -= 500) begin
      @(negedge clk) delay_fs = d;
      @(posedge clk); #0.1;
      seen[code]++;
    end
    for (int c = 0; c <= 115; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL missing code %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
