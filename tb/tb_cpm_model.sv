// tb_cpm_model -- checks the CPM behavioural model against delays worked
// out by hand from its alpha-power-law equations (Vth 0.35 V, alpha 1.3,
// 59.375 ps per cell at 0.8 V): all-gate, half-and-half and all-wire chains
// at 0.8, 1.0 and 1.2 V, plus monotonic decrease with voltage and the
// ordering of sensitivities (more gate cells -> more sensitive).
module tb_cpm_model;
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] vout_uv;
  logic [15:0] cell_sel;
  logic [31:0] delay_fs;
  int checks = 0, failures = 0;

  cpm_model dut (.vout_uv, .cell_sel, .delay_fs);

  task automatic expect_near(input int unsigned v_uv, input logic [15:0] sel,
                             input int unsigned exp_fs);
    vout_uv = v_uv; cell_sel = sel;
    #1;
    checks++;
    if ((delay_fs > exp_fs ? delay_fs - exp_fs : exp_fs - delay_fs) > 50) begin
      failures++;
      $display("FAIL V=%0d uV sel=%h delay=%0d fs expected %0d", v_uv, sel, delay_fs, exp_fs);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned prev;
    expect_near(800000,  16'hFFFF, 950000);
    expect_near(800000,  16'h00FF, 950000);
    expect_near(800000,  16'h0000, 950000);
    expect_near(1000000, 16'hFFFF, 736245);
    expect_near(1000000, 16'hF0F0, 827091);
    expect_near(1000000, 16'h0000, 917936);
    expect_near(1200000, 16'hFFFF, 623370);
    expect_near(1200000, 16'h5555, 762188);
    expect_near(1200000, 16'h0000, 901005);
    // delay falls monotonically with voltage for every mix
    for (int m = 0; m < 3; m++) begin
      cell_sel = (m == 0) ? 16'hFFFF : (m == 1) ? 16'h0F0F : 16'h0001;
      vout_uv = 700000; #1; prev = delay_fs;
      for (int v = 710000; v <= 1300000; v += 10000) begin
        vout_uv = v; #1;
        checks++;
        if (!(delay_fs < prev)) begin
          failures++;
          $display("FAIL not monotonic at %0d uV", v);
        end
        prev = delay_fs;
      end
    end
    // sensitivity grows with the number of gate-dominated cells
    begin
      int unsigned d_lo, d_hi, s_prev;
      s_prev = 0;
      for (int n = 0; n <= 16; n += 4) begin
        cell_sel = 16'((32'h1 << n) - 1);
        vout_uv = 1000000; #1; d_lo = delay_fs;
        vout_uv = 1100000; #1; d_hi = delay_fs;
        checks++;
        if (n > 0 && !(d_lo - d_hi > s_prev)) begin
          failures++;
          $display("FAIL sensitivity with %0d gate cells", n);
        end
        s_prev = d_lo - d_hi;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
