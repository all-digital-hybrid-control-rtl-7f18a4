// tb_workload_vout_points -- runs the closed loop (controller at default
// parameters plus buck_plant_model) at the three output voltages 0.8, 1.0
// and 1.2 V and at load currents of 1.5, 3.0 and 4.5 A, the operating
// points of the converter's efficiency sweep, with direct drive enabled.
// For each point the slack set point is the code the CPM/TDC chain gives
// at that voltage (19, 101, 144 for an all-gate-dominated CPM), and the
// test checks that the output stays within 12 mV of the intended voltage
// for at least 6000 of 6400 clocks and that its average lies within 15 mV. A 3 A load
// step is applied at each voltage and recovery is checked. Finally the
// CPM is reprogrammed to half wire-dominated cells and regulation at
// 1.0 V is checked with the matching set point.
module tb_workload_vout_points;
  import buck_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] vout_uv;
  logic [15:0] cpm_cell_sel = 16'hFFFF;
  logic [TDC_W-1:0] tdc_target, tdc_min, tdc_max;
  logic dd_enable = 1'b1;
  logic bridge_drive;
  mode_e mode;
  logic [TDC_W-1:0] tdc_code;
  logic signed [DERIV_W-1:0] deriv;
  logic [DUTY_W-1:0] duty_cmd;
  logic [DPWM_W-1:0] duty_code;
  logic period_start;
  logic [15:0] dd_entries;
  int iload_ma = 1500;
  int il_ma;
  int checks = 0, failures = 0;

  hybrid_buck_top dut (.*);
  buck_plant_model #(.V0(0.9), .I0(1.5)) plant (.clk, .bridge_drive, .iload_ma, .vout_uv, .il_ma);

  always #0.5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int codes[3] = '{19, 101, 144};
  int volts[3] = '{800000, 1000000, 1200000};
  int loads[3] = '{1500, 3000, 4500};

  initial begin
    longint vsum;
    int vavg, n_ok;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 3; v++) begin
      tdc_target = 8'(codes[v]);
      tdc_min    = 8'(codes[v] - 5);
      tdc_max    = 8'(codes[v] + 5);
      for (int l = 0; l < 3; l++) begin
        iload_ma = loads[l];
        repeat (30000) @(posedge clk);
        vsum = 0; n_ok = 0;
        for (int k = 0; k < 6400; k++) begin
          @(posedge clk);
          vsum += 64'(vout_uv);
          if (int'(vout_uv) >= volts[v] - 12000 && int'(vout_uv) <= volts[v] + 12000) n_ok++;
        end
        vavg = int'(vsum / 6400);
        $display("Vset %0d uV, load %0d mA: average vout %0d uV, %0d/6400 clocks within 12 mV, duty_cmd %0d",
                 volts[v], loads[l], vavg, n_ok, duty_cmd);
        checks++;
        if (n_ok < 6000) begin failures++; $display("FAIL regulation at this point"); end
        checks++;
        if (vavg < volts[v] - 15000 || vavg > volts[v] + 15000) begin failures++; $display("FAIL output voltage"); end
      end
      // load step 1.5 A -> 4.5 A at 500 mA/ns and back, must recover
      iload_ma = 1500;
      repeat (30000) @(posedge clk);
      for (int t = 1; t <= 6; t++) begin @(posedge clk); iload_ma = 1500 + 500 * t; end
      repeat (40000) @(posedge clk);
      checks++;
      if (!(int'(tdc_code) >= codes[v] - 3 && int'(tdc_code) <= codes[v] + 3)) begin
        failures++; $display("FAIL recovery after load step at %0d uV", volts[v]);
      end
    end
    // CPM reprogrammed to half wire-dominated cells (lower sensitivity,
    // about 6.3 mV per code at 1.0 V): slack code 67 is about 1.0 V
    cpm_cell_sel = 16'h00FF;
    tdc_target = 8'd67; tdc_min = 8'd62; tdc_max = 8'd72;
    iload_ma = 3000;
    repeat (40000) @(posedge clk);
    vsum = 0; n_ok = 0;
    for (int k = 0; k < 6400; k++) begin
      @(posedge clk);
      vsum += 64'(vout_uv);
      if (int'(vout_uv) >= 988000 && int'(vout_uv) <= 1012000) n_ok++;
    end
    vavg = int'(vsum / 6400);
    $display("half-wire CPM, code 67, load 3000 mA: average vout %0d uV, %0d/6400 clocks within 12 mV", vavg, n_ok);
    checks++;
    if (n_ok < 6000 || vavg < 985000 || vavg > 1015000) begin failures++; $display("FAIL regulation with reprogrammed CPM"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
