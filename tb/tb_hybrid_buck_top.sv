// tb_hybrid_buck_top -- closed-loop, end-to-end test of the converter
// controller at its default parameters, with buck_plant_model as the power
// stage (2 V in, 13 nH, 10 uF).
//
// Sequence: regulate at a slack set point of about 1.0 V with a 0.5 A load;
// apply a 5 A load step ramped at 500 mA/ns (10 ns) with direct drive
// disabled (linear PID only), release it, then repeat both with direct drive
// enabled. Checked: steady-state regulation inside the direct-drive window,
// the switching rate (64 core clocks per period, 15.6 MHz), droop and
// overshoot with and without direct drive (hybrid control must reduce the
// droop), recovery to the window after each transient, and that every
// mechanism happened: DD_HIGH and DD_LOW entries, integrator freeze during
// direct drive, dither carries (duty code above and below the command's
// integer part), nonzero derivative, odd (half-cycle) DPWM codes.
module tb_hybrid_buck_top;
  import buck_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] vout_uv;
  logic [15:0] cpm_cell_sel;
  logic [TDC_W-1:0] tdc_target, tdc_min, tdc_max;
  logic dd_enable;
  logic bridge_drive;
  mode_e mode;
  logic [TDC_W-1:0] tdc_code;
  logic signed [DERIV_W-1:0] deriv;
  logic [DUTY_W-1:0] duty_cmd;
  logic [DPWM_W-1:0] duty_code;
  logic period_start;
  logic [15:0] dd_entries;
  int iload_ma;
  int il_ma;
  int checks = 0, failures = 0;

  hybrid_buck_top dut (.*);

  buck_plant_model #(.V0(1.0), .I0(0.5)) plant (
    .clk, .bridge_drive, .iload_ma, .vout_uv, .il_ma
  );

  always #0.5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_dd_high = 0, n_dd_low = 0, n_freeze = 0, n_dither_up = 0, n_dither_dn = 0;
  int n_deriv = 0, n_odd = 0, n_periods = 0, n_rise = 0;
  mode_e mode_q;
  logic bridge_q;
  logic [DUTY_W-1:0] cmd_at_dsm;
  always @(posedge clk) if (rst_n) begin
    mode_q   <= mode;
    bridge_q <= bridge_drive;
    if (mode_q == MODE_LINEAR && mode == MODE_DD_HIGH) n_dd_high++;
    if (mode_q == MODE_LINEAR && mode == MODE_DD_LOW)  n_dd_low++;
    if (period_start && mode != MODE_LINEAR) n_freeze++;
    if (period_start) begin
      n_periods++;
      if (int'(duty_code) > int'(duty_cmd >> DITHER_W)) n_dither_up++;
      if (int'(duty_code) == int'(duty_cmd >> DITHER_W) && duty_cmd[DITHER_W-1:0] != 0) n_dither_dn++;
      if (duty_code[0]) n_odd++;
    end
    if (deriv != 0) n_deriv++;
  end

  // ---------------- helpers ----------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // min / max of vout over n clocks; also count bridge rising edges
  task automatic observe(input int n, output int vmin, output int vmax, output int rises);
    logic b_prev;
    vmin = 32'h7fffffff; vmax = 0; rises = 0;
    b_prev = bridge_drive;
    repeat (n) begin
      @(posedge clk);
      if (int'(vout_uv) < vmin) vmin = int'(vout_uv);
      if (int'(vout_uv) > vmax) vmax = int'(vout_uv);
      if (bridge_drive && !b_prev) rises++;
      b_prev = bridge_drive;
    end
  endtask

  task automatic ramp_load(input int from_ma, input int to_ma);
    // 10 ns ramp: 500 mA/ns for a 5 A step
    for (int t = 1; t <= 10; t++) begin
      @(posedge clk);
      iload_ma = from_ma + (to_ma - from_ma) * t / 10;
    end
  endtask

  // code of the set point, measured from the model chain itself at 1.0 V is
  // about 101 (all gate-dominated cells); window +/-5 codes (~19 mV)
  localparam int TARGET = 101;

  int v_lo, v_hi, rises, v_set;
  int droop_lin, over_lin, droop_dd, over_dd;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpm_cell_sel = 16'hFFFF;
    tdc_target   = 8'(TARGET);
    tdc_min      = 8'(TARGET - 5);
    tdc_max      = 8'(TARGET + 5);
    dd_enable    = 1'b0;
    iload_ma     = 500;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- start-up and steady state (linear control) ----
    repeat (30000) @(posedge clk);
    observe(6400, v_lo, v_hi, rises);
    v_set = (v_lo + v_hi) / 2;
    $display("steady state: vout %0d..%0d uV, code %0d, duty_cmd %0d, %0d pulses in 6.4 us",
             v_lo, v_hi, tdc_code, duty_cmd, rises);
    check(int'(tdc_code) >= TARGET - 2 && int'(tdc_code) <= TARGET + 2, "steady-state code near target");
    check(v_lo > 970000 && v_hi < 1030000, "steady-state output near 1.0 V");
    check(rises >= 99 && rises <= 101, "switching rate 64 clocks/period (15.6 MHz)");

    // ---- 5 A load step, linear control only ----
    ramp_load(500, 5500);
    observe(20000, v_lo, v_hi, rises);
    droop_lin = v_set - v_lo;
    repeat (20000) @(posedge clk);
    observe(3000, v_lo, v_hi, rises);
    $display("linear only: droop %0d uV; after 40 us vout %0d..%0d", droop_lin, v_lo, v_hi);
    check(int'(tdc_code) >= TARGET - 5 && int'(tdc_code) <= TARGET + 5, "linear: recovered after load step");
    ramp_load(5500, 500);
    observe(20000, v_lo, v_hi, rises);
    over_lin = v_hi - v_set;
    repeat (20000) @(posedge clk);
    $display("linear only: overshoot %0d uV", over_lin);
    check(int'(tdc_code) >= TARGET - 5 && int'(tdc_code) <= TARGET + 5, "linear: recovered after load release");
    check(n_dd_high == 0 && n_dd_low == 0, "no direct drive while disabled");

    // ---- same transients with hybrid control ----
    dd_enable = 1'b1;
    repeat (10000) @(posedge clk);
    ramp_load(500, 5500);
    observe(20000, v_lo, v_hi, rises);
    droop_dd = v_set - v_lo;
    repeat (20000) @(posedge clk);
    $display("hybrid: droop %0d uV", droop_dd);
    check(int'(tdc_code) >= TARGET - 5 && int'(tdc_code) <= TARGET + 5, "hybrid: recovered after load step");
    ramp_load(5500, 500);
    observe(20000, v_lo, v_hi, rises);
    over_dd = v_hi - v_set;
    repeat (20000) @(posedge clk);
    $display("hybrid: overshoot %0d uV", over_dd);
    check(int'(tdc_code) >= TARGET - 5 && int'(tdc_code) <= TARGET + 5, "hybrid: recovered after load release");

    check(droop_dd < droop_lin, "hybrid control reduces droop");
    check(over_dd < over_lin, "hybrid control reduces overshoot");

    $display("mechanisms: dd_high=%0d dd_low=%0d freeze=%0d dither_up=%0d dither_hold=%0d deriv=%0d odd_codes=%0d periods=%0d",
             n_dd_high, n_dd_low, n_freeze, n_dither_up, n_dither_dn, n_deriv, n_odd, n_periods);
    check(n_dd_high > 0, "direct drive to Vin happened");
    check(n_dd_low > 0, "direct drive to Vss happened");
    check(n_freeze > 0, "integrator frozen during direct drive");
    check(n_dither_up > 0 && n_dither_dn > 0, "dither carries happened");
    check(n_deriv > 0, "derivative estimate active");
    check(n_odd > 0, "half-cycle DPWM codes used");
    check(int'(dd_entries) == n_dd_high + n_dd_low, "entry counter matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
