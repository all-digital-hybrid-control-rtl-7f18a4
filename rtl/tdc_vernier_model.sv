// tdc_vernier_model -- behavioural model (not synthesizable) of the vernier
// delay-line time-to-digital converter that digitises the CPM timing slack.
//
// On every core-clock edge the CPM launches a transition; the slack is the
// time left in the clock period after the CPM delay. A vernier TDC races a
// "start" edge down a line of slow cells (TAU_SLOW_PS) against a "stop" edge
// in a line of fast cells (TAU_FAST_PS); stage k reports that the stop edge
// has caught up once k*(TAU_SLOW_PS-TAU_FAST_PS) exceeds the time between
// them. The thermometer of STAGES stage outputs is counted into a binary
// code, so one LSB is TAU_SLOW_PS - TAU_FAST_PS (2.6 ps by default, chosen so
// that a gate-dominated CPM at 1.2 V moves about one code per 6 mV, the
// worst-case resolution given in the design description).
//
// Interface/timing: code is registered on the rising edge of clk, one clock
// after the delay it measures. A larger code means more slack, i.e. a higher
// supply voltage. The code saturates at 0 (no slack) and at STAGES.
module tdc_vernier_model #(
  parameter int unsigned CODE_W      = 8,
  parameter int unsigned STAGES      = 255,
  parameter real         T_CLK_PS    = 1000.0,
  parameter real         TAU_SLOW_PS = 20.0,
  parameter real         TAU_FAST_PS = 17.4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [31:0]       delay_fs,  // CPM delay
  output logic [CODE_W-1:0] code       // digitised slack
);

  real         slack_ps;
  int unsigned therm_count;

  // Vernier stage comparisons, counted as a thermometer code.
  always_comb begin
    slack_ps    = T_CLK_PS - real'(delay_fs) / 1000.0;
    therm_count = 0;
    for (int k = 1; k <= int'(STAGES); k++) begin
      if (slack_ps >= real'(k) * (TAU_SLOW_PS - TAU_FAST_PS)) therm_count = therm_count + 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= CODE_W'(therm_count);
  end

endmodule
