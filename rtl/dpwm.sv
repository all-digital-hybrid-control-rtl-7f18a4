// dpwm -- counter-ramp digital pulse-width modulator with half-cycle
// resolution.
//
// The ramp advances on both edges of the core clock: it is 2*cnt on the high
// phase of clock cycle cnt and 2*cnt+1 on the low phase, so one switching
// period is 2^DPWM_W half-cycles (ramp 0..127, 64 core clocks; 1 GHz core
// clock -> 15.6 MHz switching). The output is high while ramp < duty, i.e.
// for duty_code half-cycles from the start of the period.
// The double-edge register is built from one rising-edge and one
// falling-edge flop whose XOR is the output (qp <= d ^ qn on the rising
// edge, qn <= d ^ qp on the falling edge), so the clock never enters the
// data path and each edge sets the output for the following half-cycle.
// The ramp compare and the double-edge counter follow the design
// description; the XOR double-edge register is this design's choice.
//
// Interface/timing: duty_code is sampled on the rising edge that starts a
// period (cnt wraps to 0) and used for that whole period. period_start is
// high during the first clock cycle of each period, once per switching
// period; the compensator and dither use it as their update strobe.
module dpwm
  import buck_pkg::*;
#(
  parameter int unsigned W = DPWM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] duty_code,
  output logic         pwm,
  output logic         period_start
);

  logic [W-2:0] cnt;       // core-clock count within the period
  logic [W-2:0] cnt_next;
  logic [W-1:0] duty_q;    // duty of the running period
  logic [W-1:0] duty_for_next;
  logic         qp, qn;

  always_comb begin
    cnt_next      = cnt + 1'b1;
    duty_for_next = (cnt_next == '0) ? duty_code : duty_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '1;
      duty_q <= '0;
      qp     <= 1'b0;
    end else begin
      cnt <= cnt_next;
      if (cnt_next == '0) duty_q <= duty_code;
      // high phase of cycle cnt_next: ramp = 2*cnt_next
      qp <= ({cnt_next, 1'b0} < duty_for_next) ^ qn;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) qn <= 1'b0;
    // low phase of cycle cnt: ramp = 2*cnt + 1
    else        qn <= ({cnt, 1'b1} < duty_q) ^ qp;
  end

  assign pwm          = qp ^ qn;
  assign period_start = (cnt == '0);

endmodule
