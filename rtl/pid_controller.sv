// pid_controller -- PI compensator on the coarse slack error plus the D
// term from the time-based derivative unit.
//
// Once per switching period (update strobe) it computes
//   u = KP*e + I - KD*deriv,   I <= I + KI*e,
// all in fixed point with PID_FRAC bits below one duty LSB, and registers
// duty_cmd = clamp(u >> PID_FRAC, 0, 2^DUTY_W - 1), a 10-bit duty command
// (7 DPWM bits plus 3 dither bits). e is the coarse error (positive: output
// low) and deriv is the rate of the slack code (positive: output rising), so
// the D term opposes voltage movement.
// While freeze is high (the bridge is under direct drive) the integrator
// holds its value so that the loop resumes from the pre-transient operating
// point when linear control takes over again. The integrator is clamped to
// the duty range (anti-windup) and resets to INIT_DUTY.
// The PI-plus-derivative structure, the coarse error for PI and the
// high-resolution derivative follow the design description; gains, scaling,
// update rate, anti-windup, freeze and INIT_DUTY are this design's choices.
//
// Interface/timing: inputs sampled on the clock edge where update is high;
// duty_cmd changes on that edge and is held until the next update.
module pid_controller
  import buck_pkg::*;
#(
  parameter int unsigned ERR_W     = TDC_W + 1,
  parameter int unsigned D_W       = DERIV_W,
  parameter int unsigned OUT_W     = DUTY_W,
  parameter int unsigned FRAC      = PID_FRAC,
  parameter int          KP        = 2048,  // 8 duty LSB per coarse code
  parameter int          KI        = 128,   // 1/2 duty LSB per coarse code per period
  parameter int          KD        = 256,   // 1 duty LSB per deriv unit
  parameter int unsigned INIT_DUTY = 512    // integrator reset value (duty 0.5)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    update,   // once per switching period
  input  logic                    freeze,   // hold the integrator
  input  logic signed [ERR_W-1:0] err,      // coarse error
  input  logic signed [D_W-1:0]   deriv,    // slack-code rate
  output logic [OUT_W-1:0]        duty_cmd
);

  localparam int ACC_W = 32;
  localparam logic signed [ACC_W-1:0] I_MAX = ACC_W'(((longint'(1) << OUT_W) - 1) << FRAC);
  localparam logic signed [ACC_W-1:0] O_MAX = ACC_W'((longint'(1) << OUT_W) - 1);

  logic signed [ACC_W-1:0] integ;
  logic signed [ACC_W-1:0] integ_next;
  logic signed [ACC_W-1:0] u;
  logic signed [ACC_W-1:0] u_int;
  logic [OUT_W-1:0]        duty_next;

  always_comb begin
    integ_next = integ + ACC_W'(KI) * ACC_W'(err);
    if (integ_next < 0)          integ_next = '0;
    else if (integ_next > I_MAX) integ_next = I_MAX;
    u     = ACC_W'(KP) * ACC_W'(err) + integ - ACC_W'(KD) * ACC_W'(deriv);
    u_int = u >>> FRAC;
    if (u_int < 0)          duty_next = '0;
    else if (u_int > O_MAX) duty_next = '1;
    else                    duty_next = OUT_W'(u_int);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ    <= ACC_W'(longint'(INIT_DUTY) << FRAC);
      duty_cmd <= OUT_W'(INIT_DUTY);
    end else if (update) begin
      if (!freeze) integ <= integ_next;
      duty_cmd <= duty_next;
    end
  end

endmodule
