// tdc_code_manager -- TDC resolution management.
//
// The converter uses one TDC at two resolutions. The full (high-resolution)
// code feeds the derivative unit and the direct-drive comparators; a coarse
// code, truncated by COARSE_SHIFT bits so that it is coarser than the
// dithered DPWM (needed to avoid limit cycles), feeds the PI path.
// There is no voltage reference: the set point is a slack code (target),
// so the PI error is target minus measured slack, both truncated.
//
// Interface/timing: code_in is registered into code_cur every clock and the
// previous value is kept in code_prev. delta, code_up, code_down and changed
// compare the two (the "current and previous code" the clocked comparators
// use). coarse_err is combinational from code_cur and target. Positive
// coarse_err means too little slack, i.e. the output voltage is low.
module tdc_code_manager
  import buck_pkg::*;
#(
  parameter int unsigned CODE_W = TDC_W,
  parameter int unsigned SHIFT  = COARSE_SHIFT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [CODE_W-1:0]       code_in,    // TDC output
  input  logic [CODE_W-1:0]       target,     // slack set point (high resolution)
  output logic [CODE_W-1:0]       code_cur,
  output logic [CODE_W-1:0]       code_prev,
  output logic signed [CODE_W:0]  delta,      // code_cur - code_prev
  output logic                    code_up,
  output logic                    code_down,
  output logic                    changed,
  output logic signed [CODE_W:0]  coarse_err  // (target>>SHIFT) - (code_cur>>SHIFT)
);

  logic primed;  // code_prev holds a real sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_cur  <= '0;
      code_prev <= '0;
      primed    <= 1'b0;
    end else begin
      code_cur  <= code_in;
      code_prev <= code_cur;
      primed    <= 1'b1;
    end
  end

  always_comb begin
    delta      = primed ? (signed'({1'b0, code_cur}) - signed'({1'b0, code_prev})) : '0;
    code_up    = delta > 0;
    code_down  = delta < 0;
    changed    = delta != 0;
    coarse_err = signed'({1'b0, target >> SHIFT}) - signed'({1'b0, code_cur >> SHIFT});
  end

endmodule
