// dsm_dither -- first-order digital delta-sigma modulator (residue
// accumulator) between the compensator and the DPWM.
//
// The compensator's duty command has DPWM_W integer bits and DITHER_W
// fraction bits. Each switching period the fraction is added to a residue
// accumulator; its carry adds one DPWM step to that period's code. Over
// 2^DITHER_W periods the average DPWM code equals the full-resolution
// command, raising the effective resolution by 2^DITHER_W (8x, 7 -> 10 bits,
// as in the design description). The code saturates at the top of the ramp.
//
// Interface/timing: on a clock edge with update high the residue and
// duty_code are registered; duty_code is held until the next update.
module dsm_dither
  import buck_pkg::*;
#(
  parameter int unsigned INT_W  = DPWM_W,
  parameter int unsigned FRAC_W = DITHER_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    update,
  input  logic [INT_W+FRAC_W-1:0] duty_cmd,
  output logic [INT_W-1:0]        duty_code
);

  logic [FRAC_W-1:0] resid;
  logic [FRAC_W:0]   sum;
  logic [INT_W:0]    code_wide;

  always_comb begin
    sum       = {1'b0, resid} + {1'b0, duty_cmd[FRAC_W-1:0]};
    code_wide = {1'b0, duty_cmd[INT_W+FRAC_W-1:FRAC_W]} + (INT_W+1)'(sum[FRAC_W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resid     <= '0;
      duty_code <= '0;
    end else if (update) begin
      resid     <= sum[FRAC_W-1:0];
      duty_code <= code_wide[INT_W] ? '1 : code_wide[INT_W-1:0];
    end
  end

endmodule
