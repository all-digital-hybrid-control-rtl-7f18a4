// buck_plant_model -- behavioural model of the converter's power stage for
// closed-loop simulation: bridge, package-mounted inductor, filter capacitor
// with ESR, and a current-source load.
//
// The bridge is ideal: the switching node is VIN when bridge_drive is 1 and
// 0 otherwise. The inductor (L, series resistance RL) and capacitor (C,
// series resistance ESR) use the published design's package values: 2 V input,
// 13 nH / 40 mOhm, 10 uF / 2 mOhm. The state is integrated with forward
// Euler at every clock edge (DT_NS, half the 1 ns core-clock period):
//   diL/dt = (vsw - vout - RL*iL) / L,  dvC/dt = (iL - iload) / C,
//   vout   = vC + ESR*(iL - iload).
// vout_uv is the output in microvolts (what the CPM sees); il_ma the
// inductor current in milliamps. The load current iload_ma is set by the
// testbench.
module buck_plant_model #(
  parameter real VIN    = 2.0,
  parameter real L_H    = 13.0e-9,
  parameter real RL_OHM = 40.0e-3,
  parameter real C_F    = 10.0e-6,
  parameter real ESR    = 2.0e-3,
  parameter real DT_NS  = 0.5,
  parameter real V0     = 1.0,
  parameter real I0     = 1.0
) (
  input  logic        clk,
  input  logic        bridge_drive,
  input  int          iload_ma,
  output logic [31:0] vout_uv,
  output int          il_ma
);

  real il = I0;
  real vc = V0;
  real vout;

  always @(clk) begin
    real vsw, iload, dt;
    dt    = DT_NS * 1.0e-9;
    vsw   = bridge_drive ? VIN : 0.0;
    iload = real'(iload_ma) * 1.0e-3;
    vout  = vc + ESR * (il - iload);
    il    = il + dt * (vsw - vout - RL_OHM * il) / L_H;
    vc    = vc + dt * (il - iload) / C_F;
  end

  always_comb begin
    real v;
    v = vc + ESR * (il - real'(iload_ma) * 1.0e-3);
    vout_uv = (v <= 0.0) ? 32'd0 : 32'(longint'(v * 1.0e6));
    il_ma   = int'(il * 1.0e3);
  end

endmodule
