// cpm_model -- behavioural model (not synthesizable) of the critical-path
// monitor (CPM).
//
// The CPM is a chain of N_CELLS delay cells. Each cell is programmed, by its
// bit of cell_sel, to be gate-dominated (1) or wire-dominated (0). The two
// cell types are the "basis" cells of the monitor: a gate-dominated cell has
// the highest delay-versus-supply sensitivity, a wire-dominated cell the
// lowest, and a mix of the two spans the sensitivities in between, so the
// chain can be trimmed to track the critical path of the logic it supplies.
//
// Timing: purely combinational model. delay_fs follows vout_uv (the sensed
// output voltage in microvolts) with no delay; the TDC samples it on the
// core clock.
//
// Model equations (this implementation's choice; the cell topology and the
// chain idea follow the design description, the numbers do not come from it):
//   gate cell:  d_g(V) = D_CELL_PS * g(V)/g(V_REF),  g(V) = V / (V - VTH)^ALPHA
//               (alpha-power-law inverter delay)
//   wire cell:  d_w(V) = D_CELL_PS * (WIRE_FIXED + (1-WIRE_FIXED) * g(V)/g(V_REF))
//               (an RC wire, mostly supply independent, plus its driver)
// Both cell types have delay D_CELL_PS at V_REF, so programming the mix
// changes only the sensitivity, not the delay at the reference point.
module cpm_model #(
  parameter int unsigned N_CELLS    = 16,
  parameter real         D_CELL_PS  = 59.375,  // per-cell delay at V_REF
  parameter real         V_REF      = 0.8,
  parameter real         VTH        = 0.35,
  parameter real         ALPHA      = 1.3,
  parameter real         WIRE_FIXED = 0.85     // supply-independent share of a wire cell
) (
  input  logic [31:0]        vout_uv,   // sensed supply voltage, microvolts
  input  logic [N_CELLS-1:0] cell_sel,  // 1: gate-dominated cell, 0: wire-dominated cell
  output logic [31:0]        delay_fs   // chain delay, femtoseconds
);

  function automatic real g_of(input real v);
    real vc;
    vc = (v < VTH + 0.05) ? VTH + 0.05 : v;
    return vc / ((vc - VTH) ** ALPHA);
  endfunction

  real v_now;
  real ratio;
  real d_ps;

  always_comb begin
    v_now = real'(vout_uv) * 1.0e-6;
    ratio = g_of(v_now) / g_of(V_REF);
    d_ps  = 0.0;
    for (int i = 0; i < int'(N_CELLS); i++) begin
      if (cell_sel[i]) d_ps = d_ps + D_CELL_PS * ratio;
      else             d_ps = d_ps + D_CELL_PS * (WIRE_FIXED + (1.0 - WIRE_FIXED) * ratio);
    end
    if (d_ps * 1000.0 > 4.0e9) delay_fs = 32'hFFFF_FFFF;
    else                       delay_fs = 32'(longint'(d_ps * 1000.0));
  end

endmodule
