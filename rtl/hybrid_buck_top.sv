// hybrid_buck_top -- all-digital, voltage-reference-free hybrid-control
// buck converter controller (single phase).
//
// Signal flow: the sensed output voltage sets the delay of the critical-path
// monitor (cpm_model); the vernier TDC (tdc_vernier_model) turns the timing
// slack left in each core-clock period into a code, so a higher output
// voltage gives a higher code and the set point is a slack code rather than
// a voltage reference. tdc_code_manager keeps the current and previous codes
// and forms the coarse PI error; deriv_unit turns the time between code
// changes into a derivative; pid_controller produces a 10-bit duty command
// once per switching period; dsm_dither dithers it to a 7-bit code; dpwm
// compares it with a double-edge 0..127 ramp. control_law_select passes the
// DPWM output to the bridge in linear mode, or holds the bridge at Vin/Vss
// in direct-drive mode during large transients.
//
// The CPM and TDC are behavioural models (analog delay circuits), so this
// top simulates but does not synthesize as a whole; everything between the
// TDC code and bridge_drive is synthesizable.
//
// Interface/timing: one core clock (1 GHz nominal, 64 clocks per 15.6 MHz
// switching period). vout_uv is the output voltage as the CPM sees it, in
// microvolts. tdc_target/tdc_min/tdc_max are slack codes: the set point and
// the direct-drive window. bridge_drive = 1 connects the switching node to
// Vin. The PID and the dither update at the start of each switching period,
// so a new duty command reaches the bridge about one period later.
module hybrid_buck_top
  import buck_pkg::*;
#(
  parameter int unsigned N_CPM_CELLS = 16,
  parameter real         T_CLK_PS    = 1000.0,
  parameter int          KP          = 2048,
  parameter int          KI          = 128,
  parameter int          KD          = 256,
  parameter int unsigned INIT_DUTY   = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [31:0]                  vout_uv,
  input  logic [N_CPM_CELLS-1:0]       cpm_cell_sel,
  input  logic [TDC_W-1:0]             tdc_target,
  input  logic [TDC_W-1:0]             tdc_min,
  input  logic [TDC_W-1:0]             tdc_max,
  input  logic                         dd_enable,
  output logic                         bridge_drive,
  output mode_e                        mode,
  output logic [TDC_W-1:0]             tdc_code,
  output logic signed [DERIV_W-1:0]    deriv,
  output logic [DUTY_W-1:0]            duty_cmd,
  output logic [DPWM_W-1:0]            duty_code,
  output logic                         period_start,
  output logic [15:0]                  dd_entries
);

  logic [31:0]             cpm_delay_fs;
  logic [TDC_W-1:0]        tdc_raw;
  logic signed [TDC_W:0]   delta;
  logic                    code_up, code_down, changed;
  logic signed [TDC_W:0]   coarse_err;
  logic                    pwm;
  logic                    dsm_update;
  logic                    dd_active;

  cpm_model #(.N_CELLS(N_CPM_CELLS)) u_cpm (
    .vout_uv  (vout_uv),
    .cell_sel (cpm_cell_sel),
    .delay_fs (cpm_delay_fs)
  );

  tdc_vernier_model #(.CODE_W(TDC_W), .T_CLK_PS(T_CLK_PS)) u_tdc (
    .clk, .rst_n,
    .delay_fs (cpm_delay_fs),
    .code     (tdc_raw)
  );

  tdc_code_manager u_codes (
    .clk, .rst_n,
    .code_in    (tdc_raw),
    .target     (tdc_target),
    .code_cur   (tdc_code),
    .code_prev  (),
    .delta      (delta),
    .code_up    (code_up),
    .code_down  (code_down),
    .changed    (changed),
    .coarse_err (coarse_err)
  );

  deriv_unit u_deriv (
    .clk, .rst_n,
    .delta   (delta),
    .changed (changed),
    .deriv   (deriv)
  );

  pid_controller #(.KP(KP), .KI(KI), .KD(KD), .INIT_DUTY(INIT_DUTY)) u_pid (
    .clk, .rst_n,
    .update   (period_start),
    .freeze   (dd_active),
    .err      (coarse_err),
    .deriv    (deriv),
    .duty_cmd (duty_cmd)
  );

  // The dither stage takes the command one clock after the PID registers it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsm_update <= 1'b0;
    else        dsm_update <= period_start;
  end

  dsm_dither u_dsm (
    .clk, .rst_n,
    .update    (dsm_update),
    .duty_cmd  (duty_cmd),
    .duty_code (duty_code)
  );

  dpwm u_dpwm (
    .clk, .rst_n,
    .duty_code    (duty_code),
    .pwm          (pwm),
    .period_start (period_start)
  );

  control_law_select u_cls (
    .clk, .rst_n,
    .dd_enable    (dd_enable),
    .code_cur     (tdc_code),
    .code_up      (code_up),
    .code_down    (code_down),
    .tdc_min      (tdc_min),
    .tdc_max      (tdc_max),
    .pwm          (pwm),
    .mode         (mode),
    .dd_active    (dd_active),
    .bridge_drive (bridge_drive),
    .dd_entries   (dd_entries)
  );

endmodule
