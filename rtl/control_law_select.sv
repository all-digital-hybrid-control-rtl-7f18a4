// control_law_select -- hybrid control-law selection and bridge drive.
//
// In steady state the converter is in linear mode: the DPWM output drives
// the bridge. Clocked comparators check the high-resolution slack code every
// core clock against two thresholds and against the previous code:
//  * code < tdc_min and falling (output below its window and still going
//    down: inductor current below load current) -> DD_HIGH, bridge held at
//    Vin so the inductor current ramps up as fast as possible;
//  * code > tdc_max and rising -> DD_LOW, bridge held at Vss.
// Direct drive ends when the slope of the code reverses (a rising code in
// DD_HIGH, a falling code in DD_LOW): the inductor current has passed the
// load current and the output is at its extreme, so linear control takes
// over. The exit is current-driven, not voltage-driven.
// The thresholds, the use of the current and previous code and the exit on
// slope reversal follow the design description; the dd_enable input (to run
// linear control alone), the exact comparator forms and the event counter
// outputs are this design's choices.
//
// Interface/timing: mode is registered; bridge_drive is a combinational mux
// of pwm and the registered mode (1: switching node to Vin). dd_active is
// high whenever mode is not linear. dd_entries counts entries into either
// direct-drive mode (saturating), for monitoring.
module control_law_select
  import buck_pkg::*;
#(
  parameter int unsigned CODE_W = TDC_W,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dd_enable,
  input  logic [CODE_W-1:0] code_cur,
  input  logic              code_up,
  input  logic              code_down,
  input  logic [CODE_W-1:0] tdc_min,
  input  logic [CODE_W-1:0] tdc_max,
  input  logic              pwm,
  output mode_e             mode,
  output logic              dd_active,
  output logic              bridge_drive,
  output logic [CNT_W-1:0]  dd_entries
);

  mode_e mode_next;

  always_comb begin
    mode_next = mode;
    if (!dd_enable) begin
      mode_next = MODE_LINEAR;
    end else begin
      unique case (mode)
        MODE_LINEAR: begin
          if (code_cur < tdc_min && code_down)      mode_next = MODE_DD_HIGH;
          else if (code_cur > tdc_max && code_up)   mode_next = MODE_DD_LOW;
        end
        MODE_DD_HIGH: if (code_up)   mode_next = MODE_LINEAR;
        MODE_DD_LOW:  if (code_down) mode_next = MODE_LINEAR;
        default:                     mode_next = MODE_LINEAR;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_LINEAR;
      dd_entries <= '0;
    end else begin
      mode <= mode_next;
      if (mode == MODE_LINEAR && mode_next != MODE_LINEAR && dd_entries != '1)
        dd_entries <= dd_entries + 1'b1;
    end
  end

  always_comb begin
    dd_active = (mode != MODE_LINEAR);
    unique case (mode)
      MODE_DD_HIGH: bridge_drive = 1'b1;
      MODE_DD_LOW:  bridge_drive = 1'b0;
      default:      bridge_drive = pwm;
    endcase
  end

  // Direct drive is only ever entered from linear mode.
  a_no_dd_swap: assert property (@(posedge clk) disable iff (!rst_n)
    !(mode == MODE_DD_HIGH && mode_next == MODE_DD_LOW) &&
    !(mode == MODE_DD_LOW && mode_next == MODE_DD_HIGH));

endmodule
