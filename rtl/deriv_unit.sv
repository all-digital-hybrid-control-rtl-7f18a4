// deriv_unit -- time-based discrete derivative of the TDC code.
//
// Within one switching period the output voltage rarely moves more than one
// TDC code, so differencing codes once per period gives a noisy, mostly-zero
// derivative. This unit instead measures the time between code changes: it
// counts core clocks since the last change, and when the code changes by
// delta it outputs  deriv = delta * RECIP[bucket(interval)],  with RECIP a
// 16-entry table approximating DK/interval (the rate in codes per clock,
// scaled by DK). The table is indexed by the position of the interval's
// leading one plus the next bit, giving 16 buckets that cover 1..383 clocks;
// longer intervals read as zero rate. The table is computed at elaboration:
//   bucket 0: interval 1; bucket i>0: p=(i+1)/2, m=(i+1)%2,
//   lo = 2^p + m*2^(p-1), hi = lo + 2^(p-1) - 1,
//   RECIP[i] = round(2*DK / (lo+hi)).
// While no change arrives and the silence already exceeds the last
// interval, the estimate decays to last_delta * RECIP[bucket(age)], since
// the true rate can be no higher than that.
// The division-by-table, the 16 entries and counting core clocks between
// code changes follow the design description; the bucket scheme, the decay
// rule and the clamp of delta to +/-7 are this implementation's choices.
//
// Interface/timing: delta/changed come from tdc_code_manager. deriv is
// registered; it updates the clock after a code change. Positive deriv means
// a rising code (rising output voltage).
module deriv_unit
  import buck_pkg::*;
#(
  parameter int unsigned DELTA_W = TDC_W + 1,
  parameter int unsigned OUT_W   = DERIV_W,
  parameter int unsigned AGE_W   = 9,    // interval counter, saturating
  parameter int unsigned DK      = 256   // table scale: RECIP[interval 1]
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [DELTA_W-1:0] delta,
  input  logic                      changed,
  output logic signed [OUT_W-1:0]   deriv
);

  localparam int unsigned LUT_N = 16;
  localparam int unsigned LUT_W = $clog2(DK + 1);

  typedef logic [LUT_W-1:0] lut_t [LUT_N];

  function automatic lut_t build_lut();
    lut_t t;
    for (int i = 0; i < int'(LUT_N); i++) begin
      int lo, hi, p, m;
      if (i == 0) begin
        lo = 1; hi = 1;
      end else begin
        p  = (i + 1) / 2;
        m  = (i + 1) % 2;
        lo = (1 << p) + m * (1 << (p - 1));
        hi = lo + (1 << (p - 1)) - 1;
      end
      t[i] = LUT_W'((2 * int'(DK) + (lo + hi) / 2) / (lo + hi));
    end
    return t;
  endfunction

  localparam lut_t RECIP = build_lut();

  // Bucket of an interval; valid=0 when it is too long to measure.
  function automatic logic [4:0] bucket(input logic [AGE_W-1:0] c);
    int p;
    logic m;
    p = 0;
    for (int b = 0; b < int'(AGE_W); b++) if (c[b]) p = b;
    m = (p > 0) ? c[p-1] : 1'b0;
    if (p == 0)                    return 5'd0;
    else if (2 * p + int'(m) - 1 >= int'(LUT_N)) return 5'd16;
    else                           return 5'(2 * p + int'(m) - 1);
  endfunction

  function automatic logic [LUT_W-1:0] recip_of(input logic [AGE_W-1:0] c);
    logic [4:0] b;
    b = bucket(c);
    return b[4] ? '0 : RECIP[b[3:0]];
  endfunction

  localparam logic [AGE_W-1:0] AGE_MAX = '1;

  logic [AGE_W-1:0]  age;            // clocks since the last change
  logic [AGE_W-1:0]  last_interval;
  logic signed [3:0] last_delta;     // clamped step of the last change
  logic signed [3:0] delta_c;

  always_comb begin
    if (delta > 7)       delta_c = 4'sd7;
    else if (delta < -7) delta_c = -4'sd7;
    else                 delta_c = 4'(delta);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      age           <= AGE_MAX;
      last_interval <= AGE_MAX;
      last_delta    <= '0;
      deriv         <= '0;
    end else if (changed) begin
      age           <= AGE_W'(1);
      last_interval <= age;
      last_delta    <= delta_c;
      deriv         <= OUT_W'(delta_c * signed'({1'b0, recip_of(age)}));
    end else begin
      if (age != AGE_MAX) age <= age + 1'b1;
      if (age > last_interval)
        deriv <= OUT_W'(last_delta * signed'({1'b0, recip_of(age)}));
    end
  end

endmodule
