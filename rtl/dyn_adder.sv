// dyn_adder: dynamic-width adder of the timing-error-accepting MAC.
//
// One physical W1-bit adder is used.  The magnitude checker decides, for
// every addition, whether both operands fit the reduced width W2 (with one
// bit of headroom so the sum cannot overflow); if so the sum is taken at W2
// bits and sign-extended, otherwise at the full width.  In addition the tap
// controller can impose a static width `static_w` for the current filter tap:
// the effective width is static_w in full mode and min(W2, static_w) in
// reduced mode.  In error-free operation the result is always the exact W1-bit
// sum; the point of the narrower effective width is that, when the supply is
// scaled below the worst-case delay, small operands no longer propagate long
// carries into the MSBs, so the timing errors that do occur are small.
//
// Interface: a, b are W1-bit operands, static_w the per-tap width, sum the
// W1-bit result, reduced = 1 when the reduced width W2 was used.
// Purely combinational: the adder chains after the multiplier in one cycle.
// Two widths (W1, W2) follow the architecture described for this filter; the
// static per-tap width input is how this design merges tap reordering into
// the same truncation multiplexer.
module dyn_adder #(
  parameter int W1 = 54,                 // full adder width
  parameter int W2 = 39,                 // reduced adder width
  parameter int WW = $clog2(W1 + 1)
) (
  input  logic [W1-1:0] a,
  input  logic [W1-1:0] b,
  input  logic [WW-1:0] static_w,
  output logic [W1-1:0] sum,
  output logic          reduced
);

  logic [W1-1:0] raw;
  logic [WW-1:0] eff_w;
  logic          fits;

  mag_check #(.W(W1), .CHK(W1 - W2 + 2)) u_chk (
    .a     (a),
    .b     (b),
    .fits (fits)
  );

  always_comb begin
    raw     = a + b;
    reduced = fits;
    if (fits && (static_w > WW'(W2))) eff_w = WW'(W2);
    else                               eff_w = static_w;
  end

  width_ctrl #(.W(W1), .WW(WW)) u_wc (
    .d (raw),
    .w (eff_w),
    .q (sum)
  );

endmodule
