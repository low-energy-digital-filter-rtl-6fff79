// width_ctrl: truncation and sign-extension logic behind the adder.
//
// The adder always produces a full W-bit sum.  When a narrower effective
// width w is selected, only bits [w-1:0] of that sum are kept and bit w-1 is
// copied into all bits above it, so downstream logic always sees a full-width
// two's-complement value.  With w = W the block is a pass-through, which is
// the configuration on the critical path.  Each output bit is a 2:1
// multiplexer between the sum bit and the selected sign bit.
//
// Interface: d is the W-bit sum, w the effective width (1..W; values above W
// act as W, 0 acts as 1), q the truncated and sign-extended result.  Purely
// combinational.
module width_ctrl #(
  parameter int W  = 54,
  parameter int WW = $clog2(W + 1)
) (
  input  logic [W-1:0]  d,
  input  logic [WW-1:0] w,
  output logic [W-1:0]  q
);

  int   wi;
  logic sgn;

  always_comb begin
    wi = int'(w);
    if (wi < 1) wi = 1;
    if (wi > W) wi = W;
    sgn = d[wi - 1];
    for (int i = 0; i < W; i++) q[i] = (i < wi) ? d[i] : sgn;
  end

endmodule
