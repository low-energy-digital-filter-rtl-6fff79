// mag_check: operand magnitude-checking logic of the dynamic-width adder.
//
// Both operands of an addition are inspected in parallel with the
// multiply-accumulate path.  For each operand an AND tree tests whether its
// CHK most significant bits are all ones and another whether they are all
// zeros; if either holds for both operands, the operands are small enough to
// be added in the reduced-width adder and `fits` is raised.  The logic is a
// pure combinational function of the two operands, roughly log2(CHK) gate
// levels deep, so it never sits on the critical path.
//
// Interface: a, b are the two W-bit two's-complement operands; fits is 1
// when the top CHK bits of a are uniform and the top CHK bits of b are
// uniform.  The dynamic-width adder sets CHK = W - W2 + 2, so that both
// operands fit in W2-1 bits and their sum fits in the W2-bit reduced adder
// without overflow.  The AND-tree structure follows the filter architecture
// this RTL implements; the extra checked bit is this design's choice that
// keeps the reduced addition exact.
module mag_check #(
  parameter int W   = 54,   // full datapath width (W1)
  parameter int CHK = 17    // number of top bits that must be uniform
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         fits
);

  logic [CHK-1:0] a_top, b_top;
  logic           a_uni, b_uni;

  always_comb begin
    a_top = a[W-1 -: CHK];
    b_top = b[W-1 -: CHK];
    a_uni = (&a_top) | (&(~a_top));
    b_uni = (&b_top) | (&(~b_top));
    fits = a_uni & b_uni;
  end

endmodule
