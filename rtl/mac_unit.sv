// mac_unit: single-cycle multiply-accumulate unit with a dynamic-width adder.
//
// The signed CW x DW multiplier feeds the dynamic-width adder directly, and
// the adder result is written to the W1-bit accumulator in the same clock
// cycle, so the multiplier-adder chain is the critical path of the filter.
// Under timing starvation it is the adder at the end of this chain that fails
// first, which is why the width control sits on the adder.  On the first tap
// of an output sample (`clr`) the accumulator operand is replaced by zero.
//
// Interface:  en   - perform one MAC this cycle
//             clr  - start a new sum (accumulator operand = 0)
//             coef - CW-bit signed coefficient, data - DW-bit signed sample
//             static_w - effective width for this tap (from tap control)
//             acc  - accumulator register (valid the cycle after en)
//             reduced - 1 when this cycle's addition used the reduced width
// Timing: acc <= (clr ? 0 : acc) + coef*data on the rising edge when en=1.
// Reset: asynchronous, active low, clears the accumulator.
// The product is W1 = CW + DW bits wide, so it needs no alignment; this
// matches the number formats of all three filters this architecture was
// built for.
module mac_unit #(
  parameter int CW = 22,                 // coefficient width
  parameter int DW = 32,                 // data width
  parameter int W1 = CW + DW,            // full accumulator/adder width
  parameter int W2 = 39,                 // reduced adder width
  parameter int WW = $clog2(W1 + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clr,
  input  logic signed [CW-1:0] coef,
  input  logic signed [DW-1:0] data,
  input  logic        [WW-1:0] static_w,
  output logic signed [W1-1:0] acc,
  output logic                 reduced
);

  logic signed [CW+DW-1:0] prod;
  logic        [W1-1:0]    prod_x, acc_op, sum;

  always_comb begin
    prod   = coef * data;
    prod_x = W1'(prod);                  // W1 = CW + DW, so this is exact
    acc_op = clr ? '0 : acc;
  end

  dyn_adder #(.W1(W1), .W2(W2), .WW(WW)) u_add (
    .a        (prod_x),
    .b        (acc_op),
    .static_w (static_w),
    .sum      (sum),
    .reduced  (reduced)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

  // A reduced-width addition must never lose information.
  a_reduced_exact : assert property (@(posedge clk) disable iff (!rst_n)
    (en && reduced) |-> (sum == W1'(prod_x + acc_op)));

  initial begin
    assert (W1 == CW + DW) else $error("mac_unit: W1 must equal CW + DW");
  end

endmodule
