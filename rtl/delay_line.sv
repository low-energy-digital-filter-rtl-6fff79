// delay_line: sample history of the filter, x(n-i) or y(n-i).
//
// A shift register of DEPTH samples.  `push` shifts a new sample in at
// position 0 and moves every older sample one place down; the oldest one
// drops out.  Any position can be read combinationally through `rd_idx`,
// which is how the tap controller fetches the data operand of a tap in an
// arbitrary (reordered) order.  Position 0 is the newest sample.
//
// Interface: push/din write, rd_idx/dout read (rd_idx >= DEPTH reads 0).
// Timing: write on the rising clock edge; read is combinational.
// Reset: asynchronous, active low, clears all samples to zero, which is the
// zero initial state of the filter (a choice of this design).
module delay_line #(
  parameter int DW    = 32,
  parameter int DEPTH = 6,
  parameter int IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  logic signed [DW-1:0] din,
  input  logic        [IW-1:0] rd_idx,
  output logic signed [DW-1:0] dout
);

  logic signed [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (push) begin
      mem[0] <= din;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  always_comb begin
    if (int'(rd_idx) < DEPTH) dout = mem[rd_idx];
    else                      dout = '0;
  end

endmodule
