// sm_filter: single-MAC FIR/IIR filter with controlled timing-error acceptance.
//
// Computes y(n) = sum_{i=0}^{NB-1} b_i x(n-i) + sum_{i=1}^{NA} a_i y(n-i)
// (NA = 0 gives an FIR filter) on one multiply-accumulate unit, one tap per
// clock cycle.  Two measures shape how the filter degrades when its supply is
// lowered below the point where the multiplier-adder chain meets timing:
//   * dynamic bitwidth: every addition whose operands are small is done in a
//     reduced-width (W2) configuration of the adder and sign-extended;
//   * tap reordering: taps are issued in ascending |coefficient| order
//     (feedforward and feedback sections separately), and each tap gets a
//     static adder width from its worst-case intermediate gain.
// With correct timing the output is bit-exact with a plain full-width filter.
//
// Number formats: coefficients are CW-bit signed with CF fractional bits,
// input and output samples DW-bit signed with the same scaling, the
// accumulator W1 = CW + DW bits (products need no alignment).  The output is
// the accumulator shifted right by CF (truncation toward minus infinity) and
// saturated to DW bits; the feedback history stores that output.
//
// Interface: in_valid/in_ready/in_data - sample input (valid/ready
// handshake); out_valid/out_data - one-cycle output pulse (no back-pressure);
// mac_en/mac_reduced - a MAC is performed this cycle / its addition used the
// reduced width (for activity and average-width statistics).
// Timing: a sample accepted on edge e produces out_valid after edge e+NT+1,
// NT = NB+NA.  A new sample can be accepted every NT cycles (the MAC never
// idles under a continuous stream).
// Reset: asynchronous, active low; histories and accumulator are cleared.
// The datapath equation, formats and the two techniques follow the filter
// architecture this RTL implements; the handshake, the rounding and
// saturation of the output, and the overlap of consecutive samples are this
// design's choices.
module sm_filter
  import tea_pkg::*;
#(
  parameter int CW = 22,                 // coefficient width (Q1.21 -> 22)
  parameter int CF = 21,                 // coefficient fractional bits
  parameter int DW = 32,                 // sample width (Q3.29 -> 32)
  parameter int W1 = CW + DW,            // full adder width (54)
  parameter int W2 = 39,                 // reduced adder width
  parameter int NB = 6,                  // feedforward taps b_0..b_{NB-1}
  parameter int NA = 0,                  // feedback taps a_1..a_NA
  parameter coef_tab_t COEF = '{0: -240124, 1: 117021, 2: 1085696, 3: 1085696, 4: 117021, 5: -240124, default: 0}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data,
  output logic                 mac_en,
  output logic                 mac_reduced
);

  localparam int WW = $clog2(W1 + 1);
  localparam int HD = (NB > NA) ? NB : ((NA > 0) ? NA : 1);
  localparam int IW = (HD > 1) ? $clog2(HD) : 1;

  logic                 accept, busy, step, first, last, fb, out_pend;
  logic        [IW-1:0] hist_idx;
  logic signed [CW-1:0] coef;
  logic        [WW-1:0] tap_w;
  logic signed [DW-1:0] x_rd, y_rd, data, y_new;
  logic signed [W1-1:0] acc;

  tap_ctrl #(
    .CW(CW), .DW(DW), .W1(W1), .NB(NB), .NA(NA), .COEF(COEF), .WW(WW), .HD(HD), .IW(IW)
  ) u_tap (
    .clk, .rst_n,
    .start    (accept),
    .busy     (busy),
    .step     (step),
    .first    (first),
    .last     (last),
    .fb       (fb),
    .hist_idx (hist_idx),
    .coef     (coef),
    .tap_w    (tap_w)
  );

  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  delay_line #(.DW(DW), .DEPTH(NB), .IW(IW)) u_xh (
    .clk, .rst_n,
    .push   (accept),
    .din    (in_data),
    .rd_idx (hist_idx),
    .dout   (x_rd)
  );

  if (NA > 0) begin : g_fb
    delay_line #(.DW(DW), .DEPTH(NA), .IW(IW)) u_yh (
      .clk, .rst_n,
      .push   (out_pend),
      .din    (y_new),
      .rd_idx (hist_idx),
      .dout   (y_rd)
    );
  end else begin : g_nofb
    assign y_rd = '0;
  end

  assign data = fb ? y_rd : x_rd;

  mac_unit #(.CW(CW), .DW(DW), .W1(W1), .W2(W2), .WW(WW)) u_mac (
    .clk, .rst_n,
    .en       (step),
    .clr      (first),
    .coef     (coef),
    .data     (data),
    .static_w (tap_w),
    .acc      (acc),
    .reduced  (mac_reduced)
  );

  assign mac_en = step;

  // Output format conversion: drop CF fractional bits, saturate to DW bits.
  localparam int SW = W1 - CF;
  logic signed [SW-1:0] shifted;
  always_comb begin
    shifted = SW'(acc >>> CF);
    if (shifted > SW'(signed'({1'b0, {(DW-1){1'b1}}})))
      y_new = {1'b0, {(DW-1){1'b1}}};
    else if (shifted < -SW'(signed'({1'b0, {(DW-1){1'b1}}})) - 1)
      y_new = {1'b1, {(DW-1){1'b0}}};
    else
      y_new = DW'(shifted);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pend  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_pend  <= last;
      out_valid <= out_pend;
      if (out_pend) out_data <= y_new;
    end
  end

  // The feedback taps come after all feedforward taps, so the previous output
  // is in the y history before any a_i is read even when samples overlap.
  initial begin
    assert (NB >= 1) else $error("sm_filter: at least one feedforward tap needed");
    assert (W2 < W1 && W2 > 1) else $error("sm_filter: need 1 < W2 < W1");
  end
  a_in_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> in_valid);

endmodule
