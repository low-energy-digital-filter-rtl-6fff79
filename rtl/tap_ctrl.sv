// tap_ctrl: tap control logic of the single-MAC filter (tap reordering).
//
// A filter output y(n) = sum_i b_i x(n-i) + sum_i a_i y(n-i) is built up one
// tap per cycle.  The order of the taps does not change the final sum but it
// does change every intermediate sum.  At elaboration time this block sorts
// the feedforward taps (b) and, separately, the feedback taps (a) by
// ascending coefficient magnitude; feedforward taps are issued first.  With
// that order the worst-case intermediate gain after the k-th tap,
// G_k = sum of |c| over the taps issued so far, grows as slowly as possible.
//
// From G_k and the full input range (|x|, |y| <= 2**(DW-1)) the block also
// derives a static adder width for every tap: the smallest two's-complement
// width that holds any intermediate sum at that point.  Early taps with small
// gain are therefore always added, truncated and sign-extended at a narrower
// width, which is exact but keeps their carries short.
//
// Interface: start launches one sequence of NB+NA steps; it is accepted when
// idle or during the last step (so sequences can run back to back), and
// ignored otherwise.
// During each step `step` is 1 and the outputs describe the tap:
//   fb       - 1 for a feedback tap (read the y history), 0 for x history
//   hist_idx - history position: i for b_i (x(n-i)), i-1 for a_i (y(n-i))
//   coef     - the coefficient code, tap_w - its static adder width
//   first / last - first and last step of the sequence.
// Timing: the first step is the cycle after start; steps are back to back,
// so one sequence occupies NB+NA cycles.
// Reset: asynchronous, active low, returns to idle.
// Coefficients are given as integer codes in COEF: b_0..b_{NB-1} followed by
// a_1..a_NA.  Sorting both sections separately and the gain formula follow
// the reordering technique this filter uses; issuing the feedforward section
// first and breaking ties by original index are this design's choices.
module tap_ctrl
  import tea_pkg::*;
#(
  parameter int CW = 22,
  parameter int DW = 32,
  parameter int W1 = CW + DW,
  parameter int NB = 6,
  parameter int NA = 0,
  parameter coef_tab_t COEF = '{0: -240124, 1: 117021, 2: 1085696, 3: 1085696, 4: 117021, 5: -240124, default: 0},
  parameter int WW = $clog2(W1 + 1),
  parameter int HD = (NB > NA) ? NB : ((NA > 0) ? NA : 1),
  parameter int IW = (HD > 1) ? $clog2(HD) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 step,
  output logic                 first,
  output logic                 last,
  output logic                 fb,
  output logic        [IW-1:0] hist_idx,
  output logic signed [CW-1:0] coef,
  output logic        [WW-1:0] tap_w
);

  localparam int NT = NB + NA;
  localparam int KW = (NT > 1) ? $clog2(NT) : 1;

  typedef int tab_t [NT];

  // Processing order: ORDER[k] is the COEF index issued at step k.
  function automatic tab_t calc_order();
    tab_t o;
    for (int i = 0; i < NT; i++) begin
      int lo, hi, r;
      lo = (i < NB) ? 0 : NB;
      hi = (i < NB) ? NB : NT;
      r  = 0;
      for (int j = lo; j < hi; j++)
        if ((abs64(COEF[j]) < abs64(COEF[i])) ||
            ((abs64(COEF[j]) == abs64(COEF[i])) && (j < i))) r++;
      o[lo + r] = i;
    end
    return o;
  endfunction

  localparam tab_t ORDER = calc_order();

  // Static width of step k from the accumulated worst-case gain.
  function automatic tab_t calc_width();
    tab_t w;
    longint unsigned s;
    s = 0;
    for (int k = 0; k < NT; k++) begin
      s    = s + (abs64(COEF[ORDER[k]]) << (DW - 1));
      w[k] = signed_bits(s, W1);
    end
    return w;
  endfunction

  localparam tab_t TAPW = calc_width();

  logic          active;
  logic [KW-1:0] k;
  int            ci;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      k      <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        k      <= '0;
      end
    end else if (int'(k) == NT - 1) begin
      // A new sequence may start right behind the last step.
      active <= start;
      k      <= '0;
    end else begin
      k <= k + 1'b1;
    end
  end

  always_comb begin
    busy     = active;
    step     = active;
    first    = active && (k == '0);
    last     = active && (int'(k) == NT - 1);
    ci       = ORDER[k];
    fb       = (ci >= NB);
    hist_idx = fb ? IW'(ci - NB) : IW'(ci);
    coef     = CW'(COEF[ci]);
    tap_w    = WW'(TAPW[k]);
  end

endmodule
