// tea_ref_pkg: independent reference model for the filter testbenches.
//
// ref_filter evaluates y(n) = sum b_i x(n-i) + sum a_i y(n-i) directly in
// 64-bit integer arithmetic, tap by tap in the original order, wraps the sum
// to the accumulator width W1, drops CF fractional bits (floor) and saturates
// to DW bits.  Nothing in it depends on the tap order, the reduced adder or
// the static tap widths of the hardware, which is what the testbenches check.
package tea_ref_pkg;

  // Sign-extend the low w bits of v.
  function automatic longint wrap(input longint v, input int w);
    return (v <<< (64 - w)) >>> (64 - w);
  endfunction

  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Signed width needed to hold every value of magnitude up to mag.
  function automatic int need_bits(input longint unsigned mag);
    int w;
    w = 1;
    while (mag >= (64'd1 << (w - 1))) w++;
    return w;
  endfunction

  class ref_filter;
    longint c[$];
    int     nb, na, cf, dw, w1;
    longint xh[$];
    longint yh[$];
    bit     last_sat;

    function new(input longint coefs[$], input int nb_, input int na_,
                 input int cf_, input int dw_, input int w1_);
      c  = coefs;
      nb = nb_; na = na_; cf = cf_; dw = dw_; w1 = w1_;
      xh = {}; yh = {};
      last_sat = 0;
    endfunction

    function longint push(input longint x);
      longint acc, y, sh;
      xh.push_front(x);
      if (xh.size() > nb) void'(xh.pop_back());
      acc = 0;
      for (int i = 0; i < nb; i++) acc += c[i] * ((i < xh.size()) ? xh[i] : 0);
      for (int i = 0; i < na; i++) acc += c[nb + i] * ((i < yh.size()) ? yh[i] : 0);
      acc = wrap(acc, w1);
      sh  = acc >>> cf;
      y   = sat(sh, dw);
      last_sat = (y != sh);
      if (na > 0) begin
        yh.push_front(y);
        if (yh.size() > na) void'(yh.pop_back());
      end
      return y;
    endfunction
  endclass

endpackage
