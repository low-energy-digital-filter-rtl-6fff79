// tea_pkg: constants and helper functions shared by the timing-error-accepting
// filter datapath.
//
// The filter keeps every addition exact in fault-free operation; what the
// datapath changes is the *effective width* of each addition, so that under
// an aggressively lowered supply the carry chains that still fail are short
// ones and the resulting errors are small.  The helpers below compute, at
// elaboration time, how many signed bits a value of a given magnitude needs
// (used to give every filter tap its static adder width) and the absolute
// value of a coefficient (used to sort taps).
package tea_pkg;

  // Largest number of taps (feedforward + feedback) a filter may have.
  localparam int TEA_MAXT = 128;

  // Coefficient codes of one filter: b_0..b_{NB-1}, then a_1..a_NA, then
  // unused entries (zero).
  typedef longint coef_tab_t [TEA_MAXT];

  // Absolute value of a 64-bit signed coefficient code.
  function automatic longint unsigned abs64(input longint v);
    return (v < 0) ? longint'(-v) : longint'(v);
  endfunction

  // Smallest two's-complement width w that holds every value in
  // [-mag, +mag], i.e. mag < 2**(w-1).  Clamped to max_w.
  function automatic int signed_bits(input longint unsigned mag, input int max_w);
    int w;
    w = 1;
    while ((w < max_w) && (w < 64) && (mag >= (64'd1 << (w - 1)))) w++;
    return w;
  endfunction

endpackage
