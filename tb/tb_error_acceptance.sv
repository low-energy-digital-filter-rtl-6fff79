// tb_error_acceptance: shows what the width control buys when the adder is
// too slow, using the operands the real design produces.
//
// The 5th-order audio FIR (sm_filter defaults) filters 20000 samples of
// speech-like audio: Laplacian with variance 0.005, alternating every 500
// samples with pauses 1000 times quieter.  All outputs are checked against
// the reference filter as usual.  In addition, at every MAC step the
// testbench takes the two adder operands and the effective width chosen by
// the hardware and evaluates a behavioural model of a timing-starved adder:
// a carry can travel at most L bit positions within the clock period (the
// carry into bit i is computed from bits i-L..i-1 only, with no carry-in
// below them).  This first-order model of supply-voltage overscaling is not
// part of the design.  For each budget L it accumulates the squared error of
//   full    - the starved adder used at the full 54 bits for every addition;
//   managed - the starved adder used at the effective width (reduced and
//             static tap widths), followed by sign extension.
// The check is that the managed error energy never exceeds the full-width
// one and is strictly smaller at the tighter budgets.  The error energies
// are printed as mean squared error per addition in dB relative to the
// squared full-scale accumulator value (-999 means no error at all).
module tb_error_acceptance;
  import tea_pkg::*;
  import tea_ref_pkg::*;

  localparam int W1 = 54;
  localparam int NL = 5;
  localparam int LBUD [NL] = '{8, 14, 20, 26, 32};
  localparam coef_tab_t CF_FIR = '{0: -240124, 1: 117021, 2: 1085696, 3: 1085696,
                                   4: 117021, 5: -240124, default: 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               iv, ir, ov, me, mr, done;
  logic signed [31:0] id, od;
  int chk, fail, nred, nfull, nref, nsat, nb2b, nout;
  int checks = 0, failures = 0;
  real err_full [NL];
  real err_mgd  [NL];

  sm_filter dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_data(od), .mac_en(me), .mac_reduced(mr)
  );

  filt_agent #(.NB(6), .NA(0), .CF(21), .DW(32), .W1(W1), .C(CF_FIR),
               .NSAMP(20000), .LAP_B(26843545.6), .PCT_BIG(0), .PCT_GAP(0),
               .QUIET_LEN(500), .QUIET_DIV(1000.0)) ag (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_data(od), .mac_en(me), .mac_reduced(mr),
    .done(done), .checks(chk), .failures(fail), .n_red(nred), .n_full(nfull),
    .n_refused(nref), .n_sat(nsat), .n_b2b(nb2b), .n_out(nout)
  );

  // Carry-budget model: w-bit addition where a carry travels at most l bits,
  // result sign-extended from bit w-1 to 64 bits.
  function automatic longint starved_add(input longint a, input longint b,
                                         input int w, input int l);
    longint r, wa, wb, win;
    int     lo;
    r = 0;
    for (int i = 0; i < w; i++) begin
      lo  = (i > l) ? i - l : 0;
      wa  = (a >>> lo) & ((longint'(1) <<< (i - lo)) - 1);
      wb  = (b >>> lo) & ((longint'(1) <<< (i - lo)) - 1);
      win = ((wa + wb) >>> (i - lo)) & 1;
      r   = r | ((((a >>> i) ^ (b >>> i) ^ win) & 1) <<< i);
    end
    return wrap(r, w);
  endfunction

  initial for (int j = 0; j < NL; j++) begin
    err_full[j] = 0.0;
    err_mgd[j]  = 0.0;
  end

  always @(posedge clk) begin
    if (rst_n && dut.u_mac.en) begin
      longint a, b, exact, e1, e2;
      int     ew;
      a     = wrap(longint'(dut.u_mac.prod_x), W1);
      b     = wrap(longint'(dut.u_mac.acc_op), W1);
      ew    = int'(dut.u_mac.u_add.eff_w);
      exact = wrap(a + b, W1);
      for (int j = 0; j < NL; j++) begin
        e1 = starved_add(a, b, W1, LBUD[j]) - exact;
        e2 = starved_add(a, b, ew, LBUD[j]) - exact;
        err_full[j] += real'(e1) * real'(e1);
        err_mgd[j]  += real'(e2) * real'(e2);
      end
    end
  end

  function automatic real db(input real e, input int n);
    real fs;
    fs = 2.0 ** (2 * (W1 - 1));
    return (e <= 0.0) ? -999.0 : 10.0 * $log10(e / real'(n) / fs);
  endfunction

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk, failures + 1 + fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done);
    $display("additions %0d, reduced width used %0d", nred + nfull, nred);
    checks++;
    if (nred == 0) failures++;
    for (int j = 0; j < NL; j++) begin
      $display("carry budget %2d bits: mean squared error full width %8.1f dB, managed width %8.1f dB",
               LBUD[j], db(err_full[j], nred + nfull), db(err_mgd[j], nred + nfull));
      checks++;
      if (err_mgd[j] > err_full[j]) begin
        failures++;
        $display("FAIL managed width worse than full width at budget %0d", LBUD[j]);
      end
    end
    checks++;
    if (!(err_mgd[0] < err_full[0])) begin
      failures++;
      $display("FAIL no error reduction at the tightest budget");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk, failures + fail);
    $finish;
  end
endmodule
