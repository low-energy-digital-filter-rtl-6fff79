// tb_tap_ctrl: checks the tap controller with the 3rd-order IIR coefficients
// (b = 0.2282 0.5612 0.5612 0.2282, a = -0.1652 -0.3835 -0.0300 in Q1.21,
// 32-bit samples, 54-bit accumulator).  The expected order, worked out by
// hand, is b0 b3 b1 b2 (ascending |b|, ties by index) and then a3 a1 a2
// (ascending |a|).  The expected static width of each step is the signed width
// of the running sum of |coefficient| * 2**31, clamped to 54.  Also checked:
// first/last flags, one step per cycle, back-to-back sequences when start is
// raised in the last step, and that start is ignored mid-sequence.
module tb_tap_ctrl;
  import tea_pkg::*;
  import tea_ref_pkg::*;
  localparam int CW = 22, DW = 32, W1 = 54, NB = 4, NA = 3, NT = 7;
  localparam int WW = $clog2(W1 + 1);
  localparam int IW = 2;
  localparam coef_tab_t C = '{0: 478570, 1: 1176922, 2: 1176922, 3: 478570,
                              4: -346450, 5: -804258, 6: -62915, default: 0};
  localparam int EXP_ORD [NT] = '{0, 3, 1, 2, 6, 4, 5};

  logic                 clk = 0, rst_n = 0, start = 0;
  logic                 busy, step, first, last, fb;
  logic        [IW-1:0] hist_idx;
  logic signed [CW-1:0] coef;
  logic        [WW-1:0] tap_w;
  int checks = 0, failures = 0;

  tap_ctrl #(.CW(CW), .DW(DW), .W1(W1), .NB(NB), .NA(NA), .COEF(C)) dut (
    .clk, .rst_n, .start, .busy, .step, .first, .last, .fb, .hist_idx, .coef, .tap_w
  );

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Checks the NT steps of one sequence; the first step is current.
  // If chain is set, start is raised during the last step.
  task automatic run_seq(input bit chain, input bit poke);
    longint unsigned s;
    int ew, ci;
    s = 0;
    for (int k = 0; k < NT; k++) begin
      ci = EXP_ORD[k];
      s  = s + (abs64(C[ci]) << (DW - 1));
      ew = need_bits(s);
      if (ew > W1) ew = W1;
      chk(step && busy, "step active");
      chk(first == (k == 0), "first flag");
      chk(last == (k == NT - 1), "last flag");
      chk(fb == (ci >= NB), "feedback select");
      chk(int'(hist_idx) == ((ci >= NB) ? ci - NB : ci), "history index");
      chk(longint'(coef) == C[ci], "coefficient");
      chk(int'(tap_w) == ew, $sformatf("static width step %0d got %0d exp %0d", k, tap_w, ew));
      start = (chain && k == NT - 1) || (poke && k == 2);
      @(posedge clk); #1;
      start = 0;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!busy && !step, "idle after reset");
    @(posedge clk); #1;
    chk(!busy, "stays idle");
    start = 1;
    @(posedge clk); #1;
    start = 0;
    run_seq(1, 1);      // start during step 2 is ignored, start in last step chains
    run_seq(0, 0);
    chk(!busy && !step, "idle after sequence");
    repeat (3) @(posedge clk);
    #1 chk(!busy, "still idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
