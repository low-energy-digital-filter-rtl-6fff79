// tb_dyn_adder: checks the dynamic-width adder at its default widths
// (W1 = 54, W2 = 39).  For random operand pairs of random magnitude and
// random static tap widths it predicts independently whether the reduced
// width applies (both operands in [-2**37, 2**37)) and what the result is:
// the sum truncated to the effective width and sign-extended.  With a static
// width of 54 the result must equal the exact sum whether or not the reduced
// width was used, which is the property that makes the technique safe.
module tb_dyn_adder;
  import tea_ref_pkg::*;
  localparam int W1 = 54, W2 = 39;
  localparam int WW = $clog2(W1 + 1);
  localparam longint LIM = longint'(1) <<< (W2 - 2);

  logic [W1-1:0] a, b, sum;
  logic [WW-1:0] static_w;
  logic          reduced;
  int checks = 0, failures = 0, n_red = 0, n_full = 0;

  dyn_adder #(.W1(W1), .W2(W2)) dut (.a, .b, .static_w, .sum, .reduced);

  function automatic longint rnd_val(input int maxe);
    int     e;
    longint v;
    e = $urandom_range(maxe, 0);
    v = {$urandom, $urandom};
    v = v & ((longint'(1) <<< e) - 1);
    if ($urandom_range(1, 0) == 1) v = -v - 1;
    return v;
  endfunction

  task automatic check(input longint va, input longint vb, input int sw);
    bit     er;
    int     ew;
    longint exp;
    a = va[W1-1:0]; b = vb[W1-1:0]; static_w = WW'(sw);
    #1;
    er  = (va >= -LIM) && (va < LIM) && (vb >= -LIM) && (vb < LIM);
    ew  = (er && sw > W2) ? W2 : sw;
    exp = wrap(va + vb, ew);
    checks++;
    if (reduced !== er || sum !== exp[W1-1:0]) begin
      failures++;
      $display("FAIL a=%0d b=%0d sw=%0d sum=%h red=%0b exp=%h/%0b", va, vb, sw, sum, reduced, exp[W1-1:0], er);
    end
    if (er) n_red++; else n_full++;
    if (sw == W1) begin
      checks++;
      if (sum !== W1'(va + vb)) begin
        failures++;
        $display("FAIL inexact a=%0d b=%0d sum=%h", va, vb, sum);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(LIM - 1, LIM - 1, W1);          // largest reduced sum, positive
    check(-LIM, -LIM, W1);                // largest reduced sum, negative
    check(LIM, 0, W1);                    // just outside the reduced range
    for (int i = 0; i < 3000; i++) check(rnd_val(52), rnd_val(52), W1);
    for (int i = 0; i < 2000; i++) check(rnd_val(52), rnd_val(52), $urandom_range(W1, 2));
    $display("reduced=%0d full=%0d", n_red, n_full);
    checks++;
    if (n_red < 100 || n_full < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
