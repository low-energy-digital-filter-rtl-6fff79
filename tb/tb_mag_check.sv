// tb_mag_check: checks the magnitude checker at its default size (W = 54,
// 17 checked bits, i.e. operands must lie in [-2**37, 2**37)).  Operands are
// drawn with random magnitudes of 0..54 bits, plus the exact range edges, and
// the `fits` output is compared with a range test done in integer arithmetic.
module tb_mag_check;
  localparam int W = 54, CHK = 17;
  localparam longint LIM = longint'(1) <<< (W - CHK);

  logic [W-1:0] a, b;
  logic         fits;
  int checks = 0, failures = 0;

  mag_check #(.W(W), .CHK(CHK)) dut (.a, .b, .fits);

  function automatic longint rnd_val();
    int     e;
    longint v;
    e = $urandom_range(W - 1, 0);
    v = {$urandom, $urandom};
    v = v & ((longint'(1) <<< e) - 1);
    if ($urandom_range(1, 0) == 1) v = -v - 1;
    return v;
  endfunction

  task automatic check(input longint va, input longint vb);
    bit exp;
    a = va[W-1:0];
    b = vb[W-1:0];
    #1;
    exp = (va >= -LIM) && (va < LIM) && (vb >= -LIM) && (vb < LIM);
    checks++;
    if (fits !== exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d fits=%0b exp=%0b", va, vb, fits, exp);
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
    check(0, 0);
    check(LIM - 1, -LIM);
    check(LIM, 0);
    check(0, -LIM - 1);
    check(-1, LIM - 1);
    for (int i = 0; i < 4000; i++) check(rnd_val(), rnd_val());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
