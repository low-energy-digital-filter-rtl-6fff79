// tb_width_ctrl: checks truncation and sign extension at the default width
// (W = 54) for every effective width 1..54 with random sums, and that width
// values 0 and above 54 are clamped.  The expected value is the low w bits of
// the sum, sign-extended with 64-bit shifts.
module tb_width_ctrl;
  localparam int W = 54;
  localparam int WW = $clog2(W + 1);

  logic [W-1:0]  d, q;
  logic [WW-1:0] w;
  int checks = 0, failures = 0;

  width_ctrl #(.W(W)) dut (.d, .w, .q);

  task automatic check(input longint vd, input int vw);
    longint exp;
    int     ew;
    ew = (vw < 1) ? 1 : ((vw > W) ? W : vw);
    d  = vd[W-1:0];
    w  = WW'(vw);
    #1;
    exp = (vd <<< (64 - ew)) >>> (64 - ew);
    checks++;
    if (q !== exp[W-1:0]) begin
      failures++;
      $display("FAIL d=%h w=%0d q=%h exp=%h", d, vw, q, exp[W-1:0]);
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
    for (int ww = 1; ww <= W; ww++)
      for (int i = 0; i < 40; i++) check({$urandom, $urandom}, ww);
    check(64'h0000_0000_0000_0001, 0);
    check(64'hffff_ffff_ffff_fffe, 0);
    check({$urandom, $urandom}, W + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
