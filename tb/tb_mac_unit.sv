// tb_mac_unit: checks the multiply-accumulate unit at its default formats
// (22-bit coefficients, 32-bit samples, 54-bit accumulator, 39-bit reduced
// adder).  Random sums of 1..8 products are accumulated, the first with clr;
// after every edge the accumulator is compared with a 64-bit model wrapped to
// 54 bits, and the `reduced` flag with an independent range test on the two
// adder operands.  Idle cycles (en = 0) must leave the accumulator alone.
module tb_mac_unit;
  import tea_ref_pkg::*;
  localparam int CW = 22, DW = 32, W1 = 54, W2 = 39;
  localparam int WW = $clog2(W1 + 1);
  localparam longint LIM = longint'(1) <<< (W2 - 2);

  logic                 clk = 0, rst_n = 0, en = 0, clr = 0, reduced;
  logic signed [CW-1:0] coef = '0;
  logic signed [DW-1:0] data = '0;
  logic        [WW-1:0] static_w = WW'(W1);
  logic signed [W1-1:0] acc;
  int checks = 0, failures = 0, n_red = 0, n_full = 0;
  longint model = 0;

  mac_unit #(.CW(CW), .DW(DW), .W2(W2)) dut (
    .clk, .rst_n, .en, .clr, .coef, .data, .static_w, .acc, .reduced
  );

  always #5 clk = ~clk;

  function automatic longint rnd(input int bits);
    int     e;
    longint v;
    e = $urandom_range(bits - 1, 0);
    v = {$urandom, $urandom};
    v = v & ((longint'(1) <<< e) - 1);
    if ($urandom_range(1, 0) == 1) v = -v - 1;
    return v;
  endfunction

  task automatic mac(input bit c, input longint vc, input longint vd);
    longint p, opnd;
    bit     er;
    en = 1; clr = c; coef = CW'(vc); data = DW'(vd);
    p    = vc * vd;
    opnd = c ? 0 : model;
    #1;
    er = (p >= -LIM) && (p < LIM) && (opnd >= -LIM) && (opnd < LIM);
    checks++;
    if (reduced !== er) begin
      failures++;
      $display("FAIL reduced p=%0d acc=%0d got=%0b", p, opnd, reduced);
    end
    if (er) n_red++; else n_full++;
    model = wrap(opnd + p, W1);
    @(posedge clk); #1;
    checks++;
    if (acc !== W1'(model)) begin
      failures++;
      $display("FAIL acc=%0d exp=%0d", acc, model);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (acc !== '0) failures++;
    for (int s = 0; s < 800; s++) begin
      int n;
      n = $urandom_range(8, 1);
      for (int t = 0; t < n; t++) mac(t == 0, rnd(CW), rnd(DW));
      en = 0;
      @(posedge clk); #1;
      checks++;
      if (acc !== W1'(model)) begin
        failures++;
        $display("FAIL idle changed acc");
      end
    end
    $display("reduced=%0d full=%0d", n_red, n_full);
    checks++;
    if (n_red < 100 || n_full < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
