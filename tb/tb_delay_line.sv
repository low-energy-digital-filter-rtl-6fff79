// tb_delay_line: checks the sample history (8-bit samples, depth 5) against
// a queue model: after reset every position reads 0; random pushes shift
// samples in at position 0; every position, and one beyond the depth, is
// read back after each clock.
module tb_delay_line;
  localparam int DW = 8, DEPTH = 5, IW = 3;

  logic                 clk = 0, rst_n = 0, push = 0;
  logic signed [DW-1:0] din = '0, dout;
  logic        [IW-1:0] rd_idx = '0;
  int checks = 0, failures = 0;
  logic signed [DW-1:0] model [$];

  delay_line #(.DW(DW), .DEPTH(DEPTH), .IW(IW)) dut (.clk, .rst_n, .push, .din, .rd_idx, .dout);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i <= DEPTH; i++) begin
      logic signed [DW-1:0] exp;
      rd_idx = IW'(i);
      #1;
      exp = (i < DEPTH) ? model[i] : '0;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL idx=%0d got=%0d exp=%0d", i, dout, exp);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model.push_back('0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_all();
    for (int n = 0; n < 300; n++) begin
      push = ($urandom_range(3, 0) != 0);
      din  = DW'($urandom);
      @(posedge clk); #1;
      if (push) begin
        model.push_front(din);
        void'(model.pop_back());
      end
      push = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
