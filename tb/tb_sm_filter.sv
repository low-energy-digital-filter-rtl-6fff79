// tb_sm_filter: checks the single-MAC filter in its two shapes.
//   * the default instance: the 5th-order audio FIR (6 taps, Q1.21
//     coefficients, Q3.29 samples, adders of 54 and 39 bits);
//   * an IIR instance: the 3rd-order audio IIR (4 + 3 taps, reduced width 38).
// Each stream is driven and checked by filt_agent against a direct-form
// 64-bit reference: every output value, the NT+1-cycle latency and the
// NT-cycle sample period.  The test also requires that both adder widths,
// refused inputs, back-to-back samples and (for the IIR) output saturation
// all occurred.
module tb_sm_filter;
  import tea_pkg::*;

  localparam coef_tab_t CF_FIR = '{0: -240124, 1: 117021, 2: 1085696, 3: 1085696,
                                   4: 117021, 5: -240124, default: 0};
  localparam coef_tab_t CF_IIR = '{0: 478570, 1: 1176922, 2: 1176922, 3: 478570,
                                   4: -346450, 5: -804258, 6: -62915, default: 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               f_iv, f_ir, f_ov, f_me, f_mr, f_done;
  logic signed [31:0] f_id, f_od;
  logic               i_iv, i_ir, i_ov, i_me, i_mr, i_done;
  logic signed [31:0] i_id, i_od;
  int f_chk, f_fail, f_red, f_full, f_ref, f_sat, f_b2b, f_out;
  int i_chk, i_fail, i_red, i_full, i_ref, i_sat, i_b2b, i_out;
  int checks = 0, failures = 0;

  sm_filter dut_fir (
    .clk, .rst_n, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_data(f_od), .mac_en(f_me), .mac_reduced(f_mr)
  );

  sm_filter #(.CW(22), .CF(21), .DW(32), .W2(38), .NB(4), .NA(3), .COEF(CF_IIR)) dut_iir (
    .clk, .rst_n, .in_valid(i_iv), .in_ready(i_ir), .in_data(i_id),
    .out_valid(i_ov), .out_data(i_od), .mac_en(i_me), .mac_reduced(i_mr)
  );

  filt_agent #(.NB(6), .NA(0), .CF(21), .DW(32), .W1(54), .C(CF_FIR),
               .NSAMP(600), .LAP_B(2.0e7), .PCT_BIG(10), .PCT_GAP(30)) ag_fir (
    .clk, .rst_n, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_data(f_od), .mac_en(f_me), .mac_reduced(f_mr),
    .done(f_done), .checks(f_chk), .failures(f_fail), .n_red(f_red), .n_full(f_full),
    .n_refused(f_ref), .n_sat(f_sat), .n_b2b(f_b2b), .n_out(f_out)
  );

  filt_agent #(.NB(4), .NA(3), .CF(21), .DW(32), .W1(54), .C(CF_IIR),
               .NSAMP(600), .LAP_B(2.0e7), .PCT_BIG(30), .PCT_GAP(30)) ag_iir (
    .clk, .rst_n, .in_valid(i_iv), .in_ready(i_ir), .in_data(i_id),
    .out_valid(i_ov), .out_data(i_od), .mac_en(i_me), .mac_reduced(i_mr),
    .done(i_done), .checks(i_chk), .failures(i_fail), .n_red(i_red), .n_full(i_full),
    .n_refused(i_ref), .n_sat(i_sat), .n_b2b(i_b2b), .n_out(i_out)
  );

  task automatic need(input int n, input string what);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk, failures + 1 + f_fail + i_fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (f_done && i_done);
    need(f_red, "fir reduced additions");
    need(f_full, "fir full additions");
    need(f_ref, "fir refused input cycles");
    need(f_b2b, "fir back-to-back samples");
    need(i_red, "iir reduced additions");
    need(i_full, "iir full additions");
    need(i_ref, "iir refused input cycles");
    need(i_b2b, "iir back-to-back samples");
    need(i_sat, "iir saturated outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk, failures + f_fail + i_fail);
    $finish;
  end
endmodule
