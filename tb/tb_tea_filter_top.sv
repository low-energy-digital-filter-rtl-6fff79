// tb_tea_filter_top: end-to-end test of the three filters at their real
// sizes (the top has no parameters).  Each filter gets its own random stream
// from filt_agent and every output is compared with a direct-form 64-bit
// reference, together with the NT+1-cycle latency and NT-cycle sample period
// (NT = 6, 7, 9).  The test counts, and requires at least once per filter:
// reduced-width and full-width additions, a tap added at a static width
// below the full width, a tap issued out of its original order (reordering),
// refused inputs, back-to-back samples and saturated outputs; for the IIR
// also a feedback tap reading a non-zero past output.
module tb_tea_filter_top;
  import tea_pkg::*;

  localparam coef_tab_t CF_FIR = '{0: -240124, 1: 117021, 2: 1085696, 3: 1085696,
                                   4: 117021, 5: -240124, default: 0};
  localparam coef_tab_t CF_IIR = '{0: 478570, 1: 1176922, 2: 1176922, 3: 478570,
                                   4: -346450, 5: -804258, 6: -62915, default: 0};
  localparam coef_tab_t CF_SHP = '{0: -683, 1: -2731, 2: -683, 3: -2731, 4: 17749,
                                   5: -2731, 6: -683, 7: -2731, 8: -683, default: 0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               f_iv, f_ir, f_ov, f_me, f_mr, f_done;
  logic signed [31:0] f_id, f_od;
  logic               i_iv, i_ir, i_ov, i_me, i_mr, i_done;
  logic signed [31:0] i_id, i_od;
  logic               s_iv, s_ir, s_ov, s_me, s_mr, s_done;
  logic signed [7:0]  s_id, s_od;
  int f_chk, f_fail, f_red, f_full, f_ref, f_sat, f_b2b, f_out;
  int i_chk, i_fail, i_red, i_full, i_ref, i_sat, i_b2b, i_out;
  int s_chk, s_fail, s_red, s_full, s_ref, s_sat, s_b2b, s_out;
  int checks = 0, failures = 0;
  int f_narrow = 0, i_narrow = 0, s_narrow = 0;
  int f_reord = 0, i_reord = 0, s_reord = 0, i_fbk = 0;
  int f_k = 0, i_k = 0, s_k = 0;

  tea_filter_top dut (
    .clk, .rst_n,
    .fir_in_valid(f_iv), .fir_in_ready(f_ir), .fir_in_data(f_id),
    .fir_out_valid(f_ov), .fir_out_data(f_od), .fir_mac_en(f_me), .fir_mac_reduced(f_mr),
    .iir_in_valid(i_iv), .iir_in_ready(i_ir), .iir_in_data(i_id),
    .iir_out_valid(i_ov), .iir_out_data(i_od), .iir_mac_en(i_me), .iir_mac_reduced(i_mr),
    .shp_in_valid(s_iv), .shp_in_ready(s_ir), .shp_in_data(s_id),
    .shp_out_valid(s_ov), .shp_out_data(s_od), .shp_mac_en(s_me), .shp_mac_reduced(s_mr)
  );

  filt_agent #(.NB(6), .NA(0), .CF(21), .DW(32), .W1(54), .C(CF_FIR),
               .NSAMP(500), .LAP_B(2.0e7), .PCT_BIG(20), .PCT_GAP(30)) ag_fir (
    .clk, .rst_n, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_data(f_od), .mac_en(f_me), .mac_reduced(f_mr),
    .done(f_done), .checks(f_chk), .failures(f_fail), .n_red(f_red), .n_full(f_full),
    .n_refused(f_ref), .n_sat(f_sat), .n_b2b(f_b2b), .n_out(f_out)
  );

  filt_agent #(.NB(4), .NA(3), .CF(21), .DW(32), .W1(54), .C(CF_IIR),
               .NSAMP(500), .LAP_B(2.0e7), .PCT_BIG(30), .PCT_GAP(30)) ag_iir (
    .clk, .rst_n, .in_valid(i_iv), .in_ready(i_ir), .in_data(i_id),
    .out_valid(i_ov), .out_data(i_od), .mac_en(i_me), .mac_reduced(i_mr),
    .done(i_done), .checks(i_chk), .failures(i_fail), .n_red(i_red), .n_full(i_full),
    .n_refused(i_ref), .n_sat(i_sat), .n_b2b(i_b2b), .n_out(i_out)
  );

  filt_agent #(.NB(9), .NA(0), .CF(12), .DW(8), .W1(24), .C(CF_SHP),
               .NSAMP(500), .LAP_B(6.0), .PCT_BIG(30), .PCT_GAP(30)) ag_shp (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_data(s_id),
    .out_valid(s_ov), .out_data(s_od), .mac_en(s_me), .mac_reduced(s_mr),
    .done(s_done), .checks(s_chk), .failures(s_fail), .n_red(s_red), .n_full(s_full),
    .n_refused(s_ref), .n_sat(s_sat), .n_b2b(s_b2b), .n_out(s_out)
  );

  // Internal activity that the ports do not show: static tap widths below
  // the full width, taps issued out of their original order, and feedback
  // taps reading a non-zero past output.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_fir.u_tap.step) begin
        if (int'(dut.u_fir.u_tap.tap_w) < 54) f_narrow <= f_narrow + 1;
        if (dut.u_fir.u_tap.first) f_k = 0;
        if (int'(dut.u_fir.u_tap.hist_idx) != f_k) f_reord <= f_reord + 1;
        f_k++;
      end
      if (dut.u_iir.u_tap.step) begin
        if (int'(dut.u_iir.u_tap.tap_w) < 54) i_narrow <= i_narrow + 1;
        if (dut.u_iir.u_tap.first) i_k = 0;
        if ((int'(dut.u_iir.u_tap.hist_idx) + (dut.u_iir.u_tap.fb ? 4 : 0)) != i_k)
          i_reord <= i_reord + 1;
        if (dut.u_iir.u_tap.fb && dut.u_iir.data != 0) i_fbk <= i_fbk + 1;
        i_k++;
      end
      if (dut.u_shp.u_tap.step) begin
        if (int'(dut.u_shp.u_tap.tap_w) < 24) s_narrow <= s_narrow + 1;
        if (dut.u_shp.u_tap.first) s_k = 0;
        if (int'(dut.u_shp.u_tap.hist_idx) != s_k) s_reord <= s_reord + 1;
        s_k++;
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("%-30s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk + s_chk,
             failures + 1 + f_fail + i_fail + s_fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (f_done && i_done && s_done);
    need(f_out, "fir outputs");
    need(f_red, "fir reduced additions");
    need(f_full, "fir full additions");
    need(f_narrow, "fir static narrow taps");
    need(f_reord, "fir reordered taps");
    need(f_ref, "fir refused input cycles");
    need(f_b2b, "fir back-to-back samples");
    need(f_sat, "fir saturated outputs");
    need(i_out, "iir outputs");
    need(i_red, "iir reduced additions");
    need(i_full, "iir full additions");
    need(i_narrow, "iir static narrow taps");
    need(i_reord, "iir reordered taps");
    need(i_fbk, "iir non-zero feedback taps");
    need(i_ref, "iir refused input cycles");
    need(i_b2b, "iir back-to-back samples");
    need(i_sat, "iir saturated outputs");
    need(s_out, "shp outputs");
    need(s_red, "shp reduced additions");
    need(s_full, "shp full additions");
    need(s_narrow, "shp static narrow taps");
    need(s_reord, "shp reordered taps");
    need(s_ref, "shp refused input cycles");
    need(s_b2b, "shp back-to-back samples");
    need(s_sat, "shp saturated outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk + s_chk,
             failures + f_fail + i_fail + s_fail);
    $finish;
  end
endmodule
