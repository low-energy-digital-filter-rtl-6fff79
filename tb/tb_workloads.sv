// tb_workloads: runs the evaluated workloads through the full-size design.
//   * audio FIR and IIR: 4 s of audio at 22 kHz = 88000 samples each,
//     Laplacian with variance 0.005 on a -0.5..0.5 signal range (scale
//     b = 0.05, i.e. 0.05 * 2**29 in Q3.29 LSBs), offered back to back;
//   * sharpening: one 256 x 256 image = 65536 pixels fed as a 1-D stream,
//     Laplacian around mid-grey (scale 30 grey levels, signed pixels).
// Every output is checked against the reference model, as are latency and
// sample period.  At the end the fraction of additions done at the reduced
// width and the resulting average effective adder width
// W_avg = W1 * p1 + W2 * p2 are printed for each filter.
module tb_workloads;
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
               .NSAMP(88000), .LAP_B(26843545.6), .PCT_BIG(0), .PCT_GAP(0)) ag_fir (
    .clk, .rst_n, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_data(f_od), .mac_en(f_me), .mac_reduced(f_mr),
    .done(f_done), .checks(f_chk), .failures(f_fail), .n_red(f_red), .n_full(f_full),
    .n_refused(f_ref), .n_sat(f_sat), .n_b2b(f_b2b), .n_out(f_out)
  );

  filt_agent #(.NB(4), .NA(3), .CF(21), .DW(32), .W1(54), .C(CF_IIR),
               .NSAMP(88000), .LAP_B(26843545.6), .PCT_BIG(0), .PCT_GAP(0)) ag_iir (
    .clk, .rst_n, .in_valid(i_iv), .in_ready(i_ir), .in_data(i_id),
    .out_valid(i_ov), .out_data(i_od), .mac_en(i_me), .mac_reduced(i_mr),
    .done(i_done), .checks(i_chk), .failures(i_fail), .n_red(i_red), .n_full(i_full),
    .n_refused(i_ref), .n_sat(i_sat), .n_b2b(i_b2b), .n_out(i_out)
  );

  filt_agent #(.NB(9), .NA(0), .CF(12), .DW(8), .W1(24), .C(CF_SHP),
               .NSAMP(65536), .LAP_B(30.0), .PCT_BIG(0), .PCT_GAP(0)) ag_shp (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_data(s_id),
    .out_valid(s_ov), .out_data(s_od), .mac_en(s_me), .mac_reduced(s_mr),
    .done(s_done), .checks(s_chk), .failures(s_fail), .n_red(s_red), .n_full(s_full),
    .n_refused(s_ref), .n_sat(s_sat), .n_b2b(s_b2b), .n_out(s_out)
  );

  task automatic report(input string nm, input int red, input int full, input int w1, input int w2, input int nout, input int nexp);
    real p2;
    p2 = real'(red) / real'(red + full);
    $display("%s: outputs %0d, additions %0d, reduced fraction p2 = %f, W_avg = %f bits (W1 %0d, W2 %0d)",
             nm, nout, red + full, p2, w1 * (1.0 - p2) + w2 * p2, w1, w2);
    checks++;
    if (nout != nexp) begin
      failures++;
      $display("FAIL %s produced %0d outputs, expected %0d", nm, nout, nexp);
    end
  endtask

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk + s_chk,
             failures + 1 + f_fail + i_fail + s_fail);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (f_done && i_done && s_done);
    report("fir audio", f_red, f_full, 54, 39, f_out, 88000);
    report("iir audio", i_red, i_full, 54, 38, i_out, 88000);
    report("shp image", s_red, s_full, 24, 20, s_out, 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks + f_chk + i_chk + s_chk,
             failures + f_fail + i_fail + s_fail);
    $finish;
  end
endmodule
