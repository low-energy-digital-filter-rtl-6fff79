// tea_filter_top: the three timing-error-accepting filters side by side.
//
// Each filter is the same single-MAC architecture (sm_filter) with dynamic
// adder bitwidth and reordered taps, configured for one application:
//   fir - 5th-order least-squares low-pass FIR for audio (22 kHz sampling,
//         pass band to 6 kHz, stop band from 7.5 kHz); coefficients Q1.21,
//         samples Q3.29, accumulator Q4.50; adders of 54 and 39 bits.
//   iir - 3rd-order type-II Chebyshev low-pass IIR for audio (cut-off 8 kHz);
//         same formats; adders of 54 and 38 bits.
//   shp - 1-D image sharpening FIR built from the 3x3 "unsharp" kernel
//         (alpha = 0.2); coefficients Q4.12, pixels Q8.0, accumulator Q12.12;
//         adders of 24 and 20 bits.
// The filters share only clock and reset; each has its own sample stream.
// Coefficient codes are the real coefficients times 2**CF, rounded to the
// nearest integer.  The audio coefficients and all formats and widths are
// those of the reference design; the sharpening kernel values are the
// standard unsharp kernel, and treating pixels as signed (offset by -128)
// and the kernel as 9 taps in row order are choices of this design.
// Interface per filter: <f>_in_valid/_in_ready/_in_data (valid/ready),
// <f>_out_valid/_out_data (one-cycle pulse), <f>_mac_en/_mac_reduced
// (activity of the MAC and use of the reduced adder width).
// Timing: output NT+1 cycles after the input is accepted, one sample every
// NT cycles, NT = 6 (fir), 7 (iir), 9 (shp).
module tea_filter_top (
  input  logic               clk,
  input  logic               rst_n,
  // 5th-order FIR, Q3.29 samples
  input  logic               fir_in_valid,
  output logic               fir_in_ready,
  input  logic signed [31:0] fir_in_data,
  output logic               fir_out_valid,
  output logic signed [31:0] fir_out_data,
  output logic               fir_mac_en,
  output logic               fir_mac_reduced,
  // 3rd-order IIR, Q3.29 samples
  input  logic               iir_in_valid,
  output logic               iir_in_ready,
  input  logic signed [31:0] iir_in_data,
  output logic               iir_out_valid,
  output logic signed [31:0] iir_out_data,
  output logic               iir_mac_en,
  output logic               iir_mac_reduced,
  // image sharpening FIR, Q8.0 pixels
  input  logic               shp_in_valid,
  output logic               shp_in_ready,
  input  logic signed [7:0]  shp_in_data,
  output logic               shp_out_valid,
  output logic signed [7:0]  shp_out_data,
  output logic               shp_mac_en,
  output logic               shp_mac_reduced
);

  // b = (-0.1145, 0.0558, 0.5177, 0.5177, 0.0558, -0.1145) in Q1.21
  sm_filter #(
    .CW(22), .CF(21), .DW(32), .W2(39), .NB(6), .NA(0),
    .COEF('{0: -240124, 1: 117021, 2: 1085696, 3: 1085696, 4: 117021, 5: -240124, default: 0})
  ) u_fir (
    .clk, .rst_n,
    .in_valid    (fir_in_valid),
    .in_ready    (fir_in_ready),
    .in_data     (fir_in_data),
    .out_valid   (fir_out_valid),
    .out_data    (fir_out_data),
    .mac_en      (fir_mac_en),
    .mac_reduced (fir_mac_reduced)
  );

  // b = (0.2282, 0.5612, 0.5612, 0.2282), a = (-0.1652, -0.3835, -0.0300)
  // in Q1.21, with y(n) = sum b_i x(n-i) + sum a_i y(n-i)
  sm_filter #(
    .CW(22), .CF(21), .DW(32), .W2(38), .NB(4), .NA(3),
    .COEF('{0: 478570, 1: 1176922, 2: 1176922, 3: 478570, 4: -346450, 5: -804258, 6: -62915, default: 0})
  ) u_iir (
    .clk, .rst_n,
    .in_valid    (iir_in_valid),
    .in_ready    (iir_in_ready),
    .in_data     (iir_in_data),
    .out_valid   (iir_out_valid),
    .out_data    (iir_out_data),
    .mac_en      (iir_mac_en),
    .mac_reduced (iir_mac_reduced)
  );

  // unsharp kernel (alpha 0.2) rows: -1/6 -2/3 -1/6 | -2/3 13/3 -2/3 |
  // -1/6 -2/3 -1/6, in Q4.12
  sm_filter #(
    .CW(16), .CF(12), .DW(8), .W2(20), .NB(9), .NA(0),
    .COEF('{0: -683, 1: -2731, 2: -683, 3: -2731, 4: 17749, 5: -2731, 6: -683, 7: -2731, 8: -683, default: 0})
  ) u_shp (
    .clk, .rst_n,
    .in_valid    (shp_in_valid),
    .in_ready    (shp_in_ready),
    .in_data     (shp_in_data),
    .out_valid   (shp_out_valid),
    .out_data    (shp_out_data),
    .mac_en      (shp_mac_en),
    .mac_reduced (shp_mac_reduced)
  );

endmodule
