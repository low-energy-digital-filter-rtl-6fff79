// filt_agent: stimulus and checking for one sm_filter stream (testbench use).
//
// Drives NSAMP samples into the filter's valid/ready input, predicts every
// output with tea_ref_pkg::ref_filter and compares it when out_valid pulses.
// Samples are Laplacian with scale LAP_B (in LSBs); PCT_BIG percent of them
// are uniform over the full range instead (to reach saturation and the
// full-width adder).  The first NB samples form a worst-case pattern
// (full scale, signs matching the coefficients) that drives the output into
// saturation.  With QUIET_LEN > 0 the stream alternates between segments
// of QUIET_LEN samples at scale LAP_B and at LAP_B / QUIET_DIV, like speech
// with pauses.  PCT_GAP percent of samples are preceded by 1..3 idle
// cycles; the rest are offered back to back so the input is refused while
// the MAC is busy.  Checked per output: value, and latency (the output must
// appear NT+1 cycles after the input was accepted).  Checked per accept: no
// two accepts closer than NT cycles, exactly NT when offered back to back.
// Counted for the caller: reduced and full-width additions, refused cycles,
// saturated outputs and back-to-back accepts.
module filt_agent
  import tea_pkg::*;
  import tea_ref_pkg::*;
#(
  parameter int        NB      = 6,
  parameter int        NA      = 0,
  parameter int        CF      = 21,
  parameter int        DW      = 32,
  parameter int        W1      = 54,
  parameter coef_tab_t C       = '{default: 0},
  parameter int        NSAMP   = 200,
  parameter real       LAP_B   = 1.0e7,
  parameter int        PCT_BIG = 5,
  parameter int        PCT_GAP = 30,
  parameter int        QUIET_LEN = 0,     // >0: alternate loud/quiet segments
  parameter real       QUIET_DIV = 1.0e4  // quiet segments use LAP_B / QUIET_DIV
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [DW-1:0] in_data,
  input  logic                 out_valid,
  input  logic signed [DW-1:0] out_data,
  input  logic                 mac_en,
  input  logic                 mac_reduced,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_red,
  output int                   n_full,
  output int                   n_refused,
  output int                   n_sat,
  output int                   n_b2b,
  output int                   n_out
);
  localparam int NT = NB + NA;

  ref_filter rf;
  longint    exp_q[$];
  longint    cyc_q[$];
  bit        sat_q[$];
  longint    cyc = 0, last_acc = -1000;
  int        n_acc = 0;
  bit        gap_before = 1;

  initial begin
    longint cq[$];
    for (int i = 0; i < NT; i++) cq.push_back(C[i]);
    rf = new(cq, NB, NA, CF, DW, W1);
    in_valid = 0; in_data = '0; done = 0;
    checks = 0; failures = 0; n_red = 0; n_full = 0; n_refused = 0;
    n_sat = 0; n_b2b = 0; n_out = 0;
  end

  function automatic longint gen_sample(input int n);
    longint hi, v;
    real    u, m;
    hi = (longint'(1) <<< (DW - 1)) - 1;
    if (n < NB) return (C[NB - 1 - n] < 0) ? -hi - 1 : hi;
    if ($urandom_range(99, 0) < PCT_BIG) begin
      v = longint'($urandom) <<< 32 | longint'($urandom);
      return wrap(v, DW);
    end
    u = (real'($urandom_range(1000000, 1))) / 1000001.0;
    m = -LAP_B * $ln(u);
    if (QUIET_LEN > 0 && ((n / QUIET_LEN) % 2) == 1) m = m / QUIET_DIV;
    if (m > real'(hi)) m = real'(hi);
    v = longint'(m);
    return ($urandom_range(1, 0) == 1) ? -v : v;
  endfunction

  // Driver: inputs change on the falling edge.
  initial begin
    int n_prev;
    @(posedge rst_n);
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      if ($urandom_range(99, 0) < PCT_GAP) begin
        in_valid   = 0;
        gap_before = 1;
        repeat ($urandom_range(3, 1)) @(negedge clk);
      end
      in_valid = 1;
      in_data  = DW'(gen_sample(n));
      n_prev   = n_acc;
      while (n_acc == n_prev) @(negedge clk);
      in_valid = 0;
    end
    repeat (NT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != NSAMP) begin
      failures++;
      $display("FAIL %0d outputs missing (got %0d of %0d)", exp_q.size(), n_out, NSAMP);
    end
    done = 1;
  end

  // Monitor: samples everything on the rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (mac_en) begin
        if (mac_reduced) n_red <= n_red + 1;
        else             n_full <= n_full + 1;
      end
      if (in_valid && !in_ready) n_refused <= n_refused + 1;
      if (in_valid && in_ready) begin
        longint y;
        y = rf.push(longint'(in_data));
        exp_q.push_back(y);
        cyc_q.push_back(cyc);
        sat_q.push_back(rf.last_sat);
        checks++;
        if (cyc - last_acc < NT) begin
          failures++;
          $display("FAIL accepts %0d cycles apart, need %0d", cyc - last_acc, NT);
        end
        if (!gap_before) begin
          checks++;
          if (cyc - last_acc != NT) begin
            failures++;
            $display("FAIL back-to-back accepts %0d cycles apart, expected %0d", cyc - last_acc, NT);
          end else n_b2b <= n_b2b + 1;
        end
        last_acc   = cyc;
        gap_before = 0;
        n_acc     <= n_acc + 1;
      end
      if (out_valid) begin
        longint y, c;
        bit     s;
        n_out <= n_out + 1;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures += 2;
          $display("FAIL unexpected output");
        end else begin
          y = exp_q.pop_front();
          c = cyc_q.pop_front();
          s = sat_q.pop_front();
          if (s) n_sat <= n_sat + 1;
          if (longint'(out_data) != y) begin
            failures++;
            $display("FAIL output %0d expected %0d", out_data, y);
          end
          if (cyc - c - 1 != NT + 1) begin
            failures++;
            $display("FAIL latency %0d expected %0d", cyc - c - 1, NT + 1);
          end
        end
      end
    end
  end
endmodule
