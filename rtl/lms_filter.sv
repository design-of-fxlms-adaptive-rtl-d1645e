// LMS adaptive transversal filter, the building block used three times in
// the FXLMS architecture.
//
// Per sample k the filter holds the last TAPS reference samples
// x(k) .. x(k-TAPS+1) and a coefficient vector w(k). It produces the
// anti-noise output y(k) = -w(k)^T x(k), forms the error by addition,
// e(k) = d(k) + y(k), and adapts with w(k+1) = w(k) + mu e(k) x(k). The two
// equations (error by addition, update with +mu) are the algorithm's; making
// the output the negated convolution is how they are made to converge
// together, and is this design's reading. The error e(k) is the block's main
// output: it is the w_error / Final_out bus of the architecture. The
// coefficient vector w is internal; testbenches observe it hierarchically.
//
// Number formats (this design's choice): samples Q1.15; coefficients
// COEF_W bits with COEF_FRAC fractional bits; mu = 2^-MU_SHIFT so the update
// is a shift. Products are truncated towards minus infinity; y, e and every
// coefficient saturate instead of wrapping. Tap count and step size are
// parameters because no values are given for them.
//
// Timing: one sample per clock. At a clock edge x_in and d_in enter the tap
// line and the d register; during the following cycle the sum, the error and
// the new coefficients are computed combinationally; the next edge registers
// e_out and writes the coefficients. Latency is 2 clocks and the
// update uses exactly the e(k) and x vector of the same sample (plain LMS).
// Synchronous, active-high reset clears taps, coefficients and outputs.
module lms_filter
  import fxlms_pkg::*;
#(
  parameter int unsigned TAPS      = 8,
  parameter int unsigned COEF_W    = 24,
  parameter int unsigned COEF_FRAC = 22,
  parameter int unsigned MU_SHIFT  = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  sample_t                  x_in,
  input  sample_t                  d_in,
  output sample_t                  e_out
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(TAPS + 1);
  // e*x is Q2.30; bring it to the coefficient format and multiply by mu.
  localparam int unsigned UPD_SHIFT = 2 * FRAC_W - COEF_FRAC + MU_SHIFT;

  localparam logic signed [COEF_W:0] COEF_MAX = (COEF_W + 1)'(2 ** (COEF_W - 1) - 1);
  localparam logic signed [COEF_W:0] COEF_MIN = (COEF_W + 1)'(-(2 ** (COEF_W - 1)));

  sample_t                  x_line [TAPS];  // x(k) .. x(k-TAPS+1)
  sample_t                  d_reg;          // d(k)
  logic signed [COEF_W-1:0] w      [TAPS];  // w(k)

  logic signed [ACC_W-1:0]  acc;
  sample_t                  y_now, e_now;
  logic signed [COEF_W-1:0] w_next [TAPS];

  // Filter output, error and coefficient update for the sample in the taps.
  always_comb begin
    logic signed [2*DATA_W-1:0] grad;
    logic signed [COEF_W:0]     sum;
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += ACC_W'(x_line[i] * w[i]);
    y_now = sat_sample(-(64'(acc) >>> COEF_FRAC));
    e_now = sat_sample(64'(d_reg) + 64'(y_now));
    for (int i = 0; i < TAPS; i++) begin
      grad = e_now * x_line[i];
      sum  = (COEF_W + 1)'(w[i]) + (COEF_W + 1)'(grad >>> UPD_SHIFT);
      if (sum > COEF_MAX)      w_next[i] = COEF_MAX[COEF_W-1:0];
      else if (sum < COEF_MIN) w_next[i] = COEF_MIN[COEF_W-1:0];
      else                     w_next[i] = sum[COEF_W-1:0];
    end
  end

  // Input stage: tap delay line and desired-signal register.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) x_line[i] <= '0;
      d_reg <= '0;
    end else begin
      x_line[0] <= x_in;
      for (int i = 1; i < TAPS; i++) x_line[i] <= x_line[i-1];
      d_reg <= d_in;
    end
  end

  // Output and adaptation stage.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) w[i] <= '0;
      e_out <= '0;
    end else begin
      w     <= w_next;
      e_out <= e_now;
    end
  end

endmodule
