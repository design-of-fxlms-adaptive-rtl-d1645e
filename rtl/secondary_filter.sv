// Secondary-path filter S: fixed-coefficient FIR.
//
// Models the path from the adaptive filter's output to the error sensor:
// out1(k) = sum_i COEFS[i] * x(k-i). Its role (pass the adaptive filter's
// output through the secondary path) is given by the algorithm; its length
// and coefficients are not, so they are parameters. The default 4-tap
// response 0, 0.5, 0.25, 0.125 (one sample of pure delay followed by a
// decay) is this design's choice. COEFS must be given whenever TAPS is
// changed, since the default list has exactly four entries. Coefficients are Q1.15; the Q2.30 sum is
// truncated towards minus infinity and saturated to a Q1.15 sample.
//
// Timing: one sample per clock, latency 2 clocks (the tap register, then the
// output register). Synchronous, active-high reset clears taps and output.
module secondary_filter
  import fxlms_pkg::*;
#(
  parameter int unsigned TAPS         = 4,
  parameter sample_t     COEFS [TAPS] = '{16'sd0, 16'sd16384, 16'sd8192, 16'sd4096}
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t x_in,
  output sample_t y_out
);

  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(TAPS + 1);

  sample_t                 x_line [TAPS];
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc += ACC_W'(x_line[i] * COEFS[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) x_line[i] <= '0;
      y_out <= '0;
    end else begin
      x_line[0] <= x_in;
      for (int i = 1; i < TAPS; i++) x_line[i] <= x_line[i-1];
      y_out <= sat_sample(64'(acc >>> FRAC_W));
    end
  end

endmodule
