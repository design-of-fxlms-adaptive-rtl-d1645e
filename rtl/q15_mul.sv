// MUL block: registered Q1.15 x Q1.15 multiplier, p = a * b.
//
// In the FXLMS datapath it multiplies error_out (from SUB) with the error
// output of the second LMS filter to give out2. The block name and its
// 16-bit buses come from the architecture diagram; the number format is this
// design's choice: the 32-bit Q2.30 product is shifted right by 15
// (truncation towards minus infinity) and clamped, which only matters for
// -1 x -1.
//
// Timing: one clock of latency, one product per clock. Synchronous,
// active-high reset clears the output.
module q15_mul
  import fxlms_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t a,
  input  sample_t b,
  output sample_t p
);

  logic signed [2*DATA_W-1:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= sat_sample(64'(prod >>> FRAC_W));
  end

endmodule
