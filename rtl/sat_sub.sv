// SUB block: registered saturating subtractor, y = a - b.
//
// In the FXLMS datapath it forms error_out = din1 - out1, the reference
// input minus the secondary-path response. The block name and its 16-bit
// buses come from the architecture diagram; the operand order, the
// saturation to the Q1.15 range and the single output register are choices
// of this design.
//
// Timing: one clock of latency, one result per clock. Synchronous,
// active-high reset clears the output.
module sat_sub
  import fxlms_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t a,
  input  sample_t b,
  output sample_t y
);

  logic signed [DATA_W:0] diff;

  always_comb diff = (DATA_W + 1)'(a) - (DATA_W + 1)'(b);

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= sat_sample(64'(diff));
  end

endmodule
