// FXLMS noise-cancelling datapath: top level.
//
// Six blocks are wired as in the architecture diagram:
//   u_lms1  LMS filter, x = din1, d = din2            -> w_err1
//   u_sec   secondary-path FIR on w_err1              -> out1
//   u_sub   error_out = din1 - out1
//   u_lms2  LMS filter, x = din2, d = din1            -> w_err2
//   u_mul   out2 = error_out * w_err2
//   u_lms3  LMS filter, x = out2, d = din1            -> final_out
// The block set, the buses and the 16-bit width follow the diagram; which
// input plays x and which d in each filter, and the operand order of SUB, are
// this design's reading of it.
//
// Pipeline: LMS (2) + secondary filter (2) + SUB (1) + MUL (1) + LMS (2)
// gives the stated latency of 8 clocks from din1/din2 to final_out at one
// sample per clock. Register delay lines align din1 (by 4 for SUB, by 6 for
// the last filter) and w_err2 (by 3 for MUL), so each block combines values
// that belong to the same input sample.
//
// Ports: clk, rst (synchronous, active high), din1, din2, final_out; 50 port
// bits in all. All samples are signed Q1.15.
module fxlms_top
  import fxlms_pkg::*;
#(
  parameter int unsigned LMS_TAPS = 8,
  parameter int unsigned MU_SHIFT = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t din1,
  input  sample_t din2,
  output sample_t final_out
);

  localparam int unsigned LMS_LAT = 2;
  localparam int unsigned SEC_LAT = 2;
  localparam int unsigned SUB_LAT = 1;
  localparam int unsigned MUL_LAT = 1;
  localparam int unsigned LATENCY = 2 * LMS_LAT + SEC_LAT + SUB_LAT + MUL_LAT;

  sample_t w_err1, w_err2, w_err2_d;
  sample_t out1, error_out, out2;
  sample_t din1_sub, din1_lms3;

  lms_filter #(.TAPS(LMS_TAPS), .MU_SHIFT(MU_SHIFT)) u_lms1 (
    .clk, .rst, .x_in(din1), .d_in(din2), .e_out(w_err1)
  );

  secondary_filter u_sec (
    .clk, .rst, .x_in(w_err1), .y_out(out1)
  );

  delay_line #(.WIDTH(DATA_W), .DEPTH(LMS_LAT + SEC_LAT)) u_dly_sub (
    .clk, .rst, .din(din1), .dout(din1_sub)
  );

  sat_sub u_sub (
    .clk, .rst, .a(din1_sub), .b(out1), .y(error_out)
  );

  lms_filter #(.TAPS(LMS_TAPS), .MU_SHIFT(MU_SHIFT)) u_lms2 (
    .clk, .rst, .x_in(din2), .d_in(din1), .e_out(w_err2)
  );

  delay_line #(.WIDTH(DATA_W), .DEPTH(SEC_LAT + SUB_LAT)) u_dly_mul (
    .clk, .rst, .din(w_err2), .dout(w_err2_d)
  );

  q15_mul u_mul (
    .clk, .rst, .a(error_out), .b(w_err2_d), .p(out2)
  );

  delay_line #(.WIDTH(DATA_W), .DEPTH(LMS_LAT + SEC_LAT + SUB_LAT + MUL_LAT)) u_dly_lms3 (
    .clk, .rst, .din(din1), .dout(din1_lms3)
  );

  lms_filter #(.TAPS(LMS_TAPS), .MU_SHIFT(MU_SHIFT)) u_lms3 (
    .clk, .rst, .x_in(out2), .d_in(din1_lms3), .e_out(final_out)
  );

  initial assert (LATENCY == 8) else $error("pipeline latency %0d, expected 8", LATENCY);

endmodule
