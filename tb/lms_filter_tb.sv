// Self-checking testbench of the LMS adaptive filter.
//
// The filter identifies an unknown 4-tap FIR h: x is white noise, d = h*x
// plus a little noise (the filter's output is the negated convolution, so
// it converges to w = h). Every output sample is compared with the reference
// model exactly 2 clocks after its input (the block's latency), the whole
// coefficient vector is compared after each update, the error energy must
// fall by a factor of 16 as the filter converges, and a burst of full-scale
// samples drives the saturation logic. A mid-run reset must clear the state.
module lms_filter_tb;
  import fxlms_pkg::*;
  import fxlms_ref_pkg::*;

  localparam int TAPS = 8;
  localparam int LAT  = 2;
  localparam int N    = 6000;

  logic    clk = 0;
  logic    rst = 1;
  sample_t x_in = '0, d_in = '0;
  sample_t e_out;

  int checks = 0, failures = 0;

  lms_filter dut (.clk, .rst, .x_in, .d_in, .e_out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lms_ref        model;
  longint        expq[$];
  longint        h[4] = '{9830, -4915, 2458, 1000};  // 0.3, -0.15, 0.075, 0.03
  longint        xh[$];
  real           e_early = 0, e_late = 0;
  int            coef_mismatch = 0;
  longint        snap[TAPS];  // model coefficients one sample behind

  task automatic check_out(input longint expv, input string what);
    checks++;
    if (longint'(e_out) != expv) begin
      failures++;
      if (failures < 10) $display("%s: e_out=%0d expected %0d at %0t", what, e_out, expv, $time);
    end
  endtask


  initial begin
    longint e;
    model = new(TAPS, 24, 22, 4);
    repeat (4) xh.push_back(0);
    repeat (3) @(negedge clk);
    rst = 0;
    // expected-output queue: e(k) is visible at the negedge LAT cycles later
    for (int k = 0; k < N; k++) begin
      longint x, d, acc;
      @(negedge clk);
      if (k >= LAT) check_out(expq.pop_front(), "sample");
      // the RTL writes w(k) one clock after the model has stepped
      if (k >= 1) begin
        for (int i = 0; i < TAPS; i++) begin
          checks++;
          if (longint'(dut.w[i]) != snap[i]) coef_mismatch++;
        end
      end
      foreach (snap[i]) snap[i] = model.w[i];
      x = longint'($urandom_range(16000)) - 8000;
      xh.push_front(x); void'(xh.pop_back());
      acc = 0;
      foreach (h[i]) acc += h[i] * xh[i];
      d = floor_div_pow2(acc, 15) + longint'($urandom_range(64)) - 32;
      x_in = sample_t'(x);
      d_in = sample_t'(d);
      e = model.step(x, d);
      expq.push_back(e);
      if (k < 200)     e_early += real'(e) * real'(e);
      if (k >= N - 200) e_late += real'(e) * real'(e);
    end
    // convergence: error energy must drop by at least 16x
    checks++;
    if (!(e_late * 16.0 < e_early)) begin
      failures++;
      $display("no convergence: early %f late %f", e_early, e_late);
    end
    // coefficients close to h (h in Q1.15 -> Q2.22 is x128)
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (longint'(dut.w[i]) > h[i] * 128 + 25000 || longint'(dut.w[i]) < h[i] * 128 - 25000) begin
        failures++;
        $display("w[%0d]=%0d, expected near %0d", i, dut.w[i], h[i] * 128);
      end
    end
    // full-scale burst: saturation of y, e and coefficients
    for (int k = 0; k < 300; k++) begin
      longint x, d;
      @(negedge clk);
      check_out(expq.pop_front(), "burst");
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (longint'(dut.w[i]) != snap[i]) coef_mismatch++;
      end
      foreach (snap[i]) snap[i] = model.w[i];
      x = ($urandom_range(1) != 0) ? 32767 : -32768;
      d = ($urandom_range(1) != 0) ? 32767 : -32768;
      x_in = sample_t'(x);
      d_in = sample_t'(d);
      expq.push_back(model.step(x, d));
    end
    checks++;
    if (model.saturations == 0) begin
      failures++;
      $display("burst caused no saturation");
    end
    // reset clears taps and coefficients
    @(negedge clk);
    rst = 1; x_in = '0; d_in = '0;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (dut.w[i] != 0) failures++;
    end
    checks++;
    if (e_out != 0) failures++;
    failures += coef_mismatch;
    if (coef_mismatch != 0) $display("%0d coefficient mismatches", coef_mismatch);
    $display("updates=%0d saturating samples=%0d", model.updates, model.saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
