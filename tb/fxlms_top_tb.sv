// End-to-end testbench of the FXLMS datapath at its default parameters.
//
// Stimulus: din1 is a broadband reference noise; din2 is a tone plus that
// noise passed through an unknown 3-tap primary path, the situation of a
// sensor picking up noise correlated with the reference. A bit-exact
// reference model of the six blocks and the alignment delays predicts
// final_out for every sample, checked exactly 8 clocks after the sample
// enters (the stated latency) at one sample per clock.
//
// Phases: impulse after reset (first response exactly 8 clocks later and
// nothing before), 4000 samples of the noise scenario (4 s of a 1 ksample/s
// stream), a full-scale burst, and a reset in the middle of the stream.
// In the noise scenario the first filter must learn the primary path: the
// noise left in its error (its error minus the tone) must fall by 10x.
// Mechanisms counted, each of which must occur: coefficient adaptation in
// each of the three LMS filters, saturation of an LMS filter, of SUB and of
// MUL, and the reset clearing the pipeline.
module fxlms_top_tb;
  import fxlms_pkg::*;
  import fxlms_ref_pkg::*;

  localparam int LAT = 8;

  logic    clk = 0;
  logic    rst = 1;
  sample_t din1 = '0, din2 = '0;
  sample_t final_out;

  int checks = 0, failures = 0;
  int sub_sat = 0, mul_sat = 0;
  longint last_e1;               // error of LMS 1 for the newest sample
  real    resid_early = 0, resid_late = 0;

  fxlms_top dut (.clk, .rst, .din1, .din2, .final_out);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lms_ref  m_lms1, m_lms2, m_lms3;
  fir_ref  m_sec;
  longint  expq[$];
  longint  prim[3] = '{13107, -6554, 3277};  // primary path 0.4, -0.2, 0.1
  longint  xh[3];

  function automatic void model_reset();
    m_lms1 = new(8, 24, 22, 4);
    m_lms2 = new(8, 24, 22, 4);
    m_lms3 = new(8, 24, 22, 4);
    m_sec  = new('{0, 16384, 8192, 4096});
    expq   = {};
    foreach (xh[i]) xh[i] = 0;
  endfunction

  // One input sample through the whole model; returns final_out.
  function automatic longint model_step(longint x1, longint x2);
    longint e1, s, err, e2, p, diff;
    e1   = m_lms1.step(x1, x2);
    last_e1 = e1;
    s    = m_sec.step(e1);
    diff = x1 - s;
    err  = ref_sub(x1, s);
    if (err != diff) sub_sat++;
    e2   = m_lms2.step(x2, x1);
    p    = ref_mul(err, e2);
    if (p != floor_div_pow2(err * e2, 15)) mul_sat++;
    return m_lms3.step(p, x1);
  endfunction

  task automatic sample(input longint x1, input longint x2);
    longint e;
    @(negedge clk);
    if (expq.size() == LAT) begin
      e = expq.pop_front();
      checks++;
      if (longint'(final_out) != e) begin
        failures++;
        if (failures < 10) $display("final_out=%0d expected %0d at %0t", final_out, e, $time);
      end
    end
    din1 = sample_t'(x1);
    din2 = sample_t'(x2);
    expq.push_back(model_step(x1, x2));
  endtask

  task automatic noise_scenario(input int n);
    longint x, acc, tone;
    for (int k = 0; k < n; k++) begin
      x = longint'($urandom_range(12000)) - 6000;
      xh[2] = xh[1]; xh[1] = xh[0]; xh[0] = x;
      acc = 0;
      foreach (prim[i]) acc += prim[i] * xh[i];
      tone = longint'($rtoi(4000.0 * $sin(6.283185307 * 50.0 * real'(k) / 1000.0)));
      sample(x, floor_div_pow2(acc, 15) + tone);
      // LMS 1 must learn the primary path and leave only the tone
      if (k < 200)     resid_early += real'(last_e1 - tone) ** 2;
      if (k >= n - 200) resid_late  += real'(last_e1 - tone) ** 2;
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1; din1 = '0; din2 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    model_reset();
  endtask

  initial begin
    automatic int upd1, upd2, upd3, lms_sat, first_nz, resets = 0;
    model_reset();
    repeat (3) @(negedge clk);
    rst = 0;

    // impulse: first non-zero output exactly LAT clocks after the input
    first_nz = -1;
    din1 = 16'sd10000; din2 = '0;
    for (int k = 1; k <= 12; k++) begin
      @(negedge clk);
      din1 = '0;
      if (final_out != 0 && first_nz < 0) first_nz = k;
    end
    checks++;
    if (first_nz != LAT) begin
      failures++;
      $display("impulse reached final_out after %0d clocks, expected %0d", first_nz, LAT);
    end
    do_reset(); resets++;

    noise_scenario(4000);
    checks++;
    if (!(resid_late * 10.0 < resid_early)) begin
      failures++;
      $display("LMS 1 did not cancel the noise: %f -> %f", resid_early, resid_late);
    end
    $display("LMS 1 residual noise energy: first 200 samples %0.3e, last 200 %0.3e",
             resid_early, resid_late);
    upd1 = m_lms1.updates; upd2 = m_lms2.updates; upd3 = m_lms3.updates;
    lms_sat = m_lms1.saturations + m_lms2.saturations + m_lms3.saturations;

    // full-scale burst
    for (int k = 0; k < 300; k++)
      sample(($urandom_range(1) != 0) ? 32767 : -32768, ($urandom_range(1) != 0) ? 32767 : -32768);
    lms_sat = m_lms1.saturations + m_lms2.saturations + m_lms3.saturations;

    // reset in the middle of the stream: pipeline and coefficients cleared
    do_reset(); resets++;
    checks++;
    if (final_out != 0 || dut.u_lms3.w[0] != 0 || dut.u_lms1.w[0] != 0) begin
      failures++;
      $display("reset did not clear the design");
    end
    noise_scenario(500);
    upd1 += m_lms1.updates; upd2 += m_lms2.updates; upd3 += m_lms3.updates;
    repeat (LAT) sample(0, 0);

    $display("adaptations: lms1=%0d lms2=%0d lms3=%0d", upd1, upd2, upd3);
    $display("saturations: lms=%0d sub=%0d mul=%0d; resets=%0d", lms_sat, sub_sat, mul_sat, resets);
    checks++;
    if (upd1 == 0 || upd2 == 0 || upd3 == 0) begin
      failures++;
      $display("an LMS filter never adapted");
    end
    checks++;
    if (lms_sat == 0) begin failures++; $display("no LMS saturation"); end
    checks++;
    if (sub_sat == 0) begin failures++; $display("no SUB saturation"); end
    checks++;
    if (mul_sat == 0) begin failures++; $display("no MUL saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
