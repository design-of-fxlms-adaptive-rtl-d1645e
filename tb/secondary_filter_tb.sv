// Self-checking testbench of the secondary-path FIR.
//
// An impulse must come out as the coefficient sequence, starting exactly 2
// clocks after it enters (the block's latency). Random samples, then a
// full-scale stream that saturates the output, are compared with the
// reference FIR sample by sample. The default response cannot overflow, so
// a second instance with a gain of almost 2 exercises the saturation.
module secondary_filter_tb;
  import fxlms_pkg::*;
  import fxlms_ref_pkg::*;

  localparam int LAT = 2;

  logic    clk = 0;
  logic    rst = 1;
  sample_t x_in = '0;
  sample_t y_out;
  int      checks = 0, failures = 0;
  int      sat_seen = 0;

  sample_t y_hot;

  secondary_filter dut (.clk, .rst, .x_in, .y_out);
  secondary_filter #(.COEFS('{16'sd32767, 16'sd32767, 16'sd0, 16'sd0})) dut_hot (
    .clk, .rst, .x_in, .y_out(y_hot)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fir_ref model, model_hot;
  longint expq[$], expq_hot[$];
  longint impulse_resp[8] = '{0, 0, 16383, 8191, 4095, 0, 0, 0};

  task automatic drive(input longint x);
    longint e;
    @(negedge clk);
    if (expq.size() == LAT) begin
      e = expq.pop_front();
      checks++;
      if (longint'(y_out) != e) begin
        failures++;
        if (failures < 10) $display("y_out=%0d expected %0d at %0t", y_out, e, $time);
      end
    end
    if (expq_hot.size() == LAT) begin
      e = expq_hot.pop_front();
      checks++;
      if (longint'(y_hot) != e) begin
        failures++;
        if (failures < 10) $display("y_hot=%0d expected %0d at %0t", y_hot, e, $time);
      end
    end
    x_in = sample_t'(x);
    expq.push_back(model.step(x));
    e = model_hot.step(x);
    if (e == S_MAX || e == S_MIN) sat_seen++;
    expq_hot.push_back(e);
  endtask

  initial begin
    model = new('{0, 16384, 8192, 4096});
    model_hot = new('{32767, 32767, 0, 0});
    repeat (3) @(negedge clk);
    rst = 0;
    // impulse of 0.99997: response is delay 1, then 0.5, 0.25, 0.125 (floored)
    x_in = 16'sd32767;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      x_in = '0;
      checks++;
      if (longint'(y_out) != impulse_resp[k]) begin
        failures++;
        $display("impulse: cycle %0d y_out=%0d expected %0d", k, y_out, impulse_resp[k]);
      end
    end
    // reference model history: the impulse has left the taps by now
    for (int k = 0; k < 2000; k++) drive(longint'($urandom_range(65535)) - 32768);
    for (int k = 0; k < 200; k++)  drive(($urandom_range(3) != 0) ? 32767 : -32768);
    $display("saturated samples: %0d", sat_seen);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("no saturation seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
