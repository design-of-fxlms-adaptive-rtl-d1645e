// Self-checking testbench of the saturating subtractor: corner values
// (both limits, zero, opposite signs) and random pairs, each compared with
// the reference one clock after it is applied; positive and negative
// saturation must both occur.
module sat_sub_tb;
  import fxlms_pkg::*;
  import fxlms_ref_pkg::*;

  logic    clk = 0;
  logic    rst = 1;
  sample_t a = '0, b = '0;
  sample_t y;
  int      checks = 0, failures = 0;
  int      pos_sat = 0, neg_sat = 0;

  sat_sub dut (.clk, .rst, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint va, input longint vb);
    longint e;
    @(negedge clk);
    a = sample_t'(va);
    b = sample_t'(vb);
    e = ref_sub(va, vb);
    if (va - vb > S_MAX) pos_sat++;
    if (va - vb < S_MIN) neg_sat++;
    @(negedge clk);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("%0d - %0d: y=%0d expected %0d", va, vb, y, e);
    end
  endtask

  longint corners[6] = '{-32768, -32767, -1, 0, 1, 32767};

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (y != 0) failures++;
    rst = 0;
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int k = 0; k < 2000; k++)
      apply(longint'($urandom_range(65535)) - 32768, longint'($urandom_range(65535)) - 32768);
    checks++;
    if (pos_sat == 0 || neg_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
