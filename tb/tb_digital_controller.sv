// tb_digital_controller: slot timing and M1 power gating of the controller.
// Checks the phase/channel count, the slot_start and adc_sample strobes, that
// m1_en falls exactly after HOLD in-range samples, that a weight move beyond
// the range restarts the count, and that a full-scale code or lms_restart
// switches M1 on again. HOLD is shortened to 20 samples.
`timescale 1ns/1ps
module tb_digital_controller;
  import hdnp_pkg::*;
  localparam int unsigned HOLD = 20;
  localparam int unsigned DS   = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  ch_t ch; logic [4:0] phase; logic slot_start, adc_sample;
  logic sample_valid = 1'b0; w_t weight = '0; logic adc_full_scale = 1'b0;
  logic [3:0] m1_range = 4'd2; logic lms_restart = 1'b0; logic m1_en;

  digital_controller #(.HOLD_SAMPLES(HOLD), .DIGIT_SHIFT(DS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one sample pulse, weight given in digits
  task automatic sample(input int digits);
    weight <= w_t'(longint'(digits) <<< DS);
    sample_valid <= 1'b1; @(posedge clk); sample_valid <= 1'b0; @(posedge clk);
  endtask

  initial begin
    int exp_phase, exp_ch, n;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // slot timing over 40 slots
    #1;
    check(phase == '0 && ch == '0, "phase and channel start at zero");
    exp_phase = 0; exp_ch = 0;
    for (int k = 0; k < 40 * 32; k++) begin
      #1;
      check(int'(phase) == exp_phase && int'(ch) == exp_ch, $sformatf("phase/channel count %0d/%0d exp %0d/%0d", phase, ch, exp_phase, exp_ch));
      check(slot_start == (exp_phase == 0), "slot_start at phase 0");
      check(adc_sample == (exp_phase == 31), "adc_sample at phase 31");
      @(posedge clk);
      if (exp_phase == 31) begin exp_phase = 0; exp_ch = (exp_ch + 1) % 16; end
      else exp_phase++;
    end
    // gating: the first sample sets the reference (digit 0 == reset value)
    check(m1_en, "M1 on after reset");
    n = 0;
    for (int k = 0; k < int'(HOLD) - 1; k++) begin sample((k % 5) - 2); n++; end
    check(m1_en, "M1 still on one sample before HOLD");
    sample(1);
    check(!m1_en, "M1 off after HOLD in-range samples");
    // stays off; a normal sample does not wake it
    sample(7);
    check(!m1_en, "M1 stays off");
    // full-scale code wakes it
    adc_full_scale <= 1'b1; sample(7); adc_full_scale <= 1'b0;
    check(m1_en, "full-scale code switches M1 on");
    // out-of-range moves restart the count: reference now 7
    for (int k = 0; k < int'(HOLD) - 5; k++) sample(7);
    sample(10);                         // 3 digits away: count restarts at 10
    for (int k = 0; k < int'(HOLD) - 2; k++) sample(10);
    check(m1_en, "count restarted after an out-of-range weight");
    sample(12);
    sample(12);
    check(!m1_en, "M1 off after HOLD samples around the new reference");
    // range 0: any move restarts
    @(posedge clk); lms_restart <= 1'b1; @(posedge clk); lms_restart <= 1'b0; @(posedge clk);
    check(m1_en, "lms_restart switches M1 on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
