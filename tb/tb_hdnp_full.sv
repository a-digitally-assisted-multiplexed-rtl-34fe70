// tb_hdnp_full: the neural pixel at its default parameters through one
// complete operation: start-up in saturation, lock of the offset-cancellation
// loop on 16 electrodes with random +/-50 mV offsets and a 1 mV, 200 Hz
// neural-band signal, then 10 s (3.2 million samples) of a settled weight
// until the controller switches the update multiplier M1 off.
// On top of the static offsets every electrode drifts by 10 mV at 0.1 Hz
// (one whole period within the run), the offset-tracking test signal at its
// real rate; the residual must stay small throughout.
// About 105 million clocks.
`timescale 1ns/1ps
module tb_hdnp_full;
  import hdnp_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin [N_CH];
  real  off [N_CH];
  logic [2:0] amp_gain_code = 3'd2, amp_bw_code = 3'd2;
  logic [3:0] m1_range = 4'd2;
  logic lms_restart = 1'b0;
  logic ap_valid; ch_t ap_ch; adc_t ap_code;
  u_t lfp;
  int lfp_min [N_CH], lfp_max [N_CH];
  ch_t mux_sel; w_t weight; logic m1_en, u_sat, d_sat, adc_full_scale;
  dac_t dac_code; y_t dac_word;

  hdnp_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0, samples = 0, m1_off_at = -1, last_restart = 0;
  int n_full = 0, n_peak = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < int'(N_CH); c++)
      vin[c] = off[c] + 1.0e-3 * $sin(2.0 * PI * 200.0 * real'(cyc) / 10.24e6 + real'(c) * 0.4)
             + 10.0e-3 * $sin(2.0 * PI * 0.1 * real'(cyc) / 10.24e6 + real'(c) * 0.4);
    if (rst_n && ap_valid) begin
      samples <= samples + 1;
      if (adc_full_scale) n_full++;
      // after lock, the residual must stay far from full scale
      if (samples > 16 * 1000 && (ap_code > 60 || ap_code < -60)) n_peak++;
      // the drift is tracked: lfp (offset + LFP) sweeps with it
      if (samples > 16 * 1000) begin
        if (int'(lfp) < lfp_min[ap_ch]) lfp_min[ap_ch] <= int'(lfp);
        if (int'(lfp) > lfp_max[ap_ch]) lfp_max[ap_ch] <= int'(lfp);
      end
    end
    if (rst_n && !m1_en && m1_off_at < 0) m1_off_at <= samples;
  end

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < int'(N_CH); c++) begin
      off[c] = (real'($urandom_range(0, 10000)) / 10000.0 - 0.5) * 0.1;
      vin[c] = off[c];
      lfp_min[c] = 32767; lfp_max[c] = -32768;
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (m1_off_at >= 0);
    repeat (100) @(posedge clk);
    $display("M1 off after %0d samples (%f s), weight %f, full-scale samples %0d, large residuals after lock %0d",
             m1_off_at, real'(m1_off_at) / 320.0e3, real'(weight) / 2.0**W_FRAC, n_full, n_peak);
    check(n_full > 0, "loop started saturated");
    check(n_peak == 0, "no large residual after lock");
    check(m1_off_at >= 3_200_000, "M1 stays on for at least 10 s of samples");
    check(m1_off_at < 3_200_000 + 16 * 2000, "M1 off soon after the weight settles");
    // 20 mV peak to peak of drift is 0.786 * 20 mV / 4.247 uV = 3700 word
    // units at lfp, plus the 200 Hz signal passed to the LFP output
    for (int c = 0; c < int'(N_CH); c++)
      check(lfp_max[c] - lfp_min[c] > 3300 && lfp_max[c] - lfp_min[c] < 4600,
            $sformatf("lfp of channel %0d follows the 0.1 Hz drift (swing %0d)", c, lfp_max[c] - lfp_min[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
