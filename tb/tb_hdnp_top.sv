// tb_hdnp_top: end-to-end test of the neural pixel's offset-cancellation loop.
//
// Sixteen electrodes carry random offsets of up to +/-50 mV plus a 1 mV,
// 200 Hz neural-band sine with a different phase per channel. The test checks:
//   * the loop starts saturated (full-scale ADC codes, saturated u and d),
//   * it locks: afterwards every channel's mean ADC code is near zero and its
//     peak stays far from full scale,
//   * one ADC sample every 32 clocks, channels in round-robin order,
//   * the delta-sigma modulator toggles the DAC code inside a slot,
//   * the weight settles and M1 is switched off after HOLD samples,
//   * an offset step on one channel drives the ADC to full scale, M1 is
//     switched on again, and the loop locks again,
//   * lms_restart switches M1 on,
//   * a 10 mV offset drift on every channel is tracked; the drift runs at
//     20 Hz instead of 0.1 Hz to fit the simulation time,
//   * an offset beyond the CDAC's reach pins the word and saturates d.
// HOLD_SAMPLES is shortened from 10 s to 3000 samples.
`timescale 1ns/1ps
module tb_hdnp_top;
  import hdnp_pkg::*;

  localparam int unsigned HOLD = 3000;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin [N_CH];
  real  off [N_CH];
  real  amp_sig;
  real  drift_amp = 0.0;
  logic [2:0] amp_gain_code = 3'd2, amp_bw_code = 3'd2;
  logic [3:0] m1_range = 4'd2;
  logic lms_restart = 1'b0;
  logic ap_valid; ch_t ap_ch; adc_t ap_code;
  u_t lfp;
  ch_t mux_sel; w_t weight; logic m1_en, u_sat, d_sat, adc_full_scale;
  dac_t dac_code; y_t dac_word;

  hdnp_top #(.HOLD_SAMPLES(HOLD)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_fullscale = 0, n_usat = 0, n_dsat = 0, n_m1_off = 0, n_m1_on = 0, n_dsm_toggle = 0;
  int n_samples = 0;
  longint last_valid_cyc = -1;
  ch_t    last_ch;
  logic   m1_prev = 1'b1;
  dac_t   dac_prev;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always #5 clk = ~clk;

  // electrode voltages: offset plus a 200 Hz sine (time in 10.24 MHz clocks)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < int'(N_CH); c++)
      vin[c] = off[c] + amp_sig * $sin(2.0 * PI * 200.0 * real'(cyc) / 10.24e6 + real'(c) * 0.4)
             + drift_amp * $sin(2.0 * PI * 20.0 * real'(cyc) / 10.24e6 + real'(c) * 1.1);
  end

  // event counters and protocol checks
  always @(posedge clk) if (rst_n) begin
    if (ap_valid) begin
      n_samples++;
      if (adc_full_scale) n_fullscale++;
      if (u_sat) n_usat++;
      if (d_sat) n_dsat++;
      if (last_valid_cyc >= 0) begin
        check(cyc - last_valid_cyc == 32, "one ADC sample per 32 clocks");
        check(ap_ch == ch_t'(last_ch + 1'b1), "channels in round-robin order");
      end
      last_valid_cyc = cyc;
      last_ch        = ap_ch;
    end
    if (m1_prev && !m1_en) n_m1_off++;
    if (!m1_prev && m1_en) n_m1_on++;
    m1_prev = m1_en;
    if (dut.u_dsp.u_ctrl.phase != '0 && dac_code != dac_prev) n_dsm_toggle++;
    dac_prev = dac_code;
  end

  // mean and peak |code| per channel over a window of rounds
  task automatic measure(input int rounds, output real worst_mean, output int worst_peak);
    real sum [N_CH];
    int  peak [N_CH];
    int  got;
    for (int c = 0; c < int'(N_CH); c++) begin sum[c] = 0.0; peak[c] = 0; end
    got = 0;
    while (got < rounds * int'(N_CH)) begin
      @(posedge clk);
      if (ap_valid) begin
        sum[ap_ch] += real'(ap_code);
        if ((ap_code < 0 ? -int'(ap_code) : int'(ap_code)) > peak[ap_ch])
          peak[ap_ch] = ap_code < 0 ? -int'(ap_code) : int'(ap_code);
        got++;
      end
    end
    worst_mean = 0.0; worst_peak = 0;
    for (int c = 0; c < int'(N_CH); c++) begin
      real m;
      m = sum[c] / rounds;
      if (m < 0.0) m = -m;
      if (m > worst_mean) worst_mean = m;
      if (peak[c] > worst_peak) worst_peak = peak[c];
    end
  endtask

  task automatic wait_samples(input int n);
    int got = 0;
    while (got < n) begin @(posedge clk); if (ap_valid) got++; end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wm; int wp; int fs_before;
    amp_sig = 1.0e-3;
    for (int c = 0; c < int'(N_CH); c++) begin
      off[c] = (real'($urandom_range(0, 10000)) / 10000.0 - 0.5) * 0.1;   // +/-50 mV
      vin[c] = off[c];
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // start-up: the loop begins saturated
    wait_samples(16 * 20);
    check(n_fullscale > 0, "ADC full scale at start-up");
    // lock
    wait_samples(16 * 600);
    measure(100, wm, wp);
    $display("locked: worst mean |code| %0.2f, worst peak %0d, weight %f", wm, wp,
             real'(weight) / 2.0**W_FRAC);
    check(wm < 12.0, "offset cancelled: channel means near zero");
    check(wp < 60, "no channel near full scale after lock");
    check(real'(weight) / 2.0**W_FRAC > 0.9 && real'(weight) / 2.0**W_FRAC < 1.1, "weight settles near one");

    // M1 gating: the weight must stay within +/-2 digits for HOLD samples
    begin
      int waited = 0;
      while (m1_en && waited < 40 * HOLD) begin @(posedge clk); if (ap_valid) waited++; end
    end
    check(!m1_en, "M1 switched off once the weight settled");
    measure(100, wm, wp);
    $display("M1 off: worst mean |code| %0.2f, worst peak %0d", wm, wp);
    check(wm < 12.0, "cancellation holds with M1 off");

    // offset step on channel 5: the ADC hits full scale, M1 wakes up
    fs_before = n_fullscale;
    off[5] = off[5] + 0.030;
    wait_samples(16 * 4);
    check(n_fullscale > fs_before, "offset step drives the ADC to full scale");
    check(m1_en, "full-scale code switches M1 on again");
    wait_samples(16 * 600);
    measure(100, wm, wp);
    $display("relocked: worst mean |code| %0.2f, worst peak %0d", wm, wp);
    check(wm < 12.0, "loop locks again after the step");

    // lms_restart
    begin
      int waited = 0;
      while (m1_en && waited < 40 * HOLD) begin @(posedge clk); if (ap_valid) waited++; end
    end
    @(posedge clk); lms_restart <= 1'b1; @(posedge clk); lms_restart <= 1'b0; @(posedge clk);
    check(m1_en, "lms_restart switches M1 on");

    // slow offset drift, 10 mV on every channel
    drift_amp = 10.0e-3;         // switching it on is a step of up to 10 mV
    wait_samples(16 * 600);
    measure(16 * 150, wm, wp);
    $display("drift: worst mean |code| %0.2f, worst peak %0d", wm, wp);
    check(wp < 60, "10 mV offset drift tracked without large residual");

    // an offset beyond the CDAC's reach (+/-88 mV before attenuation) on one
    // channel: the cancellation word pins at full scale and d saturates
    off[9] = 0.120;
    wait_samples(16 * 100);
    check(dac_word == y_t'(2**(Y_W-1) - 1) || n_dsat > 0, "out-of-range offset pins the DAC word");
    repeat (4) @(posedge clk);

    $display("events: samples %0d full-scale %0d u_sat %0d d_sat %0d m1_off %0d m1_on %0d dsm_toggles %0d",
             n_samples, n_fullscale, n_usat, n_dsat, n_m1_off, n_m1_on, n_dsm_toggle);
    check(n_usat > 0, "u saturation happened");
    check(n_dsat > 0, "d saturation happened");
    check(n_m1_off >= 2, "M1 gated off twice");
    check(n_m1_on >= 2, "M1 woken by full scale and by restart");
    check(n_dsm_toggle > 0, "delta-sigma modulator toggled the DAC code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
