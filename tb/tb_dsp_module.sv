// tb_dsp_module: the DSP closed around a code-level model of the front end.
// The model keeps a fixed offset per channel, in cancellation-word units
// (up to +/-11000, about +/-47 mV), takes as the DAC level twice the sum of
// the last 16 DAC codes before the adc_sample strobe (the amplifier has
// settled to the second half of the slot), and returns
// floor(0.36 * (offset - level)), clipped to 10 bits, ten clocks later,
// like the real ADC. The test checks that ap_ch names the channel that was
// selected when the sample was taken, that the loop locks (each channel's
// DAC level ends within a few units of its offset and the ADC codes near
// zero), that the lfp output (offset plus LFP) equals the offset, and that
// M1 is switched off once the weight has settled.
`timescale 1ns/1ps
module tb_dsp_module;
  import hdnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ch_t mux_sel; logic adc_sample;
  adc_t adc_code = '0; logic adc_valid = 1'b0, adc_full_scale = 1'b0;
  dac_t dac_code;
  logic [3:0] m1_range = 4'd2; logic lms_restart = 1'b0;
  logic ap_valid; ch_t ap_ch; adc_t ap_code;
  u_t lfp;
  w_t weight; logic m1_en, u_sat, d_sat; y_t dac_word;

  dsp_module #(.HOLD_SAMPLES(500)) dut (.*);

  int checks = 0, failures = 0;
  int lfp_err = 0;
  int off [N_CH];
  int slot_sum, last_sum [N_CH];
  int last16 [$];
  int pend_code [$]; int pend_ch [$]; int pend_t [$];
  longint cyc = 0;
  int n_full = 0, n_m1off = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // front-end model
  always @(posedge clk) begin
    cyc++;
    adc_valid <= 1'b0;
    if (pend_t.size() > 0 && cyc == longint'(pend_t[0])) begin
      adc_code       <= adc_t'(pend_code[0]);
      adc_full_scale <= (pend_code[0] == 511 || pend_code[0] == -512);
      adc_valid      <= 1'b1;
      void'(pend_t.pop_front()); void'(pend_code.pop_front()); void'(pend_ch.pop_front());
    end
    if (rst_n) begin
      // the amplifier settles to the DAC codes of the second half of the slot
      last16.push_back(int'(dac_code));
      if (last16.size() > 16) void'(last16.pop_front());
      if (adc_sample) begin
        int c;
        slot_sum = 0;
        foreach (last16[i]) slot_sum += 2 * last16[i];
        c = int'($floor(0.36 * real'(off[mux_sel] - slot_sum)));
        if (c > 511) c = 511;
        if (c < -512) c = -512;
        last_sum[mux_sel] = slot_sum;
        pend_code.push_back(c); pend_ch.push_back(int'(mux_sel)); pend_t.push_back(int'(cyc) + 10);
      end
    end
  end

  // the channel tag of each result is the channel selected at its sampling
  int exp_ch [$];
  always @(posedge clk) if (rst_n) begin
    if (adc_sample) exp_ch.push_back(int'(mux_sel));
    if (ap_valid) begin
      check(exp_ch.size() > 0 && int'(ap_ch) == exp_ch[0], "ap_ch is the sampled channel");
      void'(exp_ch.pop_front());
      if (adc_full_scale) n_full++;
    end
    if (!m1_en) n_m1off++;
  end

  initial begin
    int worst_sum, worst_code, got;
    for (int c = 0; c < int'(N_CH); c++) off[c] = int'($urandom_range(0, 22000)) - 11000;
    slot_sum = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // lock
    got = 0;
    while (got < 16 * 800) begin @(posedge clk); if (ap_valid) got++; end
    worst_code = 0; got = 0;
    while (got < 16 * 50) begin
      @(posedge clk);
      if (ap_valid) begin
        got++;
        if ((int'(lfp) - off[ap_ch] < 0 ? off[ap_ch] - int'(lfp) : int'(lfp) - off[ap_ch]) > lfp_err)
          lfp_err = int'(lfp) - off[ap_ch] < 0 ? off[ap_ch] - int'(lfp) : int'(lfp) - off[ap_ch];
        if ((ap_code < 0 ? -int'(ap_code) : int'(ap_code)) > worst_code)
          worst_code = ap_code < 0 ? -int'(ap_code) : int'(ap_code);
      end
    end
    worst_sum = 0;
    for (int c = 0; c < int'(N_CH); c++)
      if ((off[c] - last_sum[c] < 0 ? last_sum[c] - off[c] : off[c] - last_sum[c]) > worst_sum)
        worst_sum = off[c] - last_sum[c] < 0 ? last_sum[c] - off[c] : off[c] - last_sum[c];
    $display("locked: worst |offset - DAC| %0d units, worst |code| %0d, weight %f",
             worst_sum, worst_code, real'(weight) / 2.0**W_FRAC);
    check(n_full > 0, "loop started in saturation");
    check(worst_sum <= 24, "every channel's offset cancelled by its DAC word");
    check(worst_code <= 10, "ADC codes near zero after lock");
    check(lfp_err <= 16, $sformatf("lfp output equals the channel offset (worst error %0d)", lfp_err));
    check(n_m1off > 0, "M1 switched off after the weight settled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
