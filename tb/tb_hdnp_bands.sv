// tb_hdnp_bands: closed-loop band split of the pixel.
// The amplifier has a 4.5 mV input offset (the worst case quoted for the
// amplifier). Electrodes 0 and 15 sit at the +/-65 mV margin of electrode
// offset; the others carry random offsets of up to +/-50 mV. Channels 0-7 add
// a 0.5 mV sine at 2 kHz (spike band), channels 8-15 a 0.5 mV sine at 50 Hz
// (LFP band). After lock, the amplitude of each channel's tone is measured
// by I/Q correlation over 0.1 s on both outputs:
//   ap_code: the 2 kHz tone must pass with close to the open-loop gain
//            (0.5 mV * 0.786 * 98.4 / 1.17 mV = 33 codes), the 50 Hz tone
//            must be suppressed (the loop cancels it at the amplifier input);
//   lfp:     the 50 Hz tone must appear at its full size in cancellation-word
//            units (0.5 mV * 0.786 / 4.247 uV = 92.5), the 2 kHz tone must not.
`timescale 1ns/1ps
module tb_hdnp_bands;
  import hdnp_pkg::*;
  localparam int unsigned HOLD = 3_200_000;
  localparam real PI = 3.14159265358979;
  localparam real F_AP = 2000.0, F_LFP = 50.0, AMP = 0.5e-3;
  localparam real EXP_AP  = AMP * 0.786 * (10.0 ** ((35.0 + 2.0 * 17.0 / 7.0) / 20.0)) / (1.2 / 1024.0);
  localparam real EXP_LFP = AMP * 0.786 / (0.11598 * 0.6 / 16384.0);

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin [N_CH];
  real  off [N_CH];
  logic [2:0] amp_gain_code = 3'd2, amp_bw_code = 3'd2;
  logic [3:0] m1_range = 4'd2;
  logic lms_restart = 1'b0;
  logic ap_valid; ch_t ap_ch; adc_t ap_code;
  u_t lfp;
  ch_t mux_sel; w_t weight; logic m1_en, u_sat, d_sat, adc_full_scale;
  dac_t dac_code; y_t dac_word;

  hdnp_top #(.HOLD_SAMPLES(HOLD), .VOS(4.5e-3)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  function automatic real freq(input int c);
    return c < 8 ? F_AP : F_LFP;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < int'(N_CH); c++)
      vin[c] = off[c] + AMP * $sin(2.0 * PI * freq(c) * real'(cyc) / 10.24e6 + real'(c));
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ia [N_CH], qa [N_CH], il [N_CH], ql [N_CH], ml [N_CH];
    real ph, a_ap, a_lfp;
    int n [N_CH];
    int got, n_sat;
    for (int c = 0; c < int'(N_CH); c++) begin
      off[c] = (real'($urandom_range(0, 10000)) / 10000.0 - 0.5) * 0.1;
      if (c == 0)  off[c] = 0.065;
      if (c == 15) off[c] = -0.065;
      ia[c] = 0.0; qa[c] = 0.0; il[c] = 0.0; ql[c] = 0.0; ml[c] = 0.0; n[c] = 0;
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    got = 0;
    while (got < 16 * 1000) begin @(posedge clk); if (ap_valid) got++; end
    // 0.1 s: 2000 samples per channel, 5 periods of 50 Hz, 200 of 2 kHz
    got = 0; n_sat = 0;
    while (got < 16 * 2000) begin
      @(posedge clk);
      if (u_sat || d_sat || adc_full_scale) n_sat++;
      if (ap_valid) begin
        got++;
        ph = 2.0 * PI * freq(int'(ap_ch)) * real'(cyc) / 10.24e6;
        ia[ap_ch] += real'(ap_code) * $cos(ph); qa[ap_ch] += real'(ap_code) * $sin(ph);
        il[ap_ch] += real'(lfp) * $cos(ph);     ql[ap_ch] += real'(lfp) * $sin(ph);
        n[ap_ch]++;
      end
    end
    for (int c = 0; c < int'(N_CH); c++) begin
      a_ap  = 2.0 / real'(n[c]) * $sqrt(ia[c] * ia[c] + qa[c] * qa[c]);
      a_lfp = 2.0 / real'(n[c]) * $sqrt(il[c] * il[c] + ql[c] * ql[c]);
      $display("ch %0d %s tone: ap %0.1f codes (open loop %0.1f), lfp %0.1f units (full %0.1f)",
               c, c < 8 ? "2 kHz" : "50 Hz", a_ap, EXP_AP, a_lfp, EXP_LFP);
      if (c < 8) begin
        check(a_ap > 0.7 * EXP_AP && a_ap < 1.2 * EXP_AP, "spike-band tone passes to ap_code");
        check(a_lfp < 0.3 * EXP_LFP, "spike-band tone kept out of lfp");
      end else begin
        check(a_ap < 0.3 * EXP_AP, "LFP tone removed from ap_code");
        check(a_lfp > 0.8 * EXP_LFP && a_lfp < 1.2 * EXP_LFP, "LFP tone appears at lfp");
      end
    end
    // the loop must hold the +/-65 mV electrodes plus the amplifier offset
    // without any saturation once it has locked
    check(n_sat == 0, "no saturation with offsets at the margin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
