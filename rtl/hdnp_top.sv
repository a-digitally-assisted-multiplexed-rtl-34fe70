// hdnp_top: one high-density neural pixel, 16 electrodes sharing one
// amplifier, ADC and DAC, with digital electrode-offset cancellation.
//
// Electrode voltages (real, volts, each with its own slowly varying offset of
// up to about +/-50 mV) enter the 16:1 analog MUX. The amplifier sees the
// selected electrode minus the CDAC's cancellation voltage for that channel;
// the SAR ADC digitises its output once per 32-clock slot; the DSP low-pass
// filters each channel, runs the LMS interference canceller and sends the
// next cancellation word through the delta-sigma modulator and the segment
// decoder to the CDAC. Once the loop has locked, ap_code carries the neural
// signal of channel ap_ch with the offset removed, and lfp its low band
// (electrode offset plus LFP, in cancellation-word units of about 4.24 uV).
//
// Clock: clk at 10.24 MHz; one ADC sample per 32 clocks (320 kHz), each
// channel every 16 samples (20 kHz). The analog parts are behavioural
// models with real-valued nets, so this top level is for simulation; the
// digital part alone (dsp_module, dac_decoder, sar_logic) is synthesizable.
module hdnp_top
  import hdnp_pkg::*;
#(
  parameter int unsigned HOLD_SAMPLES = 3_200_000,
  parameter real         VOS          = 0.0    // amplifier input offset, volts
) (
  input  logic        clk,
  input  logic        rst_n,
  input  real         vin [N_CH],   // electrode voltages against V_ref
  input  logic [2:0]  amp_gain_code,
  input  logic [2:0]  amp_bw_code,
  input  logic [3:0]  m1_range,
  input  logic        lms_restart,
  output logic        ap_valid,
  output ch_t         ap_ch,
  output adc_t        ap_code,
  output u_t          lfp,
  output ch_t         mux_sel,
  output w_t          weight,
  output logic        m1_en,
  output logic        u_sat,
  output logic        d_sat,
  output logic        adc_full_scale,
  output dac_t        dac_code,
  output y_t          dac_word
);
  real         vmux, vcancel, vamp;
  logic        adc_sample, adc_valid;
  adc_t        adc_code;
  logic [4:0]  bn_bin, bb_bin;
  logic [30:0] bn_therm, bb_therm;

  analog_mux u_mux (.vin, .sel(mux_sel), .vout(vmux));

  neural_amp #(.VOS(VOS)) u_amp (
    .clk, .rst_n, .vin(vmux), .vcancel, .gain_code(amp_gain_code), .bw_code(amp_bw_code), .vout(vamp)
  );

  sar_adc u_adc (
    .clk, .rst_n, .vin(vamp), .sample(adc_sample), .code(adc_code), .valid(adc_valid),
    .full_scale(adc_full_scale)
  );

  dsp_module #(.HOLD_SAMPLES(HOLD_SAMPLES)) u_dsp (
    .clk, .rst_n, .mux_sel, .adc_sample, .adc_code, .adc_valid, .adc_full_scale,
    .dac_code, .m1_range, .lms_restart, .ap_valid, .ap_ch, .ap_code, .lfp,
    .weight, .m1_en, .u_sat, .d_sat, .dac_word
  );

  dac_decoder u_dec (.code(dac_code), .bn_bin, .bb_bin, .bn_therm, .bb_therm);

  cdac u_cdac (.bn_bin, .bb_bin, .bn_therm, .bb_therm, .vcancel);

endmodule
