// dsp_module: the pixel's digital back end (synthesizable).
//
// Takes each 10-bit ADC sample, tags it with the channel it was taken from,
// and closes the offset-cancellation loop:
//   ADC sample -> x = code * 2^ADC_SHIFT -> lpf_bank (per-channel low-pass)
//             -> lms_filter (u, d, single weight) -> Z^-(N-1) -> dac_word
//             -> delta_sigma_mod (15 -> 10 bit, one code per clock) -> CDAC.
// The digital_controller times the slots, selects the analog MUX channel,
// and stops the LMS update when the weight has settled.
//
// Outputs: ap_* is the action-potential band, the ADC sample with its
// channel (offset and LFP removed by the loop; the ADC code is passed on
// unchanged). lfp is the same channel's low-pass band in cancellation-word
// units (about 4.24 uV at the amplifier input per LSB): the LMS reference
// u = low-pass of the residual + the word that was subtracted, i.e. the
// electrode offset plus the LFP signal. It is valid with ap_valid. Both
// leave at the 320 kHz sample rate, one channel at a time.
// Timing, per 32-clock slot: adc_sample at phase 31 of the slot; the ADC
// result returns during the next slot; the DSP processes it the clock
// adc_valid is high; the new cancellation word for that channel is used
// N-1 slots later, when the channel is selected again.
// The block split follows the document's DSP; the scaling between ADC code
// and cancellation word (x2) is this design's choice.
module dsp_module
  import hdnp_pkg::*;
#(
  parameter int unsigned HOLD_SAMPLES = 3_200_000,  // 10 s at 320 kHz
  parameter w_t          W_INIT = {1'b0, {(W_W-1){1'b1}}}
) (
  input  logic        clk,
  input  logic        rst_n,
  // analog front end
  output ch_t         mux_sel,
  output logic        adc_sample,
  input  adc_t        adc_code,
  input  logic        adc_valid,
  input  logic        adc_full_scale,
  output dac_t        dac_code,
  // configuration
  input  logic [3:0]  m1_range,
  input  logic        lms_restart,
  // recorded data
  output logic        ap_valid,
  output ch_t         ap_ch,
  output adc_t        ap_code,
  output u_t          lfp,
  // status
  output w_t          weight,
  output logic        m1_en,
  output logic        u_sat,
  output logic        d_sat,
  output y_t          dac_word
);
  localparam int unsigned X_W = ADC_W + ADC_SHIFT;

  logic                   slot_start;
  ch_t                    sample_ch;
  logic signed [X_W-1:0]  x, lpf_out;

  digital_controller #(.HOLD_SAMPLES(HOLD_SAMPLES)) u_ctrl (
    .clk, .rst_n, .ch(mux_sel), .phase(), .slot_start, .adc_sample,
    .sample_valid(adc_valid), .weight, .adc_full_scale, .m1_range, .lms_restart, .m1_en
  );

  // channel the ADC is converting: the one selected when it sampled
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sample_ch <= '0;
    else if (adc_sample) sample_ch <= mux_sel;
  end

  assign x = X_W'(adc_code) <<< ADC_SHIFT;

  lpf_bank u_lpf (
    .clk, .rst_n, .valid(adc_valid), .ch(sample_ch), .x, .lfp(lpf_out)
  );

  lms_filter #(.W_INIT(W_INIT)) u_lms (
    .clk, .rst_n, .valid(adc_valid), .x, .lfp(lpf_out), .slot_start, .m1_en,
    .dac_word, .y(), .w(weight), .u_ref(lfp), .u_sat, .d_sat
  );

  delta_sigma_mod u_dsm (
    .clk, .rst_n, .x(dac_word), .q(dac_code)
  );

  assign ap_valid = adc_valid;
  assign ap_ch    = sample_ch;
  assign ap_code  = adc_code;

endmodule
