// digital_controller: slot timing, channel selection and multiplier power gating.
//
// The pixel time-shares one amplifier and ADC among N_CH electrodes. Every
// slot lasts OSR clocks (32 clocks of 10.24 MHz = one 320 kHz ADC sample).
// The controller counts clock phases inside a slot and the channel of the
// slot; the channel drives the analog MUX select, and the DSP's DEMUX/MUX use
// the channel tag that travels with each ADC sample.
//
//   slot_start  one clock at phase 0; the DSP loads the next DAC word.
//   adc_sample  one clock at phase OSR-1: the ADC takes the settled
//               amplifier output of the current channel; its conversion
//               finishes in the next slot, which is the one-sample ADC delay.
//
// Power gating: the controller samples the LMS weight once per ADC sample.
// While the weight, counted in digits of 2^-(W_FRAC-DIGIT_SHIFT), stays
// within +/-m1_range digits of a reference for HOLD_SAMPLES consecutive
// samples (10 s at 320 kHz by default), m1_en falls and the LMS update
// multiplier M1 stops. The document gives the +/-2-digit programmable
// range and the 10 s; the digit size and the wake-up rule are this design's:
// M1 is switched on again by lms_restart or by a full-scale ADC code, which
// means that the offset is no longer cancelled.
module digital_controller
  import hdnp_pkg::*;
#(
  parameter int unsigned OSR_P        = OSR,
  parameter int unsigned N_CH_P       = N_CH,
  parameter int unsigned HOLD_SAMPLES = 3_200_000,
  parameter int unsigned DIGIT_SHIFT  = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  // slot timing
  output ch_t                 ch,          // channel selected by the analog MUX
  output logic [$clog2(OSR_P)-1:0] phase,
  output logic                slot_start,
  output logic                adc_sample,
  // M1 gating
  input  logic                sample_valid, // one clock per processed ADC sample
  input  w_t                  weight,
  input  logic                adc_full_scale,
  input  logic [3:0]          m1_range,
  input  logic                lms_restart,
  output logic                m1_en
);
  localparam int unsigned CNT_W = $clog2(HOLD_SAMPLES + 1);
  localparam int unsigned DG_W  = W_W - DIGIT_SHIFT;

  typedef logic signed [DG_W-1:0] digit_t;

  // ---------------- slot timing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      ch    <= '0;
    end else if (phase == $clog2(OSR_P)'(OSR_P - 1)) begin
      phase <= '0;
      ch    <= (ch == ch_t'(N_CH_P - 1)) ? '0 : ch + 1'b1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  assign slot_start = (phase == '0);
  assign adc_sample = (phase == $clog2(OSR_P)'(OSR_P - 1));

  // ---------------- M1 gating ----------------
  digit_t             digits, ref_digits;
  logic signed [DG_W:0] diff;
  logic [CNT_W-1:0]   hold_cnt;
  logic               in_range;

  assign digits   = digit_t'(weight >>> DIGIT_SHIFT);
  assign diff     = {digits[DG_W-1], digits} - {ref_digits[DG_W-1], ref_digits};
  assign in_range = (diff <= $signed({1'b0, {(DG_W-4){1'b0}}, m1_range})) &&
                    (diff >= -$signed({1'b0, {(DG_W-4){1'b0}}, m1_range}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_en      <= 1'b1;
      ref_digits <= '0;
      hold_cnt   <= '0;
    end else if (m1_en) begin
      if (sample_valid) begin
        if (!in_range) begin
          ref_digits <= digits;
          hold_cnt   <= '0;
        end else if (hold_cnt == CNT_W'(HOLD_SAMPLES - 1)) begin
          m1_en    <= 1'b0;
          hold_cnt <= '0;
        end else begin
          hold_cnt <= hold_cnt + 1'b1;
        end
      end
    end else if (lms_restart || (sample_valid && adc_full_scale)) begin
      m1_en      <= 1'b1;
      ref_digits <= digits;
      hold_cnt   <= '0;
    end
  end

endmodule
