// hdnp_pkg: sizes and helper functions shared by the neural-pixel DSP.
//
// One high-density neural pixel (HDNP) records 16 electrodes through one
// time-multiplexed amplifier and 10-bit ADC. The DSP runs from a 10.24 MHz
// clock; each channel slot lasts OSR = 32 clocks, so the ADC samples at
// 320 kHz and every channel at 20 kHz. The channel count, converter widths,
// oversampling ratio, clock rate and the LMS step size 2^-34 follow the
// document; the saturation widths, the weight format and the ADC-to-DAC
// scaling are this design's own choices.
package hdnp_pkg;

  localparam int unsigned N_CH      = 16;  // channels per pixel
  localparam int unsigned CH_W      = 4;   // channel index width
  localparam int unsigned ADC_W     = 10;  // SAR ADC resolution
  localparam int unsigned DAC_W     = 10;  // CDAC resolution
  localparam int unsigned Y_W       = 15;  // cancellation word (DAC ENOB before noise shaping)
  localparam int unsigned OSR       = 32;  // delta-sigma oversampling ratio = clocks per slot
  localparam int unsigned U_W       = 15;  // "N-bit" saturation of the LMS reference u[n]
  localparam int unsigned D_W       = 15;  // "M-bit" saturation of the LMS desired signal d[n]
  localparam int unsigned W_FRAC    = 34;  // weight fraction bits: mu = 2^-34 becomes exact
  localparam int unsigned W_INT     = 2;   // weight integer bits (plus sign)
  localparam int unsigned W_W       = 1 + W_INT + W_FRAC;
  localparam int unsigned ADC_SHIFT = 1;   // ADC code to cancellation-word scaling (x2)
  localparam int unsigned LPF_K     = 4;   // integrator leak: pole at 1 - 2^-4 per channel sample

  typedef logic [CH_W-1:0]          ch_t;
  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [DAC_W-1:0]  dac_t;
  typedef logic signed [Y_W-1:0]    y_t;
  typedef logic signed [U_W-1:0]    u_t;
  typedef logic signed [D_W-1:0]    d_t;
  typedef logic signed [W_W-1:0]    w_t;

endpackage
