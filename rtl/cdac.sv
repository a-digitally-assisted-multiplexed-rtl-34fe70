// cdac: behavioural model of the 10-bit cancellation CDAC (not synthesizable).
//
// The array has 36 differential blocks: five binary LSB blocks B0..B4 and
// 31 identical thermometer blocks for the five MSBs. Every block is a pair of
// metal capacitors C_alpha and C_beta with C_alpha + C_beta = 8.2 fF, whose
// bottom plates are driven by the complementary bits BN and BB. Flipping a
// block therefore moves the differential charge by twice C_beta - C_alpha,
// so that difference is the block's weight: 0.2 fF for B0 (4 / 4.2 fF),
// 0.4 fF for B1 (3.9 / 4.3 fF) and 6.4 fF = 32 units for each MSB block
// (0.9 / 7.3 fF). B2..B4 follow the binary progression with the same
// 8.2 fF sum. With every block driven one way or the other the output has
// 1024 odd-symmetric levels:
//
//   vcancel = GAMMA * VDD/2 * sum_b s_b * (C_beta_b - C_alpha_b) / D_FS
//   s_b = +1 when BN_b = 1, -1 otherwise,   D_FS = 1023 * 0.2 fF
//
// GAMMA = C_DAC / (C_ac + C_INP + C_DAC) = 0.116 is the attenuation of the
// DAC swing at the amplifier's input node (C_DAC = 36 x 8.2 fF, 2 pF
// ac-coupling, 0.25 pF input capacitance), so full scale is about
// +/-69.5 mV referred to the amplifier input; vcancel is that voltage.
// The capacitor values, GAMMA and the swing follow the document; the values
// of B2..B4 and the odd-symmetric level set are this model's. Changing one
// entry of C_ALPHA / C_BETA models a mismatched block.
module cdac #(
  parameter real C_UNIT = 8.2e-15,
  parameter real N_UNIT = 36.0,
  parameter real C_INP  = 0.25e-12,
  parameter real C_AC   = 2.0e-12,
  parameter real VDD    = 1.2,
  // blocks B0..B4 and the thermometer block (index 5)
  parameter real C_ALPHA [6] = '{4.0e-15, 3.9e-15, 3.7e-15, 3.3e-15, 2.5e-15, 0.9e-15},
  parameter real C_BETA  [6] = '{4.2e-15, 4.3e-15, 4.5e-15, 4.9e-15, 5.7e-15, 7.3e-15}
) (
  input  logic [4:0]  bn_bin,
  input  logic [4:0]  bb_bin,
  input  logic [30:0] bn_therm,
  input  logic [30:0] bb_therm,
  output real         vcancel
);
  localparam real C_DAC = C_UNIT * N_UNIT;
  localparam real GAMMA = C_DAC / (C_AC + C_INP + C_DAC);
  localparam real D_FS  = 1023.0 * 0.2e-15;

  real dq;
  always_comb begin
    dq = 0.0;
    for (int b = 0; b < 5; b++)
      dq += (bn_bin[b] ? 1.0 : -1.0) * (C_BETA[b] - C_ALPHA[b]);
    for (int i = 0; i < 31; i++)
      dq += (bn_therm[i] ? 1.0 : -1.0) * (C_BETA[5] - C_ALPHA[5]);
  end

  assign vcancel = GAMMA * (VDD / 2.0) * dq / D_FS;

  // the two bottom plates of every block are driven in opposition
  always_comb begin
    assert (bb_bin == ~bn_bin && bb_therm == ~bn_therm)
      else $error("cdac: bottom-plate controls not complementary");
  end

endmodule
