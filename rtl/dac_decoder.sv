// dac_decoder: bottom-plate controls of the segmented 10-bit CDAC.
//
// The CDAC has five binary-weighted LSB capacitor blocks (B0..B4) and a
// thermometer-weighted MSB segment for the upper five bits (B5..B9). The
// signed DAC code is turned into offset binary (MSB inverted, so -512 maps to
// all zeros); its low five bits drive the binary blocks directly and its high
// five bits switch on as many of the 31 unit MSB blocks. Each block is driven
// differentially: bn is the control, bb its complement, on the two bottom
// plates. Purely combinational. The segmentation follows the document; the
// offset-binary coding and the 31-element thermometer (2^5 - 1 units of
// 32 LSB each) are this design's reading.
module dac_decoder
  import hdnp_pkg::*;
#(
  parameter int unsigned LSB_BITS = 5,
  parameter int unsigned MSB_BITS = 5
) (
  input  logic signed [LSB_BITS+MSB_BITS-1:0] code,
  output logic [LSB_BITS-1:0]                 bn_bin,
  output logic [LSB_BITS-1:0]                 bb_bin,
  output logic [2**MSB_BITS-2:0]              bn_therm,
  output logic [2**MSB_BITS-2:0]              bb_therm
);
  logic [LSB_BITS+MSB_BITS-1:0] ob;
  logic [MSB_BITS-1:0]          msb;

  assign ob  = {~code[LSB_BITS+MSB_BITS-1], code[LSB_BITS+MSB_BITS-2:0]};
  assign msb = ob[LSB_BITS+MSB_BITS-1:LSB_BITS];

  assign bn_bin = ob[LSB_BITS-1:0];
  assign bb_bin = ~bn_bin;

  always_comb begin
    for (int i = 0; i < 2**MSB_BITS - 1; i++)
      bn_therm[i] = (i < int'(msb));
  end
  assign bb_therm = ~bn_therm;

endmodule
