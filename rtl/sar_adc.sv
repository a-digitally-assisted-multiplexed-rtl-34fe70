// sar_adc: behavioural model of the 10-bit SAR ADC (not synthesizable).
//
// Models the sampling switch, comparator and charge-redistribution DAC of
// the converter around the synthesizable sar_logic. On a clock with sample
// high the differential input (volts, real) is held; the comparator compares
// the held value with the level of the current trial code, ideal and
// noiseless, with a full scale of +/-VFS (1.2 V supply, so +/-0.6 V by
// default). The result is given as a signed code (offset binary with the MSB
// inverted) with a valid pulse 10 clocks after sample. full_scale flags the
// two end codes. The 10-bit resolution follows the document; the full scale,
// the ideal comparator and the clocked conversion are this model's.
module sar_adc
  import hdnp_pkg::*;
#(
  parameter real VFS = 0.6
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  input  logic sample,
  output adc_t code,
  output logic valid,
  output logic full_scale
);
  real               vheld;
  real               vtrial;
  logic              cmp;
  logic [ADC_W-1:0]  trial, code_ob;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      vheld <= 0.0;
    else if (sample) vheld <= vin;
  end

  // level of a trial code: code c covers [(c - 512) * LSB, (c - 511) * LSB)
  assign vtrial = (real'(trial) - real'(2**(ADC_W-1))) * (2.0 * VFS / real'(2**ADC_W));
  assign cmp    = (vheld >= vtrial);

  sar_logic #(.BITS(ADC_W)) u_sar (
    .clk, .rst_n, .start(sample), .cmp, .trial, .code(code_ob), .busy(), .done(valid)
  );

  assign code       = {~code_ob[ADC_W-1], code_ob[ADC_W-2:0]};
  assign full_scale = (&code_ob) || (~|code_ob);

endmodule
