// analog_mux: behavioural model of the 16:1 analog input multiplexer
// (not synthesizable).
//
// Thick-oxide NMOS switches connect one electrode at a time to the shared
// amplifier input; the digital controller's channel count drives sel. The
// model is an ideal switch: the about 320 ohm on-resistance, its 0.3 uVrms
// noise and the charge injection, which the document finds insignificant,
// are left out.
module analog_mux
  import hdnp_pkg::*;
#(
  parameter int unsigned N = N_CH
) (
  input  real                   vin [N],
  input  logic [$clog2(N)-1:0]  sel,
  output real                   vout
);
  assign vout = vin[sel];
endmodule
