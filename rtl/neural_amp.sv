// neural_amp: behavioural model of the ac-coupled open-loop neural amplifier
// (not synthesizable).
//
// The selected electrode reaches the amplifier through 2 pF ac-coupling
// capacitors, attenuated by C_ac / (C_ac + C_INP + C_DAC) = 0.786; the CDAC
// cancellation voltage (already input-referred) is subtracted at the same
// node, and the amplifier's own input offset VOS is added. The two-stage
// amplifier is modelled as a single pole with gain and bandwidth set by the
// 3-bit resistor and Miller-capacitor banks: gain 35..52 dB and bandwidth
// 210..830 kHz, each linear in its code. The pole is stepped once per system
// clock (FCLK), and the output clips at +/-VSAT. The pseudo-resistor bias
// makes the ac coupling's high-pass corner far below the 320 kHz multiplexing
// rate, so the model treats the coupling as dc for the multiplexed signal.
// Gain and bandwidth ranges, capacitors and input offset bound follow the
// document; the single-pole model and the linear code maps are this model's.
module neural_amp #(
  parameter real FCLK  = 10.24e6,
  parameter real C_AC  = 2.0e-12,
  parameter real C_INP = 0.25e-12,
  parameter real C_DAC = 36.0 * 8.2e-15,
  parameter real VOS   = 0.0,
  parameter real VSAT  = 0.6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  real        vin,        // multiplexed electrode voltage
  input  real        vcancel,    // CDAC cancellation, input-referred
  input  logic [2:0] gain_code,
  input  logic [2:0] bw_code,
  output real        vout
);
  localparam real GAMMA_N = C_AC / (C_AC + C_INP + C_DAC);
  localparam real PI      = 3.14159265358979;

  real gain_db, gain, bw, alpha, vnode, vlin;
  real vstate;

  always_comb begin
    gain_db = 35.0 + real'(gain_code) * 17.0 / 7.0;
    gain    = 10.0 ** (gain_db / 20.0);
    bw      = 210.0e3 + real'(bw_code) * 620.0e3 / 7.0;
    alpha   = 1.0 - $exp(-2.0 * PI * bw / FCLK);
    vnode   = GAMMA_N * vin - vcancel + VOS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vstate <= 0.0;
    else        vstate <= vstate + alpha * (vnode - vstate);
  end

  always_comb begin
    vlin = gain * vstate;
    if (vlin > VSAT)       vout = VSAT;
    else if (vlin < -VSAT) vout = -VSAT;
    else                   vout = vlin;
  end

endmodule
