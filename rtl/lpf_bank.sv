// lpf_bank: per-channel low-pass filters between the DSP's DEMUX and MUX.
//
// Each ADC sample arrives with the channel it belongs to. The DEMUX routes it
// to that channel's filter state and the MUX returns that channel's filtered
// value, so the 16 filters share one adder. The document calls the filter a
// delay-free digital integrator; this design makes it a leaky integrator
// (one-pole low-pass with unity dc gain):
//
//   acc[c] <= acc[c] + x - (acc[c] >>> K),   lfp = (acc[c] + x - (acc[c] >>> K)) >>> K
//
// acc holds the filtered value times 2^K. "Delay-free" is kept: lfp already
// includes the current input x, combinationally, in the same clock that
// valid is high; the state updates at that clock edge. The pole sits at
// 1 - 2^-K per channel sample (K = 4, about 200 Hz at 20 kHz per channel).
module lpf_bank
  import hdnp_pkg::*;
#(
  parameter int unsigned N_CH_P = N_CH,
  parameter int unsigned X_W    = ADC_W + ADC_SHIFT, // input width (scaled ADC code)
  parameter int unsigned K      = LPF_K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  ch_t                     ch,
  input  logic signed [X_W-1:0]   x,
  output logic signed [X_W-1:0]   lfp
);
  localparam int unsigned A_W = X_W + K + 1;
  typedef logic signed [A_W-1:0] acc_t;

  acc_t acc [N_CH_P];
  acc_t acc_sel, acc_nxt;

  assign acc_sel = acc[ch];                                   // MUX
  assign acc_nxt = acc_sel + A_W'(x) - (acc_sel >>> K);
  assign lfp     = X_W'(acc_nxt >>> K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_CH_P); i++) acc[i] <= '0;
    end else if (valid) begin
      acc[ch] <= acc_nxt;                                     // DEMUX
    end
  end

endmodule
