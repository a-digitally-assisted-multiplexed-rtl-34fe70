// delta_sigma_mod: second-order error-feedback noise shaper, Y_W to DAC_W bits.
//
// The cancellation word needs about 15 bits of resolution but the CDAC has
// 10. Running at the system clock, OSR = 32 times the ADC sample rate, the
// modulator turns the 15-bit word into a stream of 10-bit codes whose average
// over a slot equals the word. It is an error-feedback loop:
//
//   v = x + 2*e[n-1] - e[n-2],  q = floor(v / 2^S),  e = v - q * 2^S   (S = Y_W - DAC_W)
//
// so q*2^S = x - (1 - z^-1)^2 e: the truncation error is shaped by a
// second-order high-pass and the sum of q*2^S over any run of clocks differs
// from the sum of x by at most 4*2^S. The order, the error-feedback form and
// the 15-to-10-bit reduction follow the document. The input clamp, which keeps
// q inside the DAC range, and the free-running error state are this design's.
// Latency: q is registered, one clock after x.
module delta_sigma_mod
  import hdnp_pkg::*;
#(
  parameter int unsigned IN_W  = Y_W,
  parameter int unsigned OUT_W = DAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] q
);
  localparam int unsigned S   = IN_W - OUT_W;
  localparam int unsigned V_W = IN_W + 2;
  localparam logic signed [V_W-1:0] X_MAX =  V_W'(2**(IN_W-1) - 1 - 2*(2**S - 1) - 1);
  localparam logic signed [V_W-1:0] X_MIN = -V_W'(2**(IN_W-1) - 2**S);

  logic signed [V_W-1:0] xc, v;
  logic        [S-1:0]   e1, e2, e_now;
  logic signed [OUT_W-1:0] q_now;

  always_comb begin
    if (V_W'(x) > X_MAX)      xc = X_MAX;
    else if (V_W'(x) < X_MIN) xc = X_MIN;
    else                      xc = V_W'(x);
    v     = xc + V_W'({e1, 1'b0}) - V_W'(e2);
    q_now = OUT_W'(v >>> S);
    e_now = v[S-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= '0;
      e1 <= '0;
      e2 <= '0;
    end else begin
      q  <= q_now;
      e1 <= e_now;
      e2 <= e1;
    end
  end

endmodule
