// lms_filter: single-tap LMS interference canceller shared by all channels.
//
// One weight w serves every channel. For each ADC sample (valid high) of
// channel c, with fb the cancellation word the DAC applied while that sample
// was taken:
//
//   u = sat_U(lfp + fb)          reference: channel low-pass plus fed-back estimate
//   d = sat_D(x   + fb)          desired:   ADC sample plus fed-back estimate
//   y = sat_Y((w * u) >>> 34)    multiplier M2
//   w <= w + mu * u * (d - y)    multiplier M1, mu = 2^-34 (skipped while m1_en = 0)
//
// Adding fb to u and d undoes the subtraction the amplifier performs, so the
// algorithm sees the offset it is cancelling (the document's proposed
// feedback). The saturations protect the start-up, when w begins at its
// largest value (W_INIT) and the loop is saturated.
//
// Alignment: y of the sample from slot s is needed when the same channel is
// selected again, in slot s+N. The ADC adds one slot of delay, so y passes a
// Z^-(N-1) delay line that shifts once per sample; at each slot_start its
// last stage becomes dac_word for the slot beginning, and the word of the
// slot before moves to fb (one more Z^-1), ready for the sample that slot
// produces. w has W_FRAC = 34 fraction bits, so mu*u*e is just u*e.
// The structure follows the document; the word widths and the reading of
// the delay taps are this design's.
module lms_filter
  import hdnp_pkg::*;
#(
  parameter int unsigned N_CH_P = N_CH,
  parameter int unsigned X_W    = ADC_W + ADC_SHIFT,
  parameter w_t          W_INIT = {1'b0, {(W_W-1){1'b1}}}  // largest gain
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid,      // one ADC sample to process
  input  logic signed [X_W-1:0] x,          // scaled ADC sample
  input  logic signed [X_W-1:0] lfp,        // low-pass of the same channel
  input  logic                  slot_start, // load the next DAC word
  input  logic                  m1_en,      // weight update enabled
  output y_t                    dac_word,   // cancellation word for the current slot
  output y_t                    y,          // latest filter output
  output w_t                    w,          // weight
  output u_t                    u_ref,      // u of this sample: channel offset + LFP estimate
  output logic                  u_sat,      // u saturated on this sample
  output logic                  d_sat       // d saturated on this sample
);
  localparam int unsigned S_W = Y_W + 2;  // adder width before saturation
  localparam int unsigned P_W = U_W + W_W; // M2 product
  localparam int unsigned G_W = U_W + D_W + 1; // M1 product u*e
  localparam int unsigned WS_W = W_W + 2;

  y_t                     dline [N_CH_P-1];  // Z^-(N-1)
  y_t                     fb;                // Z^-1 after the delay line
  logic signed [S_W-1:0]  u_raw, d_raw;
  u_t                     u;
  d_t                     d;
  logic signed [P_W-1:0]  prod;
  logic signed [P_W-W_FRAC-1:0] y_raw;
  y_t                     y_new;
  logic signed [D_W:0]    e;
  logic signed [G_W-1:0]  grad;
  logic signed [WS_W-1:0] w_sum;
  w_t                     w_new;

  // saturation blocks in front of u[n] and d[n]
  assign u_raw = S_W'(lfp) + S_W'(fb);
  assign d_raw = S_W'(x)   + S_W'(fb);
  assign u_ref = u;
  assign u_sat = (u_raw > S_W'(2**(U_W-1) - 1)) || (u_raw < -S_W'(2**(U_W-1)));
  assign d_sat = (d_raw > S_W'(2**(D_W-1) - 1)) || (d_raw < -S_W'(2**(D_W-1)));

  always_comb begin
    if (u_raw > S_W'(2**(U_W-1) - 1))      u = {1'b0, {(U_W-1){1'b1}}};
    else if (u_raw < -S_W'(2**(U_W-1)))    u = {1'b1, {(U_W-1){1'b0}}};
    else                                   u = U_W'(u_raw);
    if (d_raw > S_W'(2**(D_W-1) - 1))      d = {1'b0, {(D_W-1){1'b1}}};
    else if (d_raw < -S_W'(2**(D_W-1)))    d = {1'b1, {(D_W-1){1'b0}}};
    else                                   d = D_W'(d_raw);
  end

  // M2: y = w * u
  assign prod  = P_W'(w) * P_W'(u);
  assign y_raw = prod[P_W-1:W_FRAC];
  always_comb begin
    if (y_raw > (P_W-W_FRAC)'(2**(Y_W-1) - 1))   y_new = {1'b0, {(Y_W-1){1'b1}}};
    else if (y_raw < -(P_W-W_FRAC)'(2**(Y_W-1))) y_new = {1'b1, {(Y_W-1){1'b0}}};
    else                                         y_new = Y_W'(y_raw);
  end

  // M1: w += mu * u * e
  assign e     = (D_W+1)'(d) - (D_W+1)'(y_new);
  assign grad  = G_W'(u) * G_W'(e);
  assign w_sum = WS_W'(w) + WS_W'(grad);
  localparam logic signed [WS_W-1:0] W_MAX = WS_W'(signed'({1'b0, {(W_W-1){1'b1}}}));
  always_comb begin
    if (w_sum > W_MAX)       w_new = {1'b0, {(W_W-1){1'b1}}};
    else if (w_sum < -W_MAX) w_new = {1'b1, {(W_W-2){1'b0}}, 1'b1};
    else                     w_new = W_W'(w_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w        <= W_INIT;
      y        <= '0;
      dac_word <= '0;
      fb       <= '0;
      for (int i = 0; i < int'(N_CH_P) - 1; i++) dline[i] <= '0;
    end else begin
      if (valid) begin
        y        <= y_new;
        dline[0] <= y_new;
        for (int i = 1; i < int'(N_CH_P) - 1; i++) dline[i] <= dline[i-1];
        if (m1_en) w <= w_new;
      end
      if (slot_start) begin
        dac_word <= dline[N_CH_P-2];
        fb       <= dac_word;
      end
    end
  end

  // a sample is processed between two slot starts, never on the same clock
  assert property (@(posedge clk) disable iff (!rst_n) !(valid && slot_start))
    else $error("lms_filter: sample processed on a slot boundary");

endmodule
