// tb_lms_filter: LMS update, saturations and TDMA alignment of the filter.
// Each slot is 8 clocks here: slot_start on the first, one sample on the
// fourth. A reference model recomputes u, d, y, e and w with 64-bit integers
// (y = floor(w*u / 2^34), w += u*e, all saturating) and keeps its own
// 15-stage delay line, so dac_word and the fed-back word are checked too.
`timescale 1ns/1ps
module tb_lms_filter;
  import hdnp_pkg::*;
  localparam int X_W = ADC_W + ADC_SHIFT;
  localparam longint W_MAXL = (64'sd1 <<< (W_W - 1)) - 1;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, slot_start = 1'b0, m1_en = 1'b1;
  logic signed [X_W-1:0] x = '0, lfp = '0;
  y_t dac_word, y; w_t w; u_t u_ref; logic u_sat, d_sat;

  lms_filter dut (.*);

  int checks = 0, failures = 0, n_usat = 0, n_dsat = 0;
  longint w_ref, fb_ref, dac_ref;
  longint dl [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint u, d, yr, e, wn, ur, dr;
    int xv, lv;
    w_ref = W_MAXL; fb_ref = 0; dac_ref = 0;
    for (int i = 0; i < int'(N_CH) - 1; i++) dl.push_back(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(w == w_t'(W_MAXL), "weight starts at its largest value");
    for (int s = 0; s < 3000; s++) begin
      // slot start: load the next DAC word
      @(negedge clk) slot_start = 1'b1;
      @(posedge clk); fb_ref = dac_ref; dac_ref = dl[$];
      @(negedge clk) slot_start = 1'b0;
      check(longint'(dac_word) == dac_ref, "dac_word is the delay line's last stage");
      @(negedge clk);
      // one sample; small inputs mostly, occasionally full scale
      xv = (s % 7 == 0) ? ((s % 2) ? 1023 : -1024) : int'($urandom_range(0, 400)) - 200;
      lv = int'($urandom_range(0, 2046)) - 1023;
      if (s > 1500) lv = xv / 2;
      m1_en = (s % 50) != 49;
      x = X_W'(xv); lfp = X_W'(lv); valid = 1'b1;
      ur = lv + fb_ref; dr = xv + fb_ref;
      u  = clampl(ur, -16384, 16383);
      d  = clampl(dr, -16384, 16383);
      yr = clampl((w_ref * u) >>> 34, -16384, 16383);
      e  = d - yr;
      wn = clampl(w_ref + u * e, -W_MAXL, W_MAXL);
      #1;
      check(u_sat == (ur != u), "u saturation flag");
      check(longint'(u_ref) == u, "u reference output");
      check(d_sat == (dr != d), "d saturation flag");
      if (u_sat) n_usat++;
      if (d_sat) n_dsat++;
      @(posedge clk);
      if (m1_en) w_ref = wn;
      dl.push_front(yr); void'(dl.pop_back());
      @(negedge clk) valid = 1'b0;
      check(longint'(y) == yr, $sformatf("y: got %0d exp %0d", y, yr));
      check(longint'(w) == w_ref, "weight update");
      @(negedge clk);
    end
    check(n_usat > 0 && n_dsat > 0, "both saturations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
