// tb_neural_amp: the amplifier model.
// Checks the settled gain for several gain codes (35 dB at code 0, 52 dB at
// code 7, attenuation 0.786 of the input and subtraction of the CDAC
// voltage), settling to 0.1 % within one 32-clock slot at bandwidth code 2
// (about 390 kHz), slower settling at code 0, and clipping at +/-0.6 V.
`timescale 1ns/1ps
module tb_neural_amp;
  logic clk = 1'b0, rst_n = 1'b0;
  real vin = 0.0, vcancel = 0.0, vout;
  logic [2:0] gain_code = 3'd2, bw_code = 3'd2;

  neural_amp dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rel(input real a, input real b);
    return (a - b) / b < 0.0 ? (b - a) / b : (a - b) / b;
  endfunction

  initial begin
    real g, gam, expv;
    gam = 2.0e-12 / (2.0e-12 + 0.25e-12 + 36.0 * 8.2e-15);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int gc = 0; gc < 8; gc++) begin
      gain_code = 3'(gc); bw_code = 3'd2;
      g = 10.0 ** ((35.0 + real'(gc) * 17.0 / 7.0) / 20.0);
      vin = 2.0e-3; vcancel = 0.5e-3;
      expv = g * (gam * vin - vcancel);
      if (expv > 0.6) expv = 0.6;
      repeat (32) @(negedge clk);
      check(rel(vout, expv) < 1.0e-3, $sformatf("gain code %0d settles within one slot: %g exp %g", gc, vout, expv));
      vin = -vin; vcancel = -vcancel;
      repeat (32) @(negedge clk);
      check(rel(vout, -expv) < 1.0e-3, "negative step settles within one slot");
    end
    vin = 5.0e-3; vcancel = 0.0;
    repeat (32) @(negedge clk);
    check(vout == 0.6, "output clips at +0.6 V");
    vin = -5.0e-3;
    repeat (32) @(negedge clk);
    check(vout == -0.6, "output clips at -0.6 V");
    gain_code = 3'd0;
    // slower bandwidth: not settled after one slot
    bw_code = 3'd0; vin = 0.0; vcancel = 0.0;
    repeat (200) @(negedge clk);
    vin = 1.0e-3;
    repeat (8) @(negedge clk);
    expv = 10.0 ** (35.0 / 20.0) * gam * 1.0e-3;
    check(rel(vout, expv) > 0.1, "210 kHz setting is slower");
    repeat (300) @(negedge clk);
    check(rel(vout, expv) < 1.0e-3, "210 kHz setting settles eventually");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
