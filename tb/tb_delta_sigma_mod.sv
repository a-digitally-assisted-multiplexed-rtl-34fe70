// tb_delta_sigma_mod: the 15-to-10-bit noise shaper.
// For random constant inputs held for 32 clocks (one slot), the sum of the
// 10-bit codes times 32 must match 32x within the bound 4*32 that the
// second-order error feedback guarantees, and for a mid-range input the
// codes must dither between neighbouring values rather than sit still.
`timescale 1ns/1ps
module tb_delta_sigma_mod;
  import hdnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  y_t x = '0; dac_t q;

  delta_sigma_mod dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int xv, sum, qmin, qmax, xc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      case (k % 10)
        0:       xv = 16383;
        1:       xv = -16384;
        default: xv = int'($urandom_range(0, 32767)) - 16384;
      endcase
      xc = xv > 16320 ? 16320 : (xv < -16352 ? -16352 : xv);
      @(negedge clk) x = y_t'(xv);
      @(negedge clk);             // q lags x by one clock
      sum = 0; qmin = 1000; qmax = -1000;
      for (int i = 0; i < 32; i++) begin
        sum += int'(q) * 32;
        if (int'(q) < qmin) qmin = int'(q);
        if (int'(q) > qmax) qmax = int'(q);
        @(negedge clk);
      end
      check(sum - 32 * xc <= 4 * 32 && 32 * xc - sum <= 4 * 32,
            $sformatf("slot average: x %0d sum/32 %0d", xv, sum / 32));
      check(qmax - qmin <= 3, "codes stay within a few LSB of the input");
      if (k % 10 == 5 && (xc % 32) != 0) check(qmax != qmin, "codes dither");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
