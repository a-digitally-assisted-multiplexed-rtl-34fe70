// tb_sar_adc: the ADC model with its SAR register.
// Random inputs over and beyond +/-0.6 V must give floor(vin / LSB), clipped
// to -512..511, ten clocks after the sample strobe, with full_scale on the
// end codes.
`timescale 1ns/1ps
module tb_sar_adc;
  import hdnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  real vin = 0.0;
  adc_t code; logic valid, full_scale;

  sar_adc dut (.*);

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

  initial begin
    int lat, expc; real v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 1500; k++) begin
      v = (real'($urandom_range(0, 100000)) / 100000.0 - 0.5) * 1.4;
      expc = int'($floor(v / (1.2 / 1024.0)));
      if (expc > 511) expc = 511;
      if (expc < -512) expc = -512;
      @(negedge clk) begin vin = v; sample = 1'b1; end
      @(negedge clk) begin sample = 1'b0; vin = -v; end   // input moves after sampling
      lat = 0;
      while (!valid && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 10, "result 10 clocks after sampling");
      check(int'(code) == expc, $sformatf("vin %f code %0d exp %0d", v, code, expc));
      check(full_scale == (expc == 511 || expc == -512), "full-scale flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
