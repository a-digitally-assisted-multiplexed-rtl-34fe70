// tb_cdac: the cancellation DAC model.
// Code c (offset binary ob = c + 512: ob[4:0] on the binary blocks, ob / 32
// thermometer blocks on) must give
//   0.116 * 0.6 V * (2*ob - 1023) / 1023,
// the attenuation worked out from 36 x 8.2 fF against 2 pF and 0.25 pF, so
// the full-scale swing is about +/-69.5 mV and every step is one 0.2 fF unit.
// A second instance with B0 mismatched (C_beta = 4.4 fF, two units) must
// show a doubled LSB step.
`timescale 1ns/1ps
module tb_cdac;
  logic [4:0] bn_bin, bb_bin;
  logic [30:0] bn_therm, bb_therm;
  real vcancel, vmis;

  cdac dut (.*);
  cdac #(.C_BETA('{4.4e-15, 4.3e-15, 4.5e-15, 4.9e-15, 5.7e-15, 7.3e-15}))
    dut_mis (.bn_bin, .bb_bin, .bn_therm, .bb_therm, .vcancel(vmis));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real gamma, expv, lsb, v0, m0;
    int ob;
    gamma = (36.0 * 8.2e-15) / (2.0e-12 + 0.25e-12 + 36.0 * 8.2e-15);
    lsb = gamma * 0.6 * 2.0 / 1023.0;
    for (int c = -512; c < 512; c++) begin
      ob = c + 512;
      bn_bin = 5'(ob % 32); bb_bin = ~bn_bin;
      bn_therm = 31'((64'd1 << (ob / 32)) - 1); bb_therm = ~bn_therm;
      #1;
      expv = gamma * 0.6 * real'(2 * ob - 1023) / 1023.0;
      check(vcancel - expv < 1e-9 && expv - vcancel < 1e-9, $sformatf("code %0d v %g exp %g", c, vcancel, expv));
      if (ob % 2 == 0) begin v0 = vcancel; m0 = vmis; end
      else begin
        check((vmis - m0) - 2.0 * lsb < 1e-9 && 2.0 * lsb - (vmis - m0) < 1e-9,
              "mismatched B0 doubles the LSB step");
        check((vcancel - v0) - lsb < 1e-9 && lsb - (vcancel - v0) < 1e-9, "nominal LSB step");
      end
    end
    check(vcancel > 0.0693 && vcancel < 0.0698, "full scale about +69.5 mV");
    bn_bin = '0; bb_bin = '1; bn_therm = '0; bb_therm = '1;
    #1;
    check(vcancel < -0.0693 && vcancel > -0.0698, "full scale about -69.5 mV");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
