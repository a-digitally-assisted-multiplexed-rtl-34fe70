// tb_dac_decoder: all 1024 codes of the segmented CDAC decoder.
// The switched-on weight (binary bits plus 32 per thermometer line) must be
// code + 512, the thermometer lines must fill from the bottom, and the BB
// controls must be the complement of BN.
`timescale 1ns/1ps
module tb_dac_decoder;
  logic signed [9:0] code;
  logic [4:0] bn_bin, bb_bin;
  logic [30:0] bn_therm, bb_therm;

  dac_decoder dut (.*);

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
    int weight, ones;
    for (int c = -512; c < 512; c++) begin
      code = 10'(c);
      #1;
      ones = $countones(bn_therm);
      weight = int'(bn_bin) + 32 * ones;
      check(weight == c + 512, $sformatf("code %0d weight %0d", c, weight));
      check(bn_therm == 31'((64'd1 << ones) - 1), "thermometer fills from the bottom");
      check(bb_bin == ~bn_bin && bb_therm == ~bn_therm, "complementary bottom plates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
