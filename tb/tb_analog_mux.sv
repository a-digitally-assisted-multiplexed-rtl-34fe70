// tb_analog_mux: every select value must pass exactly its electrode.
`timescale 1ns/1ps
module tb_analog_mux;
  real vin [16];
  logic [3:0] sel;
  real vout;

  analog_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int c = 0; c < 16; c++) vin[c] = real'(r * 100 + c) * 1.0e-3;
      for (int c = 0; c < 16; c++) begin
        sel = 4'(c);
        #1;
        check(vout == real'(r * 100 + c) * 1.0e-3, $sformatf("select %0d", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
