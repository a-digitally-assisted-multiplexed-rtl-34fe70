// tb_sar_logic: the successive-approximation register against an ideal
// comparator. For a target level T the comparator answers trial <= T; the
// finished code must equal T and done must come exactly 10 clocks after start.
`timescale 1ns/1ps
module tb_sar_logic;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cmp;
  logic [9:0] trial, code; logic busy, done;
  int target;

  sar_logic #(.BITS(10)) dut (.*);
  assign cmp = (int'(trial) <= target);

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
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      target = (k < 2) ? k * 1023 : int'($urandom_range(0, 1023));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 0;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 10, $sformatf("conversion takes 10 clocks, got %0d", lat));
      check(int'(code) == target, $sformatf("code %0d target %0d", code, target));
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
