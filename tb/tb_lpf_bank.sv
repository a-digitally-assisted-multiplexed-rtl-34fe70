// tb_lpf_bank: per-channel leaky integrators behind the DEMUX/MUX.
// Random samples on random channels are checked against a reference that
// recomputes lfp = floor((a + x - floor(a/16)) / 16) with a = 16x the state;
// a constant input must settle to itself (unity dc gain) and channels must
// not disturb each other.
`timescale 1ns/1ps
module tb_lpf_bank;
  import hdnp_pkg::*;
  localparam int X_W = ADC_W + ADC_SHIFT;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  ch_t ch = '0;
  logic signed [X_W-1:0] x = '0, lfp;

  lpf_bank dut (.*);

  int checks = 0, failures = 0;
  longint acc_ref [N_CH];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic longint fdiv16(input longint a);
    return longint'($floor(real'(a) / 16.0));
  endfunction
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int c, input int xv);
    longint nxt;
    @(negedge clk);
    ch = ch_t'(c); x = X_W'(xv); valid = 1'b1;
    #1;
    nxt = acc_ref[c] + xv - fdiv16(acc_ref[c]);
    check(longint'(lfp) == fdiv16(nxt), $sformatf("lfp ch %0d: got %0d exp %0d", c, lfp, fdiv16(nxt)));
    @(posedge clk);
    acc_ref[c] = nxt;
    #1 valid = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < int'(N_CH); c++) acc_ref[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3000; k++)
      step($urandom_range(0, N_CH - 1), int'($urandom_range(0, 2046)) - 1023);
    // dc gain on channel 3 while channel 4 sees the opposite value
    for (int k = 0; k < 400; k++) begin step(3, 700); step(4, -300); end
    @(negedge clk); ch = 4'd3; x = 11'sd700; valid = 1'b0; #1;
    check(lfp >= 699 && lfp <= 700, "unity dc gain, channel 3");
    ch = 4'd4; x = -11'sd300; #1;
    check(lfp >= -301 && lfp <= -300, "unity dc gain, channel 4");
    // no update without valid
    ch = 4'd3; x = -11'sd1000; repeat (5) @(posedge clk); #1 x = 11'sd700; #1;
    check(lfp >= 699 && lfp <= 700, "state holds while valid is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
