// tb_gain_control: checks the adaptive gain control.
// With M' = 10376 the limit is 10376 >> 8 = 40. A run of Up pulses must
// give k = 1, 3, 7, 15, 31 (step doubling up to 16), then 40 (limit).
// A reversal restarts at step 1; Down pulses are symmetric; simultaneous
// Up and Down do nothing; clear returns k to 0.
`timescale 1ns/1ps
module tb_gain_control;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, clear = 0, up = 0, dn = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [23:0] m_ref = 24'd10376;
  logic signed [15:0] k;
  gain_control dut (.clk, .rst_n, .clear, .up, .dn, .m_ref, .k);
  task automatic pulse(input bit u, input bit d, input int exp);
    up = u; dn = d; @(posedge clk); #1; up = 0; dn = 0;
    check(k == 16'(exp), $sformatf("k=%0d expected %0d", k, exp));
    repeat (3) @(posedge clk); #1;
  endtask
  initial begin
    #22 rst_n = 1;
    pulse(1, 0, 1); pulse(1, 0, 3); pulse(1, 0, 7); pulse(1, 0, 15); pulse(1, 0, 31);
    pulse(1, 0, 40); pulse(1, 0, 40);
    pulse(0, 1, 39); pulse(0, 1, 37); pulse(0, 1, 33); pulse(1, 1, 33); pulse(1, 0, 34);
    for (int i = 0; i < 10; i++) @(posedge clk);
    repeat (12) begin up = 0; dn = 1; @(posedge clk); end
    dn = 0; #1;
    check(k == -16'sd40, $sformatf("lower limit %0d", k));
    clear = 1; @(posedge clk); #1 clear = 0;
    check(k == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
