// tb_dlf: checks the digital loop filter.
// 1) err = sum(up) - sum(dn) for words with known edge samples: an
//    alternating pattern whose edges all equal the earlier bit gives -10
//    (clock early), all equal to the later bit gives +10.
// 2) With err = +10 every clock and alpha = 2, the accumulator must grow
//    by 40 LSBs of the 10-bit fraction per clock: the code rises by one
//    every 1024/40 = 25.6 clocks (checked over 256 clocks: +10 codes).
// 3) After a load and 7 clocks of integration the frozen, dithered word
//    must average to exactly code + 40*(7+-latency)/1024 (first-order DSM).
// 4) load sets the code to load_val; hold freezes it.
`timescale 1ns/1ps
module tb_dlf;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, hold = 0, load = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [9:0] d = 10'h155, e = 0;
  logic [2:0] alpha = 3'd2;
  logic [10:0] load_val = 0, word, code; logic signed [4:0] err;
  dlf dut (.clk, .rst_n, .d, .e, .alpha, .hold, .load, .load_val, .word, .code, .err);
  initial begin
    int c0, sum;
    #22 rst_n = 1;
    // d = 1,0,1,0... (bit 0 first = 1); edges equal the earlier bit
    d = 10'h155; e = 10'h2AA;           // e[i] = d[i-1]: clock early -> dn
    @(posedge clk); #1; @(posedge clk); #1;
    check(err == -5'sd10, $sformatf("all dn: err=%0d", err));
    e = 10'h155;                         // e[i] = d[i]: clock late -> up
    @(posedge clk); #1;
    check(err == 5'sd10, $sformatf("all up: err=%0d", err));
    c0 = code;
    repeat (256) @(posedge clk); #1;
    check(code - c0 == 10 || code - c0 == 11, $sformatf("integration: +%0d codes in 256 clocks", code - c0));
    // load a known code, integrate err = +10 (40/1024 per clock) for 7
    // clocks, freeze, and check the dither average: over 1024 clocks a
    // first-order DSM with fraction f adds exactly f carries
    load_val = 11'd500; load = 1; @(posedge clk); #1 load = 0;
    repeat (7) @(posedge clk); #1;
    hold = 1; @(posedge clk); #1;
    sum = 0;
    for (int i = 0; i < 1024; i++) begin @(posedge clk); #1; sum += word; end
    check(code == 11'd500, $sformatf("code after a short integration: %0d", code));
    begin
      bit ok; ok = 0;
      for (int dl = -3; dl <= 3; dl++) if (sum == 1024 * 500 + 40 * (7 + dl)) ok = 1;
      check(ok, $sformatf("dither average %0d/1024 is code + a whole number of 40/1024 steps", sum));
    end
    c0 = code; repeat (50) @(posedge clk); #1;
    check(code == c0, "hold freezes the code");
    hold = 0; load_val = 11'd300; load = 1; @(posedge clk); #1 load = 0;
    check(code == 11'd300, "load restores a code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
