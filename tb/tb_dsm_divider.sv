// tb_dsm_divider: checks the divider-merged delta-sigma modulator.
// For several M/N pairs it waits for `valid`, then over 4096 video clocks
// checks that every output ratio 16*Q+F is the floor or ceiling of the
// exact ratio 16*5*N/M (CLK_MULT=5, one pixel per clock) and that the
// mean matches it to 1/4096 of an LSB per cycle of averaging. A new
// ratio is produced on every clock, as the document's DSM is clocked by
// the video clock. Also checks the Q<4 guard (ratio replaced by 16).
`timescale 1ns/1ps
module tb_dsm_divider;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [23:0] m = 24'd10376, n = 24'd32768;
  logic [8:0] q; logic [3:0] f; logic valid;
  dsm_divider dut (.clk, .rst_n, .m, .n, .q, .f, .valid);

  task automatic run(input int mm, input int nn);
    real exact, sum; int lo, r, changes, prev;
    m = 24'(mm); n = 24'(nn);
    repeat (80) @(posedge clk);
    exact = 80.0 * nn / mm;
    lo = int'($floor(exact));
    sum = 0; changes = 0; prev = -1;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      r = 16 * q + f;
      if (r != lo && r != lo + 1) begin check(0, $sformatf("ratio %0d outside %0d..%0d", r, lo, lo + 1)); break; end
      if (prev >= 0 && r != prev) changes++;
      prev = r; sum += r;
    end
    check(valid, "valid");
    check((sum / 4096.0 - exact) < 0.002 && (exact - sum / 4096.0) < 0.002,
          $sformatf("mean %f vs %f", sum / 4096.0, exact));
    if (exact != lo) check(changes > 0, "ratio dithers cycle by cycle");
  endtask

  initial begin
    #22 rst_n = 1;
    run(10376, 32768);   // 85.5 MHz example: ratio 252.64
    run(16000, 32768);
    run(32768, 32768);   // ratio exactly 80
    run(4321, 32768);
    // Q < 4: ratio 16*5*N/M < 64 -> replaced by 16*16
    m = 24'd32768; n = 24'd8192; repeat (80) @(posedge clk); #1;
    check(q == 9'd16 && f == 4'd0, $sformatf("Q<4 guard q=%0d f=%0d", q, f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
