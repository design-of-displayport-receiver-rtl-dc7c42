// tb_dec8b10b: checks the 8b/10b decoder against the testbench encoder.
// All 256 data bytes and the 12 control codes are encoded with a running
// disparity and decoded back (one clock latency); each must come out
// equal with no error flag. Then an invalid 6-bit group (000000) must
// raise code_err, and a second positive-disparity word in a row must
// raise disp_err.
`timescale 1ns/1ps
module tb_dec8b10b;
  import dp_pkg::*;
  import tb_dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [9:0] din = 0;
  sym_t sym; logic code_err, disp_err;
  dec8b10b dut (.clk, .rst_n, .din, .sym, .code_err, .disp_err);
  bit rd = 0;
  sym_t list [$];
  initial begin
    logic [7:0] kc [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                           8'hF7, 8'hFB, 8'hFD, 8'hFE};
    for (int r = 0; r < 3; r++) for (int i = 0; i < 256; i++) list.push_back(D(8'((i * 37 + r) % 256)));
    for (int r = 0; r < 2; r++) for (int i = 0; i < 12; i++) begin
      list.push_back(K(kc[i])); list.push_back(D(8'(i * 11 + r)));
    end
    #22 rst_n = 1;
    @(posedge clk); #1;
    din = enc(list[0], rd);
    for (int i = 1; i <= list.size(); i++) begin
      @(posedge clk); #1;
      check(sym == list[i-1] && !code_err && !disp_err,
            $sformatf("symbol %0d k=%0d d=%h got k=%0d d=%h err=%0d/%0d", i - 1, list[i-1].k,
                      list[i-1].d, sym.k, sym.d, code_err, disp_err));
      if (i < list.size()) din = enc(list[i], rd);
    end
    din = 10'b0000000000; @(posedge clk); #1;
    check(code_err, "invalid code flagged");
    // the same positive-disparity word (six ones) three times
    din = 10'h2D9; @(posedge clk); #1;
    din = 10'h2D9; @(posedge clk); #1;
    din = 10'h2D9; @(posedge clk); #1;
    check(disp_err, "disparity error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
