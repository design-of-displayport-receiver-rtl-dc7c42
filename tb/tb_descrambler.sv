// tb_descrambler: checks the main link descrambler.
// A symbol stream (data, control symbols, an SR every 300 symbols) is
// scrambled with the testbench LFSR and descrambled; the output (one
// clock later) must equal the original. The first eight scrambling bytes
// after a reset with seed FFFFh are also checked against the known
// DisplayPort sequence FF 17 C0 14 B2 E7 02 82. With alt_seed the LFSR
// restarts from FFFEh; with enable low symbols pass unchanged.
`timescale 1ns/1ps
module tb_descrambler;
  import dp_pkg::*;
  import tb_dp_pkg::*;
  int checks = 0, failures = 0, errs = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, enable = 1, alt_seed = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  sym_t din, dout;
  descrambler dut (.clk, .rst_n, .enable, .alt_seed, .din, .dout);

  task automatic run(input int n, input logic [15:0] seed);
    logic [15:0] s; sym_t orig;
    s = seed;
    for (int i = 0; i < n; i++) begin
      if (i % 300 == 0) orig = K(K_SR);
      else if (i % 50 == 7) orig = K(K_BS);
      else orig = D(8'((i * 13) ^ (i >> 3)));
      din = orig;
      if (!orig.k) begin logic [7:0] m; m = scr8(s); din.d = orig.d ^ m; end
      else begin void'(scr8(s)); if (orig.d == K_SR) s = seed; end
      @(posedge clk); #1;
      checks++; if (dout != orig) begin errs++; failures++; end
    end
  endtask

  initial begin
    logic [15:0] s; logic [7:0] exp8 [8] = '{8'hFF, 8'h17, 8'hC0, 8'h14, 8'hB2, 8'hE7, 8'h02, 8'h82};
    s = 16'hFFFF;
    for (int i = 0; i < 8; i++) check(scr8(s) == exp8[i], $sformatf("reference LFSR byte %0d", i));
    din = K(K_SR);
    #22 rst_n = 1;
    @(posedge clk); #1;
    // after SR: zeros in must give the scrambling sequence out
    for (int i = 0; i < 9; i++) begin
      din = D(8'h00); @(posedge clk); #1;
      if (i < 8) check(dout.d == exp8[i], $sformatf("descrambler sequence byte %0d = %h", i, dout.d));
    end
    din = K(K_SR); @(posedge clk); #1;
    errs = 0; run(2000, 16'hFFFF);
    check(errs == 0, $sformatf("seed FFFF stream, %0d errors", errs));
    alt_seed = 1; din = K(K_SR); @(posedge clk); #1;
    errs = 0; run(1000, 16'hFFFE);
    check(errs == 0, $sformatf("seed FFFE stream, %0d errors", errs));
    enable = 0; din = D(8'h5A); @(posedge clk); #1; @(posedge clk); #1;
    check(dout == D(8'h5A), "disabled: pass-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
