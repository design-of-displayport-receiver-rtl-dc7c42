// tb_link_quality: checks the per-lane error counters.
// 1) A PRBS7 bit stream (x^7 + x^6 + 1) delivered as 10-bit words gives
//    no bit errors; five single-bit flips give 5 x 3 = 15 counted errors
//    (a self-synchronizing checker sees each flip three times: as the new
//    bit and in the two later taps).
// 2) Symbol errors are counted only while sym_en is high; clear resets.
`timescale 1ns/1ps
module tb_link_quality;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, clear = 0, sym_en = 0, sym_err = 0, prbs_en = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [9:0] raw = 0; logic [14:0] sym_err_cnt; logic [15:0] bit_err_cnt;
  link_quality dut (.clk, .rst_n, .clear, .sym_en, .sym_err, .prbs_en, .raw, .sym_err_cnt, .bit_err_cnt);
  logic [6:0] s = 7'h7F;
  function automatic logic [9:0] prbs_word();
    logic [9:0] w;
    for (int b = 0; b < 10; b++) begin
      logic nb; nb = s[6] ^ s[5];
      s = {s[5:0], nb}; w[b] = nb;
    end
    return w;
  endfunction
  initial begin
    #22 rst_n = 1;
    raw = prbs_word(); @(posedge clk); #1;
    prbs_en = 1;
    for (int i = 0; i < 500; i++) begin raw = prbs_word(); @(posedge clk); #1; end
    check(bit_err_cnt == 0, $sformatf("clean PRBS7: %0d errors", bit_err_cnt));
    for (int i = 0; i < 100; i++) begin
      raw = prbs_word();
      if (i % 20 == 5) raw[3] = !raw[3];
      @(posedge clk); #1;
    end
    check(bit_err_cnt == 16'd15, $sformatf("5 flips counted as %0d", bit_err_cnt));
    prbs_en = 0;
    sym_err = 1; repeat (10) @(posedge clk); #1;
    check(sym_err_cnt == 0, "symbol errors ignored without sym_en");
    sym_en = 1; repeat (7) @(posedge clk); #1;
    check(sym_err_cnt == 15'd7, $sformatf("symbol errors %0d", sym_err_cnt));
    clear = 1; @(posedge clk); #1 clear = 0;
    check(sym_err_cnt == 0 && bit_err_cnt == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
