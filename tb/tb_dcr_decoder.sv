// tb_dcr_decoder: checks the resistor-bank code decoder for all 2048
// words: row and column codes must be thermometer codes of w[10:6] and
// w[5:1], fine = w[0], and the number of conducting cells
// (32*rows + cols) must equal w[10:1], so that consecutive words differ
// by at most one cell.
`timescale 1ns/1ps
module tb_dcr_decoder;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [10:0] w = 0; logic [30:0] row, col; logic fine;
  dcr_decoder dut (.clk, .rst_n, .w, .row, .col, .fine);
  initial begin
    #22 rst_n = 1;
    for (int v = 0; v < 2048; v++) begin
      int cells;
      w = 11'(v); @(posedge clk); #1;
      cells = 32 * $countones(row) + $countones(col);
      check(row == 31'((64'd1 << v[10:6]) - 1) && col == 31'((64'd1 << v[5:1]) - 1) &&
            fine == v[0] && cells == (v >> 1), $sformatf("word %0d decoded", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
