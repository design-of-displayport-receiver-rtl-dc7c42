// tb_line_fifo: checks the 2560 x 30 bit, four-bank line FIFO.
// Writes 1 to 4 pixels per write clock (10 ns) at consecutive addresses,
// going round the 2560-pixel ring three times, while a second clock
// (7 ns) reads two pixels per clock behind the writer. Every read pair
// must equal the pixels written at those addresses (read data appears
// one read clock after re). Pixel value = its sequence number, so
// wrap-around and bank selection errors are visible.
`timescale 1ns/1ps
module tb_line_fifo;
  int checks = 0, failures = 0, errs = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  localparam int DEPTH = 2560;
  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  logic we = 0, re = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [2:0] wcount = 0;
  logic [3:0][29:0] wdata = '0;
  logic [1:0][29:0] rdata;
  line_fifo dut (.wclk, .we, .waddr, .wcount, .wdata, .rclk, .re, .raddr, .rdata);

  int wseq = 0;   // pixels written
  initial begin
    @(posedge wclk);
    while (wseq < 3 * DEPTH) begin
      int n; n = 1 + (wseq / 7) % 4;
      #1; we = 1; wcount = 3'(n); waddr = 12'(wseq % DEPTH);
      for (int i = 0; i < 4; i++) wdata[i] = 30'(wseq + i);
      @(posedge wclk);
      wseq += n;
    end
    #1 we = 0;
  end

  int rseq = 0, exp0;
  bit pend = 0;
  initial begin
    repeat (200) @(posedge rclk);
    while (rseq < 3 * DEPTH - 600) begin
      #0.5;
      if (wseq - rseq > 8) begin re = 1; raddr = 12'(rseq % DEPTH); end else re = 0;
      @(posedge rclk);
      if (pend) begin
        checks++;
        if (rdata[0] != 30'(exp0) || rdata[1] != 30'(exp0 + 1)) begin
          errs++; failures++;
          if (errs < 5) $display("FAIL: read %0d %0d expected %0d", rdata[0], rdata[1], exp0);
        end
      end
      pend = re; exp0 = rseq;
      if (re) rseq += 2;
    end
    check(rseq > 2 * DEPTH, "ring wrapped at least twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
