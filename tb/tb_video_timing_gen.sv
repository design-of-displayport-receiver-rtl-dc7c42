// tb_video_timing_gen: checks the 17-state video signal generator with
// two pixels per clock. Timing: Htotal 200, Hstart 40, Hwidth 128,
// HSW 16 pixels (100 / 20 / 64 / 8 clocks); Vtotal 12, Vstart 4,
// Vheight 6, VSW 2 lines. After `start` it must: stay in state 16 before
// start; raise DE for exactly 64 clocks per active line with a line
// period of 100 clocks; give 6 DE lines per 1200-clock frame; make HSYNC
// 8 clocks and VSYNC 2 lines (200 clocks) wide; read the FIFO
// (re) only in state 10, two pixels per clock (rpix and raddr step by 2);
// visit all 16 active states; return to state 16 on flush.
`timescale 1ns/1ps
module tb_video_timing_gen;
  import dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, flush = 0, start = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  msa_t msa;
  logic [4:0] state; logic hsync, vsync, de, re, line_start;
  logic [11:0] raddr; logic [23:0] rpix;
  video_timing_gen dut (.clk, .rst_n, .flush, .start, .msa, .state, .hsync, .vsync, .de, .re,
                        .raddr, .rpix, .line_start);
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int de_len = 0, de_start = -1, hs_len = 0, vs_len = 0, frame_de = 0, vs_start = -1;
  int bad_de = 0, bad_per = 0, bad_hs = 0, bad_vs = 0, bad_fr = 0, bad_re = 0, nlines = 0, nframes = 0;
  bit de_d = 0, hs_d = 0, vs_d = 0;
  bit [15:0] seen;
  logic [23:0] rpix_d;
  always @(posedge clk) if (rst_n && !flush) begin
    if (state < 16) seen[state[3:0]] = 1;
    if (re != (state == 5'd10)) bad_re++;
    if (de) de_len++;
    if (de && !de_d) begin
      if (de_start >= 0 && cyc - de_start != 100 && cyc - de_start != 700) bad_per++;
      de_start = cyc; frame_de++;
    end
    if (!de && de_d) begin if (de_len != 64) bad_de++; de_len = 0; nlines++; end
    if (hsync) hs_len++;
    if (!hsync && hs_d) begin if (hs_len != 8) bad_hs++; hs_len = 0; end
    if (vsync) vs_len++;
    if (vsync && !vs_d) begin
      if (vs_start >= 0 && (cyc - vs_start != 1200 || frame_de != 6)) bad_fr++;
      if (vs_start >= 0) nframes++;
      vs_start = cyc; frame_de = 0;
    end
    if (!vsync && vs_d) begin if (vs_len != 200) bad_vs++; vs_len = 0; end
    de_d = de; hs_d = hsync; vs_d = vsync;
  end

  initial begin
    msa = '0;
    msa.htotal = 200; msa.hstart = 40; msa.hwidth = 128; msa.hsw = 16;
    msa.vtotal = 12; msa.vstart = 4; msa.vheight = 6; msa.vsw = 2;
    #22 rst_n = 1;
    repeat (20) @(posedge clk); #1;
    check(state == 5'd16 && !re, "idle before start");
    start = 1; @(posedge clk); #1; start = 0;
    @(posedge clk); #1;
    check(state == 5'd10, "start enters state 10");
    rpix_d = rpix;
    repeat (10) @(posedge clk); #1;
    check(rpix - rpix_d == 24'd20 && raddr == 12'(rpix), "two pixels per clock");
    repeat (6000) @(posedge clk); #1;
    check(bad_de == 0 && nlines >= 30, $sformatf("DE 64 clocks per line (%0d lines, %0d bad)", nlines, bad_de));
    check(bad_per == 0, "line period 100 clocks");
    check(bad_hs == 0, "HSYNC 8 clocks");
    check(bad_vs == 0, "VSYNC 2 lines");
    check(bad_fr == 0 && nframes >= 3, $sformatf("frame 1200 clocks with 6 DE lines (%0d frames)", nframes));
    check(bad_re == 0, "FIFO read only in state 10");
    check(seen == 16'hFFFF, $sformatf("all 16 active states visited (%h)", seen));
    flush = 1; @(posedge clk); #1 flush = 0;
    check(state == 5'd16, "flush returns to state 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
