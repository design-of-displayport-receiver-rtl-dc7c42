// tb_half_rate_writer: checks the elastic buffer and half-rate write
// control. A pixel source offers 0..4 pixels per link clock (average
// 1.5). Every memory write (we, waddr, wcount, wdata) is recorded; the
// written pixels must be the offered ones, in order, at consecutive
// addresses, and wpix must count them. In half-rate mode no two
// consecutive clocks may carry a write. `started` must rise when half
// of hwidth pixels of the first line have been taken. A source of four
// pixels every clock in half-rate mode exceeds the write capacity
// (4 per two clocks) and must raise ovf. flush clears everything.
`timescale 1ns/1ps
module tb_half_rate_writer;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, half_rate = 0, flush = 0, frame_start = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [15:0] hwidth = 16'd100;
  logic [2:0] in_cnt = 0;
  logic [3:0][29:0] in_pix = '0;
  logic we, started, ovf;
  logic [11:0] waddr; logic [2:0] wcount; logic [3:0][29:0] wdata; logic [23:0] wpix;
  half_rate_writer dut (.clk, .rst_n, .half_rate, .flush, .frame_start, .hwidth, .in_cnt,
                        .in_pix, .we, .waddr, .wcount, .wdata, .wpix, .started, .ovf);

  int sent = 0, got = 0, bad = 0, back2back = 0, next_addr = 0, start_at = -1;
  bit we_d = 0;
  always @(posedge clk) if (rst_n && !flush) begin
    if (we) begin
      if (32'(waddr) != next_addr) bad++;
      for (int i = 0; i < 4; i++) if (i < wcount) begin
        if (wdata[i] != 30'(got)) bad++;
        got++;
      end
      next_addr = (next_addr + wcount) % 2560;
      if (we_d && half_rate) back2back++;
    end
    we_d <= we;
    if (started && start_at < 0) start_at = sent;
  end

  task automatic run(input bit hr, input int cycles);
    half_rate = hr; sent = 0; got = 0; bad = 0; back2back = 0; next_addr = 0; start_at = -1;
    flush = 1; @(posedge clk); #1 flush = 0; frame_start = 1;
    for (int c = 0; c < cycles; c++) begin
      int n; n = (c % 4 == 0) ? 3 : (c % 4 == 1) ? 0 : (c % 4 == 2) ? 2 : 1;
      in_cnt = 3'(n);
      for (int i = 0; i < 4; i++) in_pix[i] = 30'(sent + i);
      @(posedge clk); #1 frame_start = 0;
      sent += n;
    end
    in_cnt = 0; repeat (20) @(posedge clk); #1;
    check(bad == 0 && got == sent, $sformatf("hr=%0d: %0d of %0d pixels written in order, %0d bad", hr, got, sent, bad));
    check(wpix == 24'(sent), "wpix counts written pixels");
    check(back2back == 0, "half-rate: never two write cycles in a row");
    check(start_at >= 50 && start_at <= 58, $sformatf("started after half a line (%0d)", start_at));
    check(!ovf, "no overflow at 1.5 pixels per clock");
  endtask

  initial begin
    #22 rst_n = 1;
    run(0, 400);
    run(1, 400);
    // overload: 4 pixels every clock with half-rate writes
    flush = 1; @(posedge clk); #1 flush = 0; frame_start = 1; half_rate = 1;
    in_cnt = 3'd4; repeat (40) @(posedge clk); #1 in_cnt = 0; frame_start = 0;
    check(ovf, "overflow flagged when input exceeds half-rate capacity");
    flush = 1; @(posedge clk); #1 flush = 0;
    check(!ovf && !started && wpix == 0, "flush clears state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
