// tb_fifo_monitor: checks the FIFO status monitor across two clocks
// (write 10 ns, read 13 ns). The write count is held at chosen values
// and, after the handshake has settled, a reader line start with a
// given read count must give Up when the distance exceeds hwidth/2+8,
// Down when it is below hwidth/2-8 and neither inside the band; a
// distance above the FIFO depth must raise ovf, a zero distance while
// reading must raise udf. The handshake must deliver a changing write
// count within 8 read clocks.
`timescale 1ns/1ps
module tb_fifo_monitor;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;
  logic [23:0] wpix = 0, rpix = 0;
  logic line_start = 0, reading = 0;
  logic [15:0] hwidth = 16'd1920;
  logic up, dn, ovf, udf; logic signed [24:0] distance;
  fifo_monitor dut (.wclk, .wrst_n(rst_n), .wpix, .rclk, .rrst_n(rst_n), .rpix, .line_start,
                    .reading, .hwidth, .up, .dn, .ovf, .udf, .distance);
  task automatic probe(input int w, input int r, input bit eu, input bit ed, input string msg);
    bit gu, gd;
    wpix = 24'(w); rpix = 24'(r);
    repeat (8) @(posedge rclk);
    #1 line_start = 1; @(posedge rclk); #1 line_start = 0;
    gu = up; gd = dn;
    check(gu == eu && gd == ed && distance == 25'(w - r),
          $sformatf("%s: up=%0d dn=%0d dist=%0d", msg, gu, gd, distance));
  endtask
  initial begin
    #30 rst_n = 1;
    probe(5000, 4040, 0, 0, "centre");
    probe(5000, 4032, 0, 0, "upper band edge");
    probe(5000, 4031, 1, 0, "above band");
    probe(5000, 4048, 0, 0, "lower band edge");
    probe(5000, 4049, 0, 1, "below band");
    wpix = 24'd9000; rpix = 24'd1000; repeat (10) @(posedge rclk); #1;
    check(ovf, "overflow flagged");
    wpix = 24'd1000; reading = 1; repeat (10) @(posedge rclk); #1;
    check(udf && !ovf, "underflow flagged while reading");
    reading = 0; @(posedge rclk); #1;
    check(!udf, "no underflow when not reading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
