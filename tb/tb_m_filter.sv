// tb_m_filter: checks the M value filter against a reference model.
// Sequence: first M taken as is; small changes move M' by a quarter of
// the difference (rounded); single large jumps (more than M'/32) are
// ignored; three large values in a row are accepted as a new format; a
// new N is taken at once; clear restarts. Every update is compared with
// the model written here from the same rules.
`timescale 1ns/1ps
module tb_m_filter;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, clear = 0, m_valid = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [23:0] m_in = 0, n_in = 24'd32768, m_out, n_out;
  logic valid;
  m_filter dut (.clk, .rst_n, .clear, .m_valid, .m_in, .n_in, .m_out, .n_out, .valid);

  longint mref = 0, nref = 0; int rej = 0; bit vref = 0;
  task automatic send(input int m, input int n);
    longint d, ad;
    m_in = 24'(m); n_in = 24'(n); m_valid = 1;
    @(posedge clk); #1; m_valid = 0;
    d = longint'(m) - mref; ad = d < 0 ? -d : d;
    if (!vref || n != nref || (ad > (mref >> 5) && rej == 3)) begin
      mref = m; nref = n; vref = 1; rej = 0;
    end else if (ad > (mref >> 5)) rej++;
    else begin mref = mref + ((d + 2) >>> 2); rej = 0; end
    check(m_out == 24'(mref) && n_out == 24'(nref) && valid == vref,
          $sformatf("M in %0d: out %0d expected %0d", m, m_out, mref));
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    #22 rst_n = 1;
    send(10376, 32768);
    for (int i = 0; i < 20; i++) send(10376 + ((i * 37) % 41) - 20, 32768);
    send(13000, 32768);                 // single jump: ignored
    send(10380, 32768);
    send(20000, 32768); send(20000, 32768); send(20000, 32768); send(20000, 32768); // new format
    check(m_out == 24'd20000, "new format accepted after repeated jumps");
    send(20100, 16384);                 // new N: taken at once
    clear = 1; @(posedge clk); #1 clear = 0; vref = 0; rej = 0;
    check(!valid, "clear");
    send(5000, 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
