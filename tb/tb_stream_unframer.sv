// tb_stream_unframer: checks un-framing and de-stuffing.
// Two frames of 4 vertical-blanking lines (one carrying an SS SS ... SE
// secondary packet) and 3 active lines are sent on four lanes. Active
// lines: BE, then transfer units of 10 data symbols followed by FS, two
// dummies, FE, and a final partial unit ending in FS ... BS. Checks:
// the active bytes passed on are exactly the data symbols of each line
// (stuffing removed), the secondary bytes are exactly the packet bytes
// with one sec_start and one sec_end, line_end pulses once per active
// line, frame_start once per frame, VB-ID is captured.
`timescale 1ns/1ps
module tb_stream_unframer;
  import dp_pkg::*;
  import tb_dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, enable = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  sym_t [3:0] din;
  logic [3:0][7:0] act_data, sec_data;
  logic act_valid, sec_valid, sec_start, sec_end, line_end, frame_start;
  logic [7:0] vbid;
  stream_unframer dut (.clk, .rst_n, .enable, .din, .act_data, .act_valid, .sec_data, .sec_valid,
                       .sec_start, .sec_end, .line_end, .frame_start, .vbid);

  logic [7:0] exp_act [$], exp_sec [$], got_act [$], got_sec [$];
  int n_ss = 0, n_se = 0, n_le = 0, n_fs = 0;
  always @(posedge clk) begin
    if (act_valid) got_act.push_back(act_data[2]);
    if (sec_valid) got_sec.push_back(sec_data[1]);
    if (sec_start) n_ss++;
    if (sec_end) n_se++;
    if (line_end) n_le++;
    if (frame_start) n_fs++;
  end
  task automatic put(input sym_t s);
    for (int l = 0; l < 4; l++) din[l] = s;
    if (!s.k && l_is_data) exp_act.push_back(s.d);
    @(posedge clk); #1;
  endtask
  bit l_is_data = 0;
  int cnt = 0;
  task automatic line(input bit vb, input bit sec);
    l_is_data = 0;
    put(K(K_BS)); put(D({7'b0, vb})); put(D(8'h12)); put(D(8'h00));
    for (int i = 0; i < 5; i++) put(D(8'h00));
    if (sec) begin
      put(K(K_SS)); put(K(K_SS));
      for (int i = 0; i < 9; i++) begin exp_sec.push_back(8'(i + 100)); put(D(8'(i + 100))); end
      put(K(K_SE));
    end
    for (int i = 0; i < 5; i++) put(D(8'h00));
    if (!vb) begin
      put(K(K_BE));
      for (int t = 0; t < 4; t++) begin
        l_is_data = 1;
        for (int i = 0; i < 10; i++) begin put(D(8'(cnt))); cnt++; end
        l_is_data = 0;
        put(K(K_FS)); put(D(8'hEE)); put(D(8'hEE)); put(K(K_FE));
      end
      l_is_data = 1;
      for (int i = 0; i < 3; i++) begin put(D(8'(cnt))); cnt++; end
      l_is_data = 0;
      put(K(K_FS)); put(D(8'hEE));
    end
  endtask
  initial begin
    #22 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      line(1, 0); line(1, 1); line(1, 0); line(1, 0);
      line(0, 0); line(0, 0); line(0, 0);
    end
    put(K(K_BS)); put(D(8'h01)); put(D(8'h00)); put(D(8'h00));
    repeat (3) @(posedge clk); #1;
    check(got_act == exp_act, $sformatf("active bytes exact (%0d of %0d)", got_act.size(), exp_act.size()));
    check(got_sec == exp_sec, "secondary bytes exact");
    check(n_ss == 2 && n_se == 2, "one SS SS / SE per packet");
    check(n_le == 6, $sformatf("line_end per active line (%0d)", n_le));
    check(n_fs == 2, $sformatf("frame_start per frame (%0d)", n_fs));
    check(vbid == 8'h01, "VB-ID captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
