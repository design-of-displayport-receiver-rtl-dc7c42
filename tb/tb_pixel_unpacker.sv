// tb_pixel_unpacker: checks RGB pixel reconstruction for 1, 2 and 4
// lanes and 6, 8 and 10 bits per colour. A line of 48 pixels is packed as
// the source does (pixel k on lane k mod L, MSB first, R G B) and fed one
// byte per lane per clock, with idle clocks in between. The pixels that
// come out, taken lane 0 first, must be the line's pixels in order,
// components left-aligned to 10 bits.
`timescale 1ns/1ps
module tb_pixel_unpacker;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, line_end = 0, in_valid = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [2:0] lane_cnt = 3'd4, bpc_code = 3'b010;
  logic [3:0][7:0] in_data = '0;
  logic [2:0] out_cnt; logic [3:0][29:0] out_pix;
  pixel_unpacker dut (.clk, .rst_n, .lane_cnt, .bpc_code, .line_end, .in_valid, .in_data,
                      .out_cnt, .out_pix);
  logic [29:0] got [$];
  always @(posedge clk) for (int i = 0; i < 4; i++) if (i < out_cnt) got.push_back(out_pix[i]);
  function automatic logic [29:0] comp(input int k, input int bpc);
    logic [9:0] r, g, b;
    r = 10'((k * 37 + 5) % (1 << bpc)); g = 10'((k * 11 + 1) % (1 << bpc)); b = 10'((k * 3 + 7) % (1 << bpc));
    return {r, g, b};
  endfunction
  task automatic run(input int lc, input int bpc);
    logic [7:0] lanebytes [4][$];
    int np; np = 48;
    got.delete();
    lane_cnt = 3'(lc);
    bpc_code = (bpc == 6) ? 3'b000 : (bpc == 8) ? 3'b001 : 3'b010;
    for (int l = 0; l < lc; l++) begin
      bit bits [$];
      for (int k = l; k < np; k += lc) begin
        logic [29:0] c; c = comp(k, bpc);
        for (int j = bpc - 1; j >= 0; j--) bits.push_back(c[20 + j]);
        for (int j = bpc - 1; j >= 0; j--) bits.push_back(c[10 + j]);
        for (int j = bpc - 1; j >= 0; j--) bits.push_back(c[j]);
      end
      while (bits.size() % 8) bits.push_back(0);
      for (int i = 0; i < bits.size(); i += 8) begin
        logic [7:0] v; for (int j = 0; j < 8; j++) v[7-j] = bits[i + j];
        lanebytes[l].push_back(v);
      end
    end
    for (int i = 0; i < lanebytes[0].size(); i++) begin
      for (int l = 0; l < lc; l++) in_data[l] = lanebytes[l][i];
      in_valid = 1; @(posedge clk); #1;
      if (i % 5 == 2) begin in_valid = 0; @(posedge clk); #1; end
    end
    in_valid = 0; line_end = 1; @(posedge clk); #1 line_end = 0;
    @(posedge clk); #1;
    begin
      int bad; bad = (got.size() == np) ? 0 : 1;
      for (int k = 0; k < np && k < got.size(); k++) begin
        logic [29:0] c, e; c = comp(k, bpc);
        e = {c[29:20] << (10 - bpc), c[19:10] << (10 - bpc), c[9:0] << (10 - bpc)};
        if (got[k] != e) bad++;
      end
      check(bad == 0, $sformatf("%0d lanes, %0d bpc: %0d pixels, %0d bad", lc, bpc, got.size(), bad));
    end
  endtask
  initial begin
    #22 rst_n = 1;
    run(4, 10); run(4, 8); run(4, 6); run(2, 10); run(2, 8); run(2, 6); run(1, 10); run(1, 8); run(1, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
