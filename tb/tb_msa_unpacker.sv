// tb_msa_unpacker: checks main stream attribute extraction for 4, 2 and
// 1 active lanes. The 36 attribute bytes are distributed over the lanes
// as the source does (lane l carries groups l, l+L, ...), framed by
// sec_start and sec_end; every field must come out with m_valid. A
// packet cut short (SE early) must be ignored.
`timescale 1ns/1ps
module tb_msa_unpacker;
  import dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, sec_start = 0, sec_valid = 0, sec_end = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [2:0] lane_cnt = 3'd4;
  logic [3:0][7:0] sec_data = '0;
  msa_t msa; logic m_valid;
  msa_unpacker dut (.clk, .rst_n, .lane_cnt, .sec_start, .sec_valid, .sec_data, .sec_end, .msa, .m_valid);
  logic [7:0] b [36];
  int nv = 0;
  always @(posedge clk) if (m_valid) nv++;
  task automatic build(input int s);
    int mv, nvid; mv = 10376 + s; nvid = 32768;
    b = '{default: 8'h00};
    for (int g = 0; g < 4; g++) begin b[g*9] = 8'(mv >> 16); b[g*9+1] = 8'(mv >> 8); b[g*9+2] = 8'(mv); end
    b[3] = 8'h08; b[4] = 8'h98; b[5] = 8'h04; b[6] = 8'h65;          // Htotal 2200, Vtotal 1125
    b[7] = 8'h80 | 8'(s); b[8] = 8'h2C;                             // HSP=1, HSW
    b[12] = 8'h00; b[13] = 8'hC0; b[14] = 8'h00; b[15] = 8'h29;      // Hstart 192, Vstart 41
    b[16] = 8'h00; b[17] = 8'h05;                                    // VSP=0, VSW 5
    b[21] = 8'h07; b[22] = 8'h80; b[23] = 8'h04; b[24] = 8'h38;      // 1920 x 1080
    b[30] = 8'(nvid >> 16); b[31] = 8'(nvid >> 8); b[32] = 8'(nvid);
    b[33] = 8'h20 + 8'(s);
  endtask
  task automatic send(input int lc, input bit cut);
    int per; per = 36 / lc;
    lane_cnt = 3'(lc);
    sec_start = 1; @(posedge clk); #1 sec_start = 0;
    for (int j = 0; j < per - (cut ? 3 : 0); j++) begin
      for (int l = 0; l < lc; l++) sec_data[l] = b[((j / 9) * lc + l) * 9 + j % 9];
      sec_valid = 1; @(posedge clk); #1;
    end
    sec_valid = 0; sec_end = 1; @(posedge clk); #1 sec_end = 0;
    @(posedge clk); #1;
  endtask
  task automatic verify(input int s, input string msg);
    check(msa.mvid == 24'(10376 + s) && msa.nvid == 24'd32768 && msa.htotal == 16'd2200 &&
          msa.vtotal == 16'd1125 && msa.hsp && msa.hsw == 15'(8'h2C + (s << 8)) &&
          msa.hstart == 16'd192 && msa.vstart == 16'd41 && !msa.vsp && msa.vsw == 15'd5 &&
          msa.hwidth == 16'd1920 && msa.vheight == 16'd1080 && msa.misc0 == 8'h20 + 8'(s), msg);
  endtask
  initial begin
    #22 rst_n = 1;
    build(1); send(4, 0); verify(1, "4 lanes"); check(nv == 1, "m_valid");
    build(2); send(2, 0); verify(2, "2 lanes"); check(nv == 2, "m_valid");
    build(3); send(1, 0); verify(3, "1 lane");  check(nv == 3, "m_valid");
    build(4); send(4, 1); verify(3, "short packet ignored"); check(nv == 3, "no m_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
