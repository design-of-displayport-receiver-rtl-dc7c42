// tb_edp_rx_top: end-to-end test of the receiver at its default size
// (four lanes, 2560-pixel line FIFO).
//
// The testbench is the DisplayPort source and the analog front end:
//  * one 46 ps tick makes 16 phases of a 736 ps half-rate clock; every
//    lane's four quadrature DCO clocks are phases 0/4/8/12, the
//    synthesizer's 16 phases are all of them (2.72 Gb/s per lane);
//  * a source model builds the link symbol stream (training patterns or
//    framed video with BS/BE/FS/FE stuffing, VB-ID, Mvid, an MSA packet
//    once per frame, SR once per frame), scrambles it, 8b/10b encodes it
//    and shifts it out serially. Data changes 46 ps before or after the
//    edge sampling clocks, alternately, so the bang-bang detector sees
//    both directions;
//  * a Manchester-II AUX transaction is sent at 1.1 Mb/s (+10 %).
// The video: 64 x 6 active pixels (96 x 10 total), 30 bit per pixel,
// M/N = 16000/32768 of the link clock; pixel (x, y) of frame f carries
// {x, y, f} so every received line can be checked.
// Phases and the mechanism each must show (counted; a failure if never
// seen):
//  A full link training, video with a 0.2 % wrong Mvid: FIFO monitor
//    decisions and a non-zero compensation k, no underflow/overflow,
//    correct lines;
//  B bit slip on lane 2 with self-recovery on: recovery without IRQ;
//  C bit slip with self-recovery off: HPD IRQ, source retrains;
//  D fast link training (mode switch) with half-rate FIFO writes;
//  E no link training (receiver follows the patterns alone);
//  F compensation off and Mvid 3 % off: FIFO underflow is flagged;
//  and the AUX bytes received during phase A.
`timescale 1ps/1ps
module tb_edp_rx_top;
  import dp_pkg::*;
  localparam int LANES = 4;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- clocks ----------------
  logic [3:0] tick = 0;
  logic [15:0] mp;
  always #46 tick = tick + 1'b1;
  always_comb for (int j = 0; j < 16; j++) mp[j] = 4'(tick - 4'(j)) < 4'd8;
  logic [LANES-1:0][3:0] dco_clk;
  always_comb for (int i = 0; i < LANES; i++) dco_clk[i] = {mp[12], mp[8], mp[4], mp[0]};

  logic aux_clk = 0;
  always #31250 aux_clk = ~aux_clk;

  // ---------------- DUT ----------------
  logic rst_n = 1, hpd = 0, self_rec = 1, alt_seed = 0, half_rate = 0, comp_en = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  logic prbs_en = 0;
  logic [1:0] lt_mode = 0, tp_sel = 0;
  logic [2:0] lane_cnt = 3'd4, alpha = 3'd2;
  logic [LANES-1:0][1:0] swap_sel;
  logic [LANES-1:0] inv = '0, rev = '0, ser_in = '0;
  logic aux_rx = 0;
  logic aux_tx_start = 0; logic [4:0] aux_tx_nbytes = 5'd2; logic [7:0] aux_tx_data = 8'h00;
  logic aux_tx_req, aux_tx, aux_tx_en, aux_tx_busy;
  int aux_tx_clks = 0, aux_tx_edges = 0; logic aux_tx_d = 0;
  always @(posedge aux_clk) begin
    if (aux_tx_busy) aux_tx_clks++;
    if (aux_tx_en && aux_tx != aux_tx_d) aux_tx_edges++;
    aux_tx_d <= aux_tx;
  end
  initial for (int i = 0; i < LANES; i++) swap_sel[i] = 2'(i);

  logic [LANES-1:0][30:0] dcr_row, dcr_col;
  logic [LANES-1:0] dcr_fine, dco_up, dco_dn;
  logic [7:0] aux_byte; logic aux_byte_valid, aux_done;
  logic vclk, hsync, vsync, de, clk_ls, irq, video_en, eb_ovf;
  logic [1:0][29:0] pix;
  lt_state_t lt_state;
  logic [15:0] cnt_recover, cnt_irq, cnt_up, cnt_dn, cnt_ovf, cnt_udf, cnt_wr_half;
  logic signed [15:0] comp_k;
  logic signed [24:0] fifo_dist;
  logic [LANES-1:0][14:0] sym_err_cnt;
  logic [LANES-1:0][15:0] bit_err_cnt;
  msa_t msa;
  logic [8:0] synth_q; logic [3:0] synth_f;

  edp_rx_top dut (.*);

  // ---------------- 8b/10b encoder (bit 0 = first bit) ----------------
  function automatic logic [5:0] t6(input int x);
    logic [5:0] t [32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
      6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100,
      6'b011100, 6'b010111, 6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010,
      6'b011010, 6'b111010, 6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
      6'b011110, 6'b101011};
    return t[x];
  endfunction
  function automatic logic [3:0] t4(input int y);
    logic [3:0] t [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
    return t[y];
  endfunction
  function automatic logic [3:0] t4k(input int y);
    logic [3:0] t [8] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b1000};
    return t[y];
  endfunction
  function automatic logic [9:0] pack(input logic [5:0] c6, input logic [3:0] c4);
    logic [9:0] w;
    for (int i = 0; i < 6; i++) w[i] = c6[5-i];
    for (int i = 0; i < 4; i++) w[6+i] = c4[3-i];
    return w;
  endfunction
  function automatic logic [9:0] enc(input sym_t s, inout bit rd);   // rd 1 = RD+
    int x, y; logic [5:0] c6; logic [3:0] c4; logic [9:0] w; bit alt;
    x = s.d[4:0]; y = s.d[7:5];
    if (s.k) begin
      c6 = (x == 28) ? 6'b001111 : t6(x);
      c4 = (x == 28) ? t4k(y) : 4'b1000;
      w  = pack(c6, c4);
      if (rd) w = ~w;
      if ($countones(w) != 5) rd = !rd;
      return w;
    end
    c6 = t6(x);
    if (rd) begin
      if ($countones(c6) != 3) c6 = ~c6; else if (x == 7) c6 = 6'b000111;
    end
    if ($countones(c6) != 3) rd = !rd;
    alt = (!rd && (x == 17 || x == 18 || x == 20)) || (rd && (x == 11 || x == 13 || x == 14));
    c4 = (y == 7) ? (alt ? 4'b0111 : 4'b1110) : t4(y);
    if (rd) begin
      if ($countones(c4) != 2) c4 = ~c4; else if (y == 3) c4 = 4'b0011;
    end
    if ($countones(c4) != 2) rd = !rd;
    return pack(c6, c4);
  endfunction

  // ---------------- scrambler ----------------
  function automatic logic [7:0] scr8(inout logic [15:0] s);
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      b[i] = s[15];
      s = {s[14:0], 1'b0} ^ (s[15] ? 16'h0039 : 16'h0000);
    end
    return b;
  endfunction

  // ---------------- source model ----------------
  localparam int HTOT = 96, HWID = 64, HSTART = 16, HSW = 8;
  localparam int VTOT = 10, VHGT = 6, VSTART = 3, VSW = 1;
  localparam int NVID = 32768, MTRUE = 16000;
  int unsigned mvid_sent = 16032;        // 0.2 % high: video clock too fast
  typedef enum int {SRC_IDLE, SRC_TPS1, SRC_TPS2, SRC_VIDEO} src_t;
  src_t src_mode = SRC_IDLE;
  int   slip_lane = -1;                   // drop one bit on this lane

  bit   rd [LANES];
  logic [15:0] lfsr;
  logic [LANES-1:0][9:0] cur_w;
  int   frame = 0, line = 0, pos = 0, line_len = 197;
  longint acc = 0;
  int   tps_cnt = 0;
  logic [7:0] msa_b [36];
  logic [LANES-1:0][7:0] act_bytes [64];   // per lane, per slot
  int   act_n = 0;

  function automatic logic [29:0] pix_val(input int x, input int y, input int f);
    return {10'(x), 10'(y + 16), 10'(f & 1023)};
  endfunction

  task automatic build_msa();
    int m; m = mvid_sent;
    msa_b = '{default: 8'h00};
    for (int g = 0; g < 4; g++) begin
      msa_b[g*9+0] = m[23:16]; msa_b[g*9+1] = m[15:8]; msa_b[g*9+2] = m[7:0];
    end
    {msa_b[3], msa_b[4]} = 16'(HTOT);   {msa_b[5], msa_b[6]} = 16'(VTOT);
    msa_b[7] = 8'(HSW >> 8);             msa_b[8] = 8'(HSW);
    {msa_b[12], msa_b[13]} = 16'(HSTART); {msa_b[14], msa_b[15]} = 16'(VSTART);
    msa_b[16] = 8'(VSW >> 8);            msa_b[17] = 8'(VSW);
    {msa_b[21], msa_b[22]} = 16'(HWID);  {msa_b[23], msa_b[24]} = 16'(VHGT);
    msa_b[30] = 8'(NVID >> 16); msa_b[31] = 8'(NVID >> 8); msa_b[32] = 8'(NVID);
    msa_b[33] = 8'b010_0000_0;           // 10 bpc RGB
  endtask

  // pixel bytes of one active line, per lane: 16 pixels x 30 bits = 60 bytes
  task automatic build_line(input int y);
    for (int l = 0; l < LANES; l++) begin
      logic [479:0] bits;
      for (int p = 0; p < HWID / LANES; p++)
        bits[479 - p*30 -: 30] = pix_val(p * LANES + l, y, frame);
      for (int b = 0; b < 60; b++) act_bytes[b][l] = bits[479 - b*8 -: 8];
    end
    act_n = 60;
  endtask

  function automatic sym_t K(input logic [7:0] d); return '{k: 1'b1, d: d}; endfunction
  function automatic sym_t D(input logic [7:0] d); return '{k: 1'b0, d: d}; endfunction

  // next symbol of every lane
  task automatic next_syms(output sym_t s [LANES]);
    case (src_mode)
      SRC_IDLE, SRC_TPS1: for (int l = 0; l < LANES; l++) s[l] = D(8'h4A);   // D10.2
      SRC_TPS2: begin
        sym_t p [10];
        p[0] = K(K_BS); p[1] = D(8'hCB); p[2] = K(K_BS); p[3] = D(8'hCB);
        for (int i = 4; i < 10; i++) p[i] = D(8'h4A);
        for (int l = 0; l < LANES; l++) s[l] = p[tps_cnt];
        tps_cnt = (tps_cnt + 1) % 10;
      end
      default: begin
        bit vb, act;
        int y, v;
        vb  = (line < VSTART) || (line >= VSTART + VHGT);
        act = !vb;
        y   = line - VSTART;
        for (int l = 0; l < LANES; l++) begin
          if (pos == 0) s[l] = (line == 0) ? K(K_SR) : K(K_BS);
          else if (pos == 1) s[l] = D({7'b0, vb});
          else if (pos == 2) s[l] = D(8'(mvid_sent));
          else if (pos == 3) s[l] = D(8'h00);
          else if (line == 1 && pos >= 8 && pos < 8 + 2 + 9 + 1) begin
            v = pos - 10;
            if (pos < 10) s[l] = K(K_SS);
            else if (v < 9) s[l] = D(msa_b[l*9 + v]);
            else s[l] = K(K_SE);
          end else if (act && pos == 64) s[l] = K(K_BE);
          else if (act && pos > 64) begin
            int t, k; t = (pos - 65) / 32; k = (pos - 65) % 32;
            if (t < 4) begin
              if (k < 15) s[l] = D(act_bytes[t*15 + k][l]);
              else if (k == 15) s[l] = K(K_FS);
              else if (k == 31) s[l] = K(K_FE);
              else s[l] = D(8'h00);
            end else begin
              if (pos == 193) s[l] = K(K_FS);
              else if (pos == line_len - 1) s[l] = K(K_FE);
              else s[l] = D(8'h00);
            end
          end else s[l] = D(8'h00);
        end
        if (pos == 0 && act) build_line(y);
        pos++;
        if (pos == line_len) begin
          pos = 0;
          line++;
          if (line == VTOT) begin line = 0; frame++; end
          // line length: HTOT * N / M link clocks on average
          acc += longint'(HTOT) * NVID;
          line_len = int'(acc / MTRUE); acc = acc % MTRUE;
        end
      end
    endcase
  endtask

  // symbol -> scrambled -> encoded words, one set per 10 bits
  task automatic load_words();
    sym_t s [LANES];
    logic [15:0] l0;
    next_syms(s);
    l0 = lfsr;
    for (int l = 0; l < LANES; l++) begin
      sym_t t; logic [15:0] lf; logic [7:0] m;
      t = s[l]; lf = l0;
      m = scr8(lf);
      if (src_mode == SRC_VIDEO && !t.k) t.d = t.d ^ m;
      if (l == 0) lfsr = lf;
      if (s[l].k && s[l].d == K_SR) lfsr = 16'hFFFF;
      cur_w[l] = enc(t, rd[l]);
    end
  endtask

  // serial output: odd bits early at phase 3, even bits late at phase 13.
  // Each lane has a bit queue; a slip drops one bit from one lane, which
  // then stays one bit ahead of the others.
  bit q [LANES][$];
  int slip_done = 0;
  task automatic shift_bit();
    for (int l = 0; l < LANES; l++) begin
      bit empty; empty = 0;
      for (int j = 0; j < LANES; j++) if (q[j].size() == 0) empty = 1;
      if (empty) begin
        load_words();
        for (int j = 0; j < LANES; j++) for (int b = 0; b < 10; b++) q[j].push_back(cur_w[j][b]);
      end
      if (l == slip_lane) begin void'(q[l].pop_front()); slip_lane = -1; slip_done++; end
      ser_in[l] <= q[l].pop_front();
    end
  endtask
  initial begin
    lfsr = 16'hFFFF;
    for (int l = 0; l < LANES; l++) rd[l] = 0;
    build_msa();
    forever begin
      @(posedge mp[3]);  shift_bit();
      @(posedge mp[13]); shift_bit();
    end
  end

  int irq_clks = 0;                       // link clocks with irq high
  always @(posedge clk_ls) if (irq) irq_clks++;
  lt_state_t st_prev = LT_IDLE;
  always @(posedge clk_ls) begin
    if (lt_state != st_prev) $display("%t state %s", $time, lt_state.name());
    st_prev <= lt_state;
  end
  // ---------------- video output checker ----------------
  int good_lines = 0, bad_lines = 0, px = 0, line_y = -1;
  bit line_ok = 1, de_d = 0;
  always @(posedge vclk) begin
    de_d <= de;
    if (de) begin
      if (!de_d) begin px = 0; line_ok = 1; line_y = int'(pix[0][19:10]); end
      for (int i = 0; i < 2; i++) begin
        if (pix[i][29:20] != 10'(px) || int'(pix[i][19:10]) != line_y) line_ok = 0;
        px++;
      end
    end else if (de_d) begin
      if (line_ok && px == HWID && line_y >= 16 && line_y < 16 + VHGT) good_lines++;
      else bad_lines++;
    end
  end

  // lowest compensation seen (phase A: the video clock is 0.2 % fast)
  int k_min = 0;
  always @(posedge clk_ls) if (int'(comp_k) < k_min) k_min = int'(comp_k);

  // ---------------- AUX source ----------------
  int aux_rcv [$];
  always @(posedge aux_clk) if (aux_byte_valid) aux_rcv.push_back(int'(aux_byte));
  localparam int AUX_HB = 454545;         // half bit at 1.1 Mb/s, in ps
  task automatic aux_half(input bit v); aux_rx = v; #(AUX_HB); endtask
  task automatic aux_send(input logic [7:0] b [3]);
    for (int i = 0; i < 28; i++) begin aux_half(0); aux_half(1); end  // zeros
    aux_half(1); aux_half(1); aux_half(1); aux_half(1);               // sync end
    aux_half(0); aux_half(0); aux_half(0); aux_half(0);
    for (int i = 0; i < 3; i++)
      for (int j = 7; j >= 0; j--) begin aux_half(!b[i][j]); aux_half(b[i][j]); end
    aux_half(1); aux_half(1); aux_half(1); aux_half(1);               // stop
    aux_half(0); aux_half(0); aux_half(0); aux_half(0);
    aux_rx = 0;
  endtask

  // ---------------- sequence ----------------
  task automatic ls(input int n); repeat (n) @(posedge clk_ls); endtask
  task automatic wait_state(input lt_state_t s, input int maxc, input string what);
    int c; c = 0;
    while (lt_state != s && c < maxc) begin @(posedge clk_ls); c++; end
    check(lt_state == s, what);
  endtask
  task automatic train_full();
    src_mode = SRC_TPS1; tp_sel = 2'd1;
    ls(1500);
    src_mode = SRC_TPS2; tp_sel = 2'd2;
    wait_state(LT_EQ, 4000, "full training reaches EQ");
    ls(600);
    lfsr = 16'hFFFF; line = 0; pos = 0; acc = 0; line_len = 197;
    src_mode = SRC_VIDEO; tp_sel = 2'd0;
    wait_state(LT_NORMAL, 4000, "full training reaches NORMAL");
  endtask
  task automatic frames(input int n); ls(n * 1966); endtask

  initial begin
    logic [7:0] ab [3];
    int g0, b0, up0, dn0;
    #100000; rst_n = 1;
    ls(20);
    // ---- A: full training, compensation of a 0.2 % Mvid error, AUX
    hpd = 1;
    train_full();
    ab = '{8'h90, 8'h00, 8'h5A};
    fork aux_send(ab); join_none
    frames(14);
    check(cnt_dn + cnt_up > 0, "A: FIFO monitor gave Up/Dn decisions");
    check(k_min <= -16, $sformatf("A: compensation lowered M (video clock was fast), lowest k=%0d", k_min));
    check(cnt_udf == 0 && cnt_ovf == 0, "A: no FIFO underflow/overflow with compensation");
    check(good_lines >= 40 && bad_lines <= 2, $sformatf("A: video lines good=%0d bad=%0d", good_lines, bad_lines));
    check(msa.htotal == 16'(HTOT) && msa.hwidth == 16'(HWID) && msa.mvid == 24'(mvid_sent)
          && msa.nvid == 24'(NVID), "A: MSA unpacked");
    check(!eb_ovf, "A: elastic buffer never overflowed");
    // AUX reply (ACK and one byte): 16 * (36 + 8*2) AUX clocks
    @(negedge aux_clk); aux_tx_start = 1; @(negedge aux_clk); aux_tx_start = 0;
    wait (!aux_tx_busy); @(posedge aux_clk);
    check(aux_tx_clks == 16 * (36 + 16) && aux_tx_edges > 56,
          $sformatf("A: AUX reply sent (%0d clocks, %0d edges)", aux_tx_clks, aux_tx_edges));
    check(aux_rcv.size() == 3 && aux_rcv[0] == 8'h90 && aux_rcv[1] == 8'h00 && aux_rcv[2] == 8'h5A,
          $sformatf("A: AUX bytes received (%0d)", aux_rcv.size()));
    $display("A: k=%0d up=%0d dn=%0d dist=%0d good=%0d bad=%0d", comp_k, cnt_up, cnt_dn,
             fifo_dist, good_lines, bad_lines);

    // ---- B: bit slip, self-recovery
    slip_lane = 2;
    ls(20);
    wait_state(LT_RECOVER, 2000, "B: sync loss detected, recovery entered");
    wait_state(LT_NORMAL, 6000, "B: self-recovery back to NORMAL");
    check(cnt_recover == 1 && cnt_irq == 0, "B: recovered without IRQ");
    g0 = good_lines; frames(4);
    check(good_lines > g0 + 8, "B: video resumes after recovery");

    // ---- C: bit slip, self-recovery off -> IRQ and retraining by the source
    self_rec = 0; slip_lane = 1;
    wait_state(LT_IRQ, 2000, "C: IRQ state entered");
    check(irq, "C: IRQ asserted");
    src_mode = SRC_TPS1; tp_sel = 2'd1;
    wait_state(LT_CR, 140000, "C: back to clock recovery after IRQ");
    check(irq_clks == 135000, $sformatf("C: IRQ pulse of %0d link clocks (0.5 ms at 270 MHz)", irq_clks));
    train_full();
    check(cnt_irq == 1, "C: one IRQ counted");
    g0 = good_lines; frames(4);
    check(good_lines > g0 + 8, "C: video resumes after retraining");

    // ---- D: fast link training, half-rate writes
    hpd = 0; ls(10); half_rate = 1; lt_mode = 2'd1; hpd = 1;
    src_mode = SRC_TPS1; tp_sel = 2'd1; ls(400);
    lfsr = 16'hFFFF; line = 0; pos = 0; acc = 0; line_len = 197;
    src_mode = SRC_VIDEO; tp_sel = 2'd0;
    wait_state(LT_NORMAL, 2000, "D: fast training reaches NORMAL");
    g0 = good_lines; b0 = bad_lines; frames(6);
    check(good_lines > g0 + 12, $sformatf("D: video good in half-rate mode (+%0d)", good_lines - g0));
    check(cnt_wr_half > 0, "D: half-rate write strobe skipped cycles");

    // ---- E: no link training
    hpd = 0; ls(10); half_rate = 0; lt_mode = 2'd2; hpd = 1;
    src_mode = SRC_TPS1; tp_sel = 2'd0; ls(1500);
    src_mode = SRC_TPS2; ls(600);
    lfsr = 16'hFFFF; line = 0; pos = 0; acc = 0; line_len = 197;
    src_mode = SRC_VIDEO;
    wait_state(LT_NORMAL, 4000, "E: no-training mode reaches NORMAL");
    g0 = good_lines; frames(5);
    check(good_lines > g0 + 10, "E: video good without link training");

    // ---- F: compensation off, 3 % error -> underflow flagged
    comp_en = 0; mvid_sent = 16480; build_msa();
    up0 = cnt_udf; dn0 = cnt_ovf;
    frames(8);
    check(cnt_udf > up0, $sformatf("F: FIFO underflow flagged (%0d)", cnt_udf - up0));
    $display("bit errors %0d %0d sym errors %0d", bit_err_cnt[0], bit_err_cnt[1], sym_err_cnt[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
