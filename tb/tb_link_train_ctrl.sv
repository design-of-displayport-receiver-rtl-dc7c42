// tb_link_train_ctrl: checks the link training / self-recovery controller
// (short timeouts: CR/EQ 500, recovery 200, IRQ 50 link clocks).
// Full training (IDLE -> CR -> EQ -> NORMAL following the source's
// pattern selection), memorizing of the DCO codes, self-recovery
// (restored codes loaded, back to NORMAL without IRQ), recovery failure
// (IRQ of exactly 50 clocks, then CR), IRQ directly when self-recovery is
// off, fast training with error masking, training without AUX, a CR
// timeout, and two-lane operation ignoring lanes 2 and 3.
`timescale 1ns/1ps
module tb_link_train_ctrl;
  import dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, hpd = 0, self_rec = 1, aligned = 0, sync_lost = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  lt_mode_t mode = LT_FULL;
  logic [1:0] tp_sel = 0; logic [2:0] lane_cnt = 3'd4;
  logic [3:0] cdr_lock = 0, tps1_seen = 0, sym_lock = 0;
  logic [3:0][10:0] dco_code;
  lt_state_t state; logic cr_done, eq_done, err_mask, video_en, irq;
  logic [3:0] dco_load; logic [3:0][10:0] dco_mem; logic [15:0] cnt_recover, cnt_irq;
  link_train_ctrl #(.CR_TIMEOUT(500), .EQ_TIMEOUT(500), .REC_TIME(200), .IRQ_LEN(50)) dut (
    .clk, .rst_n, .hpd, .mode, .self_rec, .tp_sel, .lane_cnt, .cdr_lock, .tps1_seen, .sym_lock,
    .aligned, .sync_lost, .dco_code, .state, .cr_done, .eq_done, .err_mask, .video_en, .irq,
    .dco_load, .dco_mem, .cnt_recover, .cnt_irq);
  task automatic clks(input int n); repeat (n) @(posedge clk); #1; endtask
  int irq_len = 0; logic [3:0] loads = 0;
  always @(posedge clk) begin if (irq) irq_len++; loads |= dco_load; end
  task automatic good(input bit on);
    cdr_lock = on ? 4'hF : 4'h0; tps1_seen = on ? 4'hF : 4'h0; sym_lock = on ? 4'hF : 4'h0; aligned = on;
  endtask
  task automatic restart(input lt_mode_t m);
    hpd = 0; good(0); tp_sel = 0; clks(2); mode = m; hpd = 1; clks(2);
  endtask
  initial begin
    for (int i = 0; i < 4; i++) dco_code[i] = 11'(100 * i + 7);
    #22 rst_n = 1; clks(2);
    check(state == LT_IDLE, "IDLE without HPD");
    // ---- full training
    hpd = 1; clks(2);
    check(state == LT_CR, "CR after HPD");
    tp_sel = 1; cdr_lock = 4'hF; tps1_seen = 4'hF; clks(5);
    check(cr_done && state == LT_CR, "CR done, waits for TPS2");
    tp_sel = 2; clks(3);
    check(state == LT_EQ, "EQ after TPS2 selected");
    sym_lock = 4'hF; aligned = 1; clks(3);
    check(eq_done && state == LT_EQ, "EQ done, waits for end of training");
    tp_sel = 0; clks(3);
    check(state == LT_NORMAL && video_en, "NORMAL");
    for (int i = 0; i < 4; i++) dco_code[i] = 11'(200 + i);
    clks(3);
    // ---- self-recovery
    loads = 0; sync_lost = 1; clks(1); sync_lost = 0;
    clks(1);
    check(state == LT_RECOVER, "RECOVER on sync loss");
    check(loads == 4'hF && dco_mem[2] == 11'd202, "memorized codes loaded");
    clks(10);
    check(state == LT_NORMAL && cnt_recover == 1 && cnt_irq == 0 && irq_len == 0, "self-recovered, no IRQ");
    // ---- recovery failure
    sync_lost = 1; clks(250);
    check(state == LT_IRQ || state == LT_CR, "recovery timeout -> IRQ");
    sync_lost = 0; good(0); clks(80);
    check(state == LT_CR && irq_len == 50 && cnt_irq == 1, $sformatf("IRQ pulse %0d clocks, then CR", irq_len));
    // ---- self-recovery off
    restart(LT_FULL); self_rec = 0; tp_sel = 1; good(1); clks(3); tp_sel = 2; clks(3); tp_sel = 0; clks(3);
    check(state == LT_NORMAL, "trained again");
    irq_len = 0; sync_lost = 1; clks(2); sync_lost = 0;
    check(state == LT_IRQ && irq, "IRQ at once without self-recovery");
    // ---- fast training
    restart(LT_FAST); cdr_lock = 4'hF; tps1_seen = 4'hF; clks(3);
    check(state == LT_NORMAL && err_mask, "fast: NORMAL after CR, errors masked");
    sync_lost = 1; clks(3);
    check(state == LT_NORMAL, "fast: masked sync loss ignored");
    sync_lost = 0; sym_lock = 4'hF; aligned = 1; clks(2);
    check(!err_mask, "fast: mask released at symbol lock and alignment");
    // ---- no link training
    restart(LT_NONE); cdr_lock = 4'hF; tps1_seen = 4'hF; clks(3);
    check(state == LT_EQ, "none: EQ without AUX");
    sym_lock = 4'hF; aligned = 1; clks(3);
    check(state == LT_NORMAL, "none: NORMAL on lock and alignment");
    // ---- CR timeout
    restart(LT_FULL); clks(520);
    check(state == LT_IDLE || state == LT_CR, "CR timeout");
    // ---- two lanes
    restart(LT_FULL); lane_cnt = 3'd2; cdr_lock = 4'h3; tps1_seen = 4'h3; tp_sel = 2; clks(3);
    check(state == LT_EQ, "two lanes: lanes 2, 3 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
