// link_train_ctrl: link training and link status controller of the
// receiver, with the self-recovery ("sleepless recovery") scheme.
//
// States (lt_state_t): IDLE, CR (clock recovery), EQ (channel
// equalization: symbol lock and inter-lane alignment), NORMAL, RECOVER
// and IRQ. IDLE is left when HPD shows a connected source; losing the
// connection returns to IDLE from anywhere.
// Training modes:
//   LT_FULL  CR ends when every active lane is locked and sees the clock
//            pattern (TPS1) and the source has selected TPS2 (tp_sel=2);
//            EQ ends when all lanes have symbol lock and are aligned and
//            the source has ended training (tp_sel=0).
//   LT_FAST  no EQ phase: NORMAL follows clock recovery at once; decode
//            errors are masked (err_mask) until symbol lock and alignment
//            are reached during normal operation.
//   LT_NONE  no AUX transaction: the receiver follows the patterns it
//            detects itself (TPS1 then lock and alignment); EQ must
//            finish within EQ_TIMEOUT link clocks.
// A phase that does not finish within its timeout returns to IDLE
// (training failure).
// On entering NORMAL, and every link clock while the link is healthy,
// the DCO code of every lane is memorized. When synchronization is lost
// in NORMAL:
//   self_rec=1  RECOVER: the memorized codes are loaded into the loop
//               filters (dco_load) and the receiver waits up to REC_TIME
//               link clocks for lock, symbol lock and alignment to come
//               back, without telling the source. On success it returns to
//               NORMAL; otherwise it falls back to the IRQ path.
//   self_rec=0  IRQ: an HPD IRQ pulse of IRQ_LEN link clocks is sent and
//               the receiver waits in CR for the source to retrain.
// cnt_recover / cnt_irq count the two outcomes.
//
// Follows the document: IDLE / link training / normal flow, full, fast
// and no-link-training sequences, error masking in fast training,
// memorizing the locked DCO code and restoring it instead of raising an
// IRQ. Timeouts, the health condition used for memorizing and the
// exact entry conditions are this design's choices.
module link_train_ctrl
  import dp_pkg::*;
#(
  parameter int LANES      = 4,
  parameter int CODE_W     = 11,
  parameter int CR_TIMEOUT = 65536,
  parameter int EQ_TIMEOUT = 65536,
  parameter int REC_TIME   = 4096,
  parameter int IRQ_LEN    = 135000
) (
  input  logic                          clk,          // link symbol clock
  input  logic                          rst_n,
  input  logic                          hpd,          // source connected
  input  lt_mode_t                      mode,
  input  logic                          self_rec,     // self-recovery enable
  input  logic [1:0]                    tp_sel,       // pattern selected by the source (0 none,1 TPS1,2 TPS2)
  input  logic [2:0]                    lane_cnt,     // 1, 2 or 4
  input  logic [LANES-1:0]              cdr_lock,
  input  logic [LANES-1:0]              tps1_seen,
  input  logic [LANES-1:0]              sym_lock,
  input  logic                          aligned,      // inter-lane alignment
  input  logic                          sync_lost,    // loss of synchronization
  input  logic [LANES-1:0][CODE_W-1:0]  dco_code,
  output lt_state_t                     state,
  output logic                          cr_done,
  output logic                          eq_done,
  output logic                          err_mask,
  output logic                          video_en,
  output logic                          irq,          // HPD IRQ pulse request
  output logic [LANES-1:0]              dco_load,
  output logic [LANES-1:0][CODE_W-1:0]  dco_mem,
  output logic [15:0]                   cnt_recover,
  output logic [15:0]                   cnt_irq
);
  logic [LANES-1:0] act;
  always_comb
    for (int i = 0; i < LANES; i++) act[i] = (i < 32'(lane_cnt));

  wire all_cr  = &((cdr_lock & tps1_seen) | ~act);
  wire all_lck = &(cdr_lock | ~act);
  wire all_sym = &(sym_lock | ~act) && aligned;

  logic [31:0] tmr;
  logic        mem_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= LT_IDLE; tmr <= '0; cr_done <= 1'b0; eq_done <= 1'b0;
      err_mask <= 1'b0; irq <= 1'b0; dco_load <= '0; dco_mem <= '0;
      mem_valid <= 1'b0; cnt_recover <= '0; cnt_irq <= '0;
    end else begin
      dco_load <= '0;
      tmr      <= tmr + 1;
      if (!hpd) begin
        state <= LT_IDLE; cr_done <= 1'b0; eq_done <= 1'b0; err_mask <= 1'b0;
        irq <= 1'b0; mem_valid <= 1'b0;
      end else case (state)
        LT_IDLE: begin
          state <= LT_CR; tmr <= '0; cr_done <= 1'b0; eq_done <= 1'b0;
        end
        LT_CR: begin
          if (all_cr) cr_done <= 1'b1;
          if (tmr > CR_TIMEOUT) state <= LT_IDLE;
          else if (all_cr) begin
            case (mode)
              LT_FAST: begin state <= LT_NORMAL; err_mask <= 1'b1; end
              LT_NONE: begin state <= LT_EQ; tmr <= '0; end
              default: if (tp_sel == 2'd2) begin state <= LT_EQ; tmr <= '0; end
            endcase
          end
        end
        LT_EQ: begin
          if (!all_lck) begin state <= LT_CR; cr_done <= 1'b0; tmr <= '0; end
          else if (all_sym) begin
            eq_done <= 1'b1;
            if (mode == LT_NONE || tp_sel == 2'd0) state <= LT_NORMAL;
          end else if (tmr > EQ_TIMEOUT) state <= LT_IDLE;
        end
        LT_NORMAL: begin
          if (all_sym) begin
            err_mask <= 1'b0;
            eq_done  <= 1'b1;
          end
          if (all_lck && all_sym && !sync_lost) begin
            dco_mem   <= dco_code;
            mem_valid <= 1'b1;
          end
          if (sync_lost && !err_mask) begin
            tmr <= '0;
            if (self_rec && mem_valid) begin
              state    <= LT_RECOVER;
              dco_load <= act;
            end else begin
              state <= LT_IRQ; irq <= 1'b1; cnt_irq <= cnt_irq + 1'b1;
              cr_done <= 1'b0; eq_done <= 1'b0;
            end
          end
        end
        LT_RECOVER: begin
          if (all_lck && all_sym && !sync_lost && tmr > 32'd4) begin
            state <= LT_NORMAL; cnt_recover <= cnt_recover + 1'b1;
          end else if (tmr > REC_TIME) begin
            state <= LT_IRQ; irq <= 1'b1; tmr <= '0; cnt_irq <= cnt_irq + 1'b1;
            cr_done <= 1'b0; eq_done <= 1'b0;
          end
        end
        LT_IRQ: begin
          if (tmr >= 32'(IRQ_LEN - 1)) begin irq <= 1'b0; state <= LT_CR; tmr <= '0; end
        end
        default: state <= LT_IDLE;
      endcase
    end

  assign video_en = (state == LT_NORMAL);
endmodule
