// edp_rx_top: eDP receiver with video clock frequency error compensation.
//
// Chain, per lane: half-rate bang-bang phase detector and deserializer
// (bbpd_deser), digital loop filter (dlf) and resistor-bank decoder
// (dcr_decoder) of the all-digital CDR; then, on the link symbol clock
// of lane 0: channel control (ch_ctrl), byte alignment (byte_align),
// 8b/10b decoding (dec8b10b) and link quality counters (link_quality).
// All lanes together: de-skew (lane_deskew), descrambling (descrambler),
// un-framing (stream_unframer), attribute and pixel un-packing
// (msa_unpacker, pixel_unpacker), half-rate FIFO writing
// (half_rate_writer) into the 2560 x 30 bit line FIFO (line_fifo). On the
// synthesized video clock: video timing generation (video_timing_gen)
// reading two pixels per clock. The video clock comes from the direct
// all-digital synthesizer (video_clk_synth) driven by M'' = M' + k, where
// M' is the filtered M (m_filter) and k the correction from the FIFO
// monitor (fifo_monitor) through the gain control (gain_control).
// Link training with self-recovery: link_train_ctrl. AUX receive and
// reply: aux_ch_rx, aux_ch_tx.
//
// Not in this module (analog, outside the digital design): the DCO and its
// resistor bank, the phase interpolator that makes the 16 clock phases,
// the equalizer, AUX/HPD drivers. Their digital interface is exposed:
// dco_clk (four half-rate quadrature clocks per lane, from the DCOs),
// dcr_row/dcr_col/dcr_fine (DCO control codes), mp (16 phases of lane 0's
// half-rate clock, for the synthesizer).
//
// Clocks: lane i deserializer on dco_clk[i]; link clock clk_ls = lane 0's
// divided clock; video clock vclk from the synthesizer; aux_clk 16 MHz.
// The lanes' words are re-registered on clk_ls, which assumes the lane
// clocks have the same frequency (same source clock) with only a phase
// offset; residual symbol skew is removed by lane_deskew.
// Cross-domain signals (link -> video): the M/N pair and the attribute
// values are quasi-static and are taken by the receiving side only when
// two consecutive samples agree; start/flush go through two flops; the
// FIFO write count through the monitor's handshake.
//
// sync_lost (link training): an active lane lost symbol lock, lanes lost
// alignment, or ERR_LIM decode errors were counted in the last 64 link
// clocks. cdr_lock of a lane: the loop filter error magnitude stayed at
// or below LOCK_TH for 64 link clocks.
//
// Follows the document: the block structure, the four-lane 2-pixel
// per clock video path, the 2560-pixel line FIFO, 4-pixel half-rate
// writes, the compensation loop. Own choices: the lock and sync-lost
// detectors, the CDC details, the configuration ports in place of the
// register file written over AUX.
// The reset synchronisers (rls_ff, rv_ff) are asynchronously cleared and
// synchronously released on purpose; the resulting "flopped as both
// synchronous and asynchronous" lint notice refers to that pattern.
// Unconnected sub-module outputs (training flags, VB-ID, filter valid,
// generator state, AUX sync status) are observation signals not needed
// at this level.
module edp_rx_top
  import dp_pkg::*;
#(
  parameter int LANES    = 4,
  parameter int DEPTH    = 2560,
  parameter int CODE_W   = 11,
  parameter int REC_TIME = 4096,
  parameter int IRQ_LEN  = 135000,
  parameter int ERR_LIM  = 4,
  parameter int LOCK_TH  = 6,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                        rst_n,
  // main link (from the equalizers) and recovered clocks
  input  logic [LANES-1:0]            ser_in,
  input  logic [LANES-1:0][3:0]       dco_clk,
  input  logic [15:0]                 mp,
  output logic [LANES-1:0][30:0]      dcr_row,
  output logic [LANES-1:0][30:0]      dcr_col,
  output logic [LANES-1:0]            dcr_fine,
  output logic [LANES-1:0]            dco_up,      // proportional path to the DCO
  output logic [LANES-1:0]            dco_dn,
  // configuration (DPCD / register values)
  input  logic                        hpd,
  input  logic [1:0]                  lt_mode,     // 0 full, 1 fast, 2 none
  input  logic                        self_rec,
  input  logic [1:0]                  tp_sel,
  input  logic [2:0]                  lane_cnt,
  input  logic                        alt_seed,
  input  logic                        half_rate,
  input  logic                        comp_en,     // frequency compensation on
  input  logic                        prbs_en,
  input  logic [2:0]                  alpha,
  input  logic [LANES-1:0][$clog2(LANES)-1:0] swap_sel,
  input  logic [LANES-1:0]            inv,
  input  logic [LANES-1:0]            rev,
  // AUX
  input  logic                        aux_clk,
  input  logic                        aux_rx,
  output logic [7:0]                  aux_byte,
  output logic                        aux_byte_valid,
  output logic                        aux_done,
  input  logic                        aux_tx_start,    // AUX reply: begin
  input  logic [4:0]                  aux_tx_nbytes,
  input  logic [7:0]                  aux_tx_data,
  output logic                        aux_tx_req,      // next reply byte taken
  output logic                        aux_tx,          // AUX transmit line level
  output logic                        aux_tx_en,       // AUX driver enable
  output logic                        aux_tx_busy,
  // video output
  output logic                        vclk,
  output logic                        hsync,
  output logic                        vsync,
  output logic                        de,
  output logic [1:0][PIX_W-1:0]       pix,
  // status
  output logic                        clk_ls,
  output lt_state_t                   lt_state,
  output logic                        irq,
  output logic                        video_en,
  output logic [15:0]                 cnt_recover,
  output logic [15:0]                 cnt_irq,
  output logic [15:0]                 cnt_up,
  output logic [15:0]                 cnt_dn,
  output logic [15:0]                 cnt_ovf,
  output logic [15:0]                 cnt_udf,
  output logic [15:0]                 cnt_wr_half,
  output logic                        eb_ovf,       // elastic buffer overflow (sticky)  // write cycles skipped in half-rate mode
  output logic signed [15:0]          comp_k,
  output logic signed [24:0]          fifo_dist,
  output logic [LANES-1:0][14:0]      sym_err_cnt,
  output logic [LANES-1:0][15:0]      bit_err_cnt,
  output msa_t                        msa,
  output logic [8:0]                  synth_q,
  output logic [3:0]                  synth_f
);
  // ------------------------------------------------------------------
  // resets
  logic [1:0] rls_ff, rv_ff;
  logic       rst_ls_n, rst_v_n;
  always_ff @(posedge clk_ls or negedge rst_n)
    if (!rst_n) rls_ff <= '0; else rls_ff <= {rls_ff[0], 1'b1};
  assign rst_ls_n = rls_ff[1];
  always_ff @(posedge vclk or negedge rst_n)
    if (!rst_n) rv_ff <= '0; else rv_ff <= {rv_ff[0], 1'b1};
  assign rst_v_n = rv_ff[1];

  // ------------------------------------------------------------------
  // ADCDR digital part, one per lane
  logic [LANES-1:0][9:0]        dw, ew, dw_ls;
  logic [LANES-1:0]             lclk;
  logic [LANES-1:0]             dco_load_l;
  logic [LANES-1:0][CODE_W-1:0] dco_word, dco_code;
  logic [LANES-1:0][4:0]        lf_err;
  logic [LANES-1:0]             dco_load;
  logic [LANES-1:0][CODE_W-1:0] dco_mem;
  logic [LANES-1:0]             cdr_lock;
  logic [LANES-1:0][6:0]        lock_cnt;
  lt_state_t                    st;

  for (genvar i = 0; i < LANES; i++) begin : g_cdr
    bbpd_deser u_pd (.rst_n, .din(ser_in[i]), .clk(dco_clk[i]), .pd_up(dco_up[i]),
                     .pd_dn(dco_dn[i]), .d(dw[i]), .e(ew[i]), .clk_ls(lclk[i]));
    // the loop filter runs on the lane's own divided clock
    dlf #(.CODE_W(CODE_W)) u_dlf (.clk(lclk[i]), .rst_n, .d(dw[i]), .e(ew[i]), .alpha,
                                  .hold(1'b0), .load(dco_load_l[i]), .load_val(dco_mem[i]),
                                  .word(dco_word[i]), .code(dco_code[i]), .err(lf_err[i]));
    dcr_decoder u_dcr (.clk(lclk[i]), .rst_n, .w(dco_word[i]), .row(dcr_row[i]),
                       .col(dcr_col[i]), .fine(dcr_fine[i]));
  end
  assign clk_ls = lclk[0];

  // dco_load pulse (clk_ls) stretched to be seen by each lane clock
  logic [LANES-1:0][1:0] load_str;
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) load_str <= '0;
    else for (int i = 0; i < LANES; i++)
      load_str[i] <= dco_load[i] ? 2'd3 : (load_str[i] != 0 ? load_str[i] - 2'd1 : 2'd0);
  always_comb for (int i = 0; i < LANES; i++) dco_load_l[i] = (load_str[i] != 0);

  // words and loop-filter state re-registered on the link clock
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) begin dw_ls <= '0; lock_cnt <= '0; end
    else begin
      dw_ls <= dw;
      for (int i = 0; i < LANES; i++) begin
        if ((lf_err[i][4] ? -lf_err[i] : lf_err[i]) > 5'(LOCK_TH)) lock_cnt[i] <= '0;
        else if (lock_cnt[i] != 7'd64) lock_cnt[i] <= lock_cnt[i] + 1'b1;
      end
    end
  always_comb for (int i = 0; i < LANES; i++) cdr_lock[i] = (lock_cnt[i] == 7'd64);

  // ------------------------------------------------------------------
  // logical PHY
  logic [LANES-1:0][9:0] cw, aw;
  logic [LANES-1:0]      sym_lock, tps1, code_err, disp_err;
  sym_t [LANES-1:0]      dsym, ksym, ssym;
  logic                  aligned, relock, sync_lost;
  logic                  enter_rec, st_cr_entry;

  ch_ctrl #(.LANES(LANES)) u_ch (.clk(clk_ls), .rst_n(rst_ls_n), .din(dw_ls), .swap_sel,
                                 .inv, .rev, .dout(cw));

  for (genvar i = 0; i < LANES; i++) begin : g_lphy
    byte_align u_ba (.clk(clk_ls), .rst_n(rst_ls_n), .relock, .din(cw[i]), .dout(aw[i]),
                     .sym_lock(sym_lock[i]), .tps1(tps1[i]));
    dec8b10b u_dec (.clk(clk_ls), .rst_n(rst_ls_n), .din(aw[i]), .sym(dsym[i]),
                    .code_err(code_err[i]), .disp_err(disp_err[i]));
    link_quality u_lq (.clk(clk_ls), .rst_n(rst_ls_n), .clear(!hpd), .sym_en(sym_lock[i]),
                       .sym_err(code_err[i] | disp_err[i]), .prbs_en, .raw(cw[i]),
                       .sym_err_cnt(sym_err_cnt[i]), .bit_err_cnt(bit_err_cnt[i]));
    descrambler u_dsc (.clk(clk_ls), .rst_n(rst_ls_n), .enable(video_en || st == LT_RECOVER),
                       .alt_seed, .din(ksym[i]), .dout(ssym[i]));
  end

  lane_deskew #(.LANES(LANES)) u_dsk (.clk(clk_ls), .rst_n(rst_ls_n), .realign(relock),
                                      .lane_cnt, .din(dsym), .dout(ksym), .aligned);

  // sync-lost detector: decode errors in a 64-clock window
  logic [LANES-1:0] act;
  always_comb for (int i = 0; i < LANES; i++) act[i] = (i < 32'(lane_cnt));
  logic [5:0] win_cnt;
  logic [3:0] err_cnt;
  logic       err_burst;
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) begin win_cnt <= '0; err_cnt <= '0; err_burst <= 1'b0; end
    else begin
      win_cnt <= win_cnt + 1'b1;
      if (win_cnt == 0) begin
        err_burst <= (32'(err_cnt) >= ERR_LIM);
        err_cnt   <= 4'(|(code_err & act));
      end else if (|(code_err & act) && err_cnt != 4'hF) err_cnt <= err_cnt + 1'b1;
    end
  assign sync_lost = (|(~sym_lock & act)) || !aligned || err_burst;

  logic irq_i;
  link_train_ctrl #(.LANES(LANES), .CODE_W(CODE_W), .REC_TIME(REC_TIME), .IRQ_LEN(IRQ_LEN))
    u_lt (.clk(clk_ls), .rst_n(rst_ls_n), .hpd, .mode(lt_mode_t'(lt_mode)), .self_rec, .tp_sel,
          .lane_cnt, .cdr_lock, .tps1_seen(tps1), .sym_lock, .aligned, .sync_lost,
          .dco_code, .state(st), .cr_done(), .eq_done(), .err_mask(), .video_en,
          .irq(irq_i), .dco_load, .dco_mem, .cnt_recover, .cnt_irq);
  assign lt_state = st;
  assign irq      = irq_i;

  // relock alignment when recovery starts or training restarts
  lt_state_t st_d;
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) st_d <= LT_IDLE; else st_d <= st;
  assign enter_rec   = (st == LT_RECOVER) && (st_d != LT_RECOVER);
  assign st_cr_entry = (st == LT_CR) && (st_d != LT_CR);
  assign relock      = enter_rec || st_cr_entry;

  // ------------------------------------------------------------------
  // link layer (link clock)
  logic [LANES-1:0][7:0] act_data, sec_data;
  logic act_valid, sec_valid, sec_start, sec_end, line_end, frame_start;
  logic m_valid;
  stream_unframer #(.LANES(LANES)) u_unf (.clk(clk_ls), .rst_n(rst_ls_n), .enable(video_en),
    .din(ssym), .act_data, .act_valid, .sec_data, .sec_valid, .sec_start, .sec_end,
    .line_end, .frame_start, .vbid());
  msa_unpacker #(.LANES(LANES)) u_msa (.clk(clk_ls), .rst_n(rst_ls_n), .lane_cnt, .sec_start,
    .sec_valid, .sec_data, .sec_end, .msa, .m_valid);

  localparam int ICW = $clog2(LANES + 1);
  logic [ICW-1:0]              pu_cnt;
  logic [LANES-1:0][PIX_W-1:0] pu_pix;
  pixel_unpacker #(.LANES(LANES)) u_pix (.clk(clk_ls), .rst_n(rst_ls_n), .lane_cnt,
    .bpc_code(msa.misc0[7:5]), .line_end, .in_valid(act_valid), .in_data(act_data),
    .out_cnt(pu_cnt), .out_pix(pu_pix));

  logic                  we, started, w_ovf;
  logic [AW-1:0]         waddr;
  logic [2:0]            wcount;
  logic [3:0][PIX_W-1:0] wdata;
  logic [23:0]           wpix;
  logic                  flush_ls;
  assign flush_ls = !video_en;
  half_rate_writer #(.DEPTH(DEPTH), .PIX_W(PIX_W), .IN_PIX(LANES), .WR_PIX(4)) u_wr (
    .clk(clk_ls), .rst_n(rst_ls_n), .half_rate, .flush(flush_ls), .frame_start,
    .hwidth(msa.hwidth), .in_cnt(pu_cnt), .in_pix(pu_pix), .we, .waddr, .wcount, .wdata,
    .wpix, .started, .ovf(w_ovf));
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) eb_ovf <= 1'b0; else if (w_ovf) eb_ovf <= 1'b1;

  // half-rate observation: link clocks on which no write strobe was given
  logic hr_tog;
  always_ff @(posedge clk_ls or negedge rst_ls_n)
    if (!rst_ls_n) begin hr_tog <= 1'b0; cnt_wr_half <= '0; end
    else begin
      hr_tog <= ~hr_tog;
      if (half_rate && video_en && started && hr_tog && cnt_wr_half != 16'hFFFF)
        cnt_wr_half <= cnt_wr_half + 1'b1;
    end

  logic [23:0] m_f, n_f;
  m_filter u_mf (.clk(clk_ls), .rst_n(rst_ls_n), .clear(!video_en), .m_valid,
                 .m_in(msa.mvid), .n_in(msa.nvid), .m_out(m_f), .n_out(n_f), .valid());

  // ------------------------------------------------------------------
  // video clock domain
  logic [23:0] m_s1, m_s2, m_v, n_s1, n_s2, n_v;
  logic [1:0]  start_ff, flush_ff;
  always_ff @(posedge vclk or negedge rst_v_n)
    if (!rst_v_n) begin
      m_s1 <= '0; m_s2 <= '0; m_v <= '0; n_s1 <= '0; n_s2 <= '0; n_v <= '0;
      start_ff <= '0; flush_ff <= 2'b11;
    end else begin
      m_s1 <= m_f; m_s2 <= m_s1; n_s1 <= n_f; n_s2 <= n_s1;
      if (m_s1 == m_s2 && n_s1 == n_s2) begin m_v <= m_s2; n_v <= n_s2; end
      start_ff <= {start_ff[0], started};
      flush_ff <= {flush_ff[0], flush_ls};
    end

  logic signed [15:0] k;
  logic up, dn, ovf, udf;
  logic [23:0] m_synth;
  assign comp_k  = k;
  assign m_synth = (m_v == 0) ? 24'd0 : 24'($signed({1'b0, m_v}) + 25'(k));

  video_clk_synth #(.MN_W(24), .CLK_MULT(5), .PIX_PER_CLK(2)) u_syn (
    .mp, .rst_n, .m(m_synth), .n(n_v), .vclk, .q(synth_q), .f(synth_f), .valid());

  logic          re, line_start;
  logic [AW-1:0] raddr;
  logic [23:0]   rpix;
  logic [1:0][PIX_W-1:0] rdata;

  line_fifo #(.DEPTH(DEPTH), .PIX_W(PIX_W), .BANKS(4), .WR_PIX(4), .RD_PIX(2)) u_fifo (
    .wclk(clk_ls), .we, .waddr, .wcount, .wdata, .rclk(vclk), .re, .raddr, .rdata);

  video_timing_gen #(.DEPTH(DEPTH), .PIX_PER_CLK(2)) u_vtg (
    .clk(vclk), .rst_n(rst_v_n), .flush(flush_ff[1]), .start(start_ff[1]), .msa,
    .state(), .hsync, .vsync, .de, .re, .raddr, .rpix, .line_start);
  assign pix = rdata;

  fifo_monitor #(.DEPTH(DEPTH)) u_mon (
    .wclk(clk_ls), .wrst_n(rst_ls_n), .wpix, .rclk(vclk), .rrst_n(rst_v_n), .rpix,
    .line_start, .reading(re), .hwidth(msa.hwidth), .up, .dn, .ovf, .udf, .distance(fifo_dist));

  gain_control u_gc (.clk(vclk), .rst_n(rst_v_n), .clear(flush_ff[1] || !comp_en),
                     .up(up && comp_en), .dn(dn && comp_en), .m_ref(m_v), .k);

  always_ff @(posedge vclk or negedge rst_v_n)
    if (!rst_v_n) begin cnt_up <= '0; cnt_dn <= '0; cnt_ovf <= '0; cnt_udf <= '0; end
    else begin
      if (up  && cnt_up  != 16'hFFFF) cnt_up  <= cnt_up  + 1'b1;
      if (dn  && cnt_dn  != 16'hFFFF) cnt_dn  <= cnt_dn  + 1'b1;
      if (ovf && cnt_ovf != 16'hFFFF) cnt_ovf <= cnt_ovf + 1'b1;
      if (udf && cnt_udf != 16'hFFFF) cnt_udf <= cnt_udf + 1'b1;
    end

  // ------------------------------------------------------------------
  // AUX channel receive
  aux_ch_rx u_aux (.clk(aux_clk), .rst_n, .rx(aux_rx), .rx_byte(aux_byte),
                   .byte_valid(aux_byte_valid), .done(aux_done), .in_sync(), .th());
  aux_ch_tx u_aux_tx (.clk(aux_clk), .rst_n, .start(aux_tx_start), .nbytes(aux_tx_nbytes),
                      .data(aux_tx_data), .byte_req(aux_tx_req), .tx(aux_tx), .tx_en(aux_tx_en),
                      .busy(aux_tx_busy));
endmodule
