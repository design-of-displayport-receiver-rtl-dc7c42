// int_divider: programmable integer divider of the video clock synthesizer.
//
// Divides the recovered clock by an integer Q (4..511). A 2/3
// dual-modulus prescaler comes first: in the first prescaler period after
// each rising output edge it divides by 3 when Q is odd (MC=1), otherwise
// by 2; the modulus control then returns to 0. The divide-by-Q/2 counter
// counts prescaler periods. When it reaches Q/4 the output is reset
// (set/reset-latch behaviour); when it reaches Q/2 the output is set and
// the counter restarts, so one output period is exactly Q input cycles.
// When Q[1] is 1 (Q/2 odd) the reset is taken on the falling edge of the
// prescaler output, one input cycle later, which keeps the duty cycle
// within half an input period of 50%.
//
// Interface: q_in is sampled on the clock edge that starts a new output
// period; `load` is high in the input cycle that ends with that edge, so
// logic on the same clock can present the next divisor combinationally.
// All flip-flops are on the rising edge of clk; the output rises on a
// rising edge of clk.
//
// The operation follows the flow chart of the document (MC, CNT==Q/4,
// CNT==Q/2). The prescaler is written as a small cycle counter rather
// than as a gate-level 2/3 cell, which is this design's choice.
module int_divider #(
  parameter int Q_W = 9
) (
  input  logic           clk,      // recovered clock, phase MP[0]
  input  logic           rst_n,
  input  logic [Q_W-1:0] q_in,     // divisor for the next period, >= 4
  output logic           load,     // next edge starts a period, q_in taken
  output logic           div_clk   // divided clock
);
  logic [Q_W-1:0] q_cur;
  logic [1:0]     pre;        // prescaler cycle count
  logic           mc;         // modulus control: 1 = divide by 3
  logic [Q_W-2:0] cnt;        // divide-by-Q/2 counter
  logic           fall_pend;  // reset on the prescaler falling edge

  wire            tick   = (pre == (mc ? 2'd2 : 2'd1));
  wire [Q_W-2:0]  cnt_n  = cnt + 1'b1;
  wire [Q_W-2:0]  half_q = q_cur[Q_W-1:1];
  wire [Q_W-2:0]  qrt_q  = (Q_W-1)'(q_cur[Q_W-1:2]);

  assign load = tick && (cnt_n == half_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_cur <= Q_W'(16); pre <= '0; mc <= 1'b0; cnt <= '0;
      fall_pend <= 1'b0; div_clk <= 1'b0;
    end else begin
      fall_pend <= 1'b0;
      if (fall_pend) div_clk <= 1'b0;
      if (!tick) begin
        pre <= pre + 1'b1;
      end else begin
        pre <= '0;
        mc  <= 1'b0;
        if (load) begin
          cnt     <= '0;
          div_clk <= 1'b1;
          q_cur   <= (q_in < Q_W'(4)) ? Q_W'(16) : q_in;
          mc      <= (q_in < Q_W'(4)) ? 1'b0 : q_in[0];
        end else begin
          cnt <= cnt_n;
          if (cnt_n == qrt_q) begin
            if (q_cur[1]) fall_pend <= 1'b1;
            else          div_clk   <= 1'b0;
          end
        end
      end
    end

endmodule
