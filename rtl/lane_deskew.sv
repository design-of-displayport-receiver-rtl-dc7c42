// lane_deskew: inter-lane de-skew and lane alignment.
//
// The transmitter delays each lane by two symbols more than the one
// before, and the channel adds its own skew. Every lane passes through a
// delay line of up to MAXD symbols. While not aligned, the arrival time
// of the next BS (blanking start) on each active lane is recorded; when
// all active lanes have seen one (see below), each
// lane is delayed by (latest arrival - its own arrival) and `aligned`
// rises. After that, every BS must leave all active lanes in the same
// clock; if not, alignment is dropped and searched again.
// Only a BS that does not follow another BS two symbols earlier counts as
// an arrival: in the equalization pattern (K28.5 D11.6 K28.5 D11.6 and six
// D10.2) that picks the first K28.5 of each ten symbols. All lanes must
// arrive within MAXD/2 clocks of the first one, otherwise the search
// starts again; so a lane whose arrival came just before the search
// began is not paired with the next pattern period.
// realign forces a new search. Latency: one clock plus the lane's delay.
//
// Follows the document: de-skew of the two-symbol inter-lane skew and
// lane alignment by comparing K characters. Delay-line depth and the
// search procedure are this design's choices.
module lane_deskew
  import dp_pkg::*;
#(
  parameter int LANES = 4,
  parameter int MAXD  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  realign,
  input  logic [2:0]            lane_cnt,
  input  sym_t [LANES-1:0]      din,
  output sym_t [LANES-1:0]      dout,
  output logic                  aligned
);
  localparam int DW = $clog2(MAXD);

  logic [LANES-1:0] act;
  always_comb for (int i = 0; i < LANES; i++) act[i] = (i < 32'(lane_cnt));

  sym_t [LANES-1:0][MAXD-1:0] dl;         // delay lines, dl[i][0] newest
  logic [LANES-1:0][DW-1:0]   dly;
  logic [LANES-1:0][DW:0]     t_arr;      // clocks since arrival of BS
  logic [LANES-1:0]           seen;
  logic                       search;
  logic [DW:0]                waitc;

  function automatic logic is_bs(input sym_t s);
    return s.k && s.d == K_BS;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dl <= '0;
    else for (int i = 0; i < LANES; i++) dl[i] <= {dl[i][MAXD-2:0], din[i]};

  logic [LANES-1:0] bs_out;
  always_comb
    for (int i = 0; i < LANES; i++) begin
      dout[i]   = dl[i][dly[i]];
      bs_out[i] = is_bs(dout[i]);
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dly <= '0; t_arr <= '0; seen <= '0; search <= 1'b1; aligned <= 1'b0; waitc <= '0;
    end else if (realign) begin
      seen <= '0; search <= 1'b1; aligned <= 1'b0; waitc <= '0;
    end else if (search) begin
      for (int i = 0; i < LANES; i++) begin
        if (seen[i]) t_arr[i] <= t_arr[i] + 1'b1;
        else if (is_bs(din[i]) && !is_bs(dl[i][1])) begin seen[i] <= 1'b1; t_arr[i] <= '0; end
      end
      if (|seen) waitc <= waitc + 1'b1;
      if ((seen & act) == act) begin
        // t_arr counts clocks since the lane's BS: a lane that was early
        // by t clocks is delayed by t
        for (int i = 0; i < LANES; i++) dly[i] <= DW'(t_arr[i]);
        search <= 1'b0; aligned <= 1'b1; seen <= '0; waitc <= '0;
      end else if (waitc >= (DW+1)'(MAXD / 2)) begin
        seen <= '0; waitc <= '0;
      end
    end else begin
      if (|(bs_out & act) && ((bs_out & act) != act)) begin
        aligned <= 1'b0; search <= 1'b1; seen <= '0;
      end
    end
endmodule
