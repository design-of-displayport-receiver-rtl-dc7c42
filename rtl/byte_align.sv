// byte_align: symbol (byte) alignment of one lane.
//
// The deserializer's 10-bit words start at an arbitrary bit. The last
// two words form a 20-bit window (older word first, bit 0 first
// received); the aligner looks for the K28.5 comma (0011111010 or its
// complement, first bit first) at each of the ten offsets. When the
// same offset has been seen LOCK_CNT times in a row, the offset is
// locked and sym_lock rises; every later word is taken from the window
// at that offset. A comma seen at another offset UNLOCK_CNT times in a
// row moves the lock there. relock clears the lock.
// tps1 is high while the raw words carry the clock-recovery pattern
// (D10.2, alternating bits), in any alignment.
// Output: one word per clock, two clocks after the input.
//
// Follows the document: alignment on the pre-defined K character of
// the 8b/10b code. Counts and the TPS1 detector are this design's.
module byte_align #(
  parameter int LOCK_CNT   = 2,
  parameter int UNLOCK_CNT = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       relock,
  input  logic [9:0] din,
  output logic [9:0] dout,
  output logic       sym_lock,
  output logic       tps1
);
  localparam logic [9:0] COMMA_N = 10'h17C;   // K28.5, RD- (bit 0 first)
  localparam logic [9:0] COMMA_P = 10'h283;   // K28.5, RD+

  logic [9:0]  prev;
  logic [19:0] win;
  logic [3:0]  off, cand;
  logic [3:0]  hit_off;
  logic        hit;
  logic [2:0]  same_cnt;

  assign win = {din, prev};

  always_comb begin
    hit = 1'b0; hit_off = '0;
    for (int o = 9; o >= 0; o--)
      if (win[o +: 10] == COMMA_N || win[o +: 10] == COMMA_P) begin
        hit = 1'b1; hit_off = 4'(o);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev <= '0; off <= '0; cand <= '0; same_cnt <= '0; sym_lock <= 1'b0;
      dout <= '0; tps1 <= 1'b0;
    end else begin
      prev <= din;
      dout <= win[5'(off) +: 10];
      tps1 <= (din == 10'h155) || (din == 10'h2AA);
      if (relock) begin
        sym_lock <= 1'b0; same_cnt <= '0;
      end else if (hit && !(sym_lock && hit_off == off)) begin
        if (hit_off == cand) begin
          if (32'(same_cnt) + 1 >= (sym_lock ? UNLOCK_CNT : LOCK_CNT)) begin
            off <= hit_off; sym_lock <= 1'b1; same_cnt <= '0;
          end else same_cnt <= same_cnt + 1'b1;
        end else begin
          cand <= hit_off; same_cnt <= 3'd1;
          if ((sym_lock ? UNLOCK_CNT : LOCK_CNT) <= 1) begin off <= hit_off; sym_lock <= 1'b1; end
        end
      end else if (hit) same_cnt <= '0;
    end
endmodule
