// dec8b10b: ANSI 8b/10b decoder of one lane.
//
// Input word bit 0 is the first bit on the wire (a); the code groups are
// abcdei (6 bit) and fghj (4 bit). The 6-bit group gives EDCBA, the
// 4-bit group HGF. K28.y is recognised by its 6-bit group (in the
// positive-disparity form its 4-bit group is complemented before
// decoding); K23.7, K27.7, K29.7 and K30.7 by their 6-bit group with the
// x.7 alternate 4-bit group. code_err flags a 6-bit group that is not a
// valid code; disp_err flags a word whose disparity does not fit the
// running disparity. One clock latency.
//
// The document names the 8b/10b decoder; the code tables are those of
// the ANSI 8b/10b standard.
module dec8b10b
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  output sym_t       sym,
  output logic       code_err,
  output logic       disp_err
);
  wire [5:0] g6 = {din[0], din[1], din[2], din[3], din[4], din[5]};   // abcdei
  wire [3:0] g4 = {din[6], din[7], din[8], din[9]};                   // fghj

  logic [4:0] v5; logic ok6;
  always_comb begin
    ok6 = 1'b1; v5 = '0;
    case (g6)
      6'b100111, 6'b011000: v5 = 5'd0;
      6'b011101, 6'b100010: v5 = 5'd1;
      6'b101101, 6'b010010: v5 = 5'd2;
      6'b110001:            v5 = 5'd3;
      6'b110101, 6'b001010: v5 = 5'd4;
      6'b101001:            v5 = 5'd5;
      6'b011001:            v5 = 5'd6;
      6'b111000, 6'b000111: v5 = 5'd7;
      6'b111001, 6'b000110: v5 = 5'd8;
      6'b100101:            v5 = 5'd9;
      6'b010101:            v5 = 5'd10;
      6'b110100:            v5 = 5'd11;
      6'b001101:            v5 = 5'd12;
      6'b101100:            v5 = 5'd13;
      6'b011100:            v5 = 5'd14;
      6'b010111, 6'b101000: v5 = 5'd15;
      6'b011011, 6'b100100: v5 = 5'd16;
      6'b100011:            v5 = 5'd17;
      6'b010011:            v5 = 5'd18;
      6'b110010:            v5 = 5'd19;
      6'b001011:            v5 = 5'd20;
      6'b101010:            v5 = 5'd21;
      6'b011010:            v5 = 5'd22;
      6'b111010, 6'b000101: v5 = 5'd23;
      6'b110011, 6'b001100: v5 = 5'd24;
      6'b100110:            v5 = 5'd25;
      6'b010110:            v5 = 5'd26;
      6'b110110, 6'b001001: v5 = 5'd27;
      6'b001110:            v5 = 5'd28;
      6'b101110, 6'b010001: v5 = 5'd29;
      6'b011110, 6'b100001: v5 = 5'd30;
      6'b101011, 6'b010100: v5 = 5'd31;
      6'b001111, 6'b110000: v5 = 5'd28;   // K28
      default:              ok6 = 1'b0;
    endcase
  end

  wire       k28 = (g6 == 6'b001111) || (g6 == 6'b110000);
  wire [3:0] g4d = (g6 == 6'b110000) ? ~g4 : g4;
  logic [2:0] v3;
  always_comb
    case (g4d)
      4'b1011, 4'b0100: v3 = 3'd0;
      4'b1001:          v3 = 3'd1;
      4'b0101:          v3 = 3'd2;
      4'b1100, 4'b0011: v3 = 3'd3;
      4'b1101, 4'b0010: v3 = 3'd4;
      4'b1010:          v3 = 3'd5;
      4'b0110:          v3 = 3'd6;
      default:          v3 = 3'd7;    // 1110/0001 (P7), 0111/1000 (A7, K.7)
    endcase

  wire k_x7 = (g4 == 4'b0111 || g4 == 4'b1000) &&
              (v5 == 5'd23 || v5 == 5'd27 || v5 == 5'd29 || v5 == 5'd30) && ok6 && !k28;

  // running disparity: ones count 5 neutral, 6 -> +2, 4 -> -2
  logic       rd_pos;
  logic [3:0] ones;
  always_comb begin
    ones = '0;
    for (int b = 0; b < 10; b++) ones += 4'(din[b]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sym <= '0; code_err <= 1'b0; disp_err <= 1'b0; rd_pos <= 1'b0;
    end else begin
      sym.k    <= k28 || k_x7;
      sym.d    <= {v3, v5};
      code_err <= !ok6 || (ones != 4'd5 && ones != 4'd6 && ones != 4'd4);
      disp_err <= (ones == 4'd6 && rd_pos) || (ones == 4'd4 && !rd_pos);
      if (ones == 4'd6) rd_pos <= 1'b1;
      else if (ones == 4'd4) rd_pos <= 1'b0;
    end
endmodule
