// tb_dp_pkg: testbench helpers shared by the link testbenches: an ANSI
// 8b/10b encoder (word bit 0 = first bit on the wire, running disparity
// kept by the caller) and the DisplayPort scrambler LFSR
// (x^16+x^5+x^4+x^3+1, eight bits per symbol, bit 0 first).
package tb_dp_pkg;
  import dp_pkg::*;
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

  function automatic sym_t K(input logic [7:0] d); return '{k: 1'b1, d: d}; endfunction
  function automatic sym_t D(input logic [7:0] d); return '{k: 1'b0, d: d}; endfunction
endpackage
