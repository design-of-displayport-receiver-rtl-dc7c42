// descrambler: main link descrambler of one lane.
//
// A 16-bit LFSR for x^16 + x^5 + x^4 + x^3 + 1 (Galois form) produces
// eight bits per symbol; data (D) symbols are XORed with them, bit 0
// first, control (K) symbols pass unchanged. The LFSR advances on every
// symbol and is re-seeded by the scrambler-reset symbol SR (K28.0),
// which itself is passed on. The seed is FFFFh, or FFFEh when alt_seed
// is set (the alternative scrambler seed reset of eDP, a content
// protection option). With enable low, symbols pass unchanged (link
// training patterns are sent without scrambling). One clock latency.
//
// Follows the document: LFSR descrambler, alternative seed reset. The
// polynomial, the seeds and SR handling are taken from the DisplayPort
// standard.
module descrambler
  import dp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic alt_seed,
  input  sym_t din,
  output sym_t dout
);
  logic [15:0] lfsr;
  wire  [15:0] seed = alt_seed ? 16'hFFFE : 16'hFFFF;

  function automatic logic [23:0] step8(input logic [15:0] s);
    // returns {next state, 8 scrambling bits}
    logic [7:0] b;
    for (int i = 0; i < 8; i++) begin
      b[i] = s[15];
      s    = {s[14:0], 1'b0} ^ (s[15] ? 16'h0039 : 16'h0000);
    end
    return {s, b};
  endfunction

  wire [23:0] st = step8(lfsr);
  wire        sr = din.k && din.d == K_SR;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin lfsr <= 16'hFFFF; dout <= '0; end
    else begin
      if (sr) lfsr <= seed;
      else    lfsr <= st[23:8];
      dout.k <= din.k;
      dout.d <= (enable && !din.k) ? din.d ^ st[7:0] : din.d;
    end
endmodule
