// dlf: digital loop filter (integral path) of the ADCDR.
//
// Every link clock it receives the ten data bits d and the ten edge
// bits e of the bang-bang detector (e[i] sampled on the boundary before
// d[i]). For each bit
//   dn[i] = d[i]   ^ e[i]     (edge equals the earlier bit: clock early)
//   up[i] = d[i-1] ^ e[i]     (edge equals the later bit: clock late)
// with d[-1] the last bit of the previous word. err = sum(up) - sum(dn)
// (-10..10) is scaled by 2^alpha and accumulated. The accumulator has
// FRAC_W bits below the 11-bit integral word; a first-order delta-sigma
// modulator dithers the integral word by one LSB from these bits, so the
// DCO sees steps finer than one code on average.
// A larger code means a higher DCO frequency.
//
// load: the accumulator is set to {load_val, 0}; this restores a
// memorized code in the self-recovery scheme. hold freezes it.
// code is the undithered integral word (for memorizing).
//
// Follows the document: XOR up/dn detection, err = up_sum - dn_sum, gain
// alpha, accumulator, first-order DSM, 11 MSBs to the DCR. Widths of the
// fraction, the shift form of alpha and the load port are this design's.
module dlf #(
  parameter int CODE_W = 11,
  parameter int FRAC_W = 10
) (
  input  logic              clk,        // link symbol clock
  input  logic              rst_n,
  input  logic [9:0]        d,
  input  logic [9:0]        e,
  input  logic [2:0]        alpha,      // integral gain 2^alpha
  input  logic              hold,
  input  logic              load,
  input  logic [CODE_W-1:0] load_val,
  output logic [CODE_W-1:0] word,       // dithered integral word to the DCR
  output logic [CODE_W-1:0] code,       // undithered integral word
  output logic signed [4:0] err
);
  localparam int ACC_W = CODE_W + FRAC_W;

  logic              d_last;
  logic [ACC_W-1:0]  acc;
  logic [FRAC_W-1:0] dsm;

  always_comb begin
    int up_sum, dn_sum;
    up_sum = 0; dn_sum = 0;
    for (int i = 0; i < 10; i++) begin
      logic prev_d;
      prev_d = (i == 0) ? d_last : d[(i+9)%10];
      dn_sum += 32'(d[i] ^ e[i]);
      up_sum += 32'(prev_d ^ e[i]);
    end
    err = 5'(up_sum - dn_sum);
  end

  wire signed [ACC_W+1:0] acc_n = $signed({2'b00, acc}) +
                                  ($signed({{(ACC_W-3){err[4]}}, err}) <<< alpha);
  wire [FRAC_W:0] dsm_sum = {1'b0, dsm} + {1'b0, acc[FRAC_W-1:0]};

  assign code = acc[ACC_W-1:FRAC_W];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_last <= 1'b0; acc <= {1'b1, {(ACC_W-1){1'b0}}}; dsm <= '0; word <= '0;
    end else begin
      d_last <= d[9];
      dsm    <= dsm_sum[FRAC_W-1:0];
      if (load)
        acc <= {load_val, {FRAC_W{1'b0}}};
      else if (!hold) begin
        if (acc_n < 0)                          acc <= '0;
        else if (acc_n > (ACC_W+2)'((1 << ACC_W) - 1)) acc <= '1;
        else                                    acc <= acc_n[ACC_W-1:0];
      end
      word <= (dsm_sum[FRAC_W] && code != '1) ? code + 1'b1 : code;
    end
endmodule
