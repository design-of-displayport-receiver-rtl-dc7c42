// aux_ch_rx: AUX CH receive logic (Manchester-II, oversampled).
//
// The AUX line is sampled with the 16 MHz AUX clock (16 samples per bit
// at 1 Mbps). Processing:
//  1. Two-flop synchroniser, then a glitch filter: the filtered level
//     changes only after GLITCH (3) consecutive samples agree, so pulses
//     shorter than three sample periods are removed.
//  2. Sync hunt: in the pre-charge/sync pattern (a run of Manchester
//     zeros) the line toggles every half bit. The time between edges is
//     measured and a moving average of the half-bit period (th, in
//     samples, 4 fractional bits) is formed; it starts at 8 samples.
//     After at least MIN_ZEROS edges at about th, a high level lasting
//     longer than 3*th is taken as the first half of the sync end
//     (high for two bit periods, then low for two bit periods).
//  3. Data: bits begin two bit periods (4*th) after the falling edge that
//     ends the high part. Each bit is sampled at 1/4 and 3/4 of the bit
//     (th/2 and 3*th/2); an edge in the middle window re-centres the bit
//     timer, so +-30 % rate offset is tolerated. bit = second-half level
//     (low-to-high = 1). Equal halves (the STOP pattern, or idle) end the
//     transaction: done pulses and the receiver returns to sync hunt.
//  4. Bits are packed MSB first into bytes (byte_valid pulses).
// An edge spacing outside 0.5*th..1.5*th during the sync hunt is treated
// as noise and restarts the hunt.
//
// Follows the document: 16 MHz oversampling, sync = 26..32 zeros then
// 2 bit periods high and 2 bit periods low, moving-average period
// calibration, removal of pulses shorter than three periods, noise before
// the sync pattern ignored. Own choices: averaging weight 1/4, sampling
// points, bit polarity, STOP detection by a missing mid-bit transition.
module aux_ch_rx #(
  parameter int SAMPLES_PER_BIT = 16,
  parameter int GLITCH          = 3,
  parameter int MIN_ZEROS       = 8
) (
  input  logic       clk,          // 16 MHz AUX clock
  input  logic       rst_n,
  input  logic       rx,           // AUX receiver output (asynchronous)
  output logic [7:0] rx_byte,
  output logic       byte_valid,
  output logic       done,         // end of transaction
  output logic       in_sync,      // sync pattern found, receiving data
  output logic [9:0] th            // measured half-bit period, Q6.4 samples
);
  localparam logic [9:0] TH0 = 10'((SAMPLES_PER_BIT / 2) * 16);

  typedef enum logic [1:0] {S_HUNT, S_SYNC_HI, S_SYNC_LO, S_DATA} st_t;
  st_t st;

  logic [1:0] sync_ff;
  logic       lvl, lvl_d;
  logic [2:0] agree;
  logic [9:0] tcnt;                // samples since last event, Q6.4 (x16)
  logic [4:0] zeros;
  logic       h1;                  // first-half sample
  logic [2:0] nbits;
  logic [6:0] sh;

  wire edge_ev = (lvl != lvl_d);

  // glitch filter
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin sync_ff <= '0; lvl <= 1'b0; lvl_d <= 1'b0; agree <= '0; end
    else begin
      sync_ff <= {sync_ff[0], rx};
      lvl_d   <= lvl;
      if (sync_ff[1] == lvl) agree <= '0;
      else if (32'(agree) == GLITCH - 1) begin lvl <= sync_ff[1]; agree <= '0; end
      else agree <= agree + 1'b1;
    end

  wire [10:0] t_half  = {1'b0, th} >> 1;
  wire [10:0] t_3half = {1'b0, th} + ({1'b0, th} >> 1);
  wire [11:0] t_3     = 12'(th) * 12'd3;
  wire [11:0] t_4     = {th, 2'b00};
  wire [10:0] t_2     = {th, 1'b0};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_HUNT; th <= TH0; tcnt <= '0; zeros <= '0; h1 <= 1'b0;
      nbits <= '0; sh <= '0; rx_byte <= '0; byte_valid <= 1'b0; done <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      done       <= 1'b0;
      if (tcnt != 10'h3FF) tcnt <= tcnt + 10'd16;
      case (st)
        S_HUNT: if (edge_ev) begin
          tcnt <= 10'd16;
          if ({1'b0, tcnt} >= t_half && {1'b0, tcnt} <= t_3half) begin
            // moving average of the half-bit period
            th <= 10'($signed({1'b0, th}) + (($signed({1'b0, tcnt}) - $signed({1'b0, th})) >>> 2));
            if (zeros != 5'h1F) zeros <= zeros + 1'b1;
          end else begin
            zeros <= '0;
            if (zeros == 0) th <= TH0;
          end
          if (lvl && 32'(zeros) >= MIN_ZEROS) st <= S_SYNC_HI;
        end
        S_SYNC_HI: begin
          if (edge_ev) begin
            tcnt <= 10'd16;
            if (12'(tcnt) >= t_3) st <= S_SYNC_LO;     // long high: sync end
            else if ({1'b0, tcnt} > t_3half) begin st <= S_HUNT; zeros <= '0; end
            // else: still the zero pattern, stay here
          end
        end
        S_SYNC_LO: begin
          if (edge_ev && 12'(tcnt) < t_3) begin st <= S_HUNT; zeros <= '0; end
          else if (12'(tcnt) >= t_4) begin
            st <= S_DATA; tcnt <= '0; nbits <= '0;
          end
        end
        S_DATA: begin
          if (edge_ev && {1'b0, tcnt} > t_half && {1'b0, tcnt} < t_3half)
            tcnt <= {th[9:4], 4'b0} + 10'd16;       // mid-bit edge: re-centre
          else if ({1'b0, tcnt} == {t_half[10:4], 4'b0})
            h1 <= lvl;
          else if ({1'b0, tcnt} == {t_3half[10:4], 4'b0}) begin
            if (h1 == lvl) begin                   // no transition: STOP
              st <= S_HUNT; zeros <= '0; done <= 1'b1;
            end else begin
              sh    <= {sh[5:0], lvl};
              nbits <= nbits + 1'b1;
              if (nbits == 3'd7) begin rx_byte <= {sh[6:0], lvl}; byte_valid <= 1'b1; end
            end
          end else if ({1'b0, tcnt} >= t_2 - 11'd16)
            tcnt <= '0;                            // next bit
        end
        default: st <= S_HUNT;
      endcase
    end

  assign in_sync = (st == S_DATA);
endmodule
