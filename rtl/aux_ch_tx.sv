// aux_ch_tx: AUX channel Manchester-II transmitter (reply direction).
//
// Sends one AUX transaction from the 16 MHz AUX clock: SYNC_ZEROS
// Manchester zeros (pre-charge and sync), the sync end (two bit periods
// high, then two low), the data bytes MSB first, and the STOP pattern
// (two bit periods high, two low). A Manchester bit is two half bits of
// HALF_BIT clocks: a 1 is low then high, a 0 high then low, the same
// convention aux_ch_rx decodes.
//
// Interface: start (one clock) begins a transaction of nbytes bytes
// (1..31). The first byte must be on `data` at start; byte_req pulses in
// the clock the transmitter takes a byte, and the next byte must be on
// `data` by the clock after. tx is the line level, tx_en enables the pad
// driver for the whole transaction, busy is high from start to the end
// of STOP.
//
// Follows the document: the AUX logic transmits with the same 16 MHz
// oversampling clock as it receives. The counts of the sync pattern are
// the DisplayPort AUX ones; the byte interface is this design's choice.
module aux_ch_tx #(
  parameter int HALF_BIT   = 8,   // 16 MHz / 1 Mb/s / 2
  parameter int SYNC_ZEROS = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] nbytes,
  input  logic [7:0] data,
  output logic       byte_req,
  output logic       tx,
  output logic       tx_en,
  output logic       busy
);
  typedef enum logic [2:0] {T_IDLE, T_SYNC, T_SEND, T_DATA, T_STOP} tstate_t;
  tstate_t     st;
  logic [$clog2(HALF_BIT)-1:0] hcnt;   // clocks within a half bit
  logic [5:0]  nhalf;                  // half bits left in the current part
  logic [7:0]  sh;                     // byte being sent
  logic [2:0]  nbit;
  logic [4:0]  left;                   // bytes left after the current one
  logic        second;                 // second half of a data bit

  wire half_end = (32'(hcnt) == HALF_BIT - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= T_IDLE; hcnt <= '0; nhalf <= '0; sh <= '0; nbit <= '0; left <= '0;
      second <= 1'b0; tx <= 1'b0; tx_en <= 1'b0; busy <= 1'b0; byte_req <= 1'b0;
    end else begin
      byte_req <= 1'b0;
      if (st != T_IDLE) hcnt <= half_end ? '0 : hcnt + 1'b1;
      case (st)
        T_IDLE: if (start && nbytes != 0) begin
          st <= T_SYNC; busy <= 1'b1; tx_en <= 1'b1; hcnt <= '0;
          nhalf <= 6'(2 * SYNC_ZEROS - 1); tx <= 1'b1;           // zero = high, low
          sh <= data; byte_req <= 1'b1; left <= nbytes - 1'b1;
        end
        T_SYNC: if (half_end) begin
          if (nhalf != 0) begin nhalf <= nhalf - 1'b1; tx <= !nhalf[0]; end
          else begin st <= T_SEND; nhalf <= 6'd7; tx <= 1'b1; end
        end
        T_SEND: if (half_end) begin                              // sync end
          if (nhalf != 0) begin nhalf <= nhalf - 1'b1; tx <= (nhalf > 6'd4); end
          else begin st <= T_DATA; nbit <= 3'd7; second <= 1'b0; tx <= !sh[7]; end
        end
        T_DATA: if (half_end) begin
          if (!second) begin second <= 1'b1; tx <= sh[nbit]; end
          else if (nbit != 0) begin
            second <= 1'b0; nbit <= nbit - 1'b1; tx <= !sh[nbit - 1'b1];
          end else if (left != 0) begin
            sh <= data; byte_req <= 1'b1; left <= left - 1'b1;
            second <= 1'b0; nbit <= 3'd7; tx <= !data[7];
          end else begin st <= T_STOP; nhalf <= 6'd7; tx <= 1'b1; end
        end
        T_STOP: if (half_end) begin
          if (nhalf != 0) begin nhalf <= nhalf - 1'b1; tx <= (nhalf > 6'd4); end
          else begin st <= T_IDLE; tx <= 1'b0; tx_en <= 1'b0; busy <= 1'b0; end
        end
        default: st <= T_IDLE;
      endcase
    end
endmodule
