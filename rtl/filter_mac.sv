// filter_mac: one folded 16-tap interpolation filter. A single
// multiply-accumulate unit walks the 16 pixels of the 4x4 neighbourhood, one
// tap per cycle, and keeps the running sum in carry-save form (a sum and a
// carry word updated by a row of full adders), so no carry has to ripple
// through the accumulator inside the loop. After the 16th product one
// carry-propagate addition resolves the sum; the result is rounded, scaled by
// 2^-COEF_FRAC and clamped to the 8-bit pixel range.
// The folding onto one MAC, the carry-save accumulation, the final addition
// and the 11-bit coefficients follow the source design; the rounding and
// clamping are this implementation's.
//
// Interface: start begins a filter; during the following 16 cycles tap
// (0..15, tap = 4*row + col of the window) tells which pixel and coefficient
// to present on pix and coef in the same cycle. done pulses 18 cycles after
// start (16 MAC cycles, 1 final-addition cycle) and result stays valid until
// the next start. Three copies run in lock step, one per output phase.
module filter_mac
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic [3:0] tap,
  input  pix_t       pix,
  input  coef_t      coef,
  output logic       busy,
  output logic       done,
  output pix_t       result
);
  localparam int unsigned ACC_W = PIX_W + COEF_W + 1 + 4;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_CPA} state_e;
  state_e state;

  acc_t acc_s, acc_c, pp, total, rounded;

  assign pp = acc_t'($signed({1'b0, pix}) * coef);

  always_comb begin
    total   = acc_s + acc_c;
    rounded = (total + acc_t'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tap    <= '0;
      acc_s  <= '0;
      acc_c  <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tap   <= '0;
          acc_s <= '0;
          acc_c <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          // 3:2 carry-save compression of sum, carry and the new product.
          acc_s <= acc_s ^ acc_c ^ pp;
          acc_c <= ((acc_s & acc_c) | (acc_s & pp) | (acc_c & pp)) <<< 1;
          tap   <= tap + 1'b1;
          if (tap == 4'd15) state <= S_CPA;
        end
        default: begin
          if (rounded < 0)                     result <= '0;
          else if (rounded > acc_t'(8'hFF))    result <= 8'hFF;
          else                                 result <= pix_t'(rounded);
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
