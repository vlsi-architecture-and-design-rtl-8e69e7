// sobel_folded: Sobel gradients of a 3x3 luma window, computed on a bank of
// four adders reused over three clock cycles.
//
// The straightforward Sobel pair needs ten additions; sharing the two
// diagonal differences brings it down to eight:
//   A = w[2][2]-w[0][0]   B = w[0][2]-w[2][0]
//   C = w[1][2]-w[1][0]   D = w[2][1]-w[0][1]
//   fx = (A + 2C) + B     fy = (A + 2D) - B
// (w[row][col], row growing downwards, col growing to the right; fx is the
// horizontal and fy the vertical gradient). Cycle 1 forms A..D on all four
// adders, cycle 2 forms A+2C and A+2D, cycle 3 adds/subtracts B. The
// sub-expression sharing, the 8-addition graph folded onto 4 adders over
// 3 cycles and the 12-bit result follow the source design; the exact
// schedule of the additions over the cycles is this implementation's.
//
// Interface: win must be stable in the cycle start is high. done pulses for
// one cycle three cycles after start, with fx/fy valid from then until the
// next start. busy is high while a computation is in flight.
module sobel_folded
  import scaler_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  pix_t  win [3][3],
  output logic  busy,
  output logic  done,
  output grad_t fx,
  output grad_t fy
);
  typedef enum logic [1:0] {S_IDLE, S_C2, S_C3} state_e;
  state_e state;

  grad_t ra, rb, rc, rd;        // A..D, then A+2C / A+2D held in ra/rc
  grad_t op_a [4], op_b [4], sum [4];
  logic  sub  [4];

  // Operand selection for the shared adder bank.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      op_a[k] = '0;
      op_b[k] = '0;
      sub[k]  = 1'b0;
    end
    unique case (state)
      S_IDLE: begin
        op_a[0] = grad_t'({1'b0, win[2][2]}); op_b[0] = grad_t'({1'b0, win[0][0]}); sub[0] = 1'b1;
        op_a[1] = grad_t'({1'b0, win[0][2]}); op_b[1] = grad_t'({1'b0, win[2][0]}); sub[1] = 1'b1;
        op_a[2] = grad_t'({1'b0, win[1][2]}); op_b[2] = grad_t'({1'b0, win[1][0]}); sub[2] = 1'b1;
        op_a[3] = grad_t'({1'b0, win[2][1]}); op_b[3] = grad_t'({1'b0, win[0][1]}); sub[3] = 1'b1;
      end
      S_C2: begin
        op_a[0] = ra; op_b[0] = rc <<< 1;   // A + 2C
        op_a[1] = ra; op_b[1] = rd <<< 1;   // A + 2D
      end
      default: begin
        op_a[0] = ra; op_b[0] = rb;               // (A+2C) + B
        op_a[1] = rc; op_b[1] = rb; sub[1] = 1'b1; // (A+2D) - B
      end
    endcase
    for (int k = 0; k < 4; k++)
      sum[k] = sub[k] ? op_a[k] - op_b[k] : op_a[k] + op_b[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ra <= '0; rb <= '0; rc <= '0; rd <= '0;
      fx <= '0; fy <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ra <= sum[0]; rb <= sum[1]; rc <= sum[2]; rd <= sum[3];
          state <= S_C2;
        end
        S_C2: begin
          ra <= sum[0]; rc <= sum[1];
          state <= S_C3;
        end
        default: begin
          fx <= sum[0]; fy <= sum[1];
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
