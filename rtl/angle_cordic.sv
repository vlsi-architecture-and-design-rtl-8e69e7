// angle_cordic: quantises the edge orientation atan(-fx/fy) of a Sobel
// gradient into one of 8 codes k (k*22.5 degrees, modulo 180), using one
// folded CORDIC-like shift-and-add rotator instead of a divider and a large
// table.
//
// The vector (X, Y) = (fy, -fx) is first folded into the first quadrant
// (negating both when X < 0 keeps the orientation; the sign of Y is kept as
// bit "neg"). Five micro-rotations with the shift sequence s = 0, 2, 3, 3, 4
// then compare the folded angle t (0..90 deg) with the transition angles:
//   stage s=0 rotates by -45 deg; "up" = (t >= 45), and the residual is
//        reflected to r = |t - 45|;
//   stages s=2,3 rotate by -(14.04 + 7.13) deg; "d" = (r >= 21.16);
//   stages s=3,4 rotate by -(7.13 + 3.58) deg when d, else by +10.70 deg;
//        "f" = (r >= 31.86) when d, (r >= 10.46) otherwise.
// The decision thresholds thus sit at 13.1, 34.5, 55.5 and 76.9 degrees,
// within 2 degrees of the ideal 11.25, 33.75, 56.25 and 78.75. The 4-bit
// vector {neg, up, d, f} addresses a 16-word x 3-bit table giving the code.
// The shift sequence 0,2,3,3,4, the 2-degree accuracy target, the 16 x 3-bit
// table and the 7-cycle folded form follow the source design; the order of
// the add/subtract decisions and the quadrant folding are this
// implementation's reconstruction. A zero gradient gives code 0.
//
// Interface: fx/fy are sampled in the cycle start is high; done pulses
// seven cycles later with angle valid until the next start.
module angle_cordic
  import scaler_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  grad_t  fx,
  input  grad_t  fy,
  output logic   busy,
  output logic   done,
  output angle_t angle
);
  localparam int unsigned FRAC = 4;
  localparam int unsigned IW   = GRAD_W + 3 + FRAC;
  typedef logic signed [IW-1:0] cv_t;

  typedef enum logic [2:0] {S_IDLE, S_ST0, S_ST1, S_ST2, S_ST3, S_ST4, S_LUT} state_e;
  state_e state;

  cv_t  x, y;
  logic neg, up, d, f, zero;
  cv_t  x0, y0;           // folded input vector
  cv_t  xs, ys, xn, yn;   // shifted operands and next values of the rotator
  logic cw;               // clockwise micro-rotation
  logic [2:0] shamt;

  // Quadrant fold of the start vector.
  always_comb begin
    cv_t xi, yi;
    xi = cv_t'(fy) <<< FRAC;
    yi = -(cv_t'(fx) <<< FRAC);
    if (xi < 0) begin
      xi = -xi;
      yi = -yi;
    end
    x0 = xi;
    y0 = yi;
  end

  // Shift sequence 0, 2, 3, 3, 4 and rotation directions.
  always_comb begin
    unique case (state)
      S_ST0:   begin shamt = 3'd0; cw = 1'b1; end
      S_ST1:   begin shamt = 3'd2; cw = 1'b1; end
      S_ST2:   begin shamt = 3'd3; cw = 1'b1; end
      S_ST3:   begin shamt = 3'd3; cw = d;    end
      default: begin shamt = 3'd4; cw = d;    end
    endcase
    xs = x >>> shamt;
    ys = y >>> shamt;
    xn = cw ? x + ys : x - ys;
    yn = cw ? y - xs : y + xs;
  end

  // 16-word quantisation table addressed by {neg, up, d, f}.
  function automatic angle_t lut(input logic [3:0] a);
    logic [2:0] q;
    unique case (a[1:0])
      2'b11:   q = a[2] ? 3'd4 : 3'd0;
      2'b10,
      2'b01:   q = a[2] ? 3'd3 : 3'd1;
      default: q = 3'd2;
    endcase
    lut = a[3] ? angle_t'(3'd0 - q) : q;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x <= '0; y <= '0;
      neg <= 1'b0; up <= 1'b0; d <= 1'b0; f <= 1'b0; zero <= 1'b0;
      angle <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x     <= x0;
          y     <= (y0 < 0) ? -y0 : y0;
          neg   <= (y0 < 0);
          zero  <= (fx == '0) && (fy == '0);
          state <= S_ST0;
        end
        S_ST0: begin
          x     <= xn;
          y     <= (yn < 0) ? -yn : yn;   // reflect: residual |t - 45|
          up    <= (yn >= 0);
          state <= S_ST1;
        end
        S_ST1: begin
          x <= xn; y <= yn;
          state <= S_ST2;
        end
        S_ST2: begin
          x <= xn; y <= yn;
          d <= (yn >= 0);
          state <= S_ST3;
        end
        S_ST3: begin
          x <= xn; y <= yn;
          state <= S_ST4;
        end
        S_ST4: begin
          x <= xn; y <= yn;
          f <= (yn >= 0);
          state <= S_LUT;
        end
        default: begin
          angle <= zero ? angle_t'(0) : lut({neg, up, d, f});
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
