// bilinear_unit: 2x bilinear interpolation of one chroma sample p00 from its
// right, lower and lower-right neighbours. It produces the three new samples
// of the 2x2 output block:
//   right = (p00 + p01 + 1) >> 1
//   below = (p00 + p10 + 1) >> 1
//   diag  = (p00 + p01 + p10 + p11 + 2) >> 2
// Cycle 1 forms the pair sums, cycle 2 the final sums and rounding shifts.
// The use of bilinear interpolation for U and V and the 2-cycle latency
// follow the source design; the round-half-up arithmetic is this
// implementation's.
//
// Interface: inputs are sampled when start is high; done pulses two cycles
// later with the outputs valid until the next start.
module bilinear_unit
  import scaler_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  pix_t p00,
  input  pix_t p01,
  input  pix_t p10,
  input  pix_t p11,
  output logic done,
  output pix_t right,
  output pix_t below,
  output pix_t diag
);
  logic       stage2;
  logic [8:0] s_top, s_left, s_bot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage2 <= 1'b0;
      done   <= 1'b0;
      s_top  <= '0; s_left <= '0; s_bot <= '0;
      right  <= '0; below  <= '0; diag  <= '0;
    end else begin
      stage2 <= start;
      done   <= stage2;
      if (start) begin
        s_top  <= 9'(p00) + 9'(p01);
        s_left <= 9'(p00) + 9'(p10);
        s_bot  <= 9'(p10) + 9'(p11);
      end
      if (stage2) begin
        right <= pix_t'((10'(s_top) + 10'd1) >> 1);
        below <= pix_t'((10'(s_left) + 10'd1) >> 1);
        diag  <= pix_t'((10'(s_top) + 10'(s_bot) + 10'd2) >> 2);
      end
    end
  end
endmodule
