// scaler_top: QCIF to 4CIF video up-scaler (4x in each dimension) built from
// two cascaded 2x stages, QCIF (176x144) -> CIF (352x288) -> 4CIF (704x576).
// Scaling in two 2x steps rather than one 4x step gives better image quality;
// each stage interpolates luma adaptively (edge-oriented filters where a
// dominant edge orientation exists, bilinear otherwise) and chroma
// bilinearly. The second stage handles four times the pixels of the first
// and sets the rate: at 42 clock cycles per CIF pixel, 30 frames/s
// need a clock period of at most 7.75 ns (border positions included). The
// first stage waits (valid/ready)
// whenever the second one cannot take its output yet.
// The two-step cascade and its sizes follow the source design; the stream
// interfaces and the shared coefficient load port are this implementation's.
//
// Streams: Y as one 8-bit pixel per transfer, U/V as one {V,U} pair per
// transfer, both in raster order, frames back to back. coef_* writes one
// coefficient of filter set coef_set (0..7 oriented, 8 bilinear), output
// phase coef_phase (0 right, 1 below, 2 diagonal) and tap coef_tap into
// both stages.
module scaler_top
  import scaler_pkg::*;
#(
  parameter int unsigned W = 176,
  parameter int unsigned H = 144
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               y_in_valid,
  output logic               y_in_ready,
  input  pix_t               y_in,
  input  logic               uv_in_valid,
  output logic               uv_in_ready,
  input  logic [2*PIX_W-1:0] uv_in,
  output logic               y_out_valid,
  input  logic               y_out_ready,
  output pix_t               y_out,
  output logic               uv_out_valid,
  input  logic               uv_out_ready,
  output logic [2*PIX_W-1:0] uv_out,
  input  logic               coef_wr,
  input  set_t               coef_set,
  input  logic [1:0]         coef_phase,
  input  logic [3:0]         coef_tap,
  input  coef_t              coef_data
);
  logic               y_mid_valid, y_mid_ready, uv_mid_valid, uv_mid_ready;
  pix_t               y_mid;
  logic [2*PIX_W-1:0] uv_mid;

  scale_stage #(.W(W), .H(H)) u_stage1 (
    .clk, .rst_n,
    .y_in_valid, .y_in_ready, .y_in,
    .y_out_valid(y_mid_valid), .y_out_ready(y_mid_ready), .y_out(y_mid),
    .uv_in_valid, .uv_in_ready, .uv_in,
    .uv_out_valid(uv_mid_valid), .uv_out_ready(uv_mid_ready), .uv_out(uv_mid),
    .coef_wr, .coef_set, .coef_phase, .coef_tap, .coef_data
  );

  scale_stage #(.W(2 * W), .H(2 * H)) u_stage2 (
    .clk, .rst_n,
    .y_in_valid(y_mid_valid), .y_in_ready(y_mid_ready), .y_in(y_mid),
    .y_out_valid, .y_out_ready, .y_out,
    .uv_in_valid(uv_mid_valid), .uv_in_ready(uv_mid_ready), .uv_in(uv_mid),
    .uv_out_valid, .uv_out_ready, .uv_out,
    .coef_wr, .coef_set, .coef_phase, .coef_tap, .coef_data
  );
endmodule
