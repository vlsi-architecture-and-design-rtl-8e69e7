// scale_stage: one 2x2 up-scaling stage of a YUV 4:2:0 video stream: the
// adaptive luma interpolator (luma_scaler) and the bilinear chroma
// interpolator (chroma_scaler) side by side, sharing the filter coefficient
// load port. Input frames are W x H luma pixels with W/2 x H/2 U/V pairs;
// output frames are 2W x 2H and W x H. Luma and chroma have independent
// valid/ready streams; the luma path sets the pace (42 cycles per
// input luma pixel). The split into an adaptive Y path and bilinear U/V path
// follows the source design; the separate streams are this implementation's.
module scale_stage
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
  output logic               y_out_valid,
  input  logic               y_out_ready,
  output pix_t               y_out,
  input  logic               uv_in_valid,
  output logic               uv_in_ready,
  input  logic [2*PIX_W-1:0] uv_in,
  output logic               uv_out_valid,
  input  logic               uv_out_ready,
  output logic [2*PIX_W-1:0] uv_out,
  input  logic               coef_wr,
  input  set_t               coef_set,
  input  logic [1:0]         coef_phase,
  input  logic [3:0]         coef_tap,
  input  coef_t              coef_data
);
  luma_scaler #(.W(W), .H(H)) u_luma (
    .clk, .rst_n,
    .in_valid(y_in_valid), .in_ready(y_in_ready), .in_y(y_in),
    .out_valid(y_out_valid), .out_ready(y_out_ready), .out_y(y_out),
    .coef_wr, .coef_set, .coef_phase, .coef_tap, .coef_data
  );

  chroma_scaler #(.WC(W / 2), .HC(H / 2)) u_chroma (
    .clk, .rst_n,
    .in_valid(uv_in_valid), .in_ready(uv_in_ready), .in_uv(uv_in),
    .out_valid(uv_out_valid), .out_ready(uv_out_ready), .out_uv(uv_out)
  );
endmodule
