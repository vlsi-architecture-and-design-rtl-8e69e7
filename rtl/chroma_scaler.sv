// chroma_scaler: 2x bilinear interpolation of the U and V planes. U and V
// arrive together as one sample stream ({V, U} per sample) of WC x HC
// samples, half the luma width and height (4:2:0). One delay line of WC+1
// {V,U} pairs (one half-size line per component) and a 2x2 register window
// give each sample with its right, lower and lower-right neighbours; two
// bilinear_unit instances compute the three new U and V samples, and two
// output_sync instances re-order the 2x2 blocks into progressive scan.
// The grid is walked with one extra padded row and column at the bottom and
// right, which replicate the last image row/column.
// Bilinear interpolation of U and V, the half-size chroma lines and the
// four output lines per component follow the source design; the 4:2:0
// sample format, the combined {V,U} stream and the border rule are this
// implementation's.
//
// Interface: in_uv/in_valid/in_ready input in raster order, out_uv/
// out_valid/out_ready the 2WC x 2HC output in raster order. About 5 cycles
// per input sample.
module chroma_scaler
  import scaler_pkg::*;
#(
  parameter int unsigned WC = 88,
  parameter int unsigned HC = 72
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [2*PIX_W-1:0] in_uv,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [2*PIX_W-1:0] out_uv
);
  localparam int unsigned RW = $clog2(HC + 1) + 1;
  localparam int unsigned CW = $clog2(WC + 1) + 1;
  typedef logic [2*PIX_W-1:0] uv_t;

  typedef enum logic [1:0] {S_FETCH, S_BIL, S_WAIT, S_WRITE} state_e;
  state_e state;

  logic [RW-1:0] r;
  logic [CW-1:0] c;
  logic take, row_rep, out_ok, shift_en, bil_start, bil_done_u, bil_done_v;
  logic advance;
  logic wr_en, wr_ready_u, wr_ready_v, valid_u, valid_v;
  uv_t  unew, tap;
  uv_t  cw [2][2];      // [row][col], row 1 / col 1 newest

  assign take    = (r < RW'(HC)) && (c < CW'(WC));
  assign row_rep = (r == RW'(HC));
  assign out_ok  = (r != '0) && (c != '0);
  assign unew    = take ? in_uv : (row_rep ? tap : cw[1][1]);

  assign in_ready  = (state == S_FETCH) && take;
  assign shift_en  = (state == S_FETCH) && (!take || in_valid);
  assign bil_start = (state == S_BIL);
  assign wr_en     = (state == S_WRITE) && wr_ready_u && wr_ready_v;
  assign advance   = ((state == S_FETCH) && shift_en && !out_ok) || wr_en;

  delay_line #(.WIDTH(2*PIX_W), .DEPTH(WC + 1)) u_line (
    .clk, .rst_n, .en(shift_en), .din(unew), .dout(tap)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FETCH;
      r <= '0;
      c <= '0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) cw[i][j] <= '0;
    end else begin
      if (shift_en) begin
        cw[0][0] <= cw[0][1];
        cw[1][0] <= cw[1][1];
        cw[0][1] <= tap;
        cw[1][1] <= unew;
      end
      unique case (state)
        S_FETCH: if (shift_en && out_ok) state <= S_BIL;
        S_BIL:  state <= S_WAIT;
        S_WAIT: if (bil_done_u) state <= S_WRITE;
        default: if (wr_en) state <= S_FETCH;
      endcase
      if (advance) begin
        if (c == CW'(WC)) begin
          c <= '0;
          r <= (r == RW'(HC)) ? '0 : r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  pix_t ur, ub, ud, vr, vb, vd, uo, vo;

  bilinear_unit u_bil_u (
    .clk, .rst_n, .start(bil_start),
    .p00(cw[0][0][PIX_W-1:0]), .p01(cw[0][1][PIX_W-1:0]),
    .p10(cw[1][0][PIX_W-1:0]), .p11(cw[1][1][PIX_W-1:0]),
    .done(bil_done_u), .right(ur), .below(ub), .diag(ud)
  );
  bilinear_unit u_bil_v (
    .clk, .rst_n, .start(bil_start),
    .p00(cw[0][0][2*PIX_W-1:PIX_W]), .p01(cw[0][1][2*PIX_W-1:PIX_W]),
    .p10(cw[1][0][2*PIX_W-1:PIX_W]), .p11(cw[1][1][2*PIX_W-1:PIX_W]),
    .done(bil_done_v), .right(vr), .below(vb), .diag(vd)
  );

  output_sync #(.W(WC)) u_osync_u (
    .clk, .rst_n, .wr_en, .wr_p00(cw[0][0][PIX_W-1:0]),
    .wr_right(ur), .wr_below(ub), .wr_diag(ud), .wr_ready(wr_ready_u),
    .out_valid(valid_u), .out_ready(out_ready && valid_v), .out_data(uo)
  );
  output_sync #(.W(WC)) u_osync_v (
    .clk, .rst_n, .wr_en, .wr_p00(cw[0][0][2*PIX_W-1:PIX_W]),
    .wr_right(vr), .wr_below(vb), .wr_diag(vd), .wr_ready(wr_ready_v),
    .out_valid(valid_v), .out_ready(out_ready && valid_u), .out_data(vo)
  );

  assign out_valid = valid_u && valid_v;
  assign out_uv    = {vo, uo};

  // U and V are written and read together, so their buffers stay in step.
  a_uv_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (valid_u == valid_v) && (wr_ready_u == wr_ready_v) && (bil_done_u == bil_done_v));
endmodule
