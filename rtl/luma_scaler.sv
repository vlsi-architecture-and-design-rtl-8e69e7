// luma_scaler: adaptive 2x interpolation of the luma (Y) plane. For every
// input pixel p[0,0] it produces the 2x2 output block {p[0,0], right; below,
// diag}, where the three new pixels are 16-tap filters over the 4x4
// neighbourhood p[-1..2,-1..2]. The filter is chosen per pixel: Sobel
// gradients give an orientation code for every pixel, and when one code
// occurs more than 6 times among the 16 codes of the neighbourhood, the
// oriented filter set of that code is used; otherwise the bilinear set.
//
// Data path: four pixel delay lines plus the incoming pixel give five rows;
// a 5x5 register window over them feeds both the Sobel unit (newest 3x3)
// and the filters (older 4x4), so each input pixel costs five line reads.
// Three orientation delay lines and a 4x4 register window hold the codes,
// three reads per pixel. sobel_folded -> angle_cordic -> histogram_folded ->
// coef_rom + 3 x filter_mac, sequenced by luma_ctrl, then output_sync
// re-orders the 2x2 blocks into progressive scan. All of this structure
// follows the source design; border replication and the stream handshakes
// are this implementation's.
//
// Interface: in_y/in_valid/in_ready is the raster-order input frame of
// W x H pixels (frames back to back); out_y/out_valid/out_ready the 2W x 2H
// output in raster order. coef_* loads filter coefficients (see coef_rom).
// Throughput is 42 clock cycles per input pixel (plus the border positions).
module luma_scaler
  import scaler_pkg::*;
#(
  parameter int unsigned W = 176,
  parameter int unsigned H = 144
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pix_t       in_y,
  output logic       out_valid,
  input  logic       out_ready,
  output pix_t       out_y,
  input  logic       coef_wr,
  input  set_t       coef_set,
  input  logic [1:0] coef_phase,
  input  logic [3:0] coef_tap,
  input  coef_t      coef_data
);
  localparam int unsigned LINE = W + 5;

  // Controller wires.
  logic       shift_en, ang_push, ang_zero, set_load, out_wr, wr_ready;
  logic [1:0] pix_sel;
  logic       sobel_start, sobel_done, angle_start, angle_done;
  logic       hist_start, hist_done, filt_start;
  logic       filt_done [PHASES];

  // Pixel lines and window.
  pix_t pnew;
  pix_t ltap [4];           // ltap[k] = pixel k+1 lines above
  pix_t win [5][5];         // [row][col], row 4 / col 4 newest

  assign pnew = (pix_sel == 2'd0) ? in_y : (pix_sel == 2'd1) ? ltap[0] : win[4][4];

  for (genvar k = 0; k < 4; k++) begin : g_pline
    delay_line #(.WIDTH(PIX_W), .DEPTH(LINE)) u_line (
      .clk, .rst_n, .en(shift_en),
      .din(k == 0 ? pnew : ltap[k-1]),
      .dout(ltap[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) win[i][j] <= '0;
    end else if (shift_en) begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 4; j++) win[i][j] <= win[i][j+1];
      win[4][4] <= pnew;
      for (int i = 0; i < 4; i++) win[3-i][4] <= ltap[i];
    end
  end

  // Sobel on the newest 3x3 window.
  pix_t  swin [3][3];
  grad_t fx, fy;
  logic  sobel_busy, angle_busy, hist_busy;
  always_comb
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) swin[i][j] = win[i+2][j+2];

  sobel_folded u_sobel (
    .clk, .rst_n, .start(sobel_start), .win(swin),
    .busy(sobel_busy), .done(sobel_done), .fx, .fy
  );

  angle_t angle;
  angle_cordic u_angle (
    .clk, .rst_n, .start(angle_start), .fx, .fy,
    .busy(angle_busy), .done(angle_done), .angle
  );

  // Orientation lines and window.
  angle_t anew;
  angle_t atap [3];
  angle_t awin [4][4];
  assign anew = ang_zero ? angle_t'(0) : angle;

  for (genvar k = 0; k < 3; k++) begin : g_aline
    delay_line #(.WIDTH(ANG_W), .DEPTH(LINE)) u_line (
      .clk, .rst_n, .en(ang_push),
      .din(k == 0 ? anew : atap[k-1]),
      .dout(atap[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) awin[i][j] <= '0;
    end else if (ang_push) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 3; j++) awin[i][j] <= awin[i][j+1];
      awin[3][3] <= anew;
      for (int i = 0; i < 3; i++) awin[2-i][3] <= atap[i];
    end
  end

  angle_t           hang [TAPS];
  angle_t           dom_angle;
  logic             oriented;
  always_comb
    for (int t = 0; t < TAPS; t++) hang[t] = awin[t/4][t%4];

  histogram_folded u_hist (
    .clk, .rst_n, .start(hist_start), .ang(hang),
    .busy(hist_busy), .done(hist_done),
    .dom_angle, .max_count(), .oriented
  );

  // Filter set selection and coefficient store.
  set_t set_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        set_q <= set_t'(BILIN_SET);
    else if (set_load) set_q <= oriented ? set_t'(dom_angle) : set_t'(BILIN_SET);
  end

  logic [3:0] tap [PHASES];
  coef_t      coef [PHASES];
  pix_t       fpix;
  pix_t       fres [PHASES];
  logic       fbusy [PHASES];

  coef_rom u_rom (
    .clk, .rst_n,
    .wr_en(coef_wr), .wr_set(coef_set), .wr_phase(coef_phase),
    .wr_tap(coef_tap), .wr_data(coef_data),
    .rd_set(set_q), .rd_tap(tap[0]), .rd_coef(coef)
  );

  // The three filters run in lock step on the same tap, so one pixel
  // multiplexer serves them all.
  assign fpix = win[3'(tap[0][3:2])][3'(tap[0][1:0])];

  for (genvar p = 0; p < PHASES; p++) begin : g_filt
    filter_mac u_filt (
      .clk, .rst_n, .start(filt_start), .tap(tap[p]),
      .pix(fpix), .coef(coef[p]),
      .busy(fbusy[p]), .done(filt_done[p]), .result(fres[p])
    );
  end

  luma_ctrl #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .shift_en, .pix_sel,
    .sobel_start, .sobel_done, .angle_start, .angle_done,
    .ang_push, .ang_zero, .hist_start, .hist_done,
    .filt_start, .set_load, .filt_done(filt_done[0]),
    .wr_ready, .out_wr
  );

  output_sync #(.W(W)) u_osync (
    .clk, .rst_n,
    .wr_en(out_wr), .wr_p00(win[1][1]),
    .wr_right(fres[PH_RIGHT]), .wr_below(fres[PH_BELOW]), .wr_diag(fres[PH_DIAG]),
    .wr_ready, .out_valid, .out_ready, .out_data(out_y)
  );

  // The units are strictly sequential: a start never hits a busy unit.
  a_sobel_free: assert property (@(posedge clk) disable iff (!rst_n) sobel_start |-> !sobel_busy);
  a_angle_free: assert property (@(posedge clk) disable iff (!rst_n) angle_start |-> !angle_busy);
  a_hist_free:  assert property (@(posedge clk) disable iff (!rst_n) hist_start  |-> !hist_busy);
  a_filt_free:  assert property (@(posedge clk) disable iff (!rst_n) filt_start  |-> !fbusy[0]);
  a_wr_ready:   assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> wr_ready);
endmodule
