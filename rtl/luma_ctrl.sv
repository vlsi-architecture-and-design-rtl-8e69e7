// luma_ctrl: controller of the adaptive luma interpolator. It walks a padded
// grid of (H+5) x (W+5) positions, one per input pixel plus a two-pixel
// border before and a three-pixel border after the image, and for each
// position issues the commands of the folded units one after the other
// (the units are not pipelined against each other):
//   FETCH   take the next pixel (from the input stream, or a replicated
//           neighbour on the border) and shift delay lines and windows;
//   SOBEL   gradients of the newest 3x3 window (3 cycles), then
//   ANGLE   orientation code (7 cycles), pushed into the orientation lines
//           in the cycle it is ready;
//   HIST    dominant orientation of the 4x4 orientation window (10 cycles);
//   FILTER  three 16-tap filters with the chosen coefficient set (18 cycles);
//   WRITE   the 2x2 output block to the output line buffers.
// SOBEL/ANGLE run once the 3x3 window lies inside the padded grid, HIST,
// FILTER and WRITE only where the 4x4 window is centred on a real pixel,
// which gives 42 cycles per input pixel. Border pixels replicate the
// nearest image pixel: rows/columns -2, -1 and 0 all repeat image row/column
// 0, and rows/columns H..H+2 (W..W+2) repeat the last one. Image row 0 is
// consumed at padded row -2, rows 1..H-1 at their own row.
// The sequence of units and the 42-cycle budget per input pixel follow the
// source design; the padded-grid walk, border replication and handshakes are
// this implementation's.
//
// Outputs: in_ready accepts an input pixel; shift_en with pix_sel (0 input,
// 1 pixel one line above, 2 previous pixel) advances the pixel windows;
// ang_push with ang_zero advances the orientation windows; *_start pulse the
// units; set_load latches the filter set; out_wr writes the output block.
module luma_ctrl #(
  parameter int unsigned W = 176,
  parameter int unsigned H = 144
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       shift_en,
  output logic [1:0] pix_sel,
  output logic       sobel_start,
  input  logic       sobel_done,
  output logic       angle_start,
  input  logic       angle_done,
  output logic       ang_push,
  output logic       ang_zero,
  output logic       hist_start,
  input  logic       hist_done,
  output logic       filt_start,
  output logic       set_load,
  input  logic       filt_done,
  input  logic       wr_ready,
  output logic       out_wr
);
  localparam int unsigned RW = $clog2(H + 5);
  localparam int unsigned CW = $clog2(W + 5);

  typedef enum logic [2:0] {
    S_FETCH, S_SOBEL, S_SOBEL_WAIT, S_ANGLE_WAIT, S_APUSH, S_HIST, S_HIST_WAIT, S_FILT_WAIT
  } state_e;
  state_e state;
  logic   writing;   // waiting for the output buffer in S_FILT_WAIT

  logic [RW-1:0] r;  // padded row: image row r-2
  logic [CW-1:0] c;  // padded column: image column c-2
  logic row_take, col_take, row_rep, sob_ok, out_ok;
  logic advance;     // move to the next padded position

  // Image row 0 at r == 0, rows 1..H-1 at r == 3..H+1; otherwise replicate.
  assign row_take = (r == '0) || (r >= RW'(3) && r <= RW'(H + 1));
  assign col_take = (c == '0) || (c >= CW'(3) && c <= CW'(W + 1));
  assign row_rep  = !row_take;
  assign sob_ok   = (r >= RW'(2)) && (c >= CW'(2));
  assign out_ok   = (r >= RW'(5)) && (c >= CW'(5));

  always_comb begin
    in_ready    = 1'b0;
    shift_en    = 1'b0;
    pix_sel     = row_rep ? 2'd1 : (col_take ? 2'd0 : 2'd2);
    sobel_start = (state == S_SOBEL);
    angle_start = (state == S_SOBEL_WAIT) && sobel_done;
    // The code is pushed in the cycle the angle unit finishes, or in
    // S_APUSH for positions without a Sobel result.
    ang_push    = (state == S_APUSH) || ((state == S_ANGLE_WAIT) && angle_done);
    ang_zero    = !sob_ok;
    hist_start  = (state == S_HIST);
    filt_start  = (state == S_HIST_WAIT) && hist_done;
    set_load    = filt_start;
    out_wr      = (state == S_FILT_WAIT) && writing && wr_ready;
    advance     = (ang_push && !out_ok) || out_wr;
    if (state == S_FETCH) begin
      if (row_take && col_take) begin
        in_ready = 1'b1;
        shift_en = in_valid;
      end else begin
        shift_en = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FETCH;
      r       <= '0;
      c       <= '0;
      writing <= 1'b0;
    end else begin
      unique case (state)
        S_FETCH:      if (shift_en) state <= sob_ok ? S_SOBEL : S_APUSH;
        S_SOBEL:      state <= S_SOBEL_WAIT;
        S_SOBEL_WAIT: if (sobel_done) state <= S_ANGLE_WAIT;
        S_ANGLE_WAIT: if (angle_done) state <= out_ok ? S_HIST : S_FETCH;
        S_APUSH: begin
          state <= out_ok ? S_HIST : S_FETCH;
        end
        S_HIST:       state <= S_HIST_WAIT;
        S_HIST_WAIT:  if (hist_done) state <= S_FILT_WAIT;
        default: begin
          if (filt_done) writing <= 1'b1;
          if (out_wr) begin
            writing <= 1'b0;
            state   <= S_FETCH;
          end
        end
      endcase
      if (advance) begin
        if (c == CW'(W + 4)) begin
          c <= '0;
          r <= (r == RW'(H + 4)) ? '0 : r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end
endmodule
