// output_sync: output synchronisation line buffers. The interpolator
// produces, per input pixel, a 2x2 block of output pixels that straddles two
// output lines; a display or the next stage wants the pixels in progressive
// scan order. Four lines of 2*W pixels are kept as two banks of two lines:
// while the interpolator writes the upper and lower output line of one bank,
// the other bank is read out, first its upper line and then its lower line,
// one pixel per accepted transfer. The four-line, two-plus-two ping-pong
// organisation follows the source design; the handshake is this
// implementation's.
//
// Write side: wr_en with the block {p00, right; below, diag} for the next
// input column (columns are counted internally, 0..W-1). wr_ready is low
// while the bank to be written still waits to be read; writes are then
// ignored. After column W-1 the bank is handed to the read side.
// Read side: valid/ready stream of 8-bit pixels, 4*W per line pair.
module output_sync
  import scaler_pkg::*;
#(
  parameter int unsigned W = 176
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_en,
  input  pix_t wr_p00,
  input  pix_t wr_right,
  input  pix_t wr_below,
  input  pix_t wr_diag,
  output logic wr_ready,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data
);
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  // Each word holds the two horizontally adjacent output pixels of one
  // input column: [7:0] even output column, [15:8] odd output column.
  logic [2*PIX_W-1:0] top_mem [2][W];
  logic [2*PIX_W-1:0] bot_mem [2][W];

  logic          wbank, rbank;
  logic [1:0]    full;
  logic [CW-1:0] wcol, rcol;
  logic          rline, rhalf;   // lower line / odd output pixel
  logic [2*PIX_W-1:0] rword;
  logic          wr_fire, rd_fire, wr_last, rd_last;

  assign wr_fire = wr_en && wr_ready;
  assign rd_fire = out_valid && out_ready;
  assign wr_last = wr_fire && (wcol == CW'(W - 1));
  assign rd_last = rd_fire && rhalf && rline && (rcol == CW'(W - 1));

  assign wr_ready = !full[wbank];

  always_ff @(posedge clk) begin
    if (wr_fire) begin
      top_mem[wbank][wcol] <= {wr_right, wr_p00};
      bot_mem[wbank][wcol] <= {wr_diag, wr_below};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      rbank <= 1'b0;
      full  <= '0;
      wcol  <= '0;
      rcol  <= '0;
      rline <= 1'b0;
      rhalf <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++)
        if (wr_last && wbank == b[0]) full[b] <= 1'b1;
        else if (rd_last && rbank == b[0]) full[b] <= 1'b0;
      if (wr_fire) begin
        if (wr_last) begin
          wcol  <= '0;
          wbank <= ~wbank;
        end else begin
          wcol <= wcol + 1'b1;
        end
      end
      if (rd_fire) begin
        rhalf <= ~rhalf;
        if (rhalf) begin
          if (rcol == CW'(W - 1)) begin
            rcol  <= '0;
            rline <= ~rline;
            if (rline) rbank <= ~rbank;
          end else begin
            rcol <= rcol + 1'b1;
          end
        end
      end
    end
  end

  assign out_valid = full[rbank];
  assign rword     = rline ? bot_mem[rbank][rcol] : top_mem[rbank][rcol];
  assign out_data  = rhalf ? rword[2*PIX_W-1:PIX_W] : rword[PIX_W-1:0];
endmodule
