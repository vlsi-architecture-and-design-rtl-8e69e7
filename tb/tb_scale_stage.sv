// tb_scale_stage: one 2x stage with luma and chroma streams running at the
// same time, oriented filter sets loaded; two frames of test pictures.
// Luma is compared with the adaptive model (pixels next to near-threshold
// orientations excepted), chroma with the bilinear model.
module tb_scale_stage;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 16, H = 12, FRAMES = 2;
  logic clk = 0, rst_n = 0;
  logic y_in_valid = 0, y_in_ready, y_out_valid, y_out_ready = 0;
  logic uv_in_valid = 0, uv_in_ready, uv_out_valid, uv_out_ready = 0;
  pix_t y_in, y_out;
  logic [15:0] uv_in, uv_out;
  logic coef_wr = 0;
  set_t coef_set = '0;
  logic [1:0] coef_phase = '0;
  logic [3:0] coef_tap = '0;
  coef_t coef_data = '0;
  int checks = 0, failures = 0, skipped = 0;
  int sy [FRAMES][], su [FRAMES][], sv [FRAMES][];
  int dy [FRAMES][], du [FRAMES][], dv [FRAMES][];
  bit ky [FRAMES][], kd [FRAMES][];

  scale_stage #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ny = 0, nuv = 0;
  always @(posedge clk) if (rst_n) begin
    if (y_out_valid && y_out_ready) begin
      int f, k;
      f = ny / (4 * W * H); k = ny % (4 * W * H);
      if (kd[f][k]) begin
        checks++;
        if (int'(y_out) != dy[f][k]) begin
          failures++;
          if (failures < 20) $display("Y frame %0d pixel %0d: %0d exp %0d", f, k, y_out, dy[f][k]);
        end
      end else skipped++;
      ny++;
    end
    if (uv_out_valid && uv_out_ready) begin
      int f, k;
      f = nuv / (W * H); k = nuv % (W * H);
      checks++;
      if (int'(uv_out[7:0]) != du[f][k] || int'(uv_out[15:8]) != dv[f][k]) begin
        failures++;
        if (failures < 20) $display("UV frame %0d pixel %0d", f, k);
      end
      nuv++;
    end
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      test_image(W, H, f, sy[f]);
      ky[f] = new[W * H];
      foreach (ky[f][k]) ky[f][k] = 1;
      luma_model(W, H, 1, sy[f], ky[f], dy[f], kd[f]);
      su[f] = new[W * H / 4]; sv[f] = new[W * H / 4];
      foreach (su[f][k]) begin su[f][k] = $urandom_range(255); sv[f][k] = $urandom_range(255); end
      chroma_model(W / 2, H / 2, su[f], du[f]);
      chroma_model(W / 2, H / 2, sv[f], dv[f]);
    end
    y_in = '0; uv_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NUM_ORIENT; s++)
      for (int p = 0; p < PHASES; p++)
        for (int t = 0; t < TAPS; t++) begin
          @(negedge clk);
          coef_wr = 1; coef_set = set_t'(s); coef_phase = 2'(p); coef_tap = 4'(t);
          coef_data = coef_t'(test_coef(s, p, t));
        end
    @(negedge clk) coef_wr = 0;
    fork
      for (int f = 0; f < FRAMES; f++)
        for (int k = 0; k < W * H; k++) begin
          while ($urandom_range(3) == 0) @(negedge clk);
          y_in_valid = 1; y_in = pix_t'(sy[f][k]);
          do @(posedge clk); while (!y_in_ready);
          #1 y_in_valid = 0;
        end
      for (int f = 0; f < FRAMES; f++)
        for (int k = 0; k < W * H / 4; k++) begin
          while ($urandom_range(3) == 0) @(negedge clk);
          uv_in_valid = 1; uv_in = {8'(sv[f][k]), 8'(su[f][k])};
          do @(posedge clk); while (!uv_in_ready);
          #1 uv_in_valid = 0;
        end
      forever begin @(negedge clk); y_out_ready = ($urandom_range(2) != 0); uv_out_ready = ($urandom_range(4) == 0); end
    join_none
    wait (ny == FRAMES * 4 * W * H && nuv == FRAMES * W * H);
    $display("skipped %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
