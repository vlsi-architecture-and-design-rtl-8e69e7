// tb_luma_scaler: end-to-end test of the adaptive luma interpolator on small
// frames. Oriented filter sets are loaded with easily told-apart filters
// (set k, phase p copies tap (5k+3+p) mod 16), so a wrong orientation
// decision shows in the output. Frames mix linear ramps at several angles
// (strongly oriented) with noise (non-oriented). A software model computes
// the padded image, Sobel gradients, orientation codes, histogram decision
// and filters; interpolated pixels whose neighbourhood holds a
// near-threshold angle are not compared (the original pixel always is).
// Input gaps and output back-pressure are random.
module tb_luma_scaler;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 12, H = 10, FRAMES = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_t in_y, out_y;
  logic coef_wr = 0;
  set_t coef_set = '0;
  logic [1:0] coef_phase = '0;
  logic [3:0] coef_tap = '0;
  coef_t coef_data = '0;
  int checks = 0, failures = 0, skipped = 0;
  int n_oriented = 0, n_bilin = 0, n_in_gap = 0, n_backpressure = 0, n_rep_row = 0, n_rep_col = 0;

  luma_scaler #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;

  int img [FRAMES][H][W];
  int expv [FRAMES][2*H][2*W];
  bit chk  [FRAMES][2*H][2*W];
  int cset [NUM_SETS][PHASES][TAPS];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int P(int f, int r, int c);
    return img[f][clampi(r, 0, H - 1)][clampi(c, 0, W - 1)];
  endfunction

  task automatic build_model(int f);
    int code [H+3][W+3];
    bit amb  [H+3][W+3];
    for (int ci = -1; ci <= H + 1; ci++)
      for (int cj = -1; cj <= W + 1; cj++) begin
        int gx, gy; bit a;
        gx = (P(f,ci-1,cj+1) + 2*P(f,ci,cj+1) + P(f,ci+1,cj+1)) - (P(f,ci-1,cj-1) + 2*P(f,ci,cj-1) + P(f,ci+1,cj-1));
        gy = (P(f,ci+1,cj-1) + 2*P(f,ci+1,cj) + P(f,ci+1,cj+1)) - (P(f,ci-1,cj-1) + 2*P(f,ci-1,cj) + P(f,ci-1,cj+1));
        code[ci+1][cj+1] = angle_code(gx, gy, a);
        amb[ci+1][cj+1] = a;
      end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        int h [8]; int best, bestc, s; bit anyamb; int px [16], cf [16];
        for (int k = 0; k < 8; k++) h[k] = 0;
        anyamb = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++) begin
            h[code[i+a][j+b]]++;
            anyamb |= amb[i+a][j+b];
            px[4*a+b] = P(f, i-1+a, j-1+b);
          end
        best = 0; bestc = h[0];
        for (int k = 1; k < 8; k++) if (h[k] > bestc) begin best = k; bestc = h[k]; end
        s = (bestc > HIST_THRESH) ? best : BILIN_SET;
        expv[f][2*i][2*j] = img[f][i][j];
        chk[f][2*i][2*j] = 1;
        for (int p = 0; p < PHASES; p++) begin
          int oy, ox;
          for (int t = 0; t < 16; t++) cf[t] = cset[s][p][t];
          oy = 2*i + ((p == 0) ? 0 : 1);
          ox = 2*j + ((p == 1) ? 0 : 1);
          expv[f][oy][ox] = apply_filter(px, cf);
          chk[f][oy][ox] = !anyamb;
        end
      end
  endtask

  // Reader: compare the output stream with the model.
  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int f, y, x;
    f = nout / (4 * W * H);
    y = (nout % (4 * W * H)) / (2 * W);
    x = nout % (2 * W);
    if (f < FRAMES) begin
      if (chk[f][y][x]) begin
        checks++;
        if (int'(out_y) != expv[f][y][x]) begin
          failures++;
          if (failures < 20) $display("frame %0d (%0d,%0d): %0d exp %0d", f, y, x, out_y, expv[f][y][x]);
        end
      end else skipped++;
    end
    nout++;
  end

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    if (dut.set_load) begin if (dut.oriented) n_oriented++; else n_bilin++; end
    if (in_ready && !in_valid) n_in_gap++;
    if (out_valid && !out_ready) n_backpressure++;
    if (dut.shift_en && dut.pix_sel == 2'd1) n_rep_row++;
    if (dut.shift_en && dut.pix_sel == 2'd2) n_rep_col++;
  end

  initial begin
    // coefficient sets
    for (int s = 0; s < NUM_SETS; s++)
      for (int p = 0; p < PHASES; p++)
        for (int t = 0; t < TAPS; t++)
          cset[s][p][t] = (s == BILIN_SET) ? bilinear_tap(p, t) : ((t == (5*s + 3 + p) % 16) ? 512 : 0);
    // frames: ramps in four quadrants, noise in the middle
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int a, b, q;
          q = (y < H/2 ? 0 : 2) + (x < W/2 ? 0 : 1) + f;
          case (q % 4)
            0: begin a = 4; b = 0; end
            1: begin a = 0; b = 5; end
            2: begin a = 2; b = 5; end
            default: begin a = 5; b = -5; end
          endcase
          img[f][y][x] = 128 + a * (x - W/2) + b * (y - H/2);
          if (x >= W/2 - 2 && x < W/2 + 2 && y >= H/2 - 2 && y < H/2 + 2) img[f][y][x] = $urandom_range(255);
          if (f == 2 && y < 3) img[f][y][x] = $urandom_range(255);
        end
    for (int f = 0; f < FRAMES; f++) build_model(f);

    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the oriented sets
    for (int s = 0; s < NUM_ORIENT; s++)
      for (int p = 0; p < PHASES; p++)
        for (int t = 0; t < TAPS; t++) begin
          @(negedge clk);
          coef_wr = 1; coef_set = set_t'(s); coef_phase = 2'(p); coef_tap = 4'(t);
          coef_data = coef_t'(cset[s][p][t]);
        end
    @(negedge clk) coef_wr = 0;
    fork
      begin
        for (int f = 0; f < FRAMES; f++)
          for (int y = 0; y < H; y++)
            for (int x = 0; x < W; x++) begin
              in_valid = ($urandom_range(4) != 0);
              in_y = pix_t'(img[f][y][x]);
              while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(4) != 0); end
              do @(posedge clk); while (!in_ready);
              #1 in_valid = 0;
            end
      end
      forever begin @(negedge clk); out_ready = ($urandom_range(3) != 0); end
    join_none
    wait (nout == FRAMES * 4 * W * H);
    @(negedge clk);
    checks += 5;
    if (n_oriented == 0) begin failures++; $display("no oriented neighbourhood"); end
    if (n_bilin == 0) begin failures++; $display("no bilinear neighbourhood"); end
    if (n_in_gap == 0) begin failures++; $display("no input gap"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_rep_row == 0 || n_rep_col == 0) begin failures++; $display("no border replication"); end
    $display("oriented %0d bilinear %0d skipped %0d", n_oriented, n_bilin, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
