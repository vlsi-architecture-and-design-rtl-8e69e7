// tb_scaler_top: one complete QCIF frame (176x144 luma, 88x72 U/V) through
// the full QCIF -> CIF -> 4CIF scaler at its default sizes. Oriented filter
// sets are loaded through the coefficient port. The expected 704x576 luma
// and 352x288 U/V frames come from running the adaptive and bilinear models
// twice; luma pixels that depend on a near-threshold orientation anywhere
// along the way are not compared. Counts how often each mechanism occurs
// (oriented and bilinear neighbourhoods in both stages, border replication,
// the first stage waiting for the second, input gaps, output
// back-pressure) and fails if one never does. Checks that a frame takes at
// most 42.5 cycles per CIF pixel (42 plus the border positions) and reports
// the clock period this needs for 30 frames/s.
module tb_scaler_top;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 176, H = 144;
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
  int sy[], su[], sv[], my[], mu[], mv[], dy[], du[], dv[];
  bit ky[], km[], kd[];
  longint cyc = 0, t_start = 0, t_end = 0;
  int n_or1 = 0, n_bl1 = 0, n_or2 = 0, n_bl2 = 0, n_rep = 0, n_wait12 = 0, n_gap = 0, n_bp = 0;

  scaler_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ny = 0, nuv = 0;
  always @(posedge clk) if (rst_n) begin
    if (y_out_valid && y_out_ready) begin
      if (kd[ny]) begin
        checks++;
        if (int'(y_out) != dy[ny]) begin
          failures++;
          if (failures < 20) $display("Y pixel (%0d,%0d): %0d exp %0d", ny / (4*W), ny % (4*W), y_out, dy[ny]);
        end
      end else skipped++;
      ny++;
      if (ny == 16 * W * H) t_end = cyc;
    end
    if (uv_out_valid && uv_out_ready) begin
      checks++;
      if (int'(uv_out[7:0]) != du[nuv] || int'(uv_out[15:8]) != dv[nuv]) begin
        failures++;
        if (failures < 20) $display("UV pixel %0d", nuv);
      end
      nuv++;
    end
    if (dut.u_stage1.u_luma.set_load) begin if (dut.u_stage1.u_luma.oriented) n_or1++; else n_bl1++; end
    if (dut.u_stage2.u_luma.set_load) begin if (dut.u_stage2.u_luma.oriented) n_or2++; else n_bl2++; end
    if (dut.u_stage2.u_luma.shift_en && dut.u_stage2.u_luma.pix_sel != 2'd0) n_rep++;
    if (dut.u_stage1.u_luma.u_ctrl.writing && !dut.u_stage1.u_luma.wr_ready) n_wait12++;
    if (y_in_ready && !y_in_valid && ny == 0) n_gap++;
    if (y_out_valid && !y_out_ready) n_bp++;
  end

  initial begin
    test_image(W, H, 0, sy);
    ky = new[W * H];
    foreach (ky[k]) ky[k] = 1;
    luma_model(W, H, 1, sy, ky, my, km);
    luma_model(2 * W, 2 * H, 1, my, km, dy, kd);
    su = new[W * H / 4]; sv = new[W * H / 4];
    foreach (su[k]) begin su[k] = $urandom_range(255); sv[k] = $urandom_range(255); end
    chroma_model(W / 2, H / 2, su, mu);
    chroma_model(W / 2, H / 2, sv, mv);
    chroma_model(W, H, mu, du);
    chroma_model(W, H, mv, dv);
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
    t_start = cyc;
    fork
      for (int k = 0; k < W * H; k++) begin
        while ($urandom_range(7) == 0) @(negedge clk);
        y_in_valid = 1; y_in = pix_t'(sy[k]);
        do @(posedge clk); while (!y_in_ready);
        #1 y_in_valid = 0;
      end
      for (int k = 0; k < W * H / 4; k++) begin
        while ($urandom_range(7) == 0) @(negedge clk);
        uv_in_valid = 1; uv_in = {8'(sv[k]), 8'(su[k])};
        do @(posedge clk); while (!uv_in_ready);
        #1 uv_in_valid = 0;
      end
      forever begin @(negedge clk); y_out_ready = ($urandom_range(7) != 0); uv_out_ready = ($urandom_range(7) != 0); end
    join_none
    wait (ny == 16 * W * H && nuv == 4 * W * H);
    checks += 7;
    // 42 cycles per CIF pixel plus the border positions of the padded grid
    if (real'(t_end - t_start) / (4.0 * W * H) > 42.5) begin
      failures++; $display("throughput below 42 cycles per CIF pixel plus borders");
    end
    if (n_or1 == 0 || n_or2 == 0) begin failures++; $display("no oriented neighbourhood"); end
    if (n_bl1 == 0 || n_bl2 == 0) begin failures++; $display("no bilinear neighbourhood"); end
    if (n_rep == 0) begin failures++; $display("no border replication"); end
    if (n_wait12 == 0) begin failures++; $display("first stage never waited for the second"); end
    if (n_gap == 0) begin failures++; $display("no input gap"); end
    if (n_bp == 0) begin failures++; $display("no output back-pressure"); end
    $display("stage 1: oriented %0d bilinear %0d; stage 2: oriented %0d bilinear %0d", n_or1, n_bl1, n_or2, n_bl2);
    $display("border replications %0d, stage-1 waits %0d, skipped %0d", n_rep, n_wait12, skipped);
    $display("cycles per frame %0d (%.2f per CIF pixel); 30 frames/s needs a clock period <= %.2f ns",
             t_end - t_start, real'(t_end - t_start) / (4.0 * W * H), 1.0e9 / 30.0 / real'(t_end - t_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
