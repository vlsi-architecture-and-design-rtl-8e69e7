// tb_luma_ctrl: runs the controller against stand-in units with the real
// latencies (Sobel 3, angle 7, histogram 10, filter 18 cycles) for two
// frames of a small grid. Checks, per padded position, the pixel source
// (input / line above / previous pixel) from the border-replication rule,
// the number of Sobel, histogram and output-write commands, that each
// output position takes 42 cycles, and that a full output buffer (wr_ready
// low) holds the controller.
module tb_luma_ctrl;
  localparam int unsigned W = 5, H = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, shift_en, sobel_start, sobel_done, angle_start, angle_done;
  logic ang_push, ang_zero, hist_start, hist_done, filt_start, set_load, filt_done;
  logic wr_ready, out_wr;
  logic [1:0] pix_sel;
  int checks = 0, failures = 0;
  int n_in = 0, n_sobel = 0, n_hist = 0, n_wr = 0, n_push = 0, n_stall = 0;
  int tr = 0, tc = 0, last_wr = -1, cyc = 0, n_42 = 0;

  luma_ctrl #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;

  // Stand-in units: done pulses a fixed number of cycles after start.
  function automatic logic delayed(input logic [31:0] hist, input int n);
    return hist[n-1];
  endfunction
  logic [31:0] sh_s = 0, sh_a = 0, sh_h = 0, sh_f = 0;
  always @(posedge clk) begin
    sh_s <= {sh_s[30:0], sobel_start};
    sh_a <= {sh_a[30:0], angle_start};
    sh_h <= {sh_h[30:0], hist_start};
    sh_f <= {sh_f[30:0], filt_start};
  end
  assign sobel_done = sh_s[2];
  assign angle_done = sh_a[6];
  assign hist_done  = sh_h[9];
  assign filt_done  = sh_f[17];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // Expected source of padded position (r, c): image row max(r-2,0) is
  // first met at r = 0 (row 0) or r = row + 2; later rows repeat it.
  function automatic int exp_sel(input int r, input int c);
    bit rfirst, cfirst;
    rfirst = (r == 0) || (r >= 3 && r <= H + 1);
    cfirst = (c == 0) || (c >= 3 && c <= W + 1);
    if (!rfirst) return 1;
    if (!cfirst) return 2;
    return 0;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (shift_en) begin
      checks++;
      if (int'(pix_sel) != exp_sel(tr, tc)) begin
        failures++;
        $display("r=%0d c=%0d sel %0d exp %0d", tr, tc, pix_sel, exp_sel(tr, tc));
      end
      if (in_ready && in_valid) n_in++;
    end
    if (sobel_start) n_sobel++;
    if (hist_start) n_hist++;
    if (ang_push) begin
      n_push++;
      checks++;
      if (ang_zero != !(tr >= 2 && tc >= 2)) begin failures++; $display("ang_zero at %0d,%0d", tr, tc); end
      if (!(tr >= 5 && tc >= 5)) begin
        if (tc == W + 4) begin tc = 0; tr = (tr == H + 4) ? 0 : tr + 1; end
        else tc++;
      end
    end
    if (out_wr) begin
      if (last_wr >= 0 && tc != 5) begin
        checks++;
        if (cyc - last_wr == 42) n_42++;
        else if (n_wr < W * H) begin failures++; $display("output interval %0d", cyc - last_wr); end
      end
      last_wr = cyc;
      n_wr++;
      if (tc == W + 4) begin tc = 0; tr = (tr == H + 4) ? 0 : tr + 1; end
      else tc++;
    end
    if (!wr_ready && dut.writing) n_stall++;
  end


  initial begin
    in_valid = 0; wr_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever begin @(posedge clk); #1; in_valid = (n_wr < W * H) ? 1'b1 : ($urandom_range(3) != 0); end
      forever begin @(posedge clk); #1; wr_ready = (n_wr < W * H) ? 1'b1 : ($urandom_range(1) != 0); end
    join_none
    wait (n_wr == 2 * W * H);
    @(negedge clk);
    checks += 7;
    if (n_push != 2 * (H + 5) * (W + 5)) begin failures++; $display("pushes %0d", n_push); end
    if (n_in != 2 * W * H) begin failures++; $display("inputs %0d", n_in); end
    if (n_wr != 2 * W * H) begin failures++; $display("writes %0d", n_wr); end
    if (n_hist != 2 * W * H) begin failures++; $display("hist %0d", n_hist); end
    if (n_sobel != 2 * (H + 3) * (W + 3)) begin failures++; $display("sobel %0d", n_sobel); end
    if (n_42 == 0) begin failures++; $display("no 42-cycle interval seen"); end
    if (n_stall == 0) begin failures++; $display("no output stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
