// tb_output_sync: writes numbered 2x2 blocks for several line pairs with
// random write gaps and random read back-pressure; the read stream must be
// the blocks' pixels in progressive scan order, and writes must stall
// (wr_ready low) while both banks are full.
module tb_output_sync;
  import scaler_pkg::*;
  localparam int unsigned W = 7, PAIRS = 6;
  logic clk = 0, rst_n = 0, wr_en = 0, out_ready = 0;
  pix_t wr_p00, wr_right, wr_below, wr_diag, out_data;
  logic wr_ready, out_valid;
  int checks = 0, failures = 0, stalls = 0, nread = 0;
  int expq [$];

  output_sync #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pv(input int pair, input int line, input int col);
    return (pair * 37 + line * 101 + col * 13) % 256;
  endfunction

  initial begin
    wr_p00 = '0; wr_right = '0; wr_below = '0; wr_diag = '0;
    for (int pr = 0; pr < PAIRS; pr++)
      for (int ln = 0; ln < 2; ln++)
        for (int c = 0; c < 2 * W; c++) expq.push_back(pv(pr, ln, c));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pr = 0; pr < PAIRS; pr++)
      for (int j = 0; j < W; j++) begin
        @(negedge clk);
        while ($urandom_range(2) == 0) begin wr_en = 0; @(negedge clk); end
        while (!wr_ready) begin wr_en = 0; stalls++; @(negedge clk); end
        wr_en = 1;
        wr_p00 = pix_t'(pv(pr, 0, 2 * j)); wr_right = pix_t'(pv(pr, 0, 2 * j + 1));
        wr_below = pix_t'(pv(pr, 1, 2 * j)); wr_diag = pix_t'(pv(pr, 1, 2 * j + 1));
      end
    @(negedge clk) wr_en = 0;
  end

  // Reader: slow at first so that both banks fill up.
  initial begin
    @(posedge rst_n);
    repeat (60) @(negedge clk);
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (int'(out_data) != expq[nread]) begin
      failures++;
      $display("pixel %0d: %0d exp %0d", nread, out_data, expq[nread]);
    end
    nread++;
    if (nread == PAIRS * 4 * W) begin
      checks++;
      if (stalls == 0) begin failures++; $display("no write stall seen"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
