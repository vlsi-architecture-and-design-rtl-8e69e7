// tb_sobel_folded: random and extreme 3x3 windows; checks fx, fy against the
// textbook Sobel sums and that done comes exactly 3 cycles after start.
module tb_sobel_folded;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t win [3][3];
  logic busy, done;
  grad_t fx, fy;
  int checks = 0, failures = 0;

  sobel_folded dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int ex, ey, lat;
    ex = (win[0][2] + 2 * win[1][2] + win[2][2]) - (win[0][0] + 2 * win[1][0] + win[2][0]);
    ey = (win[2][0] + 2 * win[2][1] + win[2][2]) - (win[0][0] + 2 * win[0][1] + win[0][2]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 3;
    if (int'(fx) != ex) begin failures++; $display("fx %0d exp %0d", fx, ex); end
    if (int'(fy) != ey) begin failures++; $display("fy %0d exp %0d", fy, ey); end
    if (lat != 3) begin failures++; $display("latency %0d exp 3", lat); end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // extremes: full-scale edges in both directions
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          case (k)
            0: win[i][j] = (j == 2) ? 8'd255 : 8'd0;
            1: win[i][j] = (j == 0) ? 8'd255 : 8'd0;
            2: win[i][j] = (i == 2) ? 8'd255 : 8'd0;
            default: win[i][j] = (i + j < 2) ? 8'd255 : 8'd0;
          endcase
      run_one();
    end
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[i][j] = pix_t'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
