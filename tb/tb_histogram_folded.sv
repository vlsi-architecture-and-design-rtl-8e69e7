// tb_histogram_folded: random neighbourhoods, neighbourhoods with a planted
// dominant code (6, 7 and more occurrences, to test the "more than 6"
// rule) and ties; checks dominant code, count, oriented flag against a
// software histogram and that done comes 10 cycles after start.
module tb_histogram_folded;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  angle_t ang [TAPS];
  logic busy, done, oriented;
  angle_t dom_angle;
  logic [CNT_W-1:0] max_count;
  int checks = 0, failures = 0, n_oriented = 0, n_flat = 0;

  histogram_folded dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int h [8];
    int best, bestc, lat;
    for (int k = 0; k < 8; k++) h[k] = 0;
    for (int t = 0; t < TAPS; t++) h[ang[t]]++;
    best = 0; bestc = h[0];
    for (int k = 1; k < 8; k++) if (h[k] > bestc) begin best = k; bestc = h[k]; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 4;
    if (lat != 10) begin failures++; $display("latency %0d", lat); end
    if (int'(max_count) != bestc) begin failures++; $display("count %0d exp %0d", max_count, bestc); end
    if (int'(dom_angle) != best) begin failures++; $display("dom %0d exp %0d", dom_angle, best); end
    if (oriented != (bestc > 6)) begin failures++; $display("oriented %0d count %0d", oriented, bestc); end
    if (oriented) n_oriented++; else n_flat++;
  endtask

  initial begin
    for (int t = 0; t < TAPS; t++) ang[t] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int plant, code;
      plant = n % 17;                 // 0..16 copies of one code
      code  = $urandom_range(7);
      for (int t = 0; t < TAPS; t++)
        ang[t] = (t < plant) ? angle_t'(code) : angle_t'($urandom);
      for (int t = TAPS - 1; t > 0; t--) begin   // shuffle
        int j; angle_t tmp;
        j = $urandom_range(t);
        tmp = ang[t]; ang[t] = ang[j]; ang[j] = tmp;
      end
      run_one();
    end
    // a tie: 8 x code 5 and 8 x code 2 -> lower code wins
    for (int t = 0; t < TAPS; t++) ang[t] = (t % 2) ? angle_t'(5) : angle_t'(2);
    run_one();
    checks += 2;
    if (n_oriented == 0) failures++;
    if (n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
