// tb_filter_mac: random 16-pixel neighbourhoods and random signed 11-bit
// coefficient sets, plus the bilinear sets; the result is compared with a
// direct multiply-add, rounding and clamping. done must come 18 cycles
// after start.
module tb_filter_mac;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] tap;
  pix_t pix;
  coef_t coef;
  logic busy, done;
  pix_t result;
  int checks = 0, failures = 0, n_clip = 0;
  int px [16], cf [16];

  filter_mac dut (.*);
  always #5 clk = ~clk;

  // Pixel and coefficient memories addressed by the unit's tap output.
  always_comb begin
    pix  = pix_t'(px[tap]);
    coef = coef_t'(cf[tap]);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int e, lat;
    e = apply_filter(px, cf);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != 18) begin failures++; $display("latency %0d", lat); end
    if (int'(result) != e) begin failures++; $display("result %0d exp %0d", result, e); end
    if (e == 0 || e == 255) n_clip++;
  endtask

  initial begin
    for (int t = 0; t < 16; t++) begin px[t] = 0; cf[t] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      for (int t = 0; t < 16; t++) begin
        px[t] = $urandom_range(255);
        cf[t] = (n < 150) ? int'($urandom_range(2047)) - 1024 : int'($urandom_range(200)) - 60;
      end
      run_one();
    end
    for (int ph = 0; ph < 3; ph++)
      for (int n = 0; n < 20; n++) begin
        for (int t = 0; t < 16; t++) begin
          px[t] = $urandom_range(255);
          cf[t] = bilinear_tap(ph, t);
        end
        run_one();
      end
    checks++;
    if (n_clip == 0) begin failures++; $display("clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
