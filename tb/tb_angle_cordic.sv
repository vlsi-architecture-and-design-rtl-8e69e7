// tb_angle_cordic: drives gradients on a circle sweep, at exact multiples of
// 22.5 degrees and at random, and compares the orientation code with an
// atan2-based quantiser; results within the guard band of a decision
// threshold are not compared. Every compared code is also checked to be
// the ideal code (22.5-degree bins) whenever the angle is more than 2
// degrees from an ideal transition. Latency must be 7 cycles.
module tb_angle_cordic;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  grad_t fx, fy;
  logic busy, done;
  angle_t angle;
  int checks = 0, failures = 0, skipped = 0;
  int seen [8];

  angle_cordic dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ideal code from the 22.5-degree bins; far = more than 2 degrees from a
  // transition level (11.25 + 22.5 i).
  function automatic int ideal_code(input int gx, input int gy, output bit far);
    real th, m;
    int  q;
    th = deg($atan2(real'(-gx), real'(gy)));   // -180..180
    if (th < 0.0) th += 180.0;
    if (th >= 180.0) th -= 180.0;
    q = int'($floor((th + 11.25) / 22.5)) % 8;
    m = th + 11.25 - 22.5 * $floor((th + 11.25) / 22.5);
    far = (m > 2.0) && (m < 20.5);
    return q;
  endfunction

  task automatic run_one(input int gx, input int gy);
    int exp_code, ideal, lat;
    bit amb, far;
    fx = grad_t'(gx);
    fy = grad_t'(gy);
    exp_code = angle_code(gx, gy, amb);
    ideal = ideal_code(gx, gy, far);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 7) begin failures++; $display("latency %0d exp 7", lat); end
    if (amb) skipped++;
    else begin
      checks++;
      seen[angle]++;
      if (int'(angle) != exp_code) begin
        failures++;
        $display("fx=%0d fy=%0d code %0d exp %0d", gx, gy, angle, exp_code);
      end
      if (far && !(gx == 0 && gy == 0)) begin
        checks++;
        if (int'(angle) != ideal) begin
          failures++;
          $display("fx=%0d fy=%0d code %0d ideal %0d", gx, gy, angle, ideal);
        end
      end
    end
  endtask

  initial begin
    fx = '0; fy = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(0, 0);
    for (int k = 0; k < 16; k++)
      run_one(int'($rtoi(1000.0 * $cos(k * 3.14159265358979 / 8.0))),
              int'($rtoi(1000.0 * $sin(k * 3.14159265358979 / 8.0))));
    for (int a = 0; a < 720; a++)
      run_one(int'($rtoi(1020.0 * $cos(a * 3.14159265358979 / 360.0))),
              int'($rtoi(1020.0 * $sin(a * 3.14159265358979 / 360.0))));
    for (int n = 0; n < 1000; n++)
      run_one(int'($urandom_range(2040)) - 1020, int'($urandom_range(2040)) - 1020);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("code %0d never produced", k); end
    end
    $display("skipped %0d near-threshold cases", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
