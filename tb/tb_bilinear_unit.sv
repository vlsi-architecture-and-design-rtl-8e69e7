// tb_bilinear_unit: exhaustive corner values and random samples; checks the
// three interpolated samples and the 2-cycle latency.
module tb_bilinear_unit;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t p00, p01, p10, p11, right, below, diag;
  logic done;
  int checks = 0, failures = 0;

  bilinear_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int er, eb, ed, lat;
    er = (p00 + p01 + 1) / 2;
    eb = (p00 + p10 + 1) / 2;
    ed = (p00 + p01 + p10 + p11 + 2) / 4;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 4;
    if (lat != 2) begin failures++; $display("latency %0d", lat); end
    if (int'(right) != er) begin failures++; $display("right %0d exp %0d", right, er); end
    if (int'(below) != eb) begin failures++; $display("below %0d exp %0d", below, eb); end
    if (int'(diag) != ed) begin failures++; $display("diag %0d exp %0d", diag, ed); end
  endtask

  initial begin
    p00 = 0; p01 = 0; p10 = 0; p11 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 16; m++) begin
      p00 = m[0] ? 8'd255 : 8'd0; p01 = m[1] ? 8'd255 : 8'd0;
      p10 = m[2] ? 8'd255 : 8'd1; p11 = m[3] ? 8'd254 : 8'd0;
      run_one();
    end
    for (int n = 0; n < 500; n++) begin
      p00 = pix_t'($urandom); p01 = pix_t'($urandom);
      p10 = pix_t'($urandom); p11 = pix_t'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
