// tb_chroma_scaler: two frames of random U and V planes through the chroma
// path with random input gaps and output back-pressure; every output {V,U}
// pair is compared with a bilinear model that replicates the last row and
// column.
module tb_chroma_scaler;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  localparam int WC = 6, HC = 5, FRAMES = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_uv, out_uv;
  int checks = 0, failures = 0, n_bp = 0;
  int su [FRAMES][], sv [FRAMES][], du [FRAMES][], dv [FRAMES][];

  chroma_scaler #(.WC(WC), .HC(HC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int f, k;
    f = nout / (4 * WC * HC);
    k = nout % (4 * WC * HC);
    checks++;
    if (int'(out_uv[7:0]) != du[f][k] || int'(out_uv[15:8]) != dv[f][k]) begin
      failures++;
      $display("frame %0d pixel %0d: u %0d v %0d exp %0d %0d", f, k, out_uv[7:0], out_uv[15:8], du[f][k], dv[f][k]);
    end
    nout++;
  end
  always @(posedge clk) if (out_valid && !out_ready) n_bp++;

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      su[f] = new[WC * HC]; sv[f] = new[WC * HC];
      foreach (su[f][k]) begin su[f][k] = $urandom_range(255); sv[f][k] = $urandom_range(255); end
      chroma_model(WC, HC, su[f], du[f]);
      chroma_model(WC, HC, sv[f], dv[f]);
    end
    in_uv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < FRAMES; f++)
        for (int k = 0; k < WC * HC; k++) begin
          while ($urandom_range(3) == 0) @(negedge clk);
          in_valid = 1;
          in_uv = {8'(sv[f][k]), 8'(su[f][k])};
          do @(posedge clk); while (!in_ready);
          #1 in_valid = 0;
        end
      forever begin @(negedge clk); out_ready = ($urandom_range(2) != 0); end
    join_none
    wait (nout == FRAMES * 4 * WC * HC);
    checks++;
    if (n_bp == 0) begin failures++; $display("no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
