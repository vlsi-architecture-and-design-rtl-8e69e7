// tb_delay_line: pushes a numbered sequence with random gaps in en and
// checks that each output equals the word pushed DEPTH enables earlier.
module tb_delay_line;
  localparam int unsigned WIDTH = 12, DEPTH = 13;
  logic clk = 0, rst_n = 0, en = 0;
  logic [WIDTH-1:0] din, dout;
  int checks = 0, failures = 0;
  int hist [$];

  delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = WIDTH'($urandom);
      #1;
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (int'(dout) != hist[hist.size() - DEPTH]) begin
            failures++;
            $display("dout %0d exp %0d", dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(int'(din));
      end
    end
    @(negedge clk) en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
