// tb_coef_rom: after reset every set must read as the bilinear filter;
// random writes then replace single coefficients, tracked in a shadow copy,
// and every (set, tap) is read back for all three phases.
module tb_coef_rom;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  set_t wr_set, rd_set;
  logic [1:0] wr_phase;
  logic [3:0] wr_tap, rd_tap;
  coef_t wr_data;
  coef_t rd_coef [PHASES];
  int checks = 0, failures = 0;
  int shadow [NUM_SETS][PHASES][TAPS];

  coef_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int s = 0; s < NUM_SETS; s++)
      for (int t = 0; t < TAPS; t++) begin
        rd_set = set_t'(s); rd_tap = 4'(t);
        #1;
        for (int p = 0; p < PHASES; p++) begin
          checks++;
          if (int'(rd_coef[p]) != shadow[s][p][t]) begin
            failures++;
            $display("set %0d ph %0d tap %0d: %0d exp %0d", s, p, t, rd_coef[p], shadow[s][p][t]);
          end
        end
      end
  endtask

  initial begin
    wr_set = '0; wr_phase = '0; wr_tap = '0; wr_data = '0; rd_set = '0; rd_tap = '0;
    for (int s = 0; s < NUM_SETS; s++)
      for (int p = 0; p < PHASES; p++)
        for (int t = 0; t < TAPS; t++) shadow[s][p][t] = bilinear_tap(p, t);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    read_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en = 1;
      wr_set = set_t'($urandom_range(NUM_SETS - 1));
      wr_phase = 2'($urandom_range(PHASES - 1));
      wr_tap = 4'($urandom);
      wr_data = coef_t'($urandom);
      shadow[wr_set][wr_phase][wr_tap] = int'(wr_data);
    end
    @(negedge clk) wr_en = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
