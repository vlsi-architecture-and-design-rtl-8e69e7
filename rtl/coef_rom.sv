// coef_rom: filter coefficient store of the interpolator. It holds
// NUM_SETS = 9 filter sets (8 oriented filters, one per orientation code,
// and the bilinear filter as set 8); each set has one 16-tap filter for each
// of the three interpolated output phases. One read returns the coefficient
// of a given tap for all three phases, which is what the three filter units
// consume in lock step.
//
// The source design pre-stores the oriented filters in a ROM with 11-bit
// coefficients but does not list their values, so here the store is a
// register file: reset fills every set with the bilinear filter (computed by
// scaler_pkg::bilinear_coef) and a write port loads the oriented sets.
// Until they are loaded every set interpolates bilinearly.
//
// Interface: read is combinational (rd_set, rd_tap -> rd_coef[phase]).
// A write (wr_en high at a clock edge) replaces one coefficient.
module coef_rom
  import scaler_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  set_t        wr_set,
  input  logic [1:0]  wr_phase,
  input  logic [3:0]  wr_tap,
  input  coef_t       wr_data,
  input  set_t        rd_set,
  input  logic [3:0]  rd_tap,
  output coef_t       rd_coef [PHASES]
);
  coef_t mem [NUM_SETS][PHASES][TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SETS; s++)
        for (int p = 0; p < PHASES; p++)
          for (int t = 0; t < TAPS; t++)
            mem[s][p][t] <= bilinear_coef(p, t);
    end else if (wr_en && wr_set < set_t'(NUM_SETS) && wr_phase < 2'(PHASES)) begin
      mem[wr_set][wr_phase][wr_tap] <= wr_data;
    end
  end

  always_comb begin
    for (int p = 0; p < PHASES; p++)
      rd_coef[p] = (rd_set < set_t'(NUM_SETS)) ? mem[rd_set][p][rd_tap] : '0;
  end
endmodule
