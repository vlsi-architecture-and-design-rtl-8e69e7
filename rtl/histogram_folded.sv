// histogram_folded: finds the dominant orientation of a 4x4 neighbourhood of
// orientation codes and decides whether the neighbourhood is "oriented".
//
// The 16 codes are latched into orientation registers. A 3-bit counter then
// steps through the 8 possible codes, one per cycle; 16 equality comparators
// test every register against the counter and a population counter (the
// (16,4) compressor of the architecture) adds up the match_cnt. Whenever that
// count is strictly larger than the maximum-count register, the maximum and
// the dominant-orientation register (both cleared at the start) take the
// count and the counter value. After the 8 counting cycles the neighbourhood
// is oriented when the maximum count exceeds HIST_THRESH (6), i.e. when one
// orientation occurs more than 6 times. Ties keep the lower code.
// All of this follows the source design, except that the match count is
// 5 bits wide so that 16 equal codes are counted exactly.
//
// Timing: ang is sampled when start is high; done pulses 10 cycles later
// (1 load, 8 count, 1 decision cycle) with dom_angle, max_count and oriented
// valid until the next start.
module histogram_folded
  import scaler_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  angle_t           ang [TAPS],
  output logic             busy,
  output logic             done,
  output angle_t           dom_angle,
  output logic [CNT_W-1:0] max_count,
  output logic             oriented
);
  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_DECIDE} state_e;
  state_e state;

  angle_t           areg [TAPS];
  angle_t           cnt;
  logic [CNT_W-1:0] match_cnt;

  always_comb begin
    match_cnt = '0;
    for (int k = 0; k < TAPS; k++)
      match_cnt += CNT_W'(areg[k] == cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      dom_angle <= '0;
      max_count <= '0;
      oriented  <= 1'b0;
      done      <= 1'b0;
      for (int k = 0; k < TAPS; k++) areg[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < TAPS; k++) areg[k] <= ang[k];
          cnt       <= '0;
          dom_angle <= '0;
          max_count <= '0;
          state     <= S_COUNT;
        end
        S_COUNT: begin
          if (match_cnt > max_count) begin
            max_count <= match_cnt;
            dom_angle <= cnt;
          end
          cnt <= cnt + 1'b1;
          if (cnt == angle_t'(NUM_ORIENT - 1)) state <= S_DECIDE;
        end
        default: begin
          oriented <= (max_count > CNT_W'(HIST_THRESH));
          done     <= 1'b1;
          state    <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
