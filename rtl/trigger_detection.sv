// Digital trigger detection of one channel.
//
// An arithmetic unit keeps the last four samples and forms the sliding sums of
// one, two, three and four samples; a multiplexer picks the sum of avg_m1+1
// samples. Instead of dividing the sum, the level/transition detector compares
// it with level x (avg_m1+1), which is the same as comparing the average with
// the level. A trigger is a crossing of the level: ascending means the average
// goes from below the level to at or above it, descending the reverse (codes
// rise as the input voltage goes more negative). After each trigger the
// disable control blocks detection for (disable_per+1) x 4 clocks, i.e. 20 ns
// to 5.12 us at 200 MHz.
//
// Sliding averages of 1..4 samples, the 1..254 level, the slope selection and
// the 20 ns..5.12 us disable period follow the design description; comparing
// sums instead of averages, the code direction and the 4-clock granularity of
// the disable period are this design's choices.
//
// Timing: sample_valid qualifies sample. A sample that completes a crossing
// raises self_trg for one clock on the clock after it is presented.
module trigger_detection
  import tr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                sample_valid,
  input  logic                arm,          // detection enabled (channel enabled)
  input  logic [7:0]          level,
  input  logic [1:0]          avg_m1,
  input  slope_e              slope,
  input  logic [7:0]          disable_per,
  output logic                self_trg
);
  logic [SAMPLE_W-1:0] s1, s2, s3;         // previous samples S-1, S-2, S-3
  logic [SAMPLE_W+1:0] sum [4];            // arithmetic unit outputs
  logic [SAMPLE_W+1:0] sel_sum, threshold;
  logic                above, above_q, primed;
  logic [9:0]          dead_cnt;           // remaining blocked clocks
  logic                crossing;

  always_comb begin
    sum[0] = {2'b00, sample};
    sum[1] = sum[0] + 10'(s1);
    sum[2] = sum[1] + 10'(s2);
    sum[3] = sum[2] + 10'(s3);
    sel_sum   = sum[avg_m1];
    threshold = 10'(level) * (10'(avg_m1) + 10'd1);
    above     = sel_sum >= threshold;
    crossing  = primed && ((slope == SLOPE_ASC) ? (above && !above_q) : (!above && above_q));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      above_q  <= 1'b0;
      primed   <= 1'b0;
      dead_cnt <= '0;
      self_trg <= 1'b0;
    end else begin
      self_trg <= 1'b0;
      if (dead_cnt != 0) dead_cnt <= dead_cnt - 10'd1;
      if (sample_valid) begin
        s1 <= sample; s2 <= s1; s3 <= s2;
        above_q <= above;
        primed  <= arm;  // a crossing needs a previous sample seen while armed
        if (arm && crossing && dead_cnt == 0) begin
          self_trg <= 1'b1;
          dead_cnt <= {disable_per, 2'b00} + 10'd3;
        end
      end
    end
  end
endmodule
