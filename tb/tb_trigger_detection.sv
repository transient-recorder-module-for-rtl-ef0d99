// Self-checking test of trigger_detection.
// Directed cases (one-sample crossing, averaging over 4, descending slope,
// dead time of 4 and 1024 clocks) followed by a random stream compared with a
// reference model of the sliding-average crossing rule.
module tb_trigger_detection;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an asserting edge for the asynchronous reset
  logic [7:0] sample = 0, level = 100, disable_per = 0;
  logic [1:0] avg_m1 = 0;
  slope_e     slope = SLOPE_ASC;
  logic       arm = 1, self_trg;
  int checks = 0, failures = 0;

  trigger_detection dut (.clk, .rst_n, .sample, .sample_valid(1'b1), .arm, .level, .avg_m1,
                         .slope, .disable_per, .self_trg);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // Present one sample for one edge; return whether a trigger followed it.
  task automatic push(input logic [7:0] s, output bit t);
    sample = s;
    @(posedge clk); #1;
    t = self_trg;
  endtask

  // reference model state
  int h [4];
  bit prev_above, primed_m;
  int dead;
  function automatic bit model_step(input int s);
    int k, sum; bit above, xing, t;
    h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = s;
    k = int'(avg_m1) + 1; sum = 0;
    for (int i = 0; i < k; i++) sum += h[i];
    above = sum >= level * k;
    xing = primed_m && ((slope == SLOPE_ASC) ? (above && !prev_above) : (!above && prev_above));
    t = arm && xing && dead == 0;
    if (dead > 0) dead--;
    if (t) dead = disable_per * 4 + 3;
    prev_above = above; primed_m = arm;
    return t;
  endfunction

  bit t;
  int first, gap;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // single sample, ascending: trigger right after the sample reaching the level
    push(50, t); push(50, t); check(!t, "no trigger below level");
    push(100, t); check(t, "trigger at level, ascending");
    push(200, t); check(!t, "no second trigger while above");
    push(20, t);  check(!t, "falling edge ignored in ascending mode");
    // descending
    slope = SLOPE_DESC; push(200, t); push(200, t); check(!t, "desc: no trigger above");
    push(99, t);  check(t, "desc: trigger when falling below level");
    // average of 4: sum must reach 4*level
    slope = SLOPE_ASC; avg_m1 = 3;
    repeat (4) push(0, t);
    push(200, t); check(!t, "avg4: 200+0+0+0 < 400");
    push(199, t); check(!t, "avg4: 399 < 400");
    push(1, t);   check(t, "avg4: 400 reaches 4*level");
    // dead time: square wave with period 2; disable_per=0 -> triggers 4 clocks apart
    avg_m1 = 0; disable_per = 0;
    repeat (8) push(0, t);
    first = -1; gap = 0;
    for (int i = 0; i < 40; i++) begin
      push((i % 2 != 0) ? 8'd200 : 8'd0, t);
      if (t) begin if (first >= 0 && gap == 0) gap = i - first; first = i; end
    end
    check(gap == 4, $sformatf("dead time 20 ns = 4 clocks (got %0d)", gap));
    disable_per = 255; repeat (1100) push(0, t);
    first = -1; gap = 0;
    for (int i = 0; i < 2200; i++) begin
      push((i % 2 != 0) ? 8'd200 : 8'd0, t);
      if (t) begin if (first >= 0 && gap == 0) gap = i - first; first = i; end
    end
    check(gap == 1024, $sformatf("dead time 5.12 us = 1024 clocks (got %0d)", gap));
    // random stream against the model
    disable_per = 1; repeat (1100) push(0, t);
    for (int i = 0; i < 4; i++) h[i] = 0;
    prev_above = 0; primed_m = 1; dead = 0;
    for (int i = 0; i < 4000; i++) begin
      int s; bit e;
      if (i % 500 == 0) begin
        avg_m1 = 2'($urandom_range(0, 3)); slope = slope_e'($urandom_range(0, 1));
        level = 8'($urandom_range(1, 254));
      end
      s = $urandom_range(0, 255);
      e = model_step(s);
      push(8'(s), t);
      check(t == e, $sformatf("random step %0d exp %0d got %0d avg %0d lvl %0d s %0d dead %0d %0d h %0d %0d %0d %0d sum %0d thr %0d aq %0d pr %0d", i, e, t, avg_m1, level, s, dead, dut.dead_cnt, h[0],h[1],h[2],h[3], dut.sel_sum, dut.threshold, dut.above_q, prev_above));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
