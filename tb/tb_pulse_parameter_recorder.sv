// Self-checking test of pulse_parameter_recorder.
// Four channel models offer random tags and hold each until acknowledged.
// Checked: at most one acknowledge per clock, all four channels served within
// four clocks when they all wait, every tag stored in order of acknowledge
// (read back on the unrelated read clock), the write pointer, and the room
// flag as the read pointer moves (room while at most 504 of 512 slots used).
// A wrap phase then runs twelve rounds of traffic, each read back tag by tag
// at its slot modulo 512, until the pointers have passed the wrap twice.
module tb_pulse_parameter_recorder;
  import tr_pkg::*;
  logic clk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  ppr_tag_t tag [NCH];
  logic [NCH-1:0] tag_valid = '0, tag_ack;
  logic [PPR_AW:0] rd_ptr = 0, wr_ptr;
  logic room;
  logic [PPR_AW-1:0] raddr = 0;
  logic [63:0] rdata;
  int checks = 0, failures = 0;
  ppr_tag_t expq [$];
  int multi_ack = 0;

  pulse_parameter_recorder dut (.*);
  always #2.5 clk = ~clk;
  initial begin #0.7; forever #5 rclk = ~rclk; end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask

  // channel models: drop a tag when acknowledged, sometimes offer a new one
  bit gen_on = 0;
  always @(posedge clk) begin
    if ($countones(tag_ack) > 1) multi_ack++;
    for (int c = 0; c < NCH; c++) if (tag_ack[c]) expq.push_back(tag[c]);
    #0.5;
    for (int c = 0; c < NCH; c++) begin
      if (tag_ack[c]) tag_valid[c] = 0;
      if (!tag_valid[c] && gen_on && ($urandom_range(0, 3) == 0)) begin
        tag[c] = '{channel: 2'(c), cut: 1'b0, rsvd: 1'b0, len_m1: 8'($urandom), sb_ptr: 12'($urandom),
                   time_mark: {8'($urandom), 32'($urandom)}};
        tag_valid[c] = 1;
      end
    end
  end

  initial begin
    int t;
    for (int c = 0; c < NCH; c++) tag[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // all four offer at once: served in four consecutive clocks
    @(posedge clk); #1;
    for (int c = 0; c < NCH; c++) tag[c] = '{channel: 2'(c), cut: 1'b0, rsvd: 1'b0, len_m1: 8'(c), sb_ptr: 12'(c), time_mark: 40'(100 + c)};
    tag_valid = '1;
    t = 0;
    while (tag_valid != 0 && t < 10) begin @(posedge clk); #1; t++; end
    check(t == 4, $sformatf("four waiting channels served in four clocks (%0d)", t));
    check(wr_ptr == 4, "write pointer after four tags");
    // random traffic, DSP keeps up in steps
    gen_on = 1;
    repeat (400) @(posedge clk);
    gen_on = 0;
    repeat (5) @(posedge clk); #1;
    check(multi_ack == 0, "one tag per clock");
    check(int'(wr_ptr) == expq.size(), $sformatf("write pointer equals tags written (%0d/%0d)", wr_ptr, expq.size()));
    // room rule
    rd_ptr = wr_ptr - 10'd504; #1;
    check(room, "room with 504 used");
    rd_ptr = wr_ptr - 10'd505; #1;
    check(!room, "no room with 505 used");
    rd_ptr = wr_ptr; #1;
    check(room, "room when empty");
    // read back every tag on the DSP clock
    begin
      automatic int bad = 0;
      @(posedge rclk); #0.5;
      for (int i = 0; i < expq.size() && i < PPR_DEPTH; i++) begin
        raddr = PPR_AW'(i);
        @(posedge rclk); #0.5;
        if (rdata !== 64'(expq[i])) bad++;
      end
      check(bad == 0, $sformatf("stored tags match in order (%0d bad)", bad));
    end
    // wrap phase: rounds of traffic, each read back by the DSP side, which
    // then moves its read pointer; the pointers pass the 512-slot wrap
    begin
      automatic int base = expq.size();
      for (int r = 0; r < 12; r++) begin
        gen_on = 1;
        repeat (100) @(posedge clk);
        gen_on = 0;
        repeat (5) @(posedge clk); #1;
        check(wr_ptr == 10'(expq.size()), $sformatf("round %0d: write pointer %0d", r, wr_ptr));
        @(posedge rclk); #0.5;
        for (int i = base; i < expq.size(); i++) begin
          raddr = PPR_AW'(i);
          @(posedge rclk); #0.5;
          check(rdata === 64'(expq[i]), $sformatf("round %0d: tag %0d read back at slot %0d", r, i, i % PPR_DEPTH));
        end
        rd_ptr = wr_ptr;
        base = expq.size();
      end
      check(base > 2 * PPR_DEPTH, $sformatf("pointers wrapped (%0d tags)", base));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
