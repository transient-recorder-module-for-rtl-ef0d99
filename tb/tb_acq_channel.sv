// Self-checking test of acq_channel (trigger detection, format, select,
// pre-trigger buffer, storing control and secondary buffer together).
// The testbench records every ADC sample it presents. A pulse crossing the
// level must be stored with exactly `pre` samples before the crossing sample,
// read back through the 64-bit read port lower byte first; a software trigger
// and another channel's trigger (selected through src_sel) store a pulse as
// well, with the tag pointing at the right SB words. A final random phase
// stores eight self-triggered pulses with random pre-trigger length (0-1500)
// and pulse length (8-64 samples) and checks each tag and every sample.
module tb_acq_channel;
  import tr_pkg::*;
  logic clk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [7:0] adc_data = 0;
  chan_cfg_t cfg;
  logic ext_trg = 0, soft_trg = 0, ch_trg, ppr_room = 1, tag_ack = 0;
  logic [NCH-1:0] ch_trg_all;
  logic [NCH-1:0] other_trg = 0;
  logic [TIME_W-1:0] time_mark = 0;
  logic [SB_PW-1:0] sb_rel_ptr = 0, res_ptr;
  ppr_tag_t tag;
  logic tag_valid, pulse_done, evt_lost, evt_discard, evt_trunc;
  logic [15:0] lost_cnt;
  logic [SB_AW-1:0] sb_raddr = 0;
  logic [63:0] sb_rdata;
  int checks = 0, failures = 0;
  byte unsigned hist [$];   // hist[i]: sample presented at edge i
  int edge_no = 0;
  int trig_edge = -1;

  assign ch_trg_all = {other_trg[3:2], ch_trg, other_trg[0]};  // this is channel 1
  acq_channel #(.CH(2'd1)) dut (.*);
  always #2.5 clk = ~clk;
  initial begin #1.1; forever #5 rclk = ~rclk; end
  always @(posedge clk) begin
    hist.push_back(adc_data);
    edge_no++;
    time_mark <= time_mark + 1;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  task automatic sample_next(input logic [7:0] v);
    adc_data = v; @(posedge clk); #0.5;
  endtask
  // read n samples starting at SB word w, compare with hist[first...]
  task automatic compare_sb(input int w, input int n, input int first, input string what);
    int bad = 0;
    for (int k = 0; k < n / 8; k++) begin
      @(posedge rclk); #0.2 sb_raddr = SB_AW'(w + k);
      @(posedge rclk); #0.2;
      for (int b = 0; b < 8; b++) if (sb_rdata[b*8 +: 8] != hist[first + 8*k + b]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d samples differ", what, bad, n));
  endtask

  initial begin
    int cross_edge, w;
    cfg = '{npulse_irq: 10'd0, enable: 1'b1, overlap: OVL_DISCARD, len_m1: 8'd3, pre: 11'd20,
            src_sel: 2'd1, ext_en: 1'b0, self_en: 1'b1, disable_per: 8'd0, slope: SLOPE_ASC,
            avg_m1: 2'd0, level: 8'd100};
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    // baseline long enough for the pre-trigger buffer pointers to settle
    repeat (2100) sample_next(8'($urandom_range(0, 60)));
    // pulse: the first sample >= 100 is the crossing
    cross_edge = edge_no;      // index in hist of the next presented sample
    for (int i = 0; i < 12; i++) sample_next(8'(150 + 8 * i));
    repeat (60) sample_next(8'($urandom_range(0, 60)));
    check(tag_valid && tag.channel == 1 && tag.sb_ptr == 0 && tag.len_m1 == 3, "self-trigger tag");
    check(tag.time_mark == TIME_W'(cross_edge + 3), $sformatf("time mark 3 clocks after the crossing sample (%0d vs %0d)", tag.time_mark, cross_edge));
    compare_sb(0, 32, cross_edge - 20, "self trigger, pre=20");
    tag_ack = 1; @(posedge clk); #0.5 tag_ack = 0;
    // software trigger, pre = 0, store-all
    cfg.pre = 0;
    repeat (2100) sample_next(8'($urandom_range(0, 60)));
    w = edge_no;
    soft_trg = 1; sample_next(8'($urandom_range(0, 60))); soft_trg = 0;
    repeat (40) sample_next(8'($urandom_range(0, 60)));
    check(tag_valid && tag.sb_ptr == 4, "software-trigger tag at the next reservation");
    // the software trigger enters where a self trigger would, so it stands for
    // the sample presented two edges earlier
    compare_sb(4, 32, w - 2, "software trigger, pre=0");
    tag_ack = 1; @(posedge clk); #0.5 tag_ack = 0;
    // other channel's trigger selected, own self trigger masked
    cfg.src_sel = 2'd3; cfg.self_en = 1'b0; cfg.pre = 5;
    repeat (2100) sample_next(8'($urandom_range(0, 60)));
    for (int i = 0; i < 5; i++) sample_next(8'(200));   // own crossing, masked
    repeat (20) sample_next(8'($urandom_range(0, 60)));
    check(!tag_valid, "masked self trigger stores nothing");
    w = edge_no;
    other_trg[3] = 1; sample_next(8'($urandom_range(0, 60))); other_trg[3] = 0;
    repeat (40) sample_next(8'($urandom_range(0, 60)));
    check(tag_valid && tag.sb_ptr == 8, $sformatf("trigger taken from channel 3 (%0d %0d)", tag_valid, tag.sb_ptr));
    compare_sb(8, 32, w - 2 - 5, "channel-3 trigger, pre=5");
    tag_ack = 1; @(posedge clk); #0.5 tag_ack = 0;
    // random phase: self triggers with random pre-trigger and pulse lengths
    cfg.src_sel = 2'd1; cfg.self_en = 1'b1;
    w = 12;
    for (int p = 0; p < 8; p++) begin
      automatic int pre = $urandom_range(0, 1500);
      automatic int lm1 = $urandom_range(0, 7);
      cfg.pre = 11'(pre); cfg.len_m1 = 8'(lm1);
      repeat (2100) sample_next(8'($urandom_range(0, 60)));
      cross_edge = edge_no;
      for (int i = 0; i < 12; i++) sample_next(8'($urandom_range(100, 255)));
      repeat (100) sample_next(8'($urandom_range(0, 60)));
      check(tag_valid && tag.sb_ptr == SB_PW'(w) && tag.len_m1 == 8'(lm1) && !tag.cut &&
            tag.time_mark == TIME_W'(cross_edge + 3),
            $sformatf("random pulse %0d: tag (pre %0d, len_m1 %0d)", p, pre, lm1));
      compare_sb(w, 8 * (lm1 + 1), cross_edge - pre, $sformatf("random pulse %0d data, pre=%0d", p, pre));
      tag_ack = 1; @(posedge clk); #0.5 tag_ack = 0;
      w += lm1 + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
