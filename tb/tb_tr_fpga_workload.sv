// Workload test of tr_fpga at default parameters: the acquisition of the
// oscilloscope comparison (ascending trigger at -2.5 V, i.e. code 128, with
// 7 us = 1400 pre-trigger samples and 10 us = 2000-sample pulses) on all four
// channels at once, and ten such pulses per channel, as in the test program's
// display of ten 2000-sample pulses.
//
// How it works: the same pulse shape (1500 samples at or above code 130,
// slightly different per channel) is presented on all four ADC inputs over
// quiet random baselines, and every input sample is kept in a history so the
// expected pulse can be cut out independently of the design. Phase A sends
// nine pulses without the DSP releasing anything: a secondary buffer holds
// only eight 250-word pulses, so the ninth is lost on every channel, and the
// "8 pulses stored" interrupt of channel 0 fires once. The DSP side then
// reads all 32 tags and 32 x 250 words over the bus, compares every sample
// with the history, checks that the time marks differ by exactly the spacing
// of the pulses, and releases the space. Phase B sends two more pulses, which
// are stored across the end of the buffers (words 2000..2249 wrap to 0..201)
// and checked the same way: ten stored pulses per channel in all.
//
// Bus timing is the design's own synchronous EMIF model (write taken at the
// command edge, read data three DSP clocks after the command).
module tb_tr_fpga_workload;
  import tr_pkg::*;
  logic clk_adc = 0, clk_dsp = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [7:0] adc_data [NCH];
  logic [NCH-1:0] ext_trg = 0;
  logic ext_start = 0;
  logic emif_ce_n = 1, emif_are_n = 1, emif_awe_n = 1, emif_pdt_n = 1;
  logic [EA_W-1:0] emif_ea = 0;
  logic [63:0] emif_ed_i = 0, emif_ed_o;
  logic emif_ed_oe;
  logic [3:0] ext_int;
  int checks = 0, failures = 0;

  tr_fpga dut (.*);
  always #2.5 clk_adc = ~clk_adc;
  initial begin #1.3; forever #5 clk_dsp = ~clk_dsp; end

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask

  localparam int PRE = 1400, NS = 2000, NW = NS / 8, HIGH = 1500, SPACING = 2600;
  localparam int HN = 1 << 18;
  byte unsigned hist [NCH][HN];
  int adc_edge = 0, pulse_pos = -1;
  int cross_at [12];
  int npulses = 0;
  bit pulse_req = 0;
  always @(posedge clk_adc) begin
    for (int c = 0; c < NCH; c++) hist[c][adc_edge % HN] = adc_data[c];
    adc_edge++;
    #0.5;
    if (pulse_req) begin
      pulse_req = 0; pulse_pos = 0; cross_at[npulses] = adc_edge; npulses++;
    end
    for (int c = 0; c < NCH; c++)
      if (pulse_pos >= 0 && pulse_pos < HIGH) adc_data[c] = 8'(130 + ((pulse_pos * 7 + c * 13) % 120));
      else adc_data[c] = 8'($urandom_range(0, 100));
    if (pulse_pos >= 0) pulse_pos = (pulse_pos + 1 < HIGH) ? pulse_pos + 1 : -1;
  end

  int irq_rises = 0;
  logic irq_q = 0;
  always @(negedge clk_adc) begin
    if (rst_n && ext_int[0] && !irq_q) irq_rises++;
    irq_q = ext_int[0];
  end

  task automatic bus_write(input logic [15:0] a, input logic [63:0] d);
    @(posedge clk_dsp); #1;
    emif_ce_n = 0; emif_awe_n = 0; emif_ea = a; emif_ed_i = d;
    @(posedge clk_dsp); #1;
    emif_ce_n = 1; emif_awe_n = 1;
  endtask
  task automatic bus_read(input logic [15:0] a, output logic [63:0] d);
    @(posedge clk_dsp); #1;
    emif_ce_n = 0; emif_are_n = 0; emif_ea = a;
    @(posedge clk_dsp); #1;
    emif_ce_n = 1; emif_are_n = 1;
    @(posedge clk_dsp);
    @(posedge clk_dsp); #1;
    d = emif_ed_o;
  endtask

  task automatic send_pulses(input int n);
    repeat (n) begin
      pulse_req = 1;
      repeat (SPACING) @(posedge clk_adc);
    end
  endtask

  // Read ntags tags starting at PPR slot slot0; the k-th tag of a channel
  // belongs to pulse pbase+k. Checks tag fields, time marks and all samples.
  task automatic drain(input int slot0, input int ntags, input int pbase,
                       input int per_ch, input int word0, inout longint t0);
    logic [63:0] d;
    ppr_tag_t t;
    int seen [NCH];
    int bad, p, first;
    for (int c = 0; c < NCH; c++) seen[c] = 0;
    for (int s = 0; s < ntags; s++) begin
      bus_read(16'h4000 | 16'((slot0 + s) % PPR_DEPTH), d);
      t = ppr_tag_t'(d);
      p = (seen[t.channel] < per_ch) ? pbase + seen[t.channel] : -1;
      check(p >= 0 && t.len_m1 == 8'(NW - 1), $sformatf("tag %0d: channel %0d, 250 words", s, t.channel));
      if (p < 0) continue;
      check(int'(t.sb_ptr[SB_AW-1:0]) == (word0 + seen[t.channel] * NW) % SB_WORDS,
            $sformatf("tag %0d: SB position %0d", s, t.sb_ptr));
      if (t0 < 0) t0 = longint'(t.time_mark) - longint'(cross_at[p]);
      check(longint'(t.time_mark) - longint'(cross_at[p]) == t0,
            $sformatf("tag %0d: time mark follows the pulse spacing", s));
      first = cross_at[p] - PRE;
      bad = 0;
      for (int k = 0; k < NW; k++) begin
        bus_read(16'h8000 | 16'(int'(t.channel) << SB_AW) | 16'((int'(t.sb_ptr[SB_AW-1:0]) + k) % SB_WORDS), d);
        for (int b = 0; b < 8; b++)
          if (d[8*b +: 8] != hist[t.channel][(first + 8*k + b) % HN]) bad++;
      end
      check(bad == 0, $sformatf("channel %0d pulse %0d: %0d of 2000 samples differ", t.channel, p, bad));
      seen[t.channel]++;
    end
    for (int c = 0; c < NCH; c++) check(seen[c] == per_ch, $sformatf("channel %0d: %0d tags", c, seen[c]));
  endtask

  initial begin
    logic [63:0] d;
    chan_cfg_t cfg;
    longint t0;
    for (int c = 0; c < NCH; c++) adc_data[c] = 0;
    repeat (3) @(posedge clk_dsp);
    #1 rst_n = 1;
    repeat (3) @(posedge clk_dsp);
    cfg = '{npulse_irq: 10'd8, enable: 1'b1, overlap: OVL_DISCARD, len_m1: 8'(NW - 1), pre: 11'(PRE),
            src_sel: 2'd0, ext_en: 1'b0, self_en: 1'b1, disable_per: 8'd255, slope: SLOPE_ASC,
            avg_m1: 2'd0, level: 8'd128};
    for (int c = 0; c < NCH; c++) begin
      cfg.src_sel = 2'(c);
      bus_write(16'(R_CH0 + c), 64'(cfg));
    end
    bus_write(16'(R_IRQ), 64'h1);          // SB0 holds 8 new pulses -> line 0
    bus_write(16'(R_CTRL), 64'h100);       // start the timer
    repeat (2200) @(posedge clk_adc);      // one buffer turn: pointers aligned

    // Phase A: nine pulses, nothing released
    send_pulses(9);
    repeat (50) @(posedge clk_dsp);
    bus_read(16'(R_PPRRD), d);
    check(d[25:16] == 10'd32, $sformatf("phase A: 32 tags written (%0d)", d[25:16]));
    bus_read(16'(R_LOST), d);
    for (int c = 0; c < NCH; c++)
      check(d[16*c +: 16] == 16'd1, $sformatf("channel %0d: ninth pulse lost (%0d)", c, d[16*c +: 16]));
    check(irq_rises == 1, $sformatf("one 8-pulse interrupt (%0d)", irq_rises));
    t0 = -1;
    drain(0, 32, 0, 8, 0, t0);
    for (int c = 0; c < NCH; c++) bus_write(16'(R_SBREL0 + c), 64'(8 * NW));
    bus_write(16'(R_PPRRD), 64'd32);
    repeat (50) @(posedge clk_dsp);

    // Phase B: two more pulses (pulse indices 9 and 10), stored across the wrap
    send_pulses(2);
    repeat (50) @(posedge clk_dsp);
    bus_read(16'(R_PPRRD), d);
    check(d[25:16] == 10'd40, $sformatf("phase B: 40 tags written (%0d)", d[25:16]));
    drain(32, 8, 9, 2, 8 * NW, t0);
    check(irq_rises == 1, "no interrupt for two more pulses");
    $display("workload: %0d pulses sent, 10 stored and checked per channel, 4 lost", npulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
