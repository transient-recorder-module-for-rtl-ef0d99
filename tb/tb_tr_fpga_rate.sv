// Pulse-rate test of tr_fpga at default parameters with 80-sample pulses
// (10 words), the short-pulse case for which the design is rated at
// 10 M pulses/s aggregate peak and a few M pulses/s sustained.
//
// How it works: every channel gets pulses of 40 samples at or above code 130
// (random values) over a random baseline below 100; each pulse start is an
// ascending crossing of level 128, so it triggers its own channel, and the
// testbench keeps every input sample and the crossing time of every pulse.
//  - Peak burst: all four channels trigger every 80 clocks at once, i.e.
//    4 x 200 MS/s / 80 samples = 10 M pulses/s, back to back, 120 pulses per
//    channel (480 tags, under the 512-tag recorder). Nothing may be lost or
//    discarded; the DSP side drains the tags and data afterwards.
//  - Sustained stream: each channel triggers after a random 150..280 clocks
//    (about 3.7 M pulses/s aggregate, i.e. 300 MB/s of pulse data) for 400
//    pulses per channel, while the DSP side drains concurrently.
// The DSP side polls the recorder's write pointer, reads each new tag, reads
// the pulse's 10 words with back-to-back single-clock bus reads (one read per
// DSP clock, data three clocks later), checks every sample and the time mark
// against the testbench's own record, and returns the space by writing the
// release and read pointers. The lost counters must stay at zero.
module tb_tr_fpga_rate;
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

  localparam int PRE = 16, NW = 10, HIGH = 40, PEAK_PERIOD = 80;
  localparam int HN = 1 << 18;
  byte unsigned hist [NCH][HN];
  int adc_edge = 0;
  int ppos [NCH], next_at [NCH], sent [NCH], quota [NCH];
  int exp_q [NCH][$];
  bit peak = 0;
  int n_discard = 0, n_lost = 0;

  always @(posedge clk_adc) begin
    for (int c = 0; c < NCH; c++) hist[c][adc_edge % HN] = adc_data[c];
    adc_edge++;
    if (rst_n) begin
      n_discard += $countones(dut.evt_discard);
      n_lost    += $countones(dut.evt_lost);
    end
    #0.5;
    for (int c = 0; c < NCH; c++) begin
      if (ppos[c] < 0 && sent[c] < quota[c] && adc_edge >= next_at[c]) begin
        ppos[c] = 0;
        exp_q[c].push_back(adc_edge);
        sent[c]++;
        next_at[c] = adc_edge + (peak ? PEAK_PERIOD : int'($urandom_range(150, 280)));
      end
      if (ppos[c] >= 0) begin
        adc_data[c] = 8'(130 + $urandom_range(0, 120));
        ppos[c] = (ppos[c] + 1 < HIGH) ? ppos[c] + 1 : -1;
      end else adc_data[c] = 8'($urandom_range(0, 100));
    end
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
  // n reads on consecutive DSP clocks from a0, a0+1, ... (SB word addresses
  // wrap inside the channel window); word j arrives three clocks after it
  // was asked for
  logic [63:0] bw [NW];
  int n_burst_clks = 0;
  task automatic burst_read(input int ch, input int w0, input int n);
    for (int j = 0; j < n + 3; j++) begin
      @(posedge clk_dsp); #1;
      if (j >= 3) bw[j-3] = emif_ed_o;
      if (j < n) begin
        emif_ce_n = 0; emif_are_n = 0;
        emif_ea = 16'h8000 | 16'(ch << SB_AW) | 16'((w0 + j) % SB_WORDS);
      end else begin
        emif_ce_n = 1; emif_are_n = 1;
      end
    end
    n_burst_clks += n + 3;
  endtask

  int rd_ptr = 0, n_checked = 0, n_tags = 0;
  longint off = -1;
  logic [SB_PW-1:0] rel [NCH];
  // take every tag written so far
  task automatic drain_once();
    logic [63:0] d;
    ppr_tag_t t;
    int wr, xing, bad;
    bus_read(16'(R_PPRRD), d);
    wr = int'(d[25:16]);
    if (wr == rd_ptr) return;
    while (rd_ptr != wr) begin
      bus_read(16'h4000 | 16'(rd_ptr % PPR_DEPTH), d);
      t = ppr_tag_t'(d);
      n_tags++;
      if (exp_q[t.channel].size() == 0) begin
        check(0, $sformatf("tag for channel %0d with no pulse sent", t.channel));
      end else begin
        xing = exp_q[t.channel].pop_front();
        if (off < 0) off = longint'(t.time_mark) - longint'(xing);
        check(longint'(t.time_mark) - longint'(xing) == off && t.len_m1 == 8'(NW - 1) && t.sb_ptr == rel[t.channel],
              $sformatf("tag %0d: channel %0d, time mark, length and SB position", n_tags, t.channel));
        burst_read(int'(t.channel), int'(t.sb_ptr[SB_AW-1:0]), NW);
        bad = 0;
        for (int k = 0; k < NW; k++)
          for (int b = 0; b < 8; b++)
            if (bw[k][8*b +: 8] != hist[t.channel][(xing - PRE + 8*k + b) % HN]) bad++;
        check(bad == 0, $sformatf("channel %0d pulse at %0d: %0d of 80 samples differ", t.channel, xing, bad));
        n_checked++;
        rel[t.channel] = rel[t.channel] + SB_PW'(NW);
        bus_write(16'(R_SBREL0 + int'(t.channel)), 64'(rel[t.channel]));
      end
      rd_ptr = (rd_ptr + 1) % (2 * PPR_DEPTH);
    end
    bus_write(16'(R_PPRRD), 64'(rd_ptr));
  endtask

  initial begin
    logic [63:0] d;
    chan_cfg_t cfg;
    int total, t_start, t_end, g;
    real rate;
    for (int c = 0; c < NCH; c++) begin
      adc_data[c] = 0; ppos[c] = -1; next_at[c] = 0; sent[c] = 0; quota[c] = 0; rel[c] = '0;
    end
    repeat (3) @(posedge clk_dsp);
    #1 rst_n = 1;
    repeat (3) @(posedge clk_dsp);
    cfg = '{npulse_irq: 10'd0, enable: 1'b1, overlap: OVL_DISCARD, len_m1: 8'(NW - 1), pre: 11'(PRE),
            src_sel: 2'd0, ext_en: 1'b0, self_en: 1'b1, disable_per: 8'd0, slope: SLOPE_ASC,
            avg_m1: 2'd0, level: 8'd128};
    for (int c = 0; c < NCH; c++) begin
      cfg.src_sel = 2'(c);
      bus_write(16'(R_CH0 + c), 64'(cfg));
    end
    bus_write(16'(R_CTRL), 64'h100);
    repeat (2200) @(posedge clk_adc);     // one buffer turn: pointers aligned

    // ---- peak burst
    peak = 1;
    for (int c = 0; c < NCH; c++) begin next_at[c] = adc_edge + 4; quota[c] = 120; end
    t_start = adc_edge;
    g = 0;
    while ((sent[0] < 120 || ppos[0] >= 0) && g < 20000) begin @(posedge clk_adc); g++; end
    repeat (200) @(posedge clk_adc);
    t_end = adc_edge;
    check(n_lost == 0 && n_discard == 0, $sformatf("peak burst: none lost (%0d) or discarded (%0d)", n_lost, n_discard));
    bus_read(16'(R_PPRRD), d);
    check(d[25:16] == 10'd480, $sformatf("peak burst: 480 tags (%0d)", d[25:16]));
    rate = 480.0 / (real'(120 * PEAK_PERIOD) * 5e-9) / 1e6;
    $display("peak burst: 480 pulses in %0d clocks, %0.2f M pulses/s aggregate", 120 * PEAK_PERIOD, rate);
    check(rate >= 9.99, "peak burst at 10 M pulses/s");
    drain_once();
    check(n_checked == 480, $sformatf("peak burst: 480 pulses checked (%0d)", n_checked));

    // ---- sustained stream with concurrent draining
    peak = 0;
    for (int c = 0; c < NCH; c++) begin next_at[c] = adc_edge + 10 + 37 * c; quota[c] = 120 + 400; end
    t_start = adc_edge;
    g = 0;
    while (n_checked < 4 * 520 && g < 200000) begin drain_once(); g++; end
    t_end = adc_edge;
    rate = 1600.0 / (real'(t_end - t_start) * 5e-9) / 1e6;
    $display("sustained: 1600 pulses in %0d clocks, %0.2f M pulses/s aggregate, bus busy with pulse data %0d DSP clocks",
             t_end - t_start, rate, n_burst_clks);
    check(n_checked == 2080, $sformatf("sustained: all pulses checked (%0d)", n_checked));
    check(rate >= 3.5, "sustained stream above 3.5 M pulses/s");
    check(n_lost == 0 && n_discard == 0, $sformatf("sustained: none lost (%0d) or discarded (%0d)", n_lost, n_discard));
    bus_read(16'(R_LOST), d);
    check(d == 64'd0, "lost counters zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
