// Full-size test of tr_fpga with every parameter at its default (40-bit
// timer, 2048-sample pre-trigger buffers, 2048-word secondary buffers,
// 512-tag PPR). One complete acquisition at the largest settings: channel 0
// is configured for 2046 pre-trigger samples and 2048-sample pulses, the timer
// is started, a pulse self-triggers the channel, and the DSP reads the tag and
// all 256 words of the pulse over the bus and compares them with the samples
// that were presented, then releases the space.
module tb_tr_fpga_full;
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

  localparam int HN = 1 << 15;
  byte unsigned hist [HN];
  int adc_edge = 0, pulse_pos = -1, cross_at = 0;
  bit pulse_req = 0;
  always @(posedge clk_adc) begin
    hist[adc_edge % HN] = adc_data[0];
    adc_edge++;
    #0.5;
    if (pulse_req) begin pulse_req = 0; pulse_pos = 0; cross_at = adc_edge; end
    if (pulse_pos >= 0 && pulse_pos < 100) begin
      adc_data[0] = 8'(200 + (pulse_pos % 50)); pulse_pos++;
    end else begin
      adc_data[0] = 8'($urandom_range(0, 60)); pulse_pos = -1;
    end
    for (int c = 1; c < NCH; c++) adc_data[c] = 8'($urandom_range(0, 255));
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

  initial begin
    logic [63:0] d;
    chan_cfg_t cfg;
    ppr_tag_t t;
    automatic int bad = 0, guard = 0;
    int first;
    for (int c = 0; c < NCH; c++) adc_data[c] = 0;
    repeat (3) @(posedge clk_dsp);
    #1 rst_n = 1;
    repeat (3) @(posedge clk_dsp);
    cfg = '{npulse_irq: 10'd1, enable: 1'b1, overlap: OVL_DISCARD, len_m1: 8'd255, pre: 11'd2046,
            src_sel: 2'd0, ext_en: 1'b0, self_en: 1'b1, disable_per: 8'd255, slope: SLOPE_ASC,
            avg_m1: 2'd3, level: 8'd150};
    bus_write(16'(R_CH0), 64'(cfg));
    bus_write(16'(R_IRQ), 64'h1);          // SB0 filled -> EXT_INT4
    bus_write(16'(R_CTRL), 64'h100);       // start the timer
    repeat (2200) @(posedge clk_adc);
    pulse_req = 1;
    // the pulse takes 2048 clocks to store; wait for the interrupt
    while (!ext_int[0] && guard < 5000) begin @(posedge clk_adc); guard++; end
    check(ext_int[0], "SB-filled interrupt after the pulse");
    do bus_read(16'(R_PPRRD), d); while (d[25:16] == 0);
    check(d[25:16] == 1, "one tag in the PPR");
    bus_read(16'h4000, d);
    t = ppr_tag_t'(d);
    check(t.channel == 0 && t.sb_ptr == 0 && t.len_m1 == 255, "tag: channel 0, word 0, 256 words");
    check(t.time_mark > 2150 && t.time_mark < 2300, $sformatf("time mark in range (%0d)", t.time_mark));
    // with a 4-sample average and level 150 the sum first reaches 600 on the
    // third pulse sample (200+201+202+baseline)
    first = -1;
    for (int k = 0; k < 4; k++) begin
      int s;
      s = 0;
      for (int j = 0; j < 4; j++) s += int'(hist[(cross_at + k - j) % HN]);
      if (first < 0 && s >= 600) first = cross_at + k;
    end
    first = first - 2046;
    for (int k = 0; k < 256; k++) begin
      int wbad;
      wbad = 0;
      bus_read(16'h8000 | 16'(k), d);
      for (int b = 0; b < 8; b++) if (d[8*b +: 8] != hist[(first + 8*k + b) % HN]) wbad++;
      check(wbad == 0, $sformatf("word %0d of the pulse: %0d of 8 samples differ", k, wbad));
      bad += wbad;
    end
    check(bad == 0, $sformatf("2048-sample pulse with 2046 pre-trigger samples: %0d differ", bad));
    bus_write(16'(R_SBREL0), 64'd256);
    bus_write(16'(R_PPRRD), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
