// End-to-end test of tr_fpga through its real interfaces: ADC sample inputs,
// external TTL triggers and start (11 ns pulses, the minimum width, at odd
// clock phases), the DSP EMIF bus and the interrupt lines.
// The timer is shortened to 12 bits so that it overflows within the run.
//
// Scenario: the DSP configures the channels over the bus, starts the timer
// and then: a pulse on channel 0 self-triggers channel 0 and, through trigger
// selection, channel 1; tags are read from the PPR and pulse data from the
// secondary buffers and compared with the samples that were presented; a
// second pulse raises the SB-filled interrupt; an external trigger stores on
// channel 2; software triggers store on channel 3, two close ones truncating
// the first pulse (store-all); two close pulses on channel 0 discard the
// second; repeated long pulses on channel 2 fill its SB until a pulse is
// lost; the timer overflow interrupt fires; the ATC streams a pulse in SPA
// and PDT modes; the external start restarts a stopped timer. Each of these
// mechanisms is counted and must have happened at least once.
module tb_tr_fpga;
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

  tr_fpga #(.TIMER_W(12)) dut (.*);
  always #2.5 clk_adc = ~clk_adc;
  initial begin #1.3; forever #5 clk_dsp = ~clk_dsp; end

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask

  // ------------------------------------------------------------ ADC stimulus
  localparam int HN = 1 << 17;
  byte unsigned hist [NCH][HN];   // sample presented at ADC edge i
  int adc_edge = 0;
  bit pulse_req [NCH];
  int pulse_pos [NCH];
  int cross_at [NCH];              // edge of the last pulse's first high sample
  always @(posedge clk_adc) begin
    for (int c = 0; c < NCH; c++) hist[c][adc_edge % HN] = adc_data[c];
    adc_edge++;
    #0.5;
    for (int c = 0; c < NCH; c++) begin
      if (pulse_req[c]) begin pulse_req[c] = 0; pulse_pos[c] = 0; cross_at[c] = adc_edge; end
      if (pulse_pos[c] >= 0 && pulse_pos[c] < 12) begin
        adc_data[c] = 8'(150 + 8 * pulse_pos[c]); pulse_pos[c]++;
      end else begin
        adc_data[c] = 8'($urandom_range(0, 60)); pulse_pos[c] = -1;
      end
    end
  end
  task automatic adc_wait(input int n);
    repeat (n) @(posedge clk_adc);
  endtask
  task automatic pulse(input int c);
    pulse_req[c] = 1; adc_wait(2);
  endtask

  // ------------------------------------------------------------ EMIF bus model
  task automatic bus_write(input logic [15:0] a, input logic [63:0] d);
    @(posedge clk_dsp); #1;
    emif_ce_n = 0; emif_awe_n = 0; emif_ea = a; emif_ed_i = d;
    @(posedge clk_dsp); #1;
    emif_ce_n = 1; emif_awe_n = 1;
  endtask
  task automatic bus_read(input logic [15:0] a, output logic [63:0] d);
    @(posedge clk_dsp); #1;
    emif_ce_n = 0; emif_are_n = 0; emif_ea = a;
    @(posedge clk_dsp); #1;           // command edge k
    emif_ce_n = 1; emif_are_n = 1;
    @(posedge clk_dsp);               // k+1
    @(posedge clk_dsp); #1;           // k+2: data on the bus, sampled at k+3
    d = emif_ed_o;
    if (!emif_ed_oe) begin failures++; $display("FAIL bus not driven for read of %h", a); end
  endtask
  function automatic logic [15:0] a_reg(int r); return 16'(r); endfunction
  function automatic logic [15:0] a_ppr(int i); return 16'h4000 | 16'(i % PPR_DEPTH); endfunction
  function automatic logic [15:0] a_sb(int c, int w); return 16'h8000 | 16'(c << SB_AW) | 16'(w % SB_WORDS); endfunction

  function automatic logic [63:0] ch_word(chan_cfg_t c); return 64'(c); endfunction

  // ------------------------------------------------------------ mechanism counters
  int n_self = 0, n_ext = 0, n_soft = 0, n_xsel = 0, n_disc = 0, n_trunc = 0, n_lost = 0;
  int n_done = 0, n_int_sb = 0, n_int_tmr = 0, n_spa = 0, n_pdt = 0, n_extstart = 0;
  logic [3:0] int_q = 0;
  always @(posedge clk_adc) begin
    n_disc  += $countones(dut.evt_discard);
    n_trunc += $countones(dut.evt_trunc);
    n_lost  += $countones(dut.evt_lost);
    n_done  += $countones(dut.pulse_done);
    if (ext_int[0] && !int_q[0] && rst_n) n_int_sb++;
    if (ext_int[3] && !int_q[3] && rst_n) n_int_tmr++;
    int_q <= ext_int;
  end

  // ------------------------------------------------------------ DSP-side bookkeeping
  int ppr_rd = 0;
  ppr_tag_t tags [$];
  // wait until at least n new tags are in the PPR, read them and free them
  task automatic fetch_tags(input int n);
    logic [63:0] d; int wr, guard;
    guard = 0;
    do begin
      bus_read(a_reg(R_PPRRD), d); wr = int'(d[25:16]); guard++;
    end while (((wr - ppr_rd) & 32'h3FF) < n && guard < 400);
    while (ppr_rd != wr) begin
      bus_read(a_ppr(ppr_rd), d);
      tags.push_back(ppr_tag_t'(d));
      ppr_rd = (ppr_rd + 1) & 32'h3FF;
    end
    bus_write(a_reg(R_PPRRD), 64'(ppr_rd));
  endtask
  // compare a stored pulse with the presented samples
  task automatic check_pulse(input ppr_tag_t t, input int first_edge, input string what);
    logic [63:0] d; int bad = 0;
    for (int k = 0; k <= int'(t.len_m1); k++) begin
      bus_read(a_sb(int'(t.channel), int'(t.sb_ptr) + k), d);
      for (int b = 0; b < 8; b++)
        if (d[8*b +: 8] != hist[t.channel][(first_edge + 8*k + b) % HN]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d samples differ", what, bad, 8 * (t.len_m1 + 1)));
  endtask

  chan_cfg_t cfg [NCH];
  initial begin
    logic [63:0] d;
    ppr_tag_t t0, t1;
    int c0, c0b, nt;
    for (int c = 0; c < NCH; c++) begin adc_data[c] = 0; pulse_req[c] = 0; pulse_pos[c] = -1; end
    repeat (3) @(posedge clk_dsp);
    #1 rst_n = 1;
    repeat (3) @(posedge clk_dsp);
    bus_read(a_reg(R_ID), d);
    check(d[63:32] == ID_MAGIC, "identification register over the bus");
    // channel 0: self trigger; channel 1: follows channel 0; channel 2: external; channel 3: software, store-all
    cfg[0] = '{npulse_irq: 10'd2, enable: 1'b1, overlap: OVL_DISCARD, len_m1: 8'd3, pre: 11'd16,
               src_sel: 2'd0, ext_en: 1'b0, self_en: 1'b1, disable_per: 8'd0, slope: SLOPE_ASC,
               avg_m1: 2'd1, level: 8'd120};
    cfg[1] = cfg[0]; cfg[1].self_en = 1'b0; cfg[1].pre = 11'd4; cfg[1].npulse_irq = 0;
    cfg[2] = cfg[1]; cfg[2].src_sel = 2'd2; cfg[2].ext_en = 1'b1; cfg[2].pre = 11'd0;
    cfg[3] = cfg[1]; cfg[3].src_sel = 2'd3; cfg[3].overlap = OVL_STORE_ALL; cfg[3].len_m1 = 8'd7;
    for (int c = 0; c < NCH; c++) bus_write(a_reg(R_CH0 + c), ch_word(cfg[c]));
    // interrupts: SB0 filled -> EXT_INT4, timer overflow -> EXT_INT7
    bus_write(a_reg(R_IRQ), {46'd0, 2'd3, 2'd0, 2'd0, 2'd0, 2'd0, 3'd0, 5'b10001});
    bus_write(a_reg(R_CTRL), 64'h100);          // software timer start
    adc_wait(2200);                             // pre-trigger buffers settle
    bus_read(a_reg(R_CTRL), d);
    check(d[1], "timer running after software start");

    // ---- self trigger on channel 0, channel 1 stores on channel 0's trigger
    pulse(0); c0 = cross_at[0];
    adc_wait(100);
    fetch_tags(2);
    check(tags.size() == 2, $sformatf("two tags after one pulse (%0d)", tags.size()));
    foreach (tags[i]) begin
      if (tags[i].channel == 0) begin t0 = tags[i]; n_self++; end
      if (tags[i].channel == 1) begin t1 = tags[i]; n_xsel++; end
    end
    check(t0.time_mark == t1.time_mark && t0.len_m1 == 3, "same time mark on both channels");
    check_pulse(t0, c0 + 1 - 16, "channel 0 self-triggered pulse, 16 pre-trigger samples");
    check_pulse(t1, c0 + 1 - 4, "channel 1 pulse on channel 0's trigger, 4 pre-trigger samples");
    tags.delete();
    // ---- second pulse: SB0 has two pulses -> interrupt
    adc_wait(300);
    pulse(0); c0b = cross_at[0];
    adc_wait(100);
    fetch_tags(2);
    foreach (tags[i]) if (tags[i].channel == 0) begin
      n_self++;
      check(int'(tags[i].time_mark) == ((int'(t0.time_mark) + c0b - c0) & 32'hFFF),
            "time marks differ by the pulse spacing");
    end
    tags.delete();
    check(n_int_sb == 1, $sformatf("SB-filled interrupt after two pulses (%0d)", n_int_sb));
    // free channel 0 and 1 space
    bus_write(a_reg(R_SBREL0 + 0), 64'd8);
    bus_write(a_reg(R_SBREL0 + 1), 64'd8);

    // ---- external trigger on channel 2: an 11 ns TTL pulse (the minimum
    //      width) at an arbitrary phase of the acquisition clock
    #1.7 ext_trg[2] = 1; #11 ext_trg[2] = 0;
    adc_wait(100);
    fetch_tags(1);
    if (tags.size() == 1 && tags[0].channel == 2) n_ext++;
    check(n_ext == 1, "external trigger stored on channel 2");
    tags.delete();
    // ---- software trigger on channel 3, then two close ones (store-all)
    bus_write(a_reg(R_CTRL), 64'h8000);
    adc_wait(100);
    fetch_tags(1);
    if (tags.size() == 1 && tags[0].channel == 3 && tags[0].len_m1 == 7) n_soft++;
    tags.delete();
    bus_write(a_reg(R_CTRL), 64'h8000);
    adc_wait(10);
    bus_write(a_reg(R_CTRL), 64'h8000);
    adc_wait(150);
    fetch_tags(2);
    check(tags.size() == 2 && tags[1].sb_ptr == tags[0].sb_ptr + 8, "store-all keeps both reservations");
    check(tags.size() == 2 && tags[0].cut && !tags[1].cut, "store-all marks the first pulse cut");
    check(n_trunc == 1, $sformatf("first pulse truncated (%0d)", n_trunc));
    n_soft += tags.size();
    tags.delete();
    // ---- overlapping pulses on channel 0 with discard
    pulse(0); adc_wait(16); pulse(0);
    adc_wait(100);
    fetch_tags(2);   // channel 0 and channel 1 (which follows it)
    check(n_disc >= 1, $sformatf("second overlapping trigger discarded (%0d)", n_disc));
    tags.delete();
    // ---- fill channel 2's SB with 256-word pulses until one is lost
    cfg[2].len_m1 = 8'd255;
    bus_write(a_reg(R_CH0 + 2), ch_word(cfg[2]));
    adc_wait(10);
    for (int p = 0; p < 9; p++) begin
      #1.3 ext_trg[2] = 1; #11 ext_trg[2] = 0;
      adc_wait(2060);
      fetch_tags(0);
    end
    bus_read(a_reg(R_LOST), d);
    check(n_lost >= 1 && d[47:32] == 16'(n_lost), $sformatf("lost pulse counted (%0d, reg %0d)", n_lost, d[47:32]));
    // ---- ATC: stream the last channel 0 pulse in SPA mode, then in PDT mode
    t0 = '0;
    foreach (tags[i]) if (tags[i].channel == 0) t0 = tags[i];
    bus_write(a_reg(R_ATC), {36'd0, 12'(t0.sb_ptr), 9'd0, 3'd0, 2'd0, 2'(ATC_SPA)});
    begin
      logic [63:0] dd; automatic int bad = 0;
      for (int k = 0; k < 4; k++) begin
        bus_read(16'hC000, d);
        bus_read(a_sb(0, int'(t0.sb_ptr) + k), dd);
        if (d == dd) n_spa++; else bad++;
      end
      check(bad == 0, "SPA stream equals direct reads");
      bus_read(a_reg(R_ATC), d);
      check(d[59:48] == 12'(t0.sb_ptr + 4), "ATC pointer advanced by four");
    end
    bus_write(a_reg(R_ATC), {36'd0, 12'(t0.sb_ptr), 9'd0, 3'd0, 2'd0, 2'(ATC_PDT)});
    begin
      logic [63:0] got [4]; logic [63:0] dd; automatic int bad = 0;
      @(posedge clk_dsp); #1;
      // four PDT cycles; the word of the cycle sampled at edge i is on the bus
      // after edge i+2
      for (int i = 0; i < 6; i++) begin
        emif_pdt_n = (i < 4) ? 1'b0 : 1'b1;
        @(posedge clk_dsp); #1;
        if (i >= 2) got[i-2] = emif_ed_o;
      end
      for (int k = 0; k < 4; k++) begin
        bus_read(a_sb(0, int'(t0.sb_ptr) + k), dd);
        if (got[k] == dd) n_pdt++; else bad++;
      end
      check(bad == 0, "PDT stream equals direct reads");
    end
    // ---- external timer start
    bus_write(a_reg(R_CTRL), 64'h200);           // stop
    bus_write(a_reg(R_CTRL), 64'h1);             // enable external start
    adc_wait(10);
    bus_read(a_reg(R_CTRL), d);
    check(!d[1], "timer stopped");
    #3.1 ext_start = 1; #11 ext_start = 0;   // 11 ns minimum-width TTL pulse
    adc_wait(10);
    bus_read(a_reg(R_CTRL), d);
    if (d[1]) n_extstart++;
    check(n_extstart == 1, "external start restarts the timer");
    adc_wait(5000);
    // ---- every mechanism seen
    check(n_self > 0, $sformatf("self triggers: %0d", n_self));
    check(n_xsel > 0, $sformatf("triggers taken from another channel: %0d", n_xsel));
    check(n_ext > 0, $sformatf("external triggers: %0d", n_ext));
    check(n_soft > 0, $sformatf("software triggers: %0d", n_soft));
    check(n_disc > 0, $sformatf("discarded overlapping triggers: %0d", n_disc));
    check(n_trunc > 0, $sformatf("truncated pulses: %0d", n_trunc));
    check(n_lost > 0, $sformatf("lost pulses (SB full): %0d", n_lost));
    check(n_int_sb > 0, $sformatf("SB-filled interrupts: %0d", n_int_sb));
    check(n_int_tmr > 0, $sformatf("timer overflow interrupts: %0d", n_int_tmr));
    check(n_spa > 0, $sformatf("SPA words: %0d", n_spa));
    check(n_pdt > 0, $sformatf("PDT words: %0d", n_pdt));
    check(n_extstart > 0, $sformatf("external timer starts: %0d", n_extstart));
    $display("mechanisms: self %0d xsel %0d ext %0d soft %0d discard %0d trunc %0d lost %0d irq_sb %0d irq_tmr %0d spa %0d pdt %0d extstart %0d pulses %0d",
             n_self, n_xsel, n_ext, n_soft, n_disc, n_trunc, n_lost, n_int_sb, n_int_tmr, n_spa, n_pdt, n_extstart, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
