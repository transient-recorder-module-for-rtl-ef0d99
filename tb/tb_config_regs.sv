// Self-checking test of config_regs: read-back of every read/write register
// with field masking, decoding of the channel configuration, the write-one
// command pulses, the interrupt map, the ATC reload pulse, the release and
// read pointers taking the written value from the clock after the write, and the
// read-only status registers. A final random phase makes 200 random writes to
// the channel and release registers and compares all four channels with a
// model after each.
module tb_config_regs;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic we = 0;
  logic [3:0] widx = 0, ridx = 0;
  logic [63:0] wdata = 0, rdata;
  chan_cfg_t chan_cfg [NCH];
  logic ext_start_en, timer_start, timer_stop, timer_clear, atc_load;
  logic [NCH-1:0] soft_trg;
  logic [NEVT-1:0] evt_en;
  logic [1:0] evt_map [NEVT];
  atc_mode_e atc_mode;
  logic [2:0] atc_src;
  logic [SB_AW-1:0] atc_start, atc_addr = 11'h155;
  logic [SB_PW-1:0] sb_rel_ptr [NCH];
  logic [PPR_AW:0] ppr_rd_ptr, ppr_wr_ptr = 10'h2A5;
  logic [TIME_W-1:0] timer_value = 40'h12_3456_789A;
  logic timer_running = 1;
  logic [15:0] lost_cnt [NCH];
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_clear = 0, n_atc = 0;
  logic [NCH-1:0] soft_seen = 0;

  config_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_start += timer_start; n_stop += timer_stop; n_clear += timer_clear; n_atc += atc_load;
    soft_seen |= soft_trg;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  task automatic wr(input int idx, input logic [63:0] v);
    we = 1; widx = 4'(idx); wdata = v;
    @(posedge clk); #1 we = 0;
  endtask

  initial begin
    logic [63:0] v;
    chan_cfg_t c;
    for (int i = 0; i < NCH; i++) lost_cnt[i] = 16'(1000 + i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ridx = 0; #1;
    check(rdata[63:32] == ID_MAGIC && rdata[31:24] == 8'(NCH) && rdata[7:0] == 8'(TIME_W), "ID register");
    // channel 1 configuration
    c = '{npulse_irq: 10'd17, enable: 1'b1, overlap: OVL_STORE_ALL, len_m1: 8'd31, pre: 11'd700,
          src_sel: 2'd3, ext_en: 1'b1, self_en: 1'b0, disable_per: 8'd9, slope: SLOPE_DESC,
          avg_m1: 2'd2, level: 8'd128};
    wr(R_CH0 + 1, {10'h3FF, 54'(c)});
    ridx = 4'(R_CH0 + 1); #1;
    check(rdata == {10'd0, 54'(c)}, "channel register read-back, upper bits masked");
    check(chan_cfg[1] == c && chan_cfg[1].pre == 700 && chan_cfg[1].len_m1 == 31, "channel config decoded");
    check(chan_cfg[0] == '0, "other channels untouched");
    // control: stored bit and command pulses
    wr(R_CTRL, 64'h0000_0000_0000_F701);
    @(posedge clk); #1;
    check(ext_start_en && n_start == 1 && n_stop == 1 && n_clear == 1 && soft_seen == 4'hF, "control pulses");
    ridx = 4'(R_CTRL); #1;
    check(rdata == 64'h3, "control read-back: stored bit and running status only");
    // interrupt map
    wr(R_IRQ, 64'hFFFF_FFFF_FFFF_FFFF);
    ridx = 4'(R_IRQ); #1;
    check(rdata == 64'h3_FF1F, "IRQ register masked");
    wr(R_IRQ, {46'd0, 2'd1, 2'd3, 2'd0, 2'd2, 2'd1, 3'd0, 5'b10101});
    check(evt_en == 5'b10101 && evt_map[0] == 1 && evt_map[1] == 2 && evt_map[2] == 0 &&
          evt_map[3] == 3 && evt_map[4] == 1, "IRQ enables and map");
    // ATC
    wr(R_ATC, {36'd0, 12'd1234, 9'd0, 3'd4, 2'd0, 2'(ATC_PDT)});
    @(posedge clk); #1;
    check(n_atc == 1 && atc_mode == ATC_PDT && atc_src == 4 && atc_start == 1234, "ATC settings and reload pulse");
    ridx = 4'(R_ATC); #1;
    check(rdata[59:48] == 12'h155, "ATC pointer readable");
    // release pointers take the written value, each only its own
    we = 1; widx = 4'(R_SBREL0 + 2); wdata = 64'hFFFF_F000_0000_0805; #1;
    check(sb_rel_ptr[2] == 0, "release pointer unchanged before the clock");
    @(posedge clk); #1 we = 0;
    check(sb_rel_ptr[2] == 12'h805, "release pointer jumps to the written value");
    check(sb_rel_ptr[0] == 0 && sb_rel_ptr[1] == 0 && sb_rel_ptr[3] == 0, "other release pointers unchanged");
    wr(R_SBREL0 + 1, 64'd1999);
    check(sb_rel_ptr[1] == 12'd1999 && sb_rel_ptr[2] == 12'h805, "second release pointer");
    ridx = 4'(R_SBREL0 + 2); #1;
    check(rdata == 64'h805, "release pointer read back masked to 12 bits");
    wr(R_PPRRD, 64'd3);
    repeat (4) @(posedge clk); #1;
    ridx = 4'(R_PPRRD); #1;
    check(ppr_rd_ptr == 3 && rdata[9:0] == 3 && rdata[25:16] == 10'h2A5, "PPR pointers");
    ridx = 4'(R_TIME); #1;
    check(rdata == 64'h12_3456_789A, "timer register");
    ridx = 4'(R_LOST); #1;
    check(rdata == {16'd1003, 16'd1002, 16'd1001, 16'd1000}, "lost counters");
    // random phase: random writes to the channel and release registers; after
    // each, all four channels must match a model and the register read back
    begin
      logic [53:0] m_cfg [NCH]; logic [11:0] m_rel [NCH];
      for (int i = 0; i < NCH; i++) begin m_cfg[i] = 54'(chan_cfg[i]); m_rel[i] = sb_rel_ptr[i]; end
      for (int n = 0; n < 200; n++) begin
        automatic int ch = $urandom_range(0, NCH - 1);
        automatic bit rel = $urandom_range(0, 1) == 1;
        v = {$urandom, $urandom};
        wr(rel ? R_SBREL0 + ch : R_CH0 + ch, v);
        if (rel) m_rel[ch] = v[11:0]; else m_cfg[ch] = v[53:0];
        ridx = 4'(rel ? R_SBREL0 + ch : R_CH0 + ch); #1;
        begin
          automatic bit ok = rdata == (rel ? 64'(m_rel[ch]) : 64'(m_cfg[ch]));
          for (int i = 0; i < NCH; i++) ok &= (54'(chan_cfg[i]) == m_cfg[i]) && (sb_rel_ptr[i] == m_rel[i]);
          check(ok, $sformatf("random write %0d to %s register of channel %0d", n, rel ? "release" : "config", ch));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
