// Transient recorder FPGA: four-channel 200 MS/s pulse recorder with DSP interface.
//
// Four free-running 8-bit ADC channels feed four acquisition channels. Each
// channel delays its samples in a pre-trigger buffer, detects triggers on a
// sliding average, and on a trigger copies a whole pulse (pre-trigger samples
// included) into its secondary buffer, while a tag with the channel number,
// the pulse's place in the secondary buffer and a 40-bit time mark goes into
// the shared pulse parameter recorder. The DSP reads registers, tags and pulse
// data through the EMIC, can stream buffers through the automatic transfer
// control, and is interrupted by the IGB on timer overflow or when a channel
// has stored a set number of pulses.
//
// Clock domains: clk_adc (200 MHz) runs acquisition, timer, PPR writes and the
// IGB; clk_dsp (100 MHz, unrelated) runs the EMIC, the registers and the ATC.
// Buffers are dual-clock memories; configuration crosses through two-flop
// synchronisers (it is static while acquiring), command pulses through toggle
// synchronisers, pointers and counters of the acquisition domain through Gray
// code, and the pointers the DSP writes (SB release, PPR read), which may jump
// by any amount, through a req/ack handshake that settles in about 40 ns. rst_n is
// asynchronous; each domain releases it through its own two-flop synchroniser.
//
// The blocks and their connections follow the FPGA block diagram of the design
// description; clocking, crossings and the reset scheme are this design's.
// TIMER_W may be lowered to make the timer overflow in short simulations; the
// time mark is then zero-extended to 40 bits.
module tr_fpga
  import tr_pkg::*;
#(
  parameter int unsigned TIMER_W = TIME_W
) (
  input  logic                clk_adc,
  input  logic                clk_dsp,
  input  logic                rst_n,
  // ADC and TTL inputs
  input  logic [SAMPLE_W-1:0] adc_data [NCH],
  input  logic [NCH-1:0]      ext_trg,
  input  logic                ext_start,
  // DSP EMIFA (CE0 space)
  input  logic                emif_ce_n,
  input  logic                emif_are_n,
  input  logic                emif_awe_n,
  input  logic                emif_pdt_n,
  input  logic [EA_W-1:0]     emif_ea,
  input  logic [63:0]         emif_ed_i,
  output logic [63:0]         emif_ed_o,
  output logic                emif_ed_oe,
  // DSP external interrupts EXT_INT4..7
  output logic [3:0]          ext_int
);
  // ---------------------------------------------------------------- resets
  logic [1:0] rst_adc_q, rst_dsp_q;
  logic       rst_adc_n, rst_dsp_n;
  always_ff @(posedge clk_adc or negedge rst_n)
    if (!rst_n) rst_adc_q <= '0; else rst_adc_q <= {rst_adc_q[0], 1'b1};
  always_ff @(posedge clk_dsp or negedge rst_n)
    if (!rst_n) rst_dsp_q <= '0; else rst_dsp_q <= {rst_dsp_q[0], 1'b1};
  assign rst_adc_n = rst_adc_q[1];
  assign rst_dsp_n = rst_dsp_q[1];

  // ---------------------------------------------------------------- DSP domain
  chan_cfg_t        cfg_d [NCH];
  logic             ext_start_en_d, tstart_d, tstop_d, tclear_d;
  logic [NCH-1:0]   soft_d;
  logic [NEVT-1:0]  evt_en_d;
  logic [1:0]       evt_map_d [NEVT];
  atc_mode_e        atc_mode;
  logic [2:0]       atc_src, atc_cur_src;
  logic [SB_AW-1:0] atc_start, atc_addr;
  logic             atc_load, atc_step, atc_active;
  logic [31:0]      atc_words;
  logic [SB_PW-1:0] sb_rel_d [NCH];
  logic [PPR_AW:0]  ppr_rd_d, ppr_wr_d;
  logic [TIME_W-1:0] time_d;
  logic             running_d;
  logic [15:0]      lost_d [NCH];
  logic             reg_we;
  logic [3:0]       reg_widx, reg_ridx;
  logic [63:0]      reg_wdata, reg_rdata;
  logic [SB_AW-1:0] sb_raddr;
  logic [63:0]      sb_rdata [NCH];
  logic [PPR_AW-1:0] ppr_raddr;
  logic [63:0]      ppr_rdata;

  emic u_emic (
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .emif_ce_n, .emif_are_n, .emif_awe_n, .emif_pdt_n, .emif_ea, .emif_ed_i,
    .emif_ed_o, .emif_ed_oe,
    .reg_we, .reg_widx, .reg_wdata, .reg_ridx, .reg_rdata,
    .sb_raddr, .sb_rdata, .ppr_raddr, .ppr_rdata,
    .atc_mode, .atc_src(atc_cur_src), .atc_addr, .atc_step
  );

  config_regs u_regs (
    .clk(clk_dsp), .rst_n(rst_dsp_n),
    .we(reg_we), .widx(reg_widx), .wdata(reg_wdata), .ridx(reg_ridx), .rdata(reg_rdata),
    .chan_cfg(cfg_d), .ext_start_en(ext_start_en_d),
    .timer_start(tstart_d), .timer_stop(tstop_d), .timer_clear(tclear_d), .soft_trg(soft_d),
    .evt_en(evt_en_d), .evt_map(evt_map_d),
    .atc_mode, .atc_src, .atc_start, .atc_load,
    .sb_rel_ptr(sb_rel_d), .ppr_rd_ptr(ppr_rd_d),
    .ppr_wr_ptr(ppr_wr_d), .timer_value(time_d), .timer_running(running_d),
    .lost_cnt(lost_d), .atc_addr
  );

  atc u_atc (
    .clk(clk_dsp), .rst_n(rst_dsp_n), .mode(atc_mode), .src(atc_src), .start(atc_start),
    .load(atc_load), .step(atc_step), .active(atc_active), .cur_src(atc_cur_src),
    .addr(atc_addr), .words(atc_words)
  );

  // ---------------------------------------------------------------- crossings
  chan_cfg_t        cfg_a [NCH];
  logic             ext_start_en_a, tstart_a, tstop_a, tclear_a;
  logic [NCH-1:0]   soft_a;
  logic [NEVT-1:0]  evt_en_a;
  logic [1:0]       evt_map_a [NEVT];
  logic [SB_PW-1:0] sb_rel_a [NCH];
  logic [PPR_AW:0]  ppr_rd_a, ppr_wr_a;
  logic [TIME_W-1:0] time_a;
  logic             running_a;
  logic [15:0]      lost_a [NCH];

  localparam int unsigned STATIC_W = NCH * $bits(chan_cfg_t) + 1 + NEVT + 2 * NEVT;
  logic [STATIC_W-1:0] static_d, static_a;
  always_comb begin
    static_d = '0;
    for (int c = 0; c < NCH; c++) static_d[c*$bits(chan_cfg_t) +: $bits(chan_cfg_t)] = cfg_d[c];
    static_d[NCH*$bits(chan_cfg_t)] = ext_start_en_d;
    static_d[NCH*$bits(chan_cfg_t) + 1 +: NEVT] = evt_en_d;
    for (int e = 0; e < NEVT; e++) static_d[NCH*$bits(chan_cfg_t) + 1 + NEVT + 2*e +: 2] = evt_map_d[e];
    for (int c = 0; c < NCH; c++) cfg_a[c] = chan_cfg_t'(static_a[c*$bits(chan_cfg_t) +: $bits(chan_cfg_t)]);
    ext_start_en_a = static_a[NCH*$bits(chan_cfg_t)];
    evt_en_a = static_a[NCH*$bits(chan_cfg_t) + 1 +: NEVT];
    for (int e = 0; e < NEVT; e++) evt_map_a[e] = static_a[NCH*$bits(chan_cfg_t) + 1 + NEVT + 2*e +: 2];
  end

  cdc_sync #(.W(STATIC_W)) u_sync_cfg (.clk(clk_adc), .rst_n(rst_adc_n), .d(static_d), .q(static_a));
  cdc_sync #(.W(1)) u_sync_run (.clk(clk_dsp), .rst_n(rst_dsp_n), .d(running_a), .q(running_d));

  cdc_pulse u_p_start (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .pulse_src(tstart_d),
                       .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .pulse_dst(tstart_a));
  cdc_pulse u_p_stop  (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .pulse_src(tstop_d),
                       .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .pulse_dst(tstop_a));
  cdc_pulse u_p_clear (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .pulse_src(tclear_d),
                       .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .pulse_dst(tclear_a));

  cdc_bus #(.W(PPR_AW+1)) u_b_pprrd (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .d(ppr_rd_d),
                                      .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .q(ppr_rd_a));
  cdc_gray #(.W(PPR_AW+1)) u_g_pprwr (.clk_src(clk_adc), .rst_src_n(rst_adc_n), .d(ppr_wr_a),
                                      .clk_dst(clk_dsp), .rst_dst_n(rst_dsp_n), .q(ppr_wr_d));
  cdc_gray #(.W(TIME_W)) u_g_time (.clk_src(clk_adc), .rst_src_n(rst_adc_n), .d(time_a),
                                   .clk_dst(clk_dsp), .rst_dst_n(rst_dsp_n), .q(time_d));

  // ---------------------------------------------------------------- ADC domain
  logic [NCH-1:0] ext_trg_s, ch_trg, tag_valid, tag_ack, pulse_done;
  logic [NCH-1:0] evt_lost, evt_discard, evt_trunc;
  logic           ext_start_s, ppr_room, timer_ovf;
  logic [TIMER_W-1:0] tcount;
  ppr_tag_t       tag [NCH];
  logic [SB_PW-1:0] res_ptr [NCH];
  logic [9:0]     npulse [NCH];
  logic [NEVT-1:0] evt;

  sync_edge u_es (.clk(clk_adc), .rst_n(rst_adc_n), .async_in(ext_start), .rise(ext_start_s));

  timer40 #(.W(TIMER_W)) u_timer (
    .clk(clk_adc), .rst_n(rst_adc_n), .sw_start(tstart_a), .sw_stop(tstop_a), .sw_clear(tclear_a),
    .ext_start(ext_start_s), .ext_start_en(ext_start_en_a),
    .count(tcount), .running(running_a), .overflow(timer_ovf)
  );
  assign time_a = TIME_W'(tcount);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    sync_edge u_et (.clk(clk_adc), .rst_n(rst_adc_n), .async_in(ext_trg[c]), .rise(ext_trg_s[c]));
    cdc_pulse u_p_soft (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .pulse_src(soft_d[c]),
                        .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .pulse_dst(soft_a[c]));
    cdc_bus #(.W(SB_PW)) u_b_rel (.clk_src(clk_dsp), .rst_src_n(rst_dsp_n), .d(sb_rel_d[c]),
                                   .clk_dst(clk_adc), .rst_dst_n(rst_adc_n), .q(sb_rel_a[c]));
    cdc_gray #(.W(16)) u_g_lost (.clk_src(clk_adc), .rst_src_n(rst_adc_n), .d(lost_a[c]),
                                 .clk_dst(clk_dsp), .rst_dst_n(rst_dsp_n), .q(lost_d[c]));
    acq_channel #(.CH(2'(c))) u_ch (
      .clk(clk_adc), .rst_n(rst_adc_n), .adc_data(adc_data[c]), .cfg(cfg_a[c]),
      .ext_trg(ext_trg_s[c]), .soft_trg(soft_a[c]), .ch_trg(ch_trg[c]), .ch_trg_all(ch_trg),
      .time_mark(time_a), .sb_rel_ptr(sb_rel_a[c]), .ppr_room, .tag_ack(tag_ack[c]),
      .tag(tag[c]), .tag_valid(tag_valid[c]), .pulse_done(pulse_done[c]),
      .evt_lost(evt_lost[c]), .evt_discard(evt_discard[c]), .evt_trunc(evt_trunc[c]),
      .lost_cnt(lost_a[c]), .res_ptr(res_ptr[c]),
      .rclk(clk_dsp), .sb_raddr, .sb_rdata(sb_rdata[c])
    );
    assign npulse[c] = cfg_a[c].npulse_irq;
  end

  pulse_parameter_recorder u_ppr (
    .clk(clk_adc), .rst_n(rst_adc_n), .tag, .tag_valid, .tag_ack,
    .rd_ptr(ppr_rd_a), .wr_ptr(ppr_wr_a), .room(ppr_room),
    .rclk(clk_dsp), .raddr(ppr_raddr), .rdata(ppr_rdata)
  );

  igb u_igb (
    .clk(clk_adc), .rst_n(rst_adc_n), .pulse_done, .timer_ovf, .npulse,
    .evt_en(evt_en_a), .evt_map(evt_map_a), .evt, .ext_int
  );
endmodule
