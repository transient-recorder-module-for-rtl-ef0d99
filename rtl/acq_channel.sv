// One acquisition channel: triggering block and buffering block.
//
// The ADC sample is registered once at the input and feeds both the
// pre-trigger buffer and the digital trigger detection. The formatted trigger
// of this channel (CHx_TRG) is exported so that other channels can select it,
// and the selected trigger drives the storing control, which moves samples from
// the pre-trigger buffer into the secondary buffer and produces the pulse tag.
//
// Pipeline: a sample presented on adc_data at edge n that causes a trigger is
// seen by the storing control at edge n+3; the pre-trigger buffer delay is set
// so that the first stored sample is the one presented pre samples before the
// triggering one. Clocks: clk is the 200 MHz acquisition clock, rclk the DSP
// side read clock of the secondary buffer.
module acq_channel
  import tr_pkg::*;
#(
  parameter logic [1:0] CH = 2'd0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] adc_data,
  input  chan_cfg_t           cfg,
  input  logic                ext_trg,      // synchronised external trigger pulse
  input  logic                soft_trg,     // software trigger pulse
  output logic                ch_trg,       // this channel's formatted trigger
  input  logic [NCH-1:0]      ch_trg_all,   // formatted triggers of all channels
  input  logic [TIME_W-1:0]   time_mark,
  input  logic [SB_PW-1:0]    sb_rel_ptr,
  input  logic                ppr_room,
  input  logic                tag_ack,
  output ppr_tag_t            tag,
  output logic                tag_valid,
  output logic                pulse_done,
  output logic                evt_lost,
  output logic                evt_discard,
  output logic                evt_trunc,
  output logic [15:0]         lost_cnt,
  output logic [SB_PW-1:0]    res_ptr,
  input  logic                rclk,
  input  logic [SB_AW-1:0]    sb_raddr,
  output logic [63:0]         sb_rdata
);
  logic [SAMPLE_W-1:0] s_in, ptb_q, sb_wdata;
  logic                self_trg, trg, sb_we, storing;
  logic [SB_AW-1:0]    sb_waddr;
  logic [2:0]          sb_lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_in <= '0;
    else s_in <= adc_data;
  end

  trigger_detection u_det (
    .clk, .rst_n, .sample(s_in), .sample_valid(1'b1), .arm(cfg.enable),
    .level(cfg.level), .avg_m1(cfg.avg_m1), .slope(cfg.slope),
    .disable_per(cfg.disable_per), .self_trg
  );

  trigger_format u_fmt (
    .self_trg, .ext_trg, .soft_trg, .self_en(cfg.self_en), .ext_en(cfg.ext_en), .ch_trg
  );

  trigger_select u_sel (.clk, .rst_n, .ch_trg(ch_trg_all), .src_sel(cfg.src_sel), .trg);

  pretrigger_buffer #(.DLY_EXTRA(2)) u_ptb (.clk, .rst_n, .d(s_in), .pre(cfg.pre), .q(ptb_q));

  storing_control #(.CH(CH)) u_tsc (
    .clk, .rst_n, .trg, .enable(cfg.enable), .overlap(cfg.overlap), .len_m1(cfg.len_m1),
    .time_mark, .ptb_q, .sb_rel_ptr, .ppr_room, .tag_ack, .tag, .tag_valid,
    .sb_we, .sb_waddr, .sb_lane, .sb_wdata, .res_ptr, .storing, .pulse_done,
    .evt_lost, .evt_discard, .evt_trunc, .lost_cnt
  );

  secondary_buffer u_sb (
    .wclk(clk), .we(sb_we), .waddr(sb_waddr), .lane(sb_lane), .wdata(sb_wdata),
    .rclk, .raddr(sb_raddr), .rdata(sb_rdata)
  );
endmodule
