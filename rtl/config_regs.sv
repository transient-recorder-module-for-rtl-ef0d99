// FPGA status and configuration registers (DSP clock domain).
//
// Sixteen 64-bit registers addressed by word index. Read/write registers hold
// the trigger and pulse parameters of each channel, the operational settings,
// the interrupt mapping, the transfer-control settings and the DSP's read
// positions in the secondary buffers and the PPR; read-only registers report
// identification, the PPR write pointer, the timer and the lost-pulse counters.
// Writes take effect at the write clock edge; reads are combinational from the
// index (the EMIC registers them).
//
// Map (index: contents):
//   0  RO  {ID_MAGIC, NCH, SB address bits, PPR address bits, timer bits}
//   1  RW  [0] external timer start enable, [1] timer running (RO);
//          write-one pulses: [8] timer start, [9] stop, [10] clear,
//          [15:12] software trigger of channels 3..0
//   2  RW  [4:0] event enables (SB0..SB3 filled, timer overflow),
//          [17:8] two-bit external interrupt map per event
//   3  RW  ATC: [1:0] mode, [6:4] source, [27:16] start word; a write reloads
//          the pointer; reads return the current pointer in [59:48]
//   4..7   RW  channel configuration (chan_cfg_t in [53:0])
//   8..11  RW  SB release pointer of channel 0..3 in [11:0]
//   12 RW  PPR read pointer in [9:0]; write pointer (RO) in [25:16]
//   13 RO  timer value
//   14 RO  lost pulses, 16 bits per channel
//
// That the registers are 64 bits wide, that some are read-only status and the
// others hold trigger, pulse and operational settings follows the design
// description; the map itself is this design's.
//
// The release and read pointers are exported straight from their registers,
// from the clock after the write; the top hands them to the acquisition clock
// domain through a handshake synchroniser, so a jump of any size is exact.
module config_regs
  import tr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [3:0]           widx,
  input  logic [63:0]          wdata,
  input  logic [3:0]           ridx,
  output logic [63:0]          rdata,
  // configuration outputs
  output chan_cfg_t            chan_cfg [NCH],
  output logic                 ext_start_en,
  output logic                 timer_start,
  output logic                 timer_stop,
  output logic                 timer_clear,
  output logic [NCH-1:0]       soft_trg,
  output logic [NEVT-1:0]      evt_en,
  output logic [1:0]           evt_map [NEVT],
  output atc_mode_e            atc_mode,
  output logic [2:0]           atc_src,
  output logic [SB_AW-1:0]     atc_start,
  output logic                 atc_load,
  output logic [SB_PW-1:0]     sb_rel_ptr [NCH],
  output logic [PPR_AW:0]      ppr_rd_ptr,
  // status inputs
  input  logic [PPR_AW:0]      ppr_wr_ptr,
  input  logic [TIME_W-1:0]    timer_value,
  input  logic                 timer_running,
  input  logic [15:0]          lost_cnt [NCH],
  input  logic [SB_AW-1:0]     atc_addr
);
  logic [63:0]       r_ctrl, r_irq, r_atc, r_pprrd;
  logic [63:0]       r_ch    [NCH];
  logic [63:0]       r_sbrel [NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_ctrl <= '0; r_irq <= '0; r_atc <= '0; r_pprrd <= '0;
      for (int c = 0; c < NCH; c++) begin
        r_ch[c]       <= '0;
        r_sbrel[c]    <= '0;
      end
      timer_start <= 1'b0; timer_stop <= 1'b0; timer_clear <= 1'b0;
      soft_trg    <= '0;
      atc_load    <= 1'b0;
    end else begin
      timer_start <= 1'b0; timer_stop <= 1'b0; timer_clear <= 1'b0;
      soft_trg    <= '0;
      atc_load    <= 1'b0;
      if (we) begin
        case (widx)
          4'(R_CTRL): begin
            r_ctrl      <= {56'd0, 7'd0, wdata[0]};
            timer_start <= wdata[8];
            timer_stop  <= wdata[9];
            timer_clear <= wdata[10];
            soft_trg    <= wdata[15:12];
          end
          4'(R_IRQ):   r_irq   <= wdata & 64'h3_FF1F;
          4'(R_ATC): begin
            r_atc    <= wdata & 64'h0FFF_0073;
            atc_load <= 1'b1;
          end
          4'(R_PPRRD): r_pprrd <= {54'd0, wdata[PPR_AW:0]};
          default: begin
            for (int c = 0; c < NCH; c++) begin
              if (widx == 4'(R_CH0 + c))    r_ch[c]    <= {10'd0, wdata[53:0]};
              if (widx == 4'(R_SBREL0 + c)) r_sbrel[c] <= {52'd0, wdata[SB_PW-1:0]};
            end
          end
        endcase
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NCH; c++) sb_rel_ptr[c] = r_sbrel[c][SB_PW-1:0];
    ppr_rd_ptr = r_pprrd[PPR_AW:0];
  end

  always_comb begin
    for (int c = 0; c < NCH; c++) chan_cfg[c] = chan_cfg_t'(r_ch[c][53:0]);
    ext_start_en = r_ctrl[0];
    evt_en       = r_irq[NEVT-1:0];
    for (int e = 0; e < NEVT; e++) evt_map[e] = r_irq[8 + 2*e +: 2];
    atc_mode  = atc_mode_e'(r_atc[1:0]);
    atc_src   = r_atc[6:4];
    atc_start = r_atc[16 +: SB_AW];
  end

  always_comb begin
    rdata = '0;
    case (ridx)
      4'(R_ID):    rdata = {ID_MAGIC, 8'(NCH), 8'(SB_AW), 8'(PPR_AW), 8'(TIME_W)};
      4'(R_CTRL):  rdata = {r_ctrl[63:2], timer_running, r_ctrl[0]};
      4'(R_IRQ):   rdata = r_irq;
      4'(R_ATC):   rdata = r_atc | (64'(atc_addr) << 48);
      4'(R_PPRRD): rdata = r_pprrd | (64'(ppr_wr_ptr) << 16);
      4'(R_TIME):  rdata = 64'(timer_value);
      4'(R_LOST):  for (int c = 0; c < NCH; c++) rdata[16*c +: 16] = lost_cnt[c];
      default: begin
        for (int c = 0; c < NCH; c++) begin
          if (ridx == 4'(R_CH0 + c))    rdata = r_ch[c];
          if (ridx == 4'(R_SBREL0 + c)) rdata = r_sbrel[c];
        end
      end
    endcase
  end
endmodule
