// Shared types and constants of the transient recorder FPGA.
//
// The recorder digitises four 8-bit channels at 200 MS/s. Each channel has a
// pre-trigger buffer, a secondary buffer (SB) for whole pulses and a trigger
// block; pulse tags go into a common pulse parameter recorder (PPR) and the DSP
// reads everything over its 64-bit external memory interface.
//
// Numbers taken from the design description: 4 channels, 8-bit samples,
// 2048-entry pre-trigger buffer (0..2046 pre-trigger samples), pulses of 8..2048
// samples in steps of 8, 512-tag PPR, 40-bit timer, 64-bit registers, trigger
// level 1..254, trigger disable period 20 ns..5.12 us. The SB size, the register
// map and the field layout of tags and registers are this design's own choices.
package tr_pkg;

  localparam int unsigned NCH        = 4;     // acquisition channels
  localparam int unsigned SAMPLE_W   = 8;     // ADC resolution
  localparam int unsigned PTB_DEPTH  = 2048;  // pre-trigger buffer entries
  localparam int unsigned PRE_W      = 11;    // pre-trigger count field, 0..2046
  localparam int unsigned SB_WORDS   = 2048;  // SB size per channel in 64-bit words (16 KiB)
  localparam int unsigned SB_AW      = $clog2(SB_WORDS);
  localparam int unsigned SB_PW      = SB_AW + 1;  // SB pointers carry one wrap bit
  localparam int unsigned PPR_DEPTH  = 512;   // pulse tags
  localparam int unsigned PPR_AW     = $clog2(PPR_DEPTH);
  localparam int unsigned TIME_W     = 40;    // time-mark counter, 5 ns resolution
  localparam int unsigned NEVT       = NCH + 1; // interrupt events: SB filled per channel, timer overflow
  localparam int unsigned EA_W       = 16;    // EMIF word address bits used by the FPGA

  // Register indices (64-bit registers, word addresses 0..15 in the register window)
  localparam int unsigned R_ID      = 0;   // RO identification and geometry
  localparam int unsigned R_CTRL    = 1;   // RW operational settings; write-one pulses in [15:8]
  localparam int unsigned R_IRQ     = 2;   // RW interrupt enable and mapping
  localparam int unsigned R_ATC     = 3;   // RW automatic transfer control
  localparam int unsigned R_CH0     = 4;   // RW channel configuration, R_CH0+ch
  localparam int unsigned R_SBREL0  = 8;   // RW SB release pointer, R_SBREL0+ch (RO part: reserve pointer)
  localparam int unsigned R_PPRRD   = 12;  // RW PPR read pointer (RO part: write pointer)
  localparam int unsigned R_TIME    = 13;  // RO timer value
  localparam int unsigned R_LOST    = 14;  // RO lost-pulse counters, 16 bits per channel
  localparam int unsigned NREGS     = 16;

  localparam logic [31:0] ID_MAGIC  = 32'h5452_4D31;  // "TRM1"

  // Trigger slope
  typedef enum logic { SLOPE_ASC = 1'b0, SLOPE_DESC = 1'b1 } slope_e;

  // Behaviour when a trigger arrives while a pulse is still being stored
  typedef enum logic { OVL_DISCARD = 1'b0, OVL_STORE_ALL = 1'b1 } overlap_e;

  // Per-channel configuration, the low 54 bits of register R_CH0+ch.
  typedef struct packed {
    logic [9:0]       npulse_irq;   // [53:44] stored pulses per SB interrupt (0 = no event)
    logic             enable;       // [43]    channel may store pulses
    overlap_e         overlap;      // [42]    overlapping-trigger policy
    logic [7:0]       len_m1;       // [41:34] pulse length in 8-sample words, minus one
    logic [PRE_W-1:0] pre;          // [33:23] pre-trigger samples, 0..2046
    logic [1:0]       src_sel;      // [22:21] channel whose trigger starts storing
    logic             ext_en;       // [20]    external trigger enabled
    logic             self_en;      // [19]    digital (self) trigger enabled
    logic [7:0]       disable_per;  // [18:11] dead time (disable_per+1) x 20 ns
    slope_e           slope;        // [10]
    logic [1:0]       avg_m1;       // [9:8]   samples averaged, minus one
    logic [7:0]       level;        // [7:0]   trigger level, 1..254
  } chan_cfg_t;

  // Pulse tag stored in the PPR, one 64-bit word.
  typedef struct packed {
    logic [1:0]        channel;     // [63:62]
    logic              cut;         // [61]    pulse cut short by a store-all trigger
    logic              rsvd;        // [60]
    logic [7:0]        len_m1;      // [59:52] reserved SB words minus one
    logic [SB_PW-1:0]  sb_ptr;      // [51:40] first SB word (low SB_AW bits are the address)
    logic [TIME_W-1:0] time_mark;   // [39:0]  timer value at the trigger
  } ppr_tag_t;

  // Transfer modes of the automatic transfer control
  typedef enum logic [1:0] { ATC_OFF = 2'd0, ATC_SPA = 2'd1, ATC_PDT = 2'd2 } atc_mode_e;

endpackage
