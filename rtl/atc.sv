// Automatic transfer control (ATC).
//
// Supplies buffer addresses for the two streaming transfer modes, in which the
// DSP does not present an FPGA address for each word: the single port access
// mode (SPA), where the DSP's DMA reads one fixed FPGA address repeatedly, and
// the peripheral device transfer mode (PDT), where the EMIF moves words from
// the FPGA straight into SDRAM and the address on the bus is the SDRAM's. The
// ATC holds a source (secondary buffer of channel 0..3, or the PPR when src is
// 4) and a word pointer; `load` sets the pointer to `start`, and every accepted
// streaming word (`step`) advances it by one, wrapping inside the source
// buffer. Timing: the pointer changes on the clock after load or step.
//
// Only the names and purpose of the PDT and SPA modes come from the design
// description; the address-generator realisation is this design's.
module atc
  import tr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  atc_mode_e        mode,
  input  logic [2:0]       src,
  input  logic [SB_AW-1:0] start,
  input  logic             load,
  input  logic             step,
  output logic             active,
  output logic [2:0]       cur_src,
  output logic [SB_AW-1:0] addr,
  output logic [31:0]      words      // words streamed since the last load
);
  logic [SB_AW-1:0] nxt;
  assign active  = (mode != ATC_OFF);
  assign cur_src = src;
  always_comb begin
    nxt = addr + SB_AW'(1);
    if (src >= 3'(NCH)) nxt[SB_AW-1:PPR_AW] = '0;   // PPR is smaller than an SB
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      words <= '0;
    end else if (load) begin
      addr  <= start;
      words <= '0;
    end else if (step && active) begin
      addr  <= nxt;
      words <= words + 32'd1;
    end
  end
endmodule
