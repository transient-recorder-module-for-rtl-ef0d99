// External memory interface control (EMIC): the DSP's window into the FPGA.
//
// Implements a synchronous slave on the DSP's 64-bit EMIFA bus, clocked by the
// DSP interface clock (100 MHz). A write (ce_n and awe_n low) is taken at the
// same edge as the command, with no latency. A read (ce_n and are_n low)
// returns its 64-bit word three clocks later: the address is registered at the
// command edge, the block RAM or register file is read at the next edge, the
// result is multiplexed and registered onto emif_ed_o at the third, and the
// DSP samples it at the edge after that. Reads may be issued every clock.
//
// Word address map (emif_ea, 16 bits):
//   00xx_xxxx_xxxx_rrrr  configuration and status register r
//   01xx_xxxp_pppp_pppp  PPR slot p
//   10xc_cwww_wwww_wwww  SB of channel c, word w
//   11xx_xxxx_xxxx_xxxx  ATC streaming port (SPA mode): next word of the ATC
// In PDT mode a cycle with emif_pdt_n low is a streaming read as well,
// whatever the address, since the address then belongs to the SDRAM.
//
// The zero write latency, the three-clock read latency of 64-bit words and
// access to registers, PPR and secondary buffers follow the design
// description; the address map, the signal set (a simplified EMIF
// synchronous interface) and the PDT handling are this design's.
module emic
  import tr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              emif_ce_n,
  input  logic              emif_are_n,
  input  logic              emif_awe_n,
  input  logic              emif_pdt_n,
  input  logic [EA_W-1:0]   emif_ea,
  input  logic [63:0]       emif_ed_i,
  output logic [63:0]       emif_ed_o,
  output logic              emif_ed_oe,
  // register file
  output logic              reg_we,
  output logic [3:0]        reg_widx,
  output logic [63:0]       reg_wdata,
  output logic [3:0]        reg_ridx,
  input  logic [63:0]       reg_rdata,
  // buffers
  output logic [SB_AW-1:0]  sb_raddr,
  input  logic [63:0]       sb_rdata [NCH],
  output logic [PPR_AW-1:0] ppr_raddr,
  input  logic [63:0]       ppr_rdata,
  // automatic transfer control
  input  atc_mode_e         atc_mode,
  input  logic [2:0]        atc_src,
  input  logic [SB_AW-1:0]  atc_addr,
  output logic              atc_step
);
  localparam logic [2:0] SRC_PPR = 3'(NCH);
  localparam logic [2:0] SRC_REG = 3'(NCH + 1);

  logic             rd_cmd, wr_cmd, strm;
  logic [1:0]       region;
  logic             s1_valid, s2_valid;
  logic [2:0]       s1_src, s2_src, src0;
  logic [SB_AW-1:0] s1_addr, addr0;
  logic [63:0]      s2_reg;

  always_comb begin
    region   = emif_ea[EA_W-1 -: 2];
    rd_cmd   = !emif_ce_n && !emif_are_n;
    wr_cmd   = !emif_ce_n && !emif_awe_n;
    strm     = (rd_cmd && region == 2'b11) || (!emif_pdt_n && atc_mode == ATC_PDT);
    atc_step = strm && (atc_mode != ATC_OFF);
    reg_we    = wr_cmd && region == 2'b00;
    reg_widx  = emif_ea[3:0];
    reg_wdata = emif_ed_i;
    // source and word of the command
    unique case (region)
      2'b00:   begin src0 = SRC_REG;                       addr0 = SB_AW'(emif_ea[3:0]); end
      2'b01:   begin src0 = SRC_PPR;                       addr0 = SB_AW'(emif_ea[PPR_AW-1:0]); end
      2'b10:   begin src0 = {1'b0, emif_ea[SB_AW+1:SB_AW]}; addr0 = emif_ea[SB_AW-1:0]; end
      default: begin src0 = atc_src;                       addr0 = atc_addr; end
    endcase
    if (strm) begin
      src0  = atc_src;
      addr0 = atc_addr;
    end
    sb_raddr  = s1_addr;
    ppr_raddr = s1_addr[PPR_AW-1:0];
    reg_ridx  = s1_addr[3:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_src <= '0; s1_addr <= '0;
      s2_valid <= 1'b0; s2_src <= '0; s2_reg  <= '0;
      emif_ed_o <= '0; emif_ed_oe <= 1'b0;
    end else begin
      s1_valid <= (rd_cmd && !wr_cmd) || strm;
      s1_src   <= src0;
      s1_addr  <= addr0;
      s2_valid <= s1_valid;
      s2_src   <= s1_src;
      s2_reg   <= reg_rdata;
      emif_ed_oe <= s2_valid;
      if (s2_valid) begin
        if (s2_src < 3'(NCH))      emif_ed_o <= sb_rdata[s2_src[1:0]];
        else if (s2_src == SRC_PPR) emif_ed_o <= ppr_rdata;
        else if (s2_src == SRC_REG) emif_ed_o <= s2_reg;
        else                        emif_ed_o <= '0;
      end
    end
  end

  // A bus cycle is either a read or a write.
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_cmd && wr_cmd));
endmodule
