// Secondary buffer (SB) of one channel: dual-clock pulse memory.
//
// The acquisition side writes one 8-bit sample per clock into byte lane
// `lane` of 64-bit word `waddr`; the DSP side reads whole 64-bit words, the
// eight samples of a word mapped from the lower to the upper byte. The read is
// registered: rdata holds word raddr one read clock after raddr is presented.
// The two ports have independent clocks, as in a true dual-port block RAM.
//
// Byte-per-sample writes and 64-bit reads with lower-to-upper byte order follow
// the design description; the depth (2048 words, 16 KiB per channel) is this
// design's choice, sized to fit four channels in the device's block RAM.
module secondary_buffer
  import tr_pkg::*;
#(
  parameter int unsigned WORDS = SB_WORDS
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [2:0]               lane,
  input  logic [SAMPLE_W-1:0]      wdata,
  input  logic                     rclk,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [63:0]              rdata
);
  logic [63:0] mem [WORDS];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr][lane*8 +: 8] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end
endmodule
