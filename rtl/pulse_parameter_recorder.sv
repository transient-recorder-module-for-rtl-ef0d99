// Pulse parameter recorder (PPR): circular buffer of 512 pulse tags.
//
// Each channel offers at most one pending tag (channel, SB mapping, time mark);
// a round-robin arbiter writes one tag per acquisition clock into the next
// slot and acknowledges it. The DSP reads slots at random through the read
// port (registered, one read clock of latency) and reports how far it has
// read through rd_ptr. wr_ptr and rd_ptr carry one wrap bit. room tells the
// channels that every one of them could still place two tags (the tag waiting
// to be written and the one of the pulse being stored), so that a reserved
// pulse never loses its tag: at most 504 of 512 slots used.
//
// The 512-tag circular buffer read by the DSP follows the design description;
// the arbitration and the room rule are this design's.
module pulse_parameter_recorder
  import tr_pkg::*;
#(
  parameter int unsigned DEPTH = PPR_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ppr_tag_t                   tag       [NCH],
  input  logic [NCH-1:0]             tag_valid,
  output logic [NCH-1:0]             tag_ack,
  input  logic [$clog2(DEPTH):0]     rd_ptr,     // DSP read pointer, acquisition domain
  output logic [$clog2(DEPTH):0]     wr_ptr,
  output logic                       room,
  input  logic                       rclk,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [63:0]                rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [63:0] mem [DEPTH];
  logic [$clog2(NCH)-1:0] rr;          // channel with highest priority
  logic [$clog2(NCH)-1:0] pick;
  logic                   any;
  logic [AW:0]            used;

  always_comb begin
    any  = 1'b0;
    pick = rr;
    for (int i = NCH - 1; i >= 0; i--) begin
      if (tag_valid[(32'(rr) + i) % NCH]) begin
        any  = 1'b1;
        pick = $clog2(NCH)'((32'(rr) + i) % NCH);
      end
    end
    used = wr_ptr - rd_ptr;
    room = used <= (AW+1)'(DEPTH - 2 * NCH);
    tag_ack = '0;
    if (any) tag_ack[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rr     <= '0;
    end else if (any) begin
      wr_ptr <= wr_ptr + (AW+1)'(1);
      rr     <= pick + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (any) mem[wr_ptr[AW-1:0]] <= tag[pick];
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end
endmodule
