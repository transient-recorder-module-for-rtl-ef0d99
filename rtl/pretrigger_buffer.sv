// Pre-trigger buffer (PTB): free-running circular sample delay line.
//
// Every acquisition clock one sample is written at the write pointer and one
// is read at the read pointer; both pointers advance every clock, so the read
// data is the sample written pre+DLY_EXTRA clocks earlier (pre = 0..2046).
// DLY_EXTRA aligns the buffer with the trigger path so that the first sample
// the storing control takes is exactly `pre` samples before the sample that
// caused the trigger. The read pointer is an independent counter; whenever the
// write pointer wraps to zero it is reloaded from the write pointer and the
// configured delay. A pointer upset or a new pre value therefore takes effect
// within one buffer turn (2048 clocks, 10.24 us at 200 MHz).
//
// Depth 2048, 8-bit width, 0..2046 pre-trigger samples and self-recovering
// pointers follow the design description; reload-on-wrap is this design's
// way of achieving the recovery.
//
// Timing: the q register loaded at a clock edge holds the sample that was
// presented on d pre+DLY_EXTRA edges earlier (DLY_EXTRA >= 1 keeps the read and
// write addresses apart).
module pretrigger_buffer
  import tr_pkg::*;
#(
  parameter int unsigned DEPTH     = PTB_DEPTH,
  parameter int unsigned DLY_EXTRA = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] d,
  input  logic [PRE_W-1:0]    pre,
  output logic [SAMPLE_W-1:0] q
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [SAMPLE_W-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  // Read address for the next clock, as derived from the write pointer.
  logic [AW-1:0] rd_from_wr;
  assign rd_from_wr = wr_ptr + AW'(1) - AW'(pre) - AW'(DLY_EXTRA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(1);
      if (wr_ptr == '1) rd_ptr <= rd_from_wr;
      else              rd_ptr <= rd_ptr + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    mem[wr_ptr] <= d;
    q <= mem[rd_ptr];
  end
endmodule
