// Transfer of a multi-bit value between unrelated clocks by a req/ack
// handshake.
//
// The source holds the value in a register and toggles req; the destination
// sees the toggle through two flip-flops, then copies the held value (stable
// since the toggle) and returns the toggle as ack through two source
// flip-flops. While a transfer is under way the source keeps its register
// still; a value written in that time is taken when the transfer ends, so the
// destination always shows a value the source really had, and the latest one
// within a few clocks. Intermediate values may be skipped, which suits
// pointers whose consumer only needs the newest position.
// Latency: one source clock plus three destination clocks when idle.
// This crossing is this design's own choice; the design description does not
// describe clock-domain crossings.
module cdc_bus #(
  parameter int unsigned W = 8
) (
  input  logic         clk_src,
  input  logic         rst_src_n,
  input  logic [W-1:0] d,
  input  logic         clk_dst,
  input  logic         rst_dst_n,
  output logic [W-1:0] q
);
  logic [W-1:0] hold;
  logic         req, ack;
  logic [1:0]   ack_s;
  logic [2:0]   req_s;

  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) begin
      hold  <= '0;
      req   <= 1'b0;
      ack_s <= '0;
    end else begin
      ack_s <= {ack_s[0], ack};
      if (req == ack_s[1] && hold != d) begin
        hold <= d;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) begin
      req_s <= '0;
      ack   <= 1'b0;
      q     <= '0;
    end else begin
      req_s <= {req_s[1:0], req};
      if (req_s[1] != ack) begin
        q   <= hold;
        ack <= req_s[1];
      end
    end
  end
endmodule
