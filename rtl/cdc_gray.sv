// Transfer of a counter value between unrelated clocks through Gray code.
//
// The source value is converted to Gray code and registered in the source
// domain, passed through two destination flip-flops and converted back to
// binary. It is exact for values that change by at most one per source clock
// (counters and FIFO pointers); a value that jumps further settles on the new
// value within three destination clocks. Latency: three destination clocks.
module cdc_gray #(
  parameter int unsigned W = 8
) (
  input  logic         clk_src,
  input  logic         rst_src_n,
  input  logic [W-1:0] d,
  input  logic         clk_dst,
  input  logic         rst_dst_n,
  output logic [W-1:0] q
);
  logic [W-1:0] g_src, g_meta, g_dst;
  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) g_src <= '0;
    else g_src <= d ^ (d >> 1);
  end
  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) begin
      g_meta <= '0;
      g_dst  <= '0;
    end else begin
      g_meta <= g_src;
      g_dst  <= g_meta;
    end
  end
  always_comb begin
    q[W-1] = g_dst[W-1];
    for (int i = W - 2; i >= 0; i--) q[i] = q[i+1] ^ g_dst[i];
  end
endmodule
