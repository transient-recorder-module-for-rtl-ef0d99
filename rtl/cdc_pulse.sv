// Single-cycle pulse transfer between unrelated clocks (toggle synchroniser).
//
// A pulse in the source domain flips a toggle flip-flop; the destination
// domain synchronises the toggle through two flip-flops and emits a one-cycle
// pulse on each change. Source pulses must be at least three destination
// clocks apart. Latency: two to three destination clocks.
module cdc_pulse (
  input  logic clk_src,
  input  logic rst_src_n,
  input  logic pulse_src,
  input  logic clk_dst,
  input  logic rst_dst_n,
  output logic pulse_dst
);
  logic tog;
  logic [2:0] sync;
  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n) tog <= 1'b0;
    else if (pulse_src) tog <= ~tog;
  end
  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) sync <= '0;
    else sync <= {sync[1:0], tog};
  end
  assign pulse_dst = sync[2] ^ sync[1];
endmodule
