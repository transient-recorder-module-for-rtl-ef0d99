// Two-flop synchroniser for a bundle of quasi-static signals.
//
// Each bit is passed through two flip-flops of the destination clock. It is
// meant for configuration bits written by the DSP that change rarely and are
// not used in the cycles after a change, so bits of one word may arrive one
// cycle apart. Latency: two destination clocks. Reset value: zero.
module cdc_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
