// Channel trigger select.
//
// Picks which channel's formatted trigger (CH0_TRG..CH3_TRG) starts storing on
// this channel, so that one channel's trigger can drive synchronous acquisition
// on several channels. With src_sel equal to the channel's own number it uses
// its own trigger. The trigger is registered here, so it reaches the storing
// control one clock after the formatted trigger.
module trigger_select
  import tr_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] ch_trg,    // formatted triggers of all channels
  input  logic [1:0]     src_sel,
  output logic           trg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trg <= 1'b0;
    else trg <= ch_trg[src_sel];
  end
endmodule
