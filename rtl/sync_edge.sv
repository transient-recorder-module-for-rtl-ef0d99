// External TTL input conditioning: synchronise and detect the rising edge.
//
// The external trigger and external timer start are asynchronous TTL pulses of
// at least 11 ns, i.e. longer than two 5 ns acquisition clocks, so a two-flop
// synchroniser always samples them. The output is a one-cycle pulse on each
// rising edge, three clocks after the edge reaches the input.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic rise
);
  logic [2:0] s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else s <= {s[1:0], async_in};
  end
  assign rise = s[1] & ~s[2];
endmodule
