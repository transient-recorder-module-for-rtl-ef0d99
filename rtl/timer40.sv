// Time-mark timer: 40-bit counter at the acquisition clock (5 ns per count).
//
// The counter runs once started, either by software (sw_start) or by the
// synchronised external TTL start pulse when ext_start_en is set, which lets
// several boards start their time bases together. sw_stop halts it and
// sw_clear zeroes it. On the wrap from all ones to zero it emits a one-clock
// overflow pulse, which is an interrupt source. All controls are one-clock
// pulses in the acquisition clock domain; the count changes on the edge after.
//
// The 40-bit width, 5 ns resolution, software/external start and overflow
// event follow the design description; stop and clear are this design's.
module timer40
  import tr_pkg::*;
#(
  parameter int unsigned W = TIME_W   // counter width; smaller only to shorten tests
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sw_start,
  input  logic              sw_stop,
  input  logic              sw_clear,
  input  logic              ext_start,
  input  logic              ext_start_en,
  output logic [W-1:0]      count,
  output logic              running,
  output logic              overflow
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      running  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= running && (count == '1);
      if (sw_clear)      count <= '0;
      else if (running)  count <= count + W'(1);
      if (sw_stop)                                   running <= 1'b0;
      else if (sw_start || (ext_start && ext_start_en)) running <= 1'b1;
    end
  end
endmodule
