// Interrupt generation block (IGB).
//
// Interrupt events are the timer overflow and, for each channel, its secondary
// buffer having been filled with a user-defined number of pulses (npulse; zero
// disables the event). Each event has an enable bit and a two-bit map that
// routes it to any of the four external DSP interrupt lines EXT_INT4..7
// (ext_int[0..3]). A line is held high for STRETCH acquisition clocks so that
// the DSP, running from an unrelated clock, sees a clean rising edge.
//
// The two event kinds and the free mapping onto external DSP interrupts follow
// the design description; the per-channel counters, the pulse stretching and
// running the block in the acquisition clock domain are this design's.
//
// Timing: an event raises its mapped line on the clock after pulse_done or
// timer_ovf.
module igb
  import tr_pkg::*;
#(
  parameter int unsigned STRETCH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NCH-1:0]      pulse_done,
  input  logic                timer_ovf,
  input  logic [9:0]          npulse [NCH],
  input  logic [NEVT-1:0]     evt_en,
  input  logic [1:0]          evt_map [NEVT],
  output logic [NEVT-1:0]     evt,        // one-clock event pulses (status)
  output logic [3:0]          ext_int
);
  logic [9:0] pcnt [NCH];
  logic [NEVT-1:0] evt_now;
  logic [3:0]      fire;
  logic [$clog2(STRETCH+1)-1:0] hold [4];

  always_comb begin
    for (int c = 0; c < NCH; c++)
      evt_now[c] = pulse_done[c] && (npulse[c] != 0) && (pcnt[c] + 10'd1 >= npulse[c]);
    evt_now[NCH] = timer_ovf;
    fire = '0;
    for (int e = 0; e < NEVT; e++)
      if (evt_now[e] && evt_en[e]) fire[evt_map[e]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) pcnt[c] <= '0;
      for (int i = 0; i < 4; i++) hold[i] <= '0;
      evt     <= '0;
      ext_int <= '0;
    end else begin
      evt <= evt_now;
      for (int c = 0; c < NCH; c++)
        if (pulse_done[c]) pcnt[c] <= evt_now[c] ? 10'd0 : pcnt[c] + 10'd1;
      for (int i = 0; i < 4; i++) begin
        if (fire[i])          hold[i] <= ($clog2(STRETCH+1))'(STRETCH - 1);
        else if (hold[i] != 0) hold[i] <= hold[i] - 1'b1;
        ext_int[i] <= fire[i] || (hold[i] != 0);
      end
    end
  end
endmodule
