// Self-checking test of igb: the SB-filled event fires on every npulse-th
// stored pulse of a channel, the timer overflow event fires at once, each is
// routed to its mapped EXT_INT line and held for STRETCH clocks, and disabled
// events raise nothing. Then 3000 clocks of random pulse completions (several
// channels at once), timer overflows, pulse counts, enables and maps are
// compared clock by clock with a reference model of the counters, the event
// pulses and the stretched lines.
module tb_igb;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an asserting edge for the asynchronous reset
  logic [NCH-1:0] pulse_done = '0;
  logic timer_ovf = 0;
  logic [9:0] npulse [NCH];
  logic [NEVT-1:0] evt_en = '0, evt;
  logic [1:0] evt_map [NEVT];
  logic [3:0] ext_int;
  int checks = 0, failures = 0;
  int rises [4];
  logic [3:0] prev = 0;
  igb #(.STRETCH(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (ext_int[i] && !prev[i]) rises[i]++;
    prev <= ext_int;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  task automatic done(input int ch);
    pulse_done[ch] = 1; @(posedge clk); #1 pulse_done[ch] = 0;
    repeat (12) @(posedge clk); #1;
  endtask
  initial begin
    int len;
    for (int i = 0; i < 4; i++) rises[i] = 0;
    npulse[0] = 3; npulse[1] = 1; npulse[2] = 0; npulse[3] = 2;
    evt_map[0] = 2; evt_map[1] = 0; evt_map[2] = 1; evt_map[3] = 3; evt_map[4] = 1;
    evt_en = 5'b10111;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (7) done(0);
    check(rises[2] == 2, $sformatf("ch0 every 3rd pulse on EXT_INT6 (%0d)", rises[2]));
    repeat (2) done(1);
    check(rises[0] == 2, $sformatf("ch1 every pulse on EXT_INT4 (%0d)", rises[0]));
    repeat (4) done(2);
    check(rises[1] == 0, "ch2 npulse=0 gives no event");
    repeat (3) done(3);
    check(rises[3] == 0, "ch3 disabled gives no interrupt");
    check(dut.pcnt[3] == 1, "ch3 still counts (3 pulses mod 2)");
    timer_ovf = 1; @(posedge clk); #1 timer_ovf = 0;
    len = 0;
    for (int i = 0; i < 20; i++) begin if (ext_int[1]) len++; @(posedge clk); #1; end
    check(rises[1] == 1 && len == 8, $sformatf("timer overflow on EXT_INT5 for 8 clocks (%0d, %0d)", rises[1], len));
    // random sequence against a reference model
    begin
      int m_pcnt [NCH];
      int m_hold [4];
      logic [NEVT-1:0] m_evt, e_now;
      logic [3:0] m_int, f;
      int bad;
      repeat (20) @(posedge clk); #1;
      for (int c = 0; c < NCH; c++) m_pcnt[c] = int'(dut.pcnt[c]);
      for (int i = 0; i < 4; i++) m_hold[i] = 0;
      bad = 0;
      for (int k = 0; k < 3000; k++) begin
        if ($urandom_range(0, 99) == 0) begin
          for (int c = 0; c < NCH; c++) npulse[c] = 10'($urandom_range(0, 4));
          for (int e = 0; e < NEVT; e++) evt_map[e] = 2'($urandom);
          evt_en = NEVT'($urandom);
        end
        for (int c = 0; c < NCH; c++) pulse_done[c] = ($urandom_range(0, 5) == 0);
        timer_ovf = ($urandom_range(0, 60) == 0);
        // expected state after the coming edge
        for (int c = 0; c < NCH; c++)
          e_now[c] = pulse_done[c] && npulse[c] != 0 && m_pcnt[c] + 1 >= int'(npulse[c]);
        e_now[NCH] = timer_ovf;
        f = '0;
        for (int e = 0; e < NEVT; e++) if (e_now[e] && evt_en[e]) f[evt_map[e]] = 1'b1;
        for (int c = 0; c < NCH; c++) if (pulse_done[c]) m_pcnt[c] = e_now[c] ? 0 : m_pcnt[c] + 1;
        for (int i = 0; i < 4; i++) begin
          m_int[i] = f[i] || m_hold[i] != 0;
          m_hold[i] = f[i] ? 7 : (m_hold[i] != 0 ? m_hold[i] - 1 : 0);
        end
        m_evt = e_now;
        @(posedge clk); #1;
        checks++;
        if (ext_int != m_int || evt != m_evt) begin
          failures++;
          if (bad++ < 5) $display("FAIL random clock %0d: ext_int %b/%b evt %b/%b", k, ext_int, m_int, evt, m_evt);
        end
      end
      pulse_done = '0; timer_ovf = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
