// Self-checking test of timer40: software start, counting, stop, clear,
// external start with and without enable, and the overflow pulse (checked on
// a 10-bit instance so that the wrap is reached quickly, and the 40-bit
// default width is checked for its first counts). A final random phase
// applies random commands every clock for 4000 clocks and compares count,
// running and overflow with a reference model each clock.
module tb_timer40;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an asserting edge for the asynchronous reset
  logic sw_start = 0, sw_stop = 0, sw_clear = 0, ext_start = 0, ext_start_en = 0;
  logic [9:0]  count;
  logic [39:0] count40;
  logic running, overflow, running40, overflow40;
  int checks = 0, failures = 0, ovf_seen = 0, ovf_at = -1;
  timer40 #(.W(10)) dut (.clk, .rst_n, .sw_start, .sw_stop, .sw_clear, .ext_start, .ext_start_en,
                         .count, .running, .overflow);
  timer40 dut40 (.clk, .rst_n, .sw_start, .sw_stop, .sw_clear, .ext_start, .ext_start_en,
                 .count(count40), .running(running40), .overflow(overflow40));
  always #5 clk = ~clk;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1 s = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(count == 0 && !running, "idle after reset");
    pulse(sw_start);
    check(running, "running after software start");
    repeat (100) @(posedge clk); #1;
    check(count == 100, $sformatf("100 clocks counted (%0d)", count));
    check(count40 == 100, "40-bit instance counts the same");
    pulse(sw_stop);
    repeat (10) @(posedge clk); #1;
    check(count == 101 && !running, $sformatf("stopped (%0d)", count));
    pulse(sw_clear); #1;
    check(count == 0, "cleared");
    ext_start_en = 0; pulse(ext_start);
    repeat (3) @(posedge clk); #1;
    check(!running, "external start ignored when disabled");
    ext_start_en = 1; pulse(ext_start);
    check(running, "external start honoured when enabled");
    // run into the wrap of the 10-bit counter
    fork
      begin
        for (int i = 0; i < 1100; i++) begin
          @(posedge clk); #1;
          if (overflow) begin ovf_seen++; if (ovf_at < 0) ovf_at = i; end
        end
      end
    join
    check(ovf_seen == 1, $sformatf("one overflow pulse in 1100 clocks (%0d)", ovf_seen));
    check(!overflow40, "no overflow on the 40-bit counter");
    // random phase: random commands every clock against a reference model of
    // the 10-bit instance (clear beats counting, stop beats start)
    begin
      logic [9:0] m_count; logic m_run, m_ovf; int bad;
      bad = 0;
      m_count = count; m_run = running; m_ovf = overflow;
      for (int i = 0; i < 4000; i++) begin
        sw_start = ($urandom_range(0, 99) < 3); sw_stop = ($urandom_range(0, 99) < 2);
        sw_clear = ($urandom_range(0, 999) < 1); ext_start = ($urandom_range(0, 99) < 3);
        ext_start_en = ($urandom_range(0, 1) == 1);
        m_ovf = m_run && (m_count == '1);
        if (sw_clear) m_count = '0; else if (m_run) m_count = m_count + 10'd1;
        if (sw_stop) m_run = 1'b0; else if (sw_start || (ext_start && ext_start_en)) m_run = 1'b1;
        @(posedge clk); #1;
        checks++;
        if (count != m_count || running != m_run || overflow != m_ovf) begin
          failures++;
          if (bad++ < 5) $display("FAIL random clock %0d: count %0d/%0d running %0d/%0d overflow %0d/%0d",
                                  i, count, m_count, running, m_run, overflow, m_ovf);
        end
      end
      sw_start = 0; sw_stop = 0; sw_clear = 0; ext_start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
