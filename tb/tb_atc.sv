// Self-checking test of atc: load, stepping in SPA mode, wrap inside a
// secondary buffer and inside the smaller PPR, no stepping when off; then
// 2000 clocks of random mode, source, load and step compared clock by clock
// with a reference model of the pointer and the word counter.
module tb_atc;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an asserting edge for the asynchronous reset
  atc_mode_e mode = ATC_OFF;
  logic [2:0] src = 0, cur_src;
  logic [SB_AW-1:0] start = 0, addr;
  logic load = 0, step = 0, active;
  logic [31:0] words;
  int checks = 0, failures = 0;
  atc dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    mode = ATC_SPA; src = 3'd2; start = 11'd2040; load = 1;
    @(posedge clk); #1 load = 0;
    check(addr == 2040 && active && cur_src == 2, "loaded");
    step = 1;
    repeat (10) @(posedge clk); #1 step = 0;
    check(addr == 11'd2, $sformatf("SB wrap 2040+10 -> 2 (%0d)", addr));
    check(words == 10, "ten words counted");
    src = 3'd4; start = 11'd510; load = 1; mode = ATC_PDT;
    @(posedge clk); #1 load = 0; step = 1;
    repeat (3) @(posedge clk); #1 step = 0;
    check(addr == 11'd1, $sformatf("PPR wrap 510+3 -> 1 (%0d)", addr));
    mode = ATC_OFF; step = 1;
    repeat (3) @(posedge clk); #1 step = 0;
    check(addr == 11'd1 && !active, "no step when off");
    // random sequence against a reference model
    begin
      int m_addr, m_words, bad;
      m_addr = int'(addr); m_words = int'(words); bad = 0;
      for (int i = 0; i < 2000; i++) begin
        mode  = atc_mode_e'($urandom_range(0, 2));
        src   = 3'($urandom_range(0, 4));
        start = 11'($urandom);
        load  = ($urandom_range(0, 15) == 0);
        step  = ($urandom_range(0, 1) == 1);
        @(posedge clk); #1;
        if (load) begin m_addr = int'(start); m_words = 0; end
        else if (step && mode != ATC_OFF) begin
          m_addr = (src == 4) ? (m_addr + 1) % PPR_DEPTH : (m_addr + 1) % SB_WORDS;
          m_words++;
        end
        checks++;
        if (addr != 11'(m_addr) || words != 32'(m_words) || active != (mode != ATC_OFF) || cur_src != src) begin
          failures++;
          if (bad++ < 5) $display("FAIL random step %0d: addr %0d/%0d words %0d/%0d", i, addr, m_addr, words, m_words);
        end
      end
      load = 0; step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
