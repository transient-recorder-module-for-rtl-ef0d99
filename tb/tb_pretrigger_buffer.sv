// Self-checking test of pretrigger_buffer at its full 2048-entry depth.
// A random sample stream is recorded in the testbench. After each change of
// the pre-trigger count (0, 1, 7, 1000, 2046 and six random values) the
// output must, within one buffer turn, equal the sample presented
// pre+DLY_EXTRA clocks earlier. Then the self-recovery is checked: the read or
// the write pointer is upset to a random value at a random moment (as a
// radiation hit would do), and from 2049 clocks later (one buffer turn plus
// the output register, 10.245 us) the output must be right again; for a read
// pointer upset it must also have been wrong in between.
module tb_pretrigger_buffer;
  import tr_pkg::*;
  localparam int DLY = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic [7:0] d = 0, q;
  logic [PRE_W-1:0] pre = 0;
  int checks = 0, failures = 0;
  byte unsigned hist [$];
  int edge_n = 0;
  pretrigger_buffer #(.DLY_EXTRA(DLY)) dut (.clk, .rst_n, .d, .pre, .q);
  always #5 clk = ~clk;

  // drive a new random sample after every edge and remember what was presented
  always @(posedge clk) begin
    hist.push_back(d);
    edge_n++;
    if (hist.size() > 4096) void'(hist.pop_front());
    #1 d = 8'($urandom);
  end

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  // q was loaded at the last edge with the sample presented p+DLY edges before it
  function automatic bit q_ok(input int p);
    return q == hist[hist.size() - 1 - p - DLY];
  endfunction

  task automatic check_pre(input int p);
    int bad;
    pre = PRE_W'(p);
    repeat (2100) @(posedge clk);   // one buffer turn lets the read pointer follow
    bad = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #2;
      if (!q_ok(p)) bad++;
    end
    check(bad == 0, $sformatf("pre=%0d: %0d mismatches", p, bad));
  endtask

  // upset one pointer (0: read, 1: write) and measure the recovery
  task automatic upset(input int which, input int p);
    int u, last_bad, nbad;
    logic [10:0] v;
    repeat ($urandom_range(1, 2047)) @(posedge clk);
    #2;
    if (which == 0) begin v = dut.rd_ptr + 11'($urandom_range(100, 1900)); force dut.rd_ptr = v; end
    else            begin v = dut.wr_ptr + 11'($urandom_range(100, 1900)); force dut.wr_ptr = v; end
    u = edge_n;
    #1;
    if (which == 0) release dut.rd_ptr; else release dut.wr_ptr;
    last_bad = u; nbad = 0;
    for (int i = 0; i < 2400; i++) begin
      @(posedge clk); #2;
      if (!q_ok(p)) begin last_bad = edge_n; nbad++; end
    end
    check(last_bad - u <= 2049,
          $sformatf("%s pointer upset, pre=%0d: right again %0d clocks later", (which != 0) ? "write" : "read", p, last_bad - u + 1));
    if (which == 0) check(nbad > 0, "read pointer upset shows until the reload");
  endtask

  initial begin
    automatic int pres [5] = '{0, 1, 7, 1000, 2046};
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    foreach (pres[k]) check_pre(pres[k]);
    repeat (6) check_pre($urandom_range(0, 2046));
    check_pre(1000);
    upset(0, 1000);
    upset(1, 1000);
    check_pre(2046);
    upset(0, 2046);
    upset(1, 2046);
    upset(0, 2046);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
