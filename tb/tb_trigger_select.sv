// Self-checking test of trigger_select: random trigger vectors and selections;
// the selected channel's trigger must appear one clock later.
module tb_trigger_select;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // an asserting edge for the asynchronous reset
  logic [NCH-1:0] ch_trg = '0;
  logic [1:0] src_sel = '0;
  logic trg;
  int checks = 0, failures = 0;
  trigger_select dut (.*);
  always #5 clk = ~clk;
  initial begin
    logic [NCH-1:0] v; logic [1:0] s;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      v = NCH'($urandom); s = 2'($urandom);
      ch_trg = v; src_sel = s;
      @(posedge clk); #1;
      checks++;
      if (trg !== v[s]) begin failures++; $display("FAIL step %0d", i); end
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
