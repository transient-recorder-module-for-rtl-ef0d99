// Self-checking test of secondary_buffer: bytes are written one per write
// clock (200 MHz) and read back as 64-bit words on an unrelated read clock
// (100 MHz, offset phase); each word must hold its eight samples lower byte
// first, and the read data must follow the address by one read clock.
module tb_secondary_buffer;
  logic wclk = 0, rclk = 0;
  logic we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [2:0] lane = 0;
  logic [7:0] wdata = 0;
  logic [63:0] rdata;
  int checks = 0, failures = 0;
  logic [63:0] ref_mem [64];
  secondary_buffer dut (.*);
  always #2.5 wclk = ~wclk;
  initial begin #1.3; forever #5 rclk = ~rclk; end
  initial begin
    @(posedge wclk); #0.5;
    for (int w = 0; w < 64; w++) begin
      for (int b = 0; b < 8; b++) begin
        logic [7:0] v;
        v = 8'($urandom);
        we = 1; waddr = 11'(w); lane = 3'(b); wdata = v;
        ref_mem[w][b*8 +: 8] = v;
        @(posedge wclk); #0.5;
      end
    end
    we = 0;
    // partial rewrite of word 5, lane 3 only
    we = 1; waddr = 5; lane = 3; wdata = 8'hA5; ref_mem[5][31:24] = 8'hA5;
    @(posedge wclk); #0.5 we = 0;
    @(posedge rclk); #0.5;
    for (int w = 0; w < 64; w++) begin
      raddr = 11'(w);
      @(posedge rclk); #0.5;
      checks++;
      if (rdata !== ref_mem[w]) begin failures++; $display("FAIL word %0d %h != %h", w, rdata, ref_mem[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
