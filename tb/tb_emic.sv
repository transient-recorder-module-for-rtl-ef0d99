// Self-checking test of emic against testbench models of the register file
// (combinational), the secondary buffers and the PPR (one-clock registered
// reads). Checked: writes reach the register file in the command clock (no
// latency); reads of registers, PPR slots and SB words of each channel return
// their word exactly three clocks after the command, also back to back; the
// SPA streaming port and PDT cycles read the ATC's buffer word and step it.
module tb_emic;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic emif_ce_n = 1, emif_are_n = 1, emif_awe_n = 1, emif_pdt_n = 1;
  logic [EA_W-1:0] emif_ea = 0;
  logic [63:0] emif_ed_i = 0, emif_ed_o;
  logic emif_ed_oe;
  logic reg_we;
  logic [3:0] reg_widx, reg_ridx;
  logic [63:0] reg_wdata, reg_rdata;
  logic [SB_AW-1:0] sb_raddr;
  logic [63:0] sb_rdata [NCH];
  logic [PPR_AW-1:0] ppr_raddr;
  logic [63:0] ppr_rdata;
  atc_mode_e atc_mode = ATC_OFF;
  logic [2:0] atc_src = 0;
  logic [SB_AW-1:0] atc_addr = 0;
  logic atc_step;
  int checks = 0, failures = 0;
  logic [63:0] regs [16];

  emic dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] sbval(int ch, int a);
    return {8'hB0 + 8'(ch), 24'd0, 32'(a) * 32'h0101_0101};
  endfunction
  function automatic logic [63:0] pprval(int a);
    return {32'hCAFE_0000, 32'(a)};
  endfunction
  // models
  assign reg_rdata = regs[reg_ridx];
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) sb_rdata[c] <= sbval(c, int'(sb_raddr));
    ppr_rdata <= pprval(int'(ppr_raddr));
    if (reg_we) regs[reg_widx] <= reg_wdata;
    if (atc_step) atc_addr <= atc_addr + 1'b1;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask

  // expected read data, by clock of issue
  logic [63:0] exp_q [$];
  int lat_q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic issue_read(input logic [15:0] a, input logic [63:0] e);
    emif_ce_n = 0; emif_are_n = 0; emif_ea = a;
    exp_q.push_back(e); lat_q.push_back(cyc + 3);
    @(posedge clk); #1;
    emif_ce_n = 1; emif_are_n = 1;
  endtask
  // Compare bus data with the expected word in the clock period before the
  // edge at which the DSP samples it: a command sampled at edge k is due at
  // edge k+3, so the word must be on the bus between edges k+2 and k+3.
  int nread = 0;
  always @(negedge clk) begin
    if (lat_q.size() > 0 && lat_q[0] == cyc) begin
      void'(lat_q.pop_front());
      checks++; nread++;
      if (!(emif_ed_oe && emif_ed_o == exp_q[0])) begin
        failures++; $display("FAIL read data %h expected %h (oe %0d) @%0t", emif_ed_o, exp_q[0], emif_ed_oe, $time);
      end
      void'(exp_q.pop_front());
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // zero-latency writes
    emif_ce_n = 0; emif_awe_n = 0; emif_ea = 16'h0005; emif_ed_i = 64'h1111_2222_3333_4444; #1;
    check(reg_we && reg_widx == 5 && reg_wdata == 64'h1111_2222_3333_4444, "write decoded in the command clock");
    @(posedge clk); #1;
    check(regs[5] == 64'h1111_2222_3333_4444, "register written at the command edge");
    emif_ea = 16'h0009; emif_ed_i = 64'hABCD;
    @(posedge clk); #1;
    emif_ea = 16'h4009; emif_ed_i = 64'hFFFF; #1;
    check(!reg_we, "write to the PPR window is not a register write");
    @(posedge clk); #1;
    emif_ce_n = 1; emif_awe_n = 1;
    // single reads with three-clock latency
    issue_read(16'h0005, 64'h1111_2222_3333_4444);
    repeat (4) @(posedge clk); #1;
    issue_read(16'h4000 | 16'd300, pprval(300));
    repeat (4) @(posedge clk); #1;
    // back-to-back reads of all windows
    issue_read(16'h0009, 64'hABCD);
    issue_read(16'h8000 | 16'd17, sbval(0, 17));
    issue_read(16'h8800 | 16'd2047, sbval(1, 2047));
    issue_read(16'h9000 | 16'd1, sbval(2, 1));
    issue_read(16'h9800 | 16'd1000, sbval(3, 1000));
    issue_read(16'h4000 | 16'd511, pprval(511));
    repeat (5) @(posedge clk); #1;
    // SPA: repeated reads of the streaming port walk through SB of channel 2
    atc_mode = ATC_SPA; atc_src = 3'd2;
    @(posedge clk); #1;
    atc_addr = 11'd100;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) issue_read(16'hC000, sbval(2, 100 + i));
    check(atc_addr == 104, "SPA stepped the ATC four times");
    repeat (5) @(posedge clk); #1;
    // PDT: pdt_n cycles stream the PPR, chip enable not asserted
    atc_mode = ATC_PDT; atc_src = 3'd4; atc_addr = 11'd7;
    for (int i = 0; i < 3; i++) begin
      emif_pdt_n = 0;
      exp_q.push_back(pprval(7 + i)); lat_q.push_back(cyc + 3);
      @(posedge clk); #1;
    end
    emif_pdt_n = 1;
    repeat (6) @(posedge clk); #1;
    check(atc_addr == 10, "PDT stepped the ATC three times");
    check(nread == 15, $sformatf("all reads compared (%0d)", nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
