// Self-checking test of trigger_format: all 32 input combinations against the
// rule "masked self trigger or masked external trigger or software trigger".
module tb_trigger_format;
  logic self_trg, ext_trg, soft_trg, self_en, ext_en, ch_trg;
  int checks = 0, failures = 0;
  trigger_format dut (.*);
  initial begin
    for (int v = 0; v < 32; v++) begin
      bit exp;
      {self_trg, ext_trg, soft_trg, self_en, ext_en} = 5'(v);
      exp = 0;
      if (self_trg && self_en) exp = 1;
      if (ext_trg && ext_en)   exp = 1;
      if (soft_trg)            exp = 1;
      #1;
      checks++;
      if (ch_trg !== exp) begin failures++; $display("FAIL combination %b", 5'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
