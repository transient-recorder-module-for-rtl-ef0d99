// Self-checking test of storing_control.
// The pre-trigger data input is a running counter, so every SB write shows
// which clock it came from. Checked: the tag (channel, SB pointer, length,
// time mark) and that it is offered only once its pulse is stored or cut,
// that a pulse of N samples is written to consecutive byte lanes
// starting one clock after the trigger and completes N clocks after it, the
// discard and store-all overlap policies, back-to-back pulses, refusal (lost
// pulse) when the SB is full, when the PPR has no room or a tag is still
// pending, and a disabled channel.
module tb_storing_control;
  import tr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic trg = 0, enable = 1, ppr_room = 1, tag_ack = 0;
  overlap_e overlap = OVL_DISCARD;
  logic [7:0] len_m1 = 1;
  logic [TIME_W-1:0] time_mark = 0;
  logic [7:0] ptb_q = 0;
  logic [SB_PW-1:0] sb_rel_ptr = 0;
  ppr_tag_t tag;
  logic tag_valid, sb_we, storing, pulse_done, evt_lost, evt_discard, evt_trunc;
  logic [SB_AW-1:0] sb_waddr;
  logic [2:0] sb_lane;
  logic [7:0] sb_wdata;
  logic [SB_PW-1:0] res_ptr;
  logic [15:0] lost_cnt;
  int checks = 0, failures = 0;
  int nwrites = 0, ndone = 0, nlost = 0, ndisc = 0, ntrunc = 0;
  logic [7:0] sbm [SB_WORDS*8];

  storing_control #(.CH(2'd2)) dut (.*);
  always #5 clk = ~clk;
  // monitors sample between edges, the stimulus counters advance after each edge
  always @(negedge clk) begin
    if (sb_we) begin sbm[int'(sb_waddr) * 8 + int'(sb_lane)] = sb_wdata; nwrites++; end
    if (pulse_done) ndone++;
    if (evt_lost) nlost++;
    if (evt_discard) ndisc++;
    if (evt_trunc) ntrunc++;
  end
  always @(posedge clk) begin
    #1 ptb_q = ptb_q + 1; time_mark = time_mark + 1;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s @%0t", w, $time); end
  endtask
  // trigger for one edge; returns the ptb value and time mark seen at that edge
  task automatic fire(output logic [7:0] q0, output logic [TIME_W-1:0] t0);
    trg = 1; q0 = ptb_q; t0 = time_mark;
    @(posedge clk); #2 trg = 0;
    @(negedge clk); #1;
  endtask
  task automatic ack();
    tag_ack = 1; @(posedge clk); #2 tag_ack = 0;
  endtask

  initial begin
    logic [7:0] q0, qa; logic [TIME_W-1:0] t0, ta; int w0, d0, clk_cnt;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    repeat (3) @(posedge clk); #2;
    // ---- one pulse of 16 samples
    w0 = nwrites;
    fire(q0, t0);
    check(!tag_valid && storing, "no tag offered while the pulse is stored");
    clk_cnt = 1;
    while (!pulse_done) begin @(posedge clk); #2; clk_cnt++; end
    check(clk_cnt == 17, $sformatf("pulse of 16 samples done at the 16th edge after the trigger edge (%0d)", clk_cnt - 1));
    check(tag_valid && tag.channel == 2 && tag.sb_ptr == 0 && tag.len_m1 == 1 && tag.time_mark == t0,
          "tag of first pulse offered with pulse_done");
    check(nwrites - w0 == 16, "16 samples written");
    begin
      automatic int bad = 0;
      for (int i = 0; i < 16; i++) if (sbm[i] != 8'(int'(q0) + 1 + i)) bad++;
      check(bad == 0, "samples in lanes 0..7 of words 0,1, starting one clock after the trigger");
    end
    check(res_ptr == 2, "two words reserved");
    ack();
    check(!tag_valid, "tag taken");
    // ---- discard policy
    len_m1 = 3;   // 32 samples
    d0 = ndisc;
    fire(q0, ta);
    repeat (5) @(posedge clk); #2;
    fire(q0, t0);
    check(!tag_valid && ndisc - d0 == 1, "overlapping trigger discarded");
    while (storing) begin @(posedge clk); #2; end
    check(tag_valid && tag.time_mark == ta && tag.sb_ptr == 2, "discard: tag of the first pulse only");
    ack();
    check(res_ptr == 6, "discard: only one reservation");
    // ---- store-all policy
    overlap = OVL_STORE_ALL;
    fire(qa, ta);
    repeat (9) @(posedge clk); #2;
    fire(q0, t0);
    check(tag_valid && tag.sb_ptr == 6 && tag.time_mark == ta && tag.cut && ntrunc == 1,
          "store-all: tag of the cut pulse offered at the new trigger, marked cut");
    begin
      automatic int bad = 0;
      for (int i = 0; i < int'(t0 - ta); i++) if (sbm[6*8 + i] != 8'(int'(qa) + 1 + i)) bad++;
      check(t0 - ta == 10 && bad == 0, "store-all: the cut pulse holds exactly (time mark difference) samples");
    end
    ack();
    while (storing) begin @(posedge clk); #2; end
    check(tag_valid && tag.sb_ptr == 10 && tag.time_mark == t0 && !tag.cut, "store-all: new pulse reserved after the first");
    ack();
    check(sbm[10*8] == 8'(q0 + 1), "store-all: second pulse starts at its own reservation");
    check(res_ptr == 14, "store-all: two reservations");
    // ---- pending tag blocks
    overlap = OVL_DISCARD; len_m1 = 0;
    fire(q0, t0);
    repeat (12) @(posedge clk); #2;
    fire(q0, t0);
    check(nlost == 1 && lost_cnt == 1, "pending tag refuses the next trigger");
    ack();
    // ---- PPR without room
    ppr_room = 0;
    fire(q0, t0);
    check(nlost == 2 && !tag_valid, "no PPR room refuses the trigger");
    ppr_room = 1;
    // ---- fill the SB: 2048 words, 255-word pulses (len_m1=254 -> 2040 samples)
    len_m1 = 254;
    for (int p = 0; p < 8; p++) begin
      fire(q0, t0);
      while (storing) begin @(posedge clk); #2; end
      if (tag_valid) ack();
    end
    // 15 + 8*255 = 2055 > 2048: the 8th must be refused
    check(nlost == 3 && res_ptr == 12'(15 + 7*255), $sformatf("SB full refuses pulse (res %0d lost %0d)", res_ptr, nlost));
    sb_rel_ptr = 12'(15 + 255);    // DSP frees up to the second large pulse
    fire(q0, t0);
    check(nlost == 3, "accepted again after release");
    while (storing) begin @(posedge clk); #2; end
    ack();
    // ---- back-to-back: a trigger on the edge that writes the last sample is
    //      no overlap, even with the discard policy
    len_m1 = 0;
    begin
      logic [7:0] q1; int dn, dd, dt; logic [SB_PW-1:0] r0;
      dn = ndone; dd = ndisc; dt = ntrunc; r0 = res_ptr;
      fire(q0, t0);
      repeat (7) @(posedge clk); #2;
      fire(q1, t0);
      check(tag_valid && tag.sb_ptr == r0 && !tag.cut && storing && ndisc == dd && ntrunc == dt,
            "back-to-back trigger accepted without discard or truncation");
      ack();
      while (storing) begin @(posedge clk); #2; end
      check(tag_valid && tag.sb_ptr == 12'(r0 + 1), "second back-to-back tag");
      ack();
      check(ndone - dn == 2 && q1 == 8'(q0 + 8), "two complete pulses, eight clocks apart");
      begin
        automatic int bad = 0;
        for (int i = 0; i < 16; i++) if (sbm[(int'(r0[SB_AW-1:0]) * 8 + i) % (SB_WORDS * 8)] != 8'(int'(q0) + 1 + i)) bad++;
        check(bad == 0, "back-to-back pulses form one unbroken sample stream");
      end
    end
    // ---- disabled channel
    enable = 0;
    fire(q0, t0);
    check(!tag_valid && !storing && nlost == 3, "disabled channel ignores triggers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
