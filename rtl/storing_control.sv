// Storing pulse detection and secondary buffer / pulse parameter control.
//
// On a storing trigger the block reserves room for a complete pulse of
// (len_m1+1) 64-bit words in the channel's secondary buffer (SB), builds the
// pulse tag (channel, first SB word, length, time mark) for the pulse parameter
// recorder (PPR), and then writes one pre-trigger-buffer sample per clock into
// the SB, byte lane 0..7 of successive words. A trigger is accepted only if the
// channel is enabled, the SB has room (reserve pointer minus the DSP's release
// pointer), the PPR has room and the previous tag has been taken by the PPR;
// otherwise the pulse is lost and counted. A trigger that arrives while a pulse
// is being stored, before the clock that writes its last sample, is discarded
// (overlap = OVL_DISCARD) or starts a new pulse
// (OVL_STORE_ALL); in the latter case the first pulse stays incomplete, and its
// sample count is the difference of the two time marks.
// The tag is built at the trigger but held in the block until its pulse is in
// the SB, complete or cut short by a store-all trigger; only then is it offered
// to the PPR. So a tag the DSP finds in the PPR always points at finished
// data. A channel thus owns at most two unwritten tags (one offered, one held
// for the pulse being stored), which the PPR room rule allows for. The tag of
// a cut pulse has its `cut` bit set; its sample count is then the difference
// between its time mark and that of the channel's next tag.
//
// Reservation, the tag contents, 8..2048 samples in multiples of 8 and the two
// overlap policies follow the design description; the flow control against the
// DSP (release pointer, PPR room) and the lost-pulse counter are this design's.
//
// Timing: trg is sampled at a clock edge; the first sample (ptb_q) is written
// at the next edge and the last one (len_m1+1)*8 edges after the trigger;
// pulse_done pulses one clock after the last write, and tag_valid rises with
// it (or, for a cut pulse, one clock after the cutting trigger). The time mark
// is the timer value at the edge that samples trg.
module storing_control
  import tr_pkg::*;
#(
  parameter logic [1:0] CH = 2'd0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trg,
  input  logic                enable,
  input  overlap_e            overlap,
  input  logic [7:0]          len_m1,
  input  logic [TIME_W-1:0]   time_mark,
  input  logic [SAMPLE_W-1:0] ptb_q,
  input  logic [SB_PW-1:0]    sb_rel_ptr,   // DSP release pointer (words)
  input  logic                ppr_room,     // PPR can take the pending tags
  input  logic                tag_ack,
  output ppr_tag_t            tag,
  output logic                tag_valid,
  output logic                sb_we,
  output logic [SB_AW-1:0]    sb_waddr,
  output logic [2:0]          sb_lane,
  output logic [SAMPLE_W-1:0] sb_wdata,
  output logic [SB_PW-1:0]    res_ptr,      // SB reserve pointer (words)
  output logic                storing,
  output logic                pulse_done,   // a complete pulse has been stored
  output logic                evt_lost,     // trigger refused for lack of room
  output logic                evt_discard,  // overlapping trigger discarded
  output logic                evt_trunc,    // pulse cut short by a new trigger
  output logic [15:0]         lost_cnt
);
  logic [SB_AW-1:0] wr_word;
  ppr_tag_t         cur;         // tag of the pulse being stored
  logic [10:0]      cnt;         // samples written in this pulse
  logic [10:0]      last;        // index of the last sample
  logic [SB_PW:0]   used_after;  // SB words in use if this pulse is reserved
  logic             room_sb, overlapped, accept;

  always_comb begin
    used_after  = {1'b0, SB_PW'(res_ptr - sb_rel_ptr)} + (SB_PW+1)'(len_m1) + (SB_PW+1)'(1);
    room_sb     = used_after <= (SB_PW+1)'(SB_WORDS);
    overlapped  = storing && (cnt != last) && (overlap == OVL_DISCARD);
    accept      = trg && enable && !overlapped && room_sb && ppr_room && !tag_valid;
    sb_we       = storing;
    sb_waddr    = wr_word;
    sb_lane     = cnt[2:0];
    sb_wdata    = ptb_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      storing     <= 1'b0;
      wr_word     <= '0;
      cnt         <= '0;
      last        <= '0;
      res_ptr     <= '0;
      tag         <= '0;
      tag_valid   <= 1'b0;
      cur         <= '0;
      pulse_done  <= 1'b0;
      evt_lost    <= 1'b0;
      evt_discard <= 1'b0;
      evt_trunc   <= 1'b0;
      lost_cnt    <= '0;
    end else begin
      pulse_done  <= 1'b0;
      evt_lost    <= 1'b0;
      evt_discard <= trg && enable && overlapped;
      evt_trunc   <= accept && storing && (cnt != last);
      if (tag_ack) tag_valid <= 1'b0;

      // the pulse being stored is finished or cut: offer its tag (the slot is
      // free: an accept needs it free, and a pulse lasts at least 8 clocks
      // while the PPR takes a tag within NCH clocks)
      if (storing && (cnt == last || accept)) begin
        tag       <= cur;
        tag.cut   <= (cnt != last);
        tag_valid <= 1'b1;
      end

      if (storing) begin
        cnt <= cnt + 11'd1;
        if (cnt[2:0] == 3'd7) wr_word <= wr_word + SB_AW'(1);
        if (cnt == last) begin
          storing    <= 1'b0;
          pulse_done <= 1'b1;
        end
      end

      if (trg && enable && !overlapped && !accept) begin
        evt_lost <= 1'b1;
        if (lost_cnt != '1) lost_cnt <= lost_cnt + 16'd1;
      end

      if (accept) begin
        storing    <= 1'b1;
        wr_word    <= res_ptr[SB_AW-1:0];
        cnt        <= '0;
        last       <= {len_m1, 3'b111};
        res_ptr    <= res_ptr + SB_PW'(len_m1) + SB_PW'(1);
        cur        <= '{channel: CH, cut: 1'b0, rsvd: 1'b0, len_m1: len_m1, sb_ptr: res_ptr, time_mark: time_mark};
      end
    end
  end

  // an offered tag is always taken before the next pulse finishes
  a_tag_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
    storing && cnt == last |-> !tag_valid || tag_ack);
endmodule
