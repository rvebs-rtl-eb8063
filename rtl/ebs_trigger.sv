// ebs_trigger: decides when a sample is taken.
//
// Triggering does not use counter overflow. Each counter i has a
// counter_offset register holding the counter value at its last trigger
// occurrence; counter i reaches its mark when
//     cnt_next_i[i] >= offset[i] + thr_i[i]      (thr_i[i] != 0, en_i = 1)
// so the architectural counters keep counting as in the standard HPM. At
// that moment the offset is reloaded with cnt_next_i[i], whether or not the
// sample can be taken now, so the next interval is measured from the
// trigger occurrence and a late sample does not move the intervals that
// follow it.
//
// If the sampler is busy (capture_ok_i = 0) the trigger is remembered in a
// one-deep pending flag, with the counters that caused it, and the sample
// is taken in the first cycle the sampler is free: the sample is delayed,
// and it records the machine state of that later cycle. A mark reached while
// a trigger is already pending merges into it (lost_o pulses), which is how
// the sample count falls behind the event count when marks come faster than
// samples can be stored.
//
// trigger_o is combinational: high in the cycle of the event that completes
// an interval, or in the first free cycle after a delayed trigger.
// trig_mask_o tells which counters caused the sample. pending_o is high
// while a mark is reached or remembered but the sample has to wait.
//
// The offset register and the compare against offset + threshold follow the
// document. This design's choices: the >= comparison (counters may advance
// by more than one per cycle), the one-deep pending flag, and that offsets
// follow the counters while sampling is disabled and reload when a counter
// or its threshold is written, so every interval starts fresh.
module ebs_trigger
  import rvebs_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               en_i,
  input  cnt_t [NUM_CNT-1:0] cnt_next_i,
  input  cnt_t [NUM_CNT-1:0] thr_i,
  input  logic [NUM_CNT-1:0] reload_i,
  input  logic               capture_ok_i,
  output logic               trigger_o,
  output logic [NUM_CNT-1:0] trig_mask_o,
  output logic               pending_o,
  output logic               lost_o,
  output cnt_t [NUM_CNT-1:0] offset_o
);

  cnt_t [NUM_CNT-1:0] offset_q;
  logic               pend_q;
  logic [NUM_CNT-1:0] pend_src_q;
  logic [NUM_CNT-1:0] reached;

  always_comb begin
    for (int unsigned i = 0; i < NUM_CNT; i++)
      reached[i] = en_i && (i != CNT_TIME) && (thr_i[i] != '0) &&
                   (cnt_next_i[i] >= offset_q[i] + thr_i[i]);
    trigger_o   = ((|reached) || pend_q) && capture_ok_i;
    trig_mask_o = trigger_o ? (reached | pend_src_q) : '0;
    pending_o   = ((|reached) || pend_q) && !capture_ok_i;
    lost_o      = (|reached) && pend_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      offset_q   <= '0;
      pend_q     <= 1'b0;
      pend_src_q <= '0;
    end else begin
      for (int unsigned i = 0; i < NUM_CNT; i++)
        if (!en_i || reload_i[i] || reached[i]) offset_q[i] <= cnt_next_i[i];
      if (!en_i || trigger_o) begin
        pend_q     <= 1'b0;
        pend_src_q <= '0;
      end else if (|reached) begin
        pend_q     <= 1'b1;
        pend_src_q <= pend_src_q | reached;
      end
    end
  end

  assign offset_o = offset_q;

endmodule
