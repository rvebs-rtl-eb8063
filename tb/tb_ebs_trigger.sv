// tb_ebs_trigger: self-checking test of the offset-based trigger.
// Drives counters that advance by random steps, with thresholds on several
// counters, and a sampler that is sometimes busy. A reference model of the
// counter_offset rule (a mark is reached when count >= offset + threshold;
// the offset then takes the count; a trigger that cannot be served waits in
// a one-deep pending flag) predicts every trigger, its source mask, the
// pending and lost flags and the offsets. Also checks that disabling makes
// the offsets follow the counters and that a reload restarts an interval.
module tb_ebs_trigger;
  import rvebs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, cap_ok, trig, pend, lost;
  cnt_t [NUM_CNT-1:0] cnt_next, thr, offset;
  logic [NUM_CNT-1:0] reload, mask;
  int checks = 0, failures = 0;
  int n_trig = 0, n_delayed = 0, n_multi = 0, n_lost = 0;
  bit ref_pend = 0;
  logic [NUM_CNT-1:0] ref_src = '0;
  longint unsigned ref_off [NUM_CNT];
  longint unsigned c [NUM_CNT];

  ebs_trigger dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .cnt_next_i(cnt_next),
    .thr_i(thr), .reload_i(reload), .capture_ok_i(cap_ok), .trigger_o(trig),
    .trig_mask_o(mask), .pending_o(pend), .lost_o(lost), .offset_o(offset));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_CNT-1:0] exp_mask;
    en = 1'b0; cap_ok = 1'b1; reload = '0; thr = '0; cnt_next = '0;
    for (int i = 0; i < NUM_CNT; i++) begin c[i] = 0; ref_off[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    thr[0] = 64'd37; thr[2] = 64'd10; thr[5] = 64'd7; thr[CNT_TIME] = 64'd3;
    for (int n = 0; n < 20000; n++) begin
      // Counters advance.
      c[0] += 1;
      c[1] += 5;
      c[2] += $urandom_range(0, 2);
      c[5] += $urandom_range(0, 1);
      c[7] += 1;
      en     = (n >= 20) && !(n >= 9000 && n < 9100);
      cap_ok = ($urandom_range(0, 3) != 0);
      reload = '0;
      if (n == 15000) begin
        reload[2] = 1'b1;
      end
      for (int i = 0; i < NUM_CNT; i++) cnt_next[i] = c[i];
      #1;
      exp_mask = '0;
      for (int i = 0; i < NUM_CNT; i++)
        if (en && i != CNT_TIME && thr[i] != 0 && c[i] >= ref_off[i] + thr[i]) exp_mask[i] = 1'b1;
      begin
        bit exp_trig;
        exp_trig = ((exp_mask != '0) || ref_pend) && cap_ok;
        check(pend == (((exp_mask != '0) || ref_pend) && !cap_ok), $sformatf("pending n=%0d", n));
        check(lost == ((exp_mask != '0) && ref_pend), "lost");
        check(trig == exp_trig, $sformatf("trigger n=%0d", n));
        check(mask == (exp_trig ? (exp_mask | ref_src) : '0), "trigger mask");
        for (int i = 0; i < NUM_CNT; i++) check(offset[i] == ref_off[i], "offset value");
        if (trig) begin
          n_trig++;
          if (ref_pend) n_delayed++;
          if ($countones(exp_mask | ref_src) > 1) n_multi++;
        end
        if (lost) n_lost++;
        for (int i = 0; i < NUM_CNT; i++)
          if (!en || reload[i] || exp_mask[i]) ref_off[i] = c[i];
        if (!en || exp_trig) begin
          ref_pend = 0; ref_src = '0;
        end else if (exp_mask != '0) begin
          ref_pend = 1; ref_src |= exp_mask;
        end
      end
      @(posedge clk); #1;
    end
    check(n_trig > 1000, "triggers happened");
    check(n_delayed > 50, "delayed triggers happened");
    check(n_multi > 10, "simultaneous triggers happened");
    check(n_lost > 10, "merged (lost) marks happened");
    $display("triggers=%0d delayed=%0d multi=%0d lost=%0d", n_trig, n_delayed, n_multi, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
