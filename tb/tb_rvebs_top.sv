// tb_rvebs_top: end-to-end test of the event-based sampling system at its
// default parameters.
//
// The testbench plays the core: it "executes" small loops instruction by
// instruction (one commit in most cycles), raises the matching event lines,
// writes the register file like the real instructions would, and models the
// L1 request queues and an L1.5 cache that acknowledges writes after a
// random delay and stores them in a memory array. It configures the system
// through the CSR port, then checks the samples that arrive in memory
// against values it tracks itself (its own instruction, event and cycle
// counts, its own copy of the registers).
//
// Phase 1, store loop: four stores, a decrement and a branch, 10000
// iterations; samples every 13 store events (not a multiple of 4). Every
// sample must arrive (no loss), carry the PC of the 13th store, the right
// counter values and the loop register; each store must own a quarter of
// the samples; an unobstructed sample walk must take 14 cycles.
// Phase 2, heavy load: a loop with one load (an L1 data miss) every four
// instructions keeps the L1 queues busy, and minstret triggers every 16
// instructions with all 14 registers stored. Samples are then delayed and
// marks merge: the testbench models the trigger rule itself and checks
// every trigger and merge against it, that every captured sample still
// reaches memory intact, and that fewer samples than intervals were taken.
// Phase 3: sampling disabled; no sample may be taken.
// Every mechanism (trigger, delayed trigger, merged mark, back-to-back capture, store
// buffer full, walk stall, request held for busy L1 queues, pointer restart
// on mhpmmaddr write, disable) is counted and must occur.
module tb_rvebs_top;
  import rvebs_pkg::*;

  localparam int unsigned NUM_EVENTS = 32;
  localparam int unsigned EV_LD_MISS = 2;   // event line numbers used here
  localparam int unsigned EV_LOAD    = 5;
  localparam int unsigned EV_STORE   = 6;
  localparam int unsigned MISS_BUSY  = 3;    // cycles an L1 miss keeps the queues busy

  typedef enum logic [2:0] {I_ST, I_LD, I_PTR, I_DEC, I_BNEZ, I_FILL} itype_e;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_EVENTS-1:0] ev;
  logic [1:0]  inc;
  logic [63:0] pc, tim;
  logic [11:0] csr_addr;
  logic        csr_we;
  logic [63:0] csr_wdata, csr_rdata;
  logic        csr_hit;
  logic [1:0][4:0]  graddr, gwaddr;
  logic [1:0][63:0] grdata, gwdata;
  logic [1:0]       gwe;
  logic        l1_empty, l15_val, l15_nc, l15_ack;
  logic [63:0] l15_addr, l15_data;
  logic [2:0]  l15_size;
  logic        trig, pend, lost, busy, stall, done, sb_full;
  logic [NUM_CNT-1:0] src;
  logic [2:0]  sb_count;
  logic [63:0] moff;

  rvebs_top dut (
    .clk_i(clk), .rst_ni(rst_n), .event_i(ev), .instret_inc_i(inc), .commit_pc_i(pc),
    .time_i(tim), .csr_addr_i(csr_addr), .csr_we_i(csr_we), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit), .gpr_raddr_i(graddr), .gpr_rdata_o(grdata),
    .gpr_we_i(gwe), .gpr_waddr_i(gwaddr), .gpr_wdata_i(gwdata), .l1_queues_empty_i(l1_empty),
    .l15_val_o(l15_val), .l15_addr_o(l15_addr), .l15_data_o(l15_data), .l15_size_o(l15_size),
    .l15_nc_o(l15_nc), .l15_ack_i(l15_ack), .sample_trigger_o(trig), .sample_src_o(src),
    .sample_pending_o(pend), .sample_lost_o(lost), .sample_busy_o(busy), .sample_stall_o(stall),
    .sample_done_o(done), .sb_full_o(sb_full), .sb_count_o(sb_count), .maddr_offset_o(moff));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- testbench's own view of the machine ----------------
  longint unsigned t_cnt [NUM_CNT];      // counter values (next-value view)
  longint unsigned t_gpr [32];
  int unsigned     t_evsel [NUM_PROG];
  int unsigned     l1_busy_left = 0;
  longint unsigned exp_words [$];        // words expected in memory, in order
  longint unsigned base_addr;
  longint unsigned wr_ptr;               // next expected memory address
  int unsigned     words_seen = 0;
  logic [63:0]     cfg_now;

  // Mechanism counters.
  int n_trig = 0, n_delayed = 0, n_b2b = 0, n_full = 0, n_stall = 0, n_hold = 0;
  int n_restart = 0, n_disabled = 0, n_walk14 = 0, n_lost = 0, n_marks = 0;
  bit m_pend = 0;
  int walk_len = 0; bit walk_clean = 1;

  // Per-cycle drive knobs.
  bit      commit;
  itype_e  cur;
  bit      heavy;        // phase 2 L1 contention
  int      phase = 0;
  int      per_store [4] = '{0, 0, 0, 0};
  longint unsigned last_ir;
  int      trig_walk_start;

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    csr_addr = a; csr_we = 1'b1; csr_wdata = d;
    ev = '0; inc = '0; gwe = '0;
    #1;
    // Counter writes are seen by the next-value view in this cycle.
    if (a == CSR_MCYCLE) t_cnt[CNT_CYCLE] = d - 1;   // +1 added in tick below
    if (a == CSR_MINSTRET) t_cnt[CNT_INSTRET] = d;
    for (int i = 0; i < NUM_PROG; i++) begin
      if (a == CSR_MHPMCOUNTER3 + 12'(i)) t_cnt[3+i] = d;
      if (a == CSR_MHPMEVENT3 + 12'(i)) t_evsel[i] = int'(d);
    end
    if (a == CSR_MHPMEBSCFG) cfg_now = d;
    tick();
    csr_we = 1'b0;
  endtask

  // One clock cycle: update the testbench counters with this cycle's
  // activity, observe the DUT, and step the clock.
  task automatic tick();
    t_cnt[CNT_CYCLE] += 1;
    t_cnt[CNT_INSTRET] += inc;
    for (int i = 0; i < NUM_PROG; i++)
      if (t_evsel[i] != 0 && ev[t_evsel[i]]) t_cnt[3+i] += 1;
    t_cnt[CNT_TIME] = tim;
    #1;
    observe();
    @(posedge clk);
    #1;
    tim += 1;
  endtask

  // Observe the DUT in the current cycle (inputs settled).
  task automatic observe();
    ebscfg_t c;
    c = ebscfg_t'(cfg_now);
    if (pend && !trig) n_delayed++;
    if (lost) n_lost++;
    // Phase 2: the testbench's own model of the trigger rule. A mark is
    // reached every 16 instructions counted from the last mark; a mark the
    // sampler cannot serve at once waits (one deep) until the walk ends.
    if (phase == 2) begin
      bit mark, cap_ok, exp_trig;
      mark     = c.en && (t_cnt[CNT_INSTRET] >= last_ir + 16);
      cap_ok   = !busy || done;
      exp_trig = (mark || m_pend) && cap_ok;
      check(trig == exp_trig, $sformatf("phase 2: trigger as modelled (instret %0d last %0d trig %0d mark %0d pend %0d busy %0d done %0d dutpend %0d)", t_cnt[CNT_INSTRET], last_ir, trig, mark, m_pend, busy, done, pend));
      check(lost == (mark && m_pend), "phase 2: merged mark as modelled");
      if (mark) n_marks++;
      if (mark || !c.en) last_ir = t_cnt[CNT_INSTRET];
      if (exp_trig) m_pend = 0;
      else if (mark) m_pend = 1;
    end
    if (sb_full) n_full++;
    if (stall) n_stall++;
    if (!l15_val && sb_count != 0 && !l1_empty) n_hold++;
    if (!c.en) begin
      check(!trig, "no sample while disabled");
      if (ev != '0 || inc != 0) n_disabled++;
    end
    // Sample walk timing.
    if (busy) begin
      walk_len++;
      if (stall) walk_clean = 0;
      if (done) begin
        if (walk_clean) begin
          n_walk14++;
          check(walk_len == SAMPLE_REGS, $sformatf("clean walk of %0d cycles (got %0d)", SAMPLE_REGS, walk_len));
        end
      end
    end
    if (trig) begin
      n_trig++;
      if (busy) n_b2b++;
      if (phase == 1)
        check(ev[EV_STORE] && t_cnt[3] == 64'(13 * n_trig) && !busy,
              $sformatf("phase 1: sample %0d taken on store %0d", n_trig, 13 * n_trig));
      walk_len = 0; walk_clean = 1;
      // Words this sample must produce, from the testbench's own state.
      exp_words.push_back(pc);
      for (int i = 0; i < NUM_CNT; i++) if (c.cnt_en[i]) exp_words.push_back(t_cnt[i]);
      for (int j = 0; j < NUM_SAMPLE_GPR; j++)
        if (c.gpr_en[j]) exp_words.push_back(c.gpr_addr[j] == 0 ? 0 : t_gpr[c.gpr_addr[j]]);
    end
    // Memory side.
    if (l15_val) check(l15_nc && l15_size == 3'd3, "non-cacheable 8-byte write");
    if (l15_val && l15_ack) begin
      longint unsigned w;
      w = (exp_words.size() != 0) ? exp_words.pop_front() : 64'hBAD;
      check(l15_data == w, $sformatf("memory word %0d data %h exp %h", words_seen, l15_data, w));
      check(l15_addr == wr_ptr, $sformatf("memory word %0d address", words_seen));
      // Attribution: the PC word that opens each phase-1 sample.
      if (phase == 1 && words_seen % 5 == 0 && l15_data >= 64'h8000_0100 && l15_data < 64'h8000_0110)
        per_store[(l15_data - 64'h8000_0100) / 4]++;
      wr_ptr += 8;
      words_seen++;
    end
  endtask

  // Drive the cycle's core activity for instruction `it` at `ipc`.
  task automatic exec(input itype_e it, input longint unsigned ipc);
    ev = '0; inc = 2'd1; gwe = '0; pc = ipc;
    unique case (it)
      I_ST:  ev[EV_STORE] = 1'b1;
      I_LD: begin
        ev[EV_LOAD] = 1'b1;
        ev[EV_LD_MISS] = 1'b1;              // every load touches a new line
        if (heavy) l1_busy_left = MISS_BUSY;
        gwe[0] = 1'b1; gwaddr[0] = 5'd12; gwdata[0] = {$urandom, $urandom};
      end
      I_PTR: begin gwe[0] = 1'b1; gwaddr[0] = 5'd13; gwdata[0] = t_gpr[13] + 16; end
      I_DEC: begin gwe[0] = 1'b1; gwaddr[0] = 5'd11; gwdata[0] = t_gpr[11] - 1; end
      I_BNEZ, I_FILL: ;
      default: ;
    endcase
  endtask

  // One cycle of the machine: maybe a bubble, else one instruction.
  task automatic cycle_with(input bit do_commit, input itype_e it, input longint unsigned ipc);
    if (do_commit) exec(it, ipc);
    else begin ev = '0; inc = '0; gwe = '0; end
    // L1 request queues and L1.5 acknowledge.
    if (l1_busy_left != 0) l1_busy_left--;
    l1_empty = (l1_busy_left == 0) && ($urandom_range(0, 9) != 0);
    #1;
    l15_ack = l15_val && ($urandom_range(0, heavy ? 3 : 1) == 0);
    tick();
    // Register writes land at the edge.
    for (int p = 0; p < 2; p++) if (gwe[p] && gwaddr[p] != 0) t_gpr[gwaddr[p]] = gwdata[p];
  endtask

  initial begin
    longint unsigned iters, stores, samples1, instr2, samples2, spc;
    ev = '0; inc = '0; pc = '0; tim = 64'd5000; csr_addr = '0; csr_we = 1'b0; csr_wdata = '0;
    graddr = '0; gwaddr = '0; gwdata = '0; gwe = '0; l1_empty = 1'b1; l15_ack = 1'b0;
    heavy = 0; cfg_now = '0;
    for (int i = 0; i < NUM_CNT; i++) t_cnt[i] = 0;
    for (int r = 0; r < 32; r++) t_gpr[r] = 0;
    for (int i = 0; i < NUM_PROG; i++) t_evsel[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t_cnt[CNT_CYCLE] = 0;   // first tick counts the first cycle after reset

    // ---------------- phase 1: store loop ----------------
    phase = 1;
    base_addr = 64'h8010_0000; wr_ptr = base_addr;
    csr_write(CSR_MHPMEVENT3, EV_STORE);
    csr_write(CSR_MHPMTHRESHOLD0 + 3, 13);
    csr_write(CSR_MHPMMADDR, base_addr);
    // li a0 -> use a1 (x11) as loop counter here; sample a1 and a2.
    gwe = 2'b01; gwaddr[0] = 5'd11; gwdata[0] = 10000; ev = '0; inc = '0;
    tick(); t_gpr[11] = 10000; gwe = '0;
    // cfg: en, store instret and hpm3, GPR slots 0 (x11) and 1 (x12).
    csr_write(CSR_MHPMEBSCFG, (64'd1 << 63) | (64'd12 << 25) | (64'd11 << 20) | (64'b0011 << 16) | 64'b1100);
    check(csr_hit && csr_rdata == cfg_now, "mhpmebscfg readback through top");
    iters = 0; stores = 0; samples1 = 0;
    while (t_gpr[11] != 0) begin
      for (int k = 0; k < 6; k++) begin
        itype_e it;
        it = (k < 4) ? I_ST : (k == 4) ? I_DEC : I_BNEZ;
        while ($urandom_range(0, 3) == 0) cycle_with(0, I_FILL, 0);
        spc = 64'h8000_0100 + 64'(k) * 4;
        if (it == I_ST) stores++;
        cycle_with(1, it, spc);
      end
      iters++;
    end
    // Drain.
    repeat (100) cycle_with(0, I_FILL, 0);
    samples1 = n_trig;
    check(per_store[0] + per_store[1] + per_store[2] + per_store[3] == samples1, "phase 1: every sample PC is a store");
    check(samples1 == stores / 13, $sformatf("phase 1: %0d samples for %0d stores (100%% accuracy)", samples1, stores));
    check(n_delayed == 0, "phase 1: no delayed samples");
    check(exp_words.size() == 0, "phase 1: all sample words reached memory");
    check(moff == 64'(samples1) * 5 * 8, "phase 1: maddr_offset");
    for (int s = 0; s < 4; s++)
      check(per_store[s] * 4 >= samples1 - 4 && per_store[s] * 4 <= samples1 + 4,
            $sformatf("store S%0d owns a quarter of the samples (%0d of %0d)", s + 1, per_store[s], samples1));
    $display("phase 1: iterations=%0d stores=%0d samples=%0d per store=%0d/%0d/%0d/%0d",
             iters, stores, samples1, per_store[0], per_store[1], per_store[2], per_store[3]);

    // ---------------- phase 2: heavy load, fine-grained sampling ----------------
    phase = 2;
    csr_write(CSR_MHPMEBSCFG, 0);
    csr_write(CSR_MHPMTHRESHOLD0 + 3, 0);
    csr_write(CSR_MHPMEVENT3 + 1, EV_LOAD);
    csr_write(CSR_MHPMEVENT3 + 2, EV_LD_MISS);
    base_addr = 64'h8020_0000;
    csr_write(CSR_MHPMMADDR, base_addr);
    wr_ptr = base_addr;
    check(moff == 0, "pointer restarted by mhpmmaddr write");
    if (moff == 0) n_restart++;
    csr_write(CSR_MHPMTHRESHOLD0 + CNT_INSTRET, 16);
    gwe = 2'b01; gwaddr[0] = 5'd11; gwdata[0] = 2000; ev = '0; inc = '0;
    tick(); t_gpr[11] = 2000; gwe = '0;
    // All counters, all four GPR slots: x11, x13, x14, x12.
    csr_write(CSR_MHPMEBSCFG, (64'd1 << 63) | (64'd12 << 35) | (64'd14 << 30) | (64'd13 << 25) |
                              (64'd11 << 20) | (64'hF << 16) | 64'h1FF);
    heavy = 1;
    n_trig = 0;
    instr2 = 0;
    while (t_gpr[11] != 0) begin
      for (int k = 0; k < 4; k++) begin
        itype_e it;
        it = (k == 0) ? I_LD : (k == 1) ? I_PTR : (k == 2) ? I_DEC : I_BNEZ;
        if ($urandom_range(0, 7) == 0) cycle_with(0, I_FILL, 0);
        instr2++;
        cycle_with(1, it, 64'h8000_0200 + 64'(k) * 4);
      end
    end
    heavy = 0;
    repeat (200) cycle_with(0, I_FILL, 0);
    samples2 = n_trig;
    check(exp_words.size() == 0, "phase 2: every captured sample reached memory");
    check(words_seen == samples1 * 5 + samples2 * 14, "phase 2: word count");
    check(samples2 < instr2 / 16, "phase 2: contention cost samples");
    check(samples2 + n_lost == n_marks, "phase 2: every mark is a sample or merged into one");
    check(samples2 > instr2 / 16 / 4, "phase 2: sampling kept going");
    $display("phase 2: instructions=%0d intervals=%0d samples=%0d (%0d.%0d%%)", instr2, instr2 / 16,
             samples2, samples2 * 100 / (instr2 / 16), (samples2 * 1000 / (instr2 / 16)) % 10);

    // ---------------- phase 3: disabled ----------------
    phase = 3;
    csr_write(CSR_MHPMEBSCFG, 64'h1FF);
    for (int n = 0; n < 500; n++) cycle_with(1, I_ST, 64'h8000_0300);
    check(n_trig == samples2, "phase 3: no samples while disabled");

    // ---------------- mechanisms ----------------
    check(n_trig > 0, "triggers");
    check(n_delayed > 0, "delayed triggers");
    check(n_b2b > 0, "back-to-back captures");
    check(n_full > 0, "store buffer full");
    check(n_stall > 0, "walk stalled on full buffer");
    check(n_hold > 0, "requests held for busy L1 queues");
    check(n_restart > 0, "pointer restart");
    check(n_disabled > 0, "events while disabled");
    check(n_walk14 > 0, "clean 14-cycle walks");
    check(n_lost > 0, "marks merged into a waiting trigger");
    $display("mechanisms: lost=%0d delayed=%0d back-to-back=%0d sb_full=%0d stall=%0d l1_hold=%0d restart=%0d disabled=%0d walk14=%0d",
             n_lost, n_delayed, n_b2b, n_full, n_stall, n_hold, n_restart, n_disabled, n_walk14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
