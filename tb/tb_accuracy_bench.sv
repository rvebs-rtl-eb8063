// tb_accuracy_bench: sampling accuracy of the full system on a simplified
// Accuracy-Bench loop nest, at the default parameters.
//
// The testbench plays a core running
//     loop1 (OUTER times):  loop0 (INNER times):
//         ld a2,0(a3); addi a3,a3,16; (R-4) filler addi; addi a1,a1,-1; bnez
//         ... addi a4,a4,-1; bnez
// so one instruction in R of loop0 is a load, and every load touches a new
// 16-byte line (an L1 data miss that keeps the L1 request queues busy for a
// few cycles). One instruction commits per cycle.
//
// Accuracy of a counter = samples it triggered / floor(events / interval).
// Runs:
//   A. R = 20, 40, 60, 80, 100 (OUTER 100, INNER 1000): minstret every
//      10000 instructions and L1D misses every 10000; for R = 20 also L1D
//      misses every 10, 100, 1000 and 100000 on further counters (the
//      sampling-rate sweep). All must reach 100 %.
//   B. R = 4, minstret every 16; and R = 20, minstret every 10. Marks come
//      faster than a sample can be stored, so samples are delayed and the
//      accuracy must drop below 100 %.
// In every run each sample's words in memory (PC and all nine counters)
// are checked against the testbench's own counts.
module tb_accuracy_bench;
  import rvebs_pkg::*;

  localparam int unsigned EV_LD_MISS = 2;
  localparam int unsigned EV_LOAD    = 5;
  localparam int unsigned MISS_BUSY  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ev;
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
    repeat (80000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned t_cnt [NUM_CNT];
  int unsigned     t_evsel [NUM_PROG];
  longint unsigned thr [NUM_CNT];
  longint unsigned n_src [NUM_CNT];
  longint unsigned exp_words [$];
  longint unsigned wr_ptr;
  int unsigned     l1_busy_left;
  int              n_delayed;

  task automatic tick();
    t_cnt[CNT_CYCLE] += 1;
    t_cnt[CNT_INSTRET] += inc;
    for (int i = 0; i < NUM_PROG; i++)
      if (t_evsel[i] != 0 && ev[t_evsel[i]]) t_cnt[3+i] += 1;
    t_cnt[CNT_TIME] = tim;
    if (l1_busy_left != 0) l1_busy_left--;
    l1_empty = (l1_busy_left == 0);
    #1;
    l15_ack = l15_val && ($urandom_range(0, 1) == 0);
    if (pend && !trig) n_delayed++;
    if (trig) begin
      for (int i = 0; i < NUM_CNT; i++) if (src[i]) n_src[i]++;
      exp_words.push_back(pc);
      for (int i = 0; i < NUM_CNT; i++) exp_words.push_back(t_cnt[i]);
    end
    if (l15_val && l15_ack) begin
      longint unsigned w;
      w = (exp_words.size() != 0) ? exp_words.pop_front() : 64'hBAD;
      check(l15_data == w && l15_addr == wr_ptr, "sample word in memory");
      wr_ptr += 8;
    end
    @(posedge clk);
    #1;
    tim += 1;
  endtask

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    csr_addr = a; csr_we = 1'b1; csr_wdata = d;
    ev = '0; inc = '0;
    for (int i = 0; i < NUM_PROG; i++) if (a == CSR_MHPMEVENT3 + 12'(i)) t_evsel[i] = int'(d);
    tick();
    csr_we = 1'b0;
  endtask

  task automatic instr(input bit is_load, input longint unsigned ipc);
    ev = '0; inc = 2'd1; pc = ipc;
    if (is_load) begin
      ev[EV_LOAD] = 1'b1;
      ev[EV_LD_MISS] = 1'b1;
      l1_busy_left = MISS_BUSY + 1;
    end
    tick();
  endtask

  // One run. thr_in[i] = 0 leaves counter i unsampled; evsel_in = event
  // line of each programmable counter. Returns nothing; prints accuracy
  // per sampled counter and checks it (full = 1: must be 100 %).
  task automatic run(input string name, input int r, input int outer, input int inner,
                     input longint unsigned thr_in [NUM_CNT], input int unsigned evsel_in [NUM_PROG],
                     input bit full);
    longint unsigned base;
    rst_n = 1'b0;
    ev = '0; inc = '0; pc = '0; csr_we = 1'b0; csr_addr = '0; csr_wdata = '0;
    gwe = '0; graddr = '0; gwaddr = '0; gwdata = '0; l1_empty = 1'b1; l15_ack = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NUM_CNT; i++) begin t_cnt[i] = 0; n_src[i] = 0; thr[i] = thr_in[i]; end
    for (int i = 0; i < NUM_PROG; i++) t_evsel[i] = 0;
    exp_words.delete();
    l1_busy_left = 0; n_delayed = 0;
    base = 64'h8100_0000;
    wr_ptr = base;
    for (int i = 0; i < NUM_PROG; i++) csr_write(CSR_MHPMEVENT3 + 12'(i), 64'(evsel_in[i]));
    for (int i = 0; i < NUM_CNT; i++) if (thr[i] != 0) csr_write(CSR_MHPMTHRESHOLD0 + 12'(i), thr[i]);
    csr_write(CSR_MHPMMADDR, base);
    // Clear the counters that will be judged, then enable.
    csr_write(CSR_MINSTRET, 0);
    for (int i = 0; i < NUM_PROG; i++) csr_write(CSR_MHPMCOUNTER3 + 12'(i), 0);
    for (int i = 0; i < NUM_PROG; i++) t_cnt[3+i] = 0;
    t_cnt[CNT_INSTRET] = 0;
    csr_write(CSR_MHPMEBSCFG, (64'd1 << 63) | 64'h1FF);
    // Events are counted from here; snapshot the starting values.
    begin
      longint unsigned start [NUM_CNT];
      for (int i = 0; i < NUM_CNT; i++) start[i] = t_cnt[i];
      for (int o = 0; o < outer; o++) begin
        for (int n = 0; n < inner; n++) begin
          instr(1, 64'h8000_0400);                       // ld
          for (int k = 1; k < r; k++) instr(0, 64'h8000_0400 + 64'(k) * 4);
        end
        instr(0, 64'h8000_0800);                         // addi a4
        instr(0, 64'h8000_0804);                         // bnez
      end
      ev = '0; inc = '0;
      repeat (400) tick();
      check(exp_words.size() == 0, {name, ": every sample reached memory"});
      for (int i = 0; i < NUM_CNT; i++) begin
        if (thr[i] != 0) begin
          longint unsigned events, truth;
          events = t_cnt[i] - start[i];
          truth  = events / thr[i];
          $display("%s: counter %0d interval %0d events %0d expected %0d samples %0d accuracy %0d.%0d%% (delayed cycles %0d)",
                   name, i, thr[i], events, truth, n_src[i],
                   truth == 0 ? 0 : n_src[i] * 100 / truth, truth == 0 ? 0 : (n_src[i] * 1000 / truth) % 10,
                   n_delayed);
          if (full) check(n_src[i] == truth, $sformatf("%s: counter %0d at 100%%", name, i));
          else      check(n_src[i] < truth && n_src[i] > 0, $sformatf("%s: counter %0d below 100%%", name, i));
        end
      end
    end
  endtask

  initial begin
    longint unsigned th [NUM_CNT];
    int unsigned     es [NUM_PROG];
    tim = 0;
    // A: accuracy over load ratios, and the sampling-rate sweep at 1/20.
    for (int ri = 0; ri < 5; ri++) begin
      int r;
      r = 20 * (ri + 1);
      for (int i = 0; i < NUM_CNT; i++) th[i] = 0;
      for (int i = 0; i < NUM_PROG; i++) es[i] = 0;
      th[CNT_INSTRET] = 10000;
      es[0] = EV_LD_MISS; th[3] = 10000;
      if (r == 20) begin
        es[1] = EV_LD_MISS; th[4] = 10;
        es[2] = EV_LD_MISS; th[5] = 100;
        es[3] = EV_LD_MISS; th[6] = 1000;
        es[4] = EV_LD_MISS; th[7] = 100000;
      end
      run($sformatf("ratio 1/%0d", r), r, 100, 1000, th, es, 1'b1);
    end
    // B: saturation.
    for (int i = 0; i < NUM_CNT; i++) th[i] = 0;
    for (int i = 0; i < NUM_PROG; i++) es[i] = 0;
    th[CNT_INSTRET] = 16;
    run("ratio 1/4, minstret every 16", 4, 10, 1000, th, es, 1'b0);
    th[CNT_INSTRET] = 10;
    run("ratio 1/20, minstret every 10", 20, 10, 100, th, es, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
