// tb_ebs_data_select: self-checking test of the Data Selection Logic.
// A small model of the Sample Regfile answers the read index with a value
// that encodes sample number and slot; the store side accepts words with a
// random ready. Checks, for random mhpmebscfg selections, that exactly the
// PC plus the selected slots are sent, in slot order, at mhpmmaddr plus a
// pointer that grows by 8 per accepted word; that a sample walk takes 14
// cycles when ready is always high; that the walk waits while ready is low;
// that a new capture is only allowed at the end of a walk; and that writing
// mhpmmaddr restarts the pointer.
module tb_ebs_data_select;
  import rvebs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cap, cap_ok, maddr_wr, st_valid, st_ready, busy, stall, done;
  ebscfg_t cfg;
  logic [63:0] maddr, rd_data, moff;
  logic [3:0]  rd_idx;
  ebs_store_t  st;
  int checks = 0, failures = 0;
  int sample_no = 0, n_stall = 0;
  longint unsigned exp_addr;
  int exp_q [$];

  ebs_data_select dut (.clk_i(clk), .rst_ni(rst_n), .capture_i(cap), .capture_ok_o(cap_ok),
    .cfg_i(cfg), .maddr_i(maddr), .maddr_wr_i(maddr_wr), .rd_idx_o(rd_idx), .rd_data_i(rd_data),
    .st_valid_o(st_valid), .st_o(st), .st_ready_i(st_ready), .busy_o(busy), .stall_o(stall),
    .sample_done_o(done), .maddr_offset_o(moff));

  // Sample Regfile model: value = sample number * 256 + slot.
  assign rd_data = 64'(sample_no) * 256 + 64'(rd_idx);

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

  // Run one sample walk and check it. full_rate: ready always high.
  task automatic walk(input bit full_rate);
    int cycles = 0;
    logic [63:0] v;
    v = {$urandom, $urandom};
    cfg = ebscfg_t'(v & 64'h8000_00FF_FFFF_01FF);
    exp_q.delete();
    exp_q.push_back(0);
    for (int i = 0; i < NUM_CNT; i++) if (cfg.cnt_en[i]) exp_q.push_back(1 + i);
    for (int j = 0; j < NUM_SAMPLE_GPR; j++) if (cfg.gpr_en[j]) exp_q.push_back(1 + NUM_CNT + j);
    check(cap_ok && !busy, "capture allowed when idle");
    cap = 1'b1;
    @(posedge clk); #1;
    cap = 1'b0;
    sample_no++;
    while (busy) begin
      st_ready = full_rate ? 1'b1 : ($urandom_range(0, 2) == 0);
      #1;
      if (stall) n_stall++;
      check(!cap_ok || done, "no capture while walking");
      if (st_valid && st_ready) begin
        int slot;
        slot = (exp_q.size() != 0) ? exp_q.pop_front() : -1;
        check(st.data == 64'(sample_no) * 256 + 64'(slot), $sformatf("word data slot %0d", slot));
        check(st.addr == exp_addr, "word address");
        exp_addr += 8;
      end
      cycles++;
      @(posedge clk); #1;
    end
    check(exp_q.size() == 0, "all selected words sent");
    check(moff == exp_addr - maddr, "maddr_offset counts bytes");
    if (full_rate) check(cycles == SAMPLE_REGS, $sformatf("walk takes %0d cycles (got %0d)", SAMPLE_REGS, cycles));
  endtask

  initial begin
    cap = 1'b0; maddr_wr = 1'b0; st_ready = 1'b1; cfg = '0;
    maddr = 64'h8000_1000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    exp_addr = maddr;
    for (int s = 0; s < 40; s++) walk(1'b1);
    for (int s = 0; s < 100; s++) walk(1'b0);
    // Restart the pointer at a new base.
    maddr = 64'h9000_0000; maddr_wr = 1'b1;
    @(posedge clk); #1; maddr_wr = 1'b0;
    check(moff == 0, "pointer restarts on mhpmmaddr write");
    exp_addr = maddr;
    for (int s = 0; s < 10; s++) walk(1'b0);
    // Back-to-back: capture again in the cycle the last slot completes.
    cfg = ebscfg_t'(64'h8000_0000_0000_0000);
    st_ready = 1'b1;
    cap = 1'b1; @(posedge clk); #1; cap = 1'b0;
    sample_no++;
    begin
      int cyc = 0, caps = 1;
      exp_addr = maddr + moff;
      while (caps < 4 || busy) begin
        cap = done && caps < 4;
        #1;
        if (cap) begin caps++; check(cap_ok, "back-to-back capture allowed at end of walk"); end
        cyc++;
        @(posedge clk); #1;
        cap = 1'b0;
      end
      check(cyc == 4 * SAMPLE_REGS, $sformatf("4 back-to-back walks in %0d cycles (got %0d)", 4 * SAMPLE_REGS, cyc));
    end
    check(n_stall > 20, "buffer-full stalls happened");
    $display("stalls=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
