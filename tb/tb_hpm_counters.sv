// tb_hpm_counters: self-checking test of hpm_counters.
// Programs two event selectors, drives random events and retirement counts,
// and compares every counter, the next-value outputs and the CSR reads with
// a reference count kept in the testbench. Also checks mcountinhibit,
// software writes of counters and the write pulses.
module tb_hpm_counters;
  import rvebs_pkg::*;

  localparam int unsigned NUM_EVENTS = 32;
  localparam int unsigned NR_COMMIT  = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_EVENTS-1:0] ev;
  logic [1:0]            inc;
  logic [63:0]           tim;
  logic [11:0]           addr;
  logic                  we;
  logic [63:0]           wdata, rdata;
  logic                  hit;
  cnt_t [NUM_CNT-1:0]    cnt, cnt_next;
  logic [NUM_CNT-1:0]    cnt_wr;

  int checks = 0, failures = 0;
  longint unsigned ref_cnt [NUM_CNT];
  int unsigned sel [NUM_PROG];

  hpm_counters #(.NUM_EVENTS(NUM_EVENTS), .NR_COMMIT(NR_COMMIT)) dut (
    .clk_i(clk), .rst_ni(rst_n), .event_i(ev), .instret_inc_i(inc), .time_i(tim),
    .csr_addr_i(addr), .csr_we_i(we), .csr_wdata_i(wdata), .csr_rdata_o(rdata),
    .csr_hit_o(hit), .cnt_o(cnt), .cnt_next_o(cnt_next), .cnt_wr_o(cnt_wr));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    addr = a; we = 1'b1; wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  longint unsigned rd;
  task automatic csr_read(input logic [11:0] a);
    addr = a; #1;
    rd = rdata;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    
    ev = '0; inc = '0; tim = 64'd1000; addr = '0; we = 1'b0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    check(cnt[CNT_CYCLE] == 0 && cnt[CNT_INSTRET] == 0 && cnt[3] == 0, "counters zero after reset");
    // Select events: counter 3 <- line 5, counter 4 <- line 7, counter 8 <- line 31.
    for (int i = 0; i < NUM_PROG; i++) sel[i] = 0;
    sel[0] = 5; sel[1] = 7; sel[5] = 31;
    csr_write(CSR_MHPMEVENT3 + 0, 5);
    csr_write(CSR_MHPMEVENT3 + 1, 7);
    csr_write(CSR_MHPMEVENT3 + 5, 31);
    csr_read(CSR_MHPMEVENT3 + 1); check(rd == 7 && hit, "mhpmevent4 readback");
    // Clear the counters so the reference starts at zero.
    csr_write(CSR_MCYCLE, 0);
    for (int i = 0; i < NUM_CNT; i++) ref_cnt[i] = 0;
    // Random events.
    for (int n = 0; n < 2000; n++) begin
      ev  = {$urandom, 1'b0};
      ev[0] = $urandom_range(0, 1);
      inc = 2'($urandom_range(0, 2));
      tim = tim + 3;

      if (n == 1000) begin
        addr = CSR_MCOUNTINHIBIT; we = 1'b1; wdata = 64'h9;  // inhibit cycle and hpm3
      end else if (n == 1100) begin
        addr = CSR_MCOUNTINHIBIT; we = 1'b1; wdata = 64'h0;
      end else begin
        we = 1'b0; addr = CSR_MHPMCOUNTER3 + 12'($urandom_range(0, 5));
      end
      #1;
      // Next-value outputs against the reference.
      begin
        longint unsigned exp_next [NUM_CNT];
        bit inh;
        inh = (n > 1000 && n <= 1100);
        for (int i = 0; i < NUM_CNT; i++) exp_next[i] = ref_cnt[i];
        if (!inh) exp_next[CNT_CYCLE] = ref_cnt[CNT_CYCLE] + 1;
        exp_next[CNT_INSTRET] = ref_cnt[CNT_INSTRET] + inc;
        for (int i = 0; i < NUM_PROG; i++)
          if (sel[i] != 0 && ev[sel[i]] && !(inh && i == 0)) exp_next[3+i] = ref_cnt[3+i] + 1;
        check(cnt_next[CNT_CYCLE] == exp_next[CNT_CYCLE], $sformatf("mcycle next n=%0d got %0d exp %0d", n, cnt_next[CNT_CYCLE], exp_next[CNT_CYCLE]));
        check(cnt_next[CNT_INSTRET] == exp_next[CNT_INSTRET], "minstret next");
        check(cnt_next[3] == exp_next[3] && cnt_next[4] == exp_next[4] && cnt_next[8] == exp_next[8], "mhpmcounter next");
        check(cnt_next[5] == 0 && cnt_wr == '0, "unselected counter stays, no write pulse");
        check(cnt[CNT_TIME] == tim, "time passes through");
        if (!we) check(rdata == ref_cnt[3 + int'(addr - CSR_MHPMCOUNTER3)] && hit, "counter CSR read");
        for (int i = 0; i < NUM_CNT; i++) ref_cnt[i] = exp_next[i];
      end
      @(posedge clk); #1;
      check(cnt[CNT_CYCLE] == ref_cnt[CNT_CYCLE] && cnt[3] == ref_cnt[3], "registered counters");
    end
    we = 1'b0; ev = '0; inc = '0;
    // Software write of a programmable counter.
    addr = CSR_MHPMCOUNTER3 + 2; we = 1'b1; wdata = 64'h1234_5678_9ABC;
    #1;
    check(cnt_wr == 9'b0_0010_0000 && cnt_next[5] == 64'h1234_5678_9ABC, "counter write pulse and next value");
    @(posedge clk); #1; we = 1'b0;
    csr_read(CSR_MHPMCOUNTER3 + 2); check(rd == 64'h1234_5678_9ABC, "counter write readback");
    csr_write(CSR_MINSTRET, 64'd77);
    csr_read(CSR_MINSTRET); check(rd == 77, "minstret write");
    csr_read(12'h7C0); check(rd == 0 && !hit, "no hit on foreign CSR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
