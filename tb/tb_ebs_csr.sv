// tb_ebs_csr: self-checking test of the EBS CSRs (ebs_csr).
// Writes every threshold, mhpmmaddr and mhpmebscfg with random values and
// checks read-back, the decoded outputs, the write pulses, the read-only
// time threshold, the masked reserved bits of mhpmebscfg and the 8-byte
// alignment of mhpmmaddr.
module tb_ebs_csr;
  import rvebs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] addr;
  logic        we;
  logic [63:0] wdata, rdata, maddr;
  logic        hit, maddr_wr;
  cnt_t [NUM_CNT-1:0] thr;
  logic [NUM_CNT-1:0] thr_wr;
  ebscfg_t     cfg;
  int checks = 0, failures = 0;
  longint unsigned ref_thr [NUM_CNT];

  ebs_csr dut (.clk_i(clk), .rst_ni(rst_n), .csr_addr_i(addr), .csr_we_i(we),
    .csr_wdata_i(wdata), .csr_rdata_o(rdata), .csr_hit_o(hit), .thr_o(thr),
    .thr_wr_o(thr_wr), .maddr_o(maddr), .maddr_wr_o(maddr_wr), .cfg_o(cfg));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    addr = a; we = 1'b1; wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    addr = '0; we = 1'b0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(thr == '0 && maddr == 0 && cfg == '0, "reset values");
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < NUM_CNT; i++) begin
        v = {$urandom, $urandom};
        addr = CSR_MHPMTHRESHOLD0 + 12'(i); we = 1'b1; wdata = v; #1;
        check(thr_wr == ((i == CNT_TIME) ? 9'd0 : 9'(1 << i)), "threshold write pulse");
        @(posedge clk); #1; we = 1'b0;
        ref_thr[i] = (i == CNT_TIME) ? 0 : v;
      end
      for (int i = 0; i < NUM_CNT; i++) begin
        addr = CSR_MHPMTHRESHOLD0 + 12'(i); #1;
        check(rdata == ref_thr[i] && hit && thr[i] == ref_thr[i], $sformatf("threshold %0d readback", i));
      end
      v = {$urandom, $urandom};
      addr = CSR_MHPMMADDR; we = 1'b1; wdata = v; #1;
      check(maddr_wr, "maddr write pulse");
      @(posedge clk); #1; we = 1'b0;
      check(maddr == {v[63:3], 3'b000} && rdata == maddr, "maddr aligned readback");
      v = {$urandom, $urandom};
      csr_write(CSR_MHPMEBSCFG, v);
      addr = CSR_MHPMEBSCFG; #1;
      check(rdata == (v & 64'h8000_00FF_FFFF_01FF), "ebscfg masked readback");
      check(cfg.en == v[63] && cfg.cnt_en == v[8:0] && cfg.gpr_en == v[19:16], "ebscfg fields");
      check(cfg.gpr_addr[0] == v[24:20] && cfg.gpr_addr[3] == v[39:35], "ebscfg ADDR fields");
    end
    addr = 12'hB00; #1;
    check(!hit, "no hit outside EBS CSRs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
