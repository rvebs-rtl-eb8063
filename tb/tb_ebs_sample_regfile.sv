// tb_ebs_sample_regfile: self-checking test of the Sample Regfile.
// Captures random PC, counter and GPR values on random cycles, changes the
// inputs between captures, and checks every slot through the read port
// against the values present in the capture cycle.
module tb_ebs_sample_regfile;
  import rvebs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cap;
  logic [63:0] pc, rdata;
  cnt_t [NUM_CNT-1:0] cnt;
  logic [NUM_SAMPLE_GPR-1:0][63:0] gpr;
  logic [3:0] idx;
  logic [63:0] expv [SAMPLE_REGS];
  int checks = 0, failures = 0;

  ebs_sample_regfile dut (.clk_i(clk), .rst_ni(rst_n), .capture_i(cap), .pc_i(pc),
    .cnt_i(cnt), .gpr_i(gpr), .rd_idx_i(idx), .rd_data_o(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic randomize_inputs();
    pc = {$urandom, $urandom};
    for (int i = 0; i < NUM_CNT; i++) cnt[i] = {$urandom, $urandom};
    for (int j = 0; j < NUM_SAMPLE_GPR; j++) gpr[j] = {$urandom, $urandom};
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cap = 1'b0; idx = '0;
    randomize_inputs();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < SAMPLE_REGS; s++) expv[s] = 0;
    for (int n = 0; n < 500; n++) begin
      randomize_inputs();
      cap = ($urandom_range(0, 2) == 0);
      if (cap) begin
        expv[0] = pc;
        for (int i = 0; i < NUM_CNT; i++) expv[1+i] = cnt[i];
        for (int j = 0; j < NUM_SAMPLE_GPR; j++) expv[1+NUM_CNT+j] = gpr[j];
      end
      @(posedge clk); #1;
      cap = 1'b0;
      randomize_inputs();
      for (int s = 0; s < SAMPLE_REGS; s++) begin
        idx = 4'(s); #1;
        check(rdata == expv[s], $sformatf("slot %0d", s));
      end
      idx = 4'd15; #1;
      check(rdata == 0, "out-of-range slot reads zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
