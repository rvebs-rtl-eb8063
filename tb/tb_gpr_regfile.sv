// tb_gpr_regfile: self-checking test of the register file with extra
// sampling read ports. Random writes on both write ports (the higher port
// wins on a clash) against a reference array; every cycle all normal and
// extra read ports are checked, including x0 reading zero.
module tb_gpr_regfile;
  import rvebs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0][4:0]  raddr, waddr;
  logic [1:0][63:0] rdata, wdata;
  logic [1:0]       we;
  logic [3:0][4:0]  eaddr;
  logic [3:0][63:0] edata;
  longint unsigned  refr [32];
  int checks = 0, failures = 0;

  gpr_regfile dut (.clk_i(clk), .rst_ni(rst_n), .raddr_i(raddr), .rdata_o(rdata), .we_i(we),
    .waddr_i(waddr), .wdata_i(wdata), .ebs_raddr_i(eaddr), .ebs_rdata_o(edata));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0; eaddr = '0;
    for (int r = 0; r < 32; r++) refr[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      for (int p = 0; p < 2; p++) begin
        we[p] = $urandom_range(0, 1);
        waddr[p] = 5'($urandom_range(0, 31));
        wdata[p] = {$urandom, $urandom};
        raddr[p] = 5'($urandom_range(0, 31));
      end
      if ($urandom_range(0, 9) == 0) waddr[1] = waddr[0];
      for (int p = 0; p < 4; p++) eaddr[p] = 5'($urandom_range(0, 31));
      #1;
      for (int p = 0; p < 2; p++) check(rdata[p] == refr[raddr[p]], "normal read port");
      for (int p = 0; p < 4; p++) check(edata[p] == refr[eaddr[p]], $sformatf("extra read port %0d", p));
      for (int p = 0; p < 2; p++) if (we[p] && waddr[p] != 0) refr[waddr[p]] = wdata[p];
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
