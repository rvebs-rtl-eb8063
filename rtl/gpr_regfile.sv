// gpr_regfile: the core's integer register file (x0..x31, XLEN bits) with
// NR_EBS_RPORTS extra read ports for event-based sampling.
//
// The normal NR_RPORTS read ports and NR_WPORTS write ports serve the
// pipeline as usual: reads are combinational, writes land at the clock edge,
// a higher-numbered write port wins when two write the same register, and
// x0 reads as zero. The extra read ports are addressed by the ADDRx fields
// of mhpmebscfg and are read every cycle, so all four sampled GPRs are
// available to the Sample Regfile in the single trigger cycle.
//
// The four extra read ports follow the document; the number of normal ports
// (2 read, 2 write, as in a dual-commit core) and reset to zero are this
// design's choices.
module gpr_regfile
  import rvebs_pkg::*;
#(
  parameter int unsigned NR_RPORTS     = 2,
  parameter int unsigned NR_WPORTS     = 2,
  parameter int unsigned NR_EBS_RPORTS = NUM_SAMPLE_GPR
) (
  input  logic                               clk_i,
  input  logic                               rst_ni,
  input  logic [NR_RPORTS-1:0][4:0]          raddr_i,
  output logic [NR_RPORTS-1:0][XLEN-1:0]     rdata_o,
  input  logic [NR_WPORTS-1:0]               we_i,
  input  logic [NR_WPORTS-1:0][4:0]          waddr_i,
  input  logic [NR_WPORTS-1:0][XLEN-1:0]     wdata_i,
  input  logic [NR_EBS_RPORTS-1:0][4:0]      ebs_raddr_i,
  output logic [NR_EBS_RPORTS-1:0][XLEN-1:0] ebs_rdata_o
);

  logic [XLEN-1:0] regs_q [32];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned r = 0; r < 32; r++) regs_q[r] <= '0;
    end else begin
      for (int unsigned w = 0; w < NR_WPORTS; w++)
        if (we_i[w] && waddr_i[w] != 5'd0) regs_q[waddr_i[w]] <= wdata_i[w];
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NR_RPORTS; p++)
      rdata_o[p] = (raddr_i[p] == 5'd0) ? '0 : regs_q[raddr_i[p]];
    for (int unsigned p = 0; p < NR_EBS_RPORTS; p++)
      ebs_rdata_o[p] = (ebs_raddr_i[p] == 5'd0) ? '0 : regs_q[ebs_raddr_i[p]];
  end

endmodule
