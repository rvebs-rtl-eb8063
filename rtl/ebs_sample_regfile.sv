// ebs_sample_regfile: the Sample Regfile, SAMPLE_REGS (14) 64-bit registers
// that freeze the machine state in the cycle a sample is triggered.
//
// On capture_i all registers load at once: slot 0 the commit PC, slots
// 1..NUM_CNT the counter values, the last four slots the GPRs read through
// the extra register-file read ports (slot map in rvebs_pkg). Capturing
// every candidate register, selected or not, keeps the whole sample
// cycle-accurate. The registers hold until the next capture; the Data
// Selection Logic reads them one at a time through rd_idx_i / rd_data_o
// (combinational read) and only allows a new capture once it has walked
// the previous sample.
//
// The register count and capture-all behaviour follow the document; slot
// order and reset to zero are this design's choices.
module ebs_sample_regfile
  import rvebs_pkg::*;
#(
  localparam int unsigned IW = $clog2(SAMPLE_REGS)
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  input  logic                                capture_i,
  input  logic [XLEN-1:0]                     pc_i,
  input  cnt_t [NUM_CNT-1:0]                  cnt_i,
  input  logic [NUM_SAMPLE_GPR-1:0][XLEN-1:0] gpr_i,
  input  logic [IW-1:0]                       rd_idx_i,
  output logic [XLEN-1:0]                     rd_data_o
);

  logic [XLEN-1:0] regs_q [SAMPLE_REGS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int unsigned s = 0; s < SAMPLE_REGS; s++) regs_q[s] <= '0;
    end else if (capture_i) begin
      regs_q[SLOT_PC] <= pc_i;
      for (int unsigned i = 0; i < NUM_CNT; i++)        regs_q[SLOT_CNT0+i] <= cnt_i[i];
      for (int unsigned j = 0; j < NUM_SAMPLE_GPR; j++) regs_q[SLOT_GPR0+j] <= gpr_i[j];
    end
  end

  assign rd_data_o = (32'(rd_idx_i) < SAMPLE_REGS) ? regs_q[rd_idx_i] : '0;

endmodule
