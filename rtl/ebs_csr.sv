// ebs_csr: the control and status registers added for event-based sampling.
//
//   mhpmthreshold<i> (one per counter index i, see rvebs_pkg): sampling
//       interval of counter i in events. Zero means counter i never
//       triggers a sample. Index 1 (time) is read-only zero.
//   mhpmmaddr : physical base address of the sample area in memory.
//   mhpmebscfg: which counters and GPRs each sample holds, the register
//       numbers of the four sampled GPRs and the global enable.
//
// CSR port: single-cycle write on csr_we_i; read data and hit are
// combinational on csr_addr_i. thr_wr_o pulses for a threshold written in
// this cycle and maddr_wr_o for a write of mhpmmaddr, so the trigger offsets
// and the sample write pointer can restart.
//
// The three register kinds follow the document; the addresses, the field
// layout of mhpmebscfg, the zero-disables rule and reset to zero are this
// design's choices.
module ebs_csr
  import rvebs_pkg::*;
(
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic [11:0]         csr_addr_i,
  input  logic                csr_we_i,
  input  logic [XLEN-1:0]     csr_wdata_i,
  output logic [XLEN-1:0]     csr_rdata_o,
  output logic                csr_hit_o,
  output cnt_t [NUM_CNT-1:0]  thr_o,
  output logic [NUM_CNT-1:0]  thr_wr_o,
  output logic [XLEN-1:0]     maddr_o,
  output logic                maddr_wr_o,
  output ebscfg_t             cfg_o
);

  cnt_t [NUM_CNT-1:0] thr_q;
  logic [XLEN-1:0]    maddr_q;
  logic [XLEN-1:0]    cfg_q;

  always_comb begin
    thr_wr_o = '0;
    for (int unsigned i = 0; i < NUM_CNT; i++)
      thr_wr_o[i] = csr_we_i && (csr_addr_i == CSR_MHPMTHRESHOLD0 + 12'(i)) && (i != CNT_TIME);
    maddr_wr_o = csr_we_i && (csr_addr_i == CSR_MHPMMADDR);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      thr_q   <= '0;
      maddr_q <= '0;
      cfg_q   <= '0;
    end else begin
      for (int unsigned i = 0; i < NUM_CNT; i++)
        if (thr_wr_o[i]) thr_q[i] <= csr_wdata_i;
      if (maddr_wr_o) maddr_q <= {csr_wdata_i[XLEN-1:3], 3'b000};
      if (csr_we_i && csr_addr_i == CSR_MHPMEBSCFG) cfg_q <= csr_wdata_i & EBSCFG_WMASK;
    end
  end

  always_comb begin
    csr_rdata_o = '0;
    csr_hit_o   = 1'b0;
    for (int unsigned i = 0; i < NUM_CNT; i++) begin
      if (csr_addr_i == CSR_MHPMTHRESHOLD0 + 12'(i)) begin
        csr_rdata_o = thr_q[i];
        csr_hit_o   = 1'b1;
      end
    end
    if (csr_addr_i == CSR_MHPMMADDR) begin
      csr_rdata_o = maddr_q;
      csr_hit_o   = 1'b1;
    end
    if (csr_addr_i == CSR_MHPMEBSCFG) begin
      csr_rdata_o = cfg_q;
      csr_hit_o   = 1'b1;
    end
  end

  assign thr_o   = thr_q;
  assign maddr_o = maddr_q;
  assign cfg_o   = ebscfg_t'(cfg_q);

endmodule
