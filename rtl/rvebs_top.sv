// rvebs_top: event-based sampling (EBS) for a RISC-V core, seen from the
// core's boundary.
//
// The core pipeline itself is outside this module: it reports hardware
// events (event_i), retirements (instret_inc_i) and the committing PC, owns
// the register file ports and issues CSR accesses. Inside are
//   - hpm_counters      : mcycle, minstret, six mhpmcounters;
//   - ebs_csr           : mhpmthreshold<i>, mhpmmaddr, mhpmebscfg;
//   - ebs_trigger       : counter_offset registers and the
//                         counter >= offset + threshold test;
//   - gpr_regfile       : integer register file with four extra read ports
//                         addressed by mhpmebscfg.ADDR0..3;
//   - ebs_sample_regfile: 14 registers frozen in the trigger cycle;
//   - ebs_data_select   : walks the sample one register per cycle and hands
//                         the selected words, with their addresses, to
//   - ebs_store_buffer  : a small FIFO that writes them, non-cacheable, to
//                         the L1.5 cache only when the L1 request queues are
//                         empty.
// Nothing in this path can stall the core: when the store buffer backs up,
// the walk waits and later samples are delayed instead.
//
// Timing: a sample is captured at the clock edge ending the cycle whose
// event completes an interval; the walk starts the next cycle and takes 14
// cycles when the buffer accepts every word; each word then leaves on the
// first cycle with empty L1 queues.
//
// CSR port: one access per cycle; csr_rdata_o/csr_hit_o are combinational
// for csr_addr_i, writes land at the clock edge.
//
// Status outputs: sample_trigger_o pulses in a capture cycle and
// sample_src_o says which counters caused it; sample_pending_o is high
// while a trigger waits for the sampler; sample_lost_o pulses when a mark
// is reached while a trigger is already waiting (the two merge into one
// sample);
// sample_busy_o/sample_stall_o/sample_done_o follow the sample walk;
// sb_full_o/sb_count_o show the store buffer; maddr_offset_o is the byte
// offset of the next sample word from mhpmmaddr.
//
// The split into counting, triggering, sample capture, word-by-word
// selection and a low-priority store buffer follows the document, as do
// the 14-register sample, the four extra register-file read ports and the
// 8-byte word format. Port names, handshakes and the event numbering are
// this design's own.
module rvebs_top
  import rvebs_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 32,
  parameter int unsigned NR_COMMIT  = 2,
  parameter int unsigned SB_DEPTH   = 4,
  parameter int unsigned NR_RPORTS  = 2,
  parameter int unsigned NR_WPORTS  = 2,
  localparam int unsigned IRW  = $clog2(NR_COMMIT + 1),
  localparam int unsigned SBAW = (SB_DEPTH > 1) ? $clog2(SB_DEPTH) : 1
) (
  input  logic                           clk_i,
  input  logic                           rst_ni,
  // Core datapath observation
  input  logic [NUM_EVENTS-1:0]          event_i,
  input  logic [IRW-1:0]                 instret_inc_i,
  input  logic [XLEN-1:0]                commit_pc_i,
  input  logic [XLEN-1:0]                time_i,
  // CSR access
  input  logic [11:0]                    csr_addr_i,
  input  logic                           csr_we_i,
  input  logic [XLEN-1:0]                csr_wdata_i,
  output logic [XLEN-1:0]                csr_rdata_o,
  output logic                           csr_hit_o,
  // Core register file ports
  input  logic [NR_RPORTS-1:0][4:0]      gpr_raddr_i,
  output logic [NR_RPORTS-1:0][XLEN-1:0] gpr_rdata_o,
  input  logic [NR_WPORTS-1:0]           gpr_we_i,
  input  logic [NR_WPORTS-1:0][4:0]      gpr_waddr_i,
  input  logic [NR_WPORTS-1:0][XLEN-1:0] gpr_wdata_i,
  // L1.5 cache adapter side
  input  logic                           l1_queues_empty_i,
  output logic                           l15_val_o,
  output logic [XLEN-1:0]                l15_addr_o,
  output logic [XLEN-1:0]                l15_data_o,
  output logic [2:0]                     l15_size_o,
  output logic                           l15_nc_o,
  input  logic                           l15_ack_i,
  // Status, for observation
  output logic                           sample_trigger_o,
  output logic [NUM_CNT-1:0]             sample_src_o,
  output logic                           sample_pending_o,
  output logic                           sample_lost_o,
  output logic                           sample_busy_o,
  output logic                           sample_stall_o,
  output logic                           sample_done_o,
  output logic                           sb_full_o,
  output logic [SBAW:0]                  sb_count_o,
  output logic [XLEN-1:0]                maddr_offset_o
);

  localparam int unsigned IW = $clog2(SAMPLE_REGS);

  cnt_t [NUM_CNT-1:0] cnt_next, thr;
  logic [NUM_CNT-1:0] cnt_wr, thr_wr;
  logic [XLEN-1:0]    hpm_rdata, ebs_rdata, maddr;
  logic               hpm_hit, ebs_hit, maddr_wr;
  ebscfg_t            cfg;
  logic               capture_ok;
  logic [IW-1:0]      rd_idx;
  logic [XLEN-1:0]    rd_data;
  logic [NUM_SAMPLE_GPR-1:0][XLEN-1:0] ebs_gpr;
  logic               st_valid, st_ready;
  ebs_store_t         st;

  hpm_counters #(
    .NUM_EVENTS (NUM_EVENTS),
    .NR_COMMIT  (NR_COMMIT)
  ) u_hpm (
    .clk_i, .rst_ni, .event_i, .instret_inc_i, .time_i,
    .csr_addr_i, .csr_we_i, .csr_wdata_i,
    .csr_rdata_o (hpm_rdata),
    .csr_hit_o   (hpm_hit),
    .cnt_o       (),
    .cnt_next_o  (cnt_next),
    .cnt_wr_o    (cnt_wr)
  );

  ebs_csr u_csr (
    .clk_i, .rst_ni, .csr_addr_i, .csr_we_i, .csr_wdata_i,
    .csr_rdata_o (ebs_rdata),
    .csr_hit_o   (ebs_hit),
    .thr_o       (thr),
    .thr_wr_o    (thr_wr),
    .maddr_o     (maddr),
    .maddr_wr_o  (maddr_wr),
    .cfg_o       (cfg)
  );

  assign csr_rdata_o = hpm_hit ? hpm_rdata : ebs_rdata;
  assign csr_hit_o   = hpm_hit | ebs_hit;

  ebs_trigger u_trig (
    .clk_i, .rst_ni,
    .en_i         (cfg.en),
    .cnt_next_i   (cnt_next),
    .thr_i        (thr),
    .reload_i     (cnt_wr | thr_wr),
    .capture_ok_i (capture_ok),
    .trigger_o    (sample_trigger_o),
    .trig_mask_o  (sample_src_o),
    .pending_o    (sample_pending_o),
    .lost_o       (sample_lost_o),
    .offset_o     ()
  );

  gpr_regfile #(
    .NR_RPORTS     (NR_RPORTS),
    .NR_WPORTS     (NR_WPORTS),
    .NR_EBS_RPORTS (NUM_SAMPLE_GPR)
  ) u_gpr (
    .clk_i, .rst_ni,
    .raddr_i     (gpr_raddr_i),
    .rdata_o     (gpr_rdata_o),
    .we_i        (gpr_we_i),
    .waddr_i     (gpr_waddr_i),
    .wdata_i     (gpr_wdata_i),
    .ebs_raddr_i (cfg.gpr_addr),
    .ebs_rdata_o (ebs_gpr)
  );

  // The sample holds the counter values that include the triggering event.
  ebs_sample_regfile u_srf (
    .clk_i, .rst_ni,
    .capture_i (sample_trigger_o),
    .pc_i      (commit_pc_i),
    .cnt_i     (cnt_next),
    .gpr_i     (ebs_gpr),
    .rd_idx_i  (rd_idx),
    .rd_data_o (rd_data)
  );

  ebs_data_select u_dsel (
    .clk_i, .rst_ni,
    .capture_i      (sample_trigger_o),
    .capture_ok_o   (capture_ok),
    .cfg_i          (cfg),
    .maddr_i        (maddr),
    .maddr_wr_i     (maddr_wr),
    .rd_idx_o       (rd_idx),
    .rd_data_i      (rd_data),
    .st_valid_o     (st_valid),
    .st_o           (st),
    .st_ready_i     (st_ready),
    .busy_o         (sample_busy_o),
    .stall_o        (sample_stall_o),
    .sample_done_o  (sample_done_o),
    .maddr_offset_o (maddr_offset_o)
  );

  ebs_store_buffer #(
    .DEPTH (SB_DEPTH)
  ) u_sb (
    .clk_i, .rst_ni,
    .push_valid_i      (st_valid),
    .push_i            (st),
    .push_ready_o      (st_ready),
    .l1_queues_empty_i,
    .l15_val_o, .l15_addr_o, .l15_data_o, .l15_size_o, .l15_nc_o,
    .l15_ack_i,
    .count_o           (sb_count_o),
    .full_o            (sb_full_o)
  );

endmodule
