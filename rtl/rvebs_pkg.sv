// rvebs_pkg: shared constants and types of the RISC-V event-based sampling
// (EBS) extension.
//
// Counter index space. Counters are numbered as in the RISC-V counter CSRs
// (mcountinhibit / mcounteren bit positions): 0 = cycle, 1 = time,
// 2 = instret, 3..8 = the six programmable mhpmcounters. The same index is
// used for the per-counter thresholds, the trigger offsets and the counter
// select bits of mhpmebscfg.
//
// Sample Regfile slot map (14 x 64-bit registers, one sample):
//   slot 0      : PC of the instruction committing in the trigger cycle
//   slots 1..9  : counter values 0..8
//   slots 10..13: the four GPRs named by the ADDRx fields of mhpmebscfg
// The document fixes the register count (14), the PC, "all the counter
// values" and four GPRs; the order of slots and the inclusion of the time
// counter as the ninth counter (making the count come to 14) are this
// design's reading.
//
// CSR addresses of the new registers are this design's choice, placed in the
// custom machine-level read/write range 0x7C0-0x7FF, as the document asks
// only that they live in the machine-level address range.
package rvebs_pkg;

  localparam int unsigned XLEN           = 64;
  localparam int unsigned NUM_PROG       = 6;
  localparam int unsigned NUM_CNT        = 3 + NUM_PROG;
  localparam int unsigned NUM_SAMPLE_GPR = 4;
  localparam int unsigned SAMPLE_REGS    = 1 + NUM_CNT + NUM_SAMPLE_GPR;

  localparam int unsigned CNT_CYCLE   = 0;
  localparam int unsigned CNT_TIME    = 1;
  localparam int unsigned CNT_INSTRET = 2;

  localparam int unsigned SLOT_PC   = 0;
  localparam int unsigned SLOT_CNT0 = 1;
  localparam int unsigned SLOT_GPR0 = SLOT_CNT0 + NUM_CNT;

  // Bytes written to memory per sampled register.
  localparam int unsigned SAMPLE_WORD_BYTES = 8;

  // Standard machine-level HPM CSRs.
  localparam logic [11:0] CSR_MCOUNTINHIBIT = 12'h320;
  localparam logic [11:0] CSR_MHPMEVENT3    = 12'h323;
  localparam logic [11:0] CSR_MCYCLE        = 12'hB00;
  localparam logic [11:0] CSR_MINSTRET      = 12'hB02;
  localparam logic [11:0] CSR_MHPMCOUNTER3  = 12'hB03;

  // New EBS CSRs. mhpmthreshold<i> lives at CSR_MHPMTHRESHOLD0 + i for
  // counter index i (i = 1, time, is read-only zero).
  localparam logic [11:0] CSR_MHPMTHRESHOLD0 = 12'h7C0;
  localparam logic [11:0] CSR_MHPMMADDR      = 12'h7C9;
  localparam logic [11:0] CSR_MHPMEBSCFG     = 12'h7CA;

  // mhpmebscfg layout (64 bits):
  //   [8:0]   cnt_en   : store counter i in each sample
  //   [15:9]  reserved
  //   [19:16] gpr_en   : store GPR slot j in each sample
  //   [39:20] gpr_addr : ADDR0..ADDR3, 5 bits each, ADDR0 lowest
  //   [62:40] reserved
  //   [63]    en       : global EBS enable
  typedef struct packed {
    logic                                en;
    logic [22:0]                         rsvd_hi;
    logic [NUM_SAMPLE_GPR-1:0][4:0]      gpr_addr;
    logic [NUM_SAMPLE_GPR-1:0]           gpr_en;
    logic [6:0]                          rsvd_lo;
    logic [NUM_CNT-1:0]                  cnt_en;
  } ebscfg_t;

  // Writable bits of mhpmebscfg; reserved fields read as zero.
  localparam logic [63:0] EBSCFG_WMASK = 64'h8000_00FF_FFFF_01FF;

  // One sampled word on its way to memory.
  typedef struct packed {
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] data;
  } ebs_store_t;

  typedef logic [XLEN-1:0] cnt_t;

endpackage
