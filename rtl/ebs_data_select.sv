// ebs_data_select: the Data Selection Logic that moves a captured sample
// from the Sample Regfile to the store buffer.
//
// Starting the cycle after a capture it walks the Sample Regfile one slot
// per cycle, slot 0 to slot SAMPLE_REGS-1. A slot is stored if it is the PC
// (always) or if its counter / GPR select bit in mhpmebscfg is set; an
// unselected slot just takes its cycle. A stored slot is offered to the
// store buffer as {address, data} with st_valid_o; the walk waits on that
// slot until st_ready_i (the buffer is full otherwise). The address is
// mhpmmaddr + maddr_offset, and maddr_offset grows by 8 bytes for every
// accepted word. A full walk takes SAMPLE_REGS cycles when the buffer never
// fills. The walk never stalls the core; while it runs, new captures are
// held off (capture_ok_o = 0), except in the cycle the last slot completes,
// so back-to-back samples can start every SAMPLE_REGS cycles.
//
// Following the document: one register per cycle, PC always stored, 8-byte
// steps of maddr_offset, stop while the buffer is full. This design's
// choices: maddr_offset restarts at zero when mhpmmaddr is written and is
// otherwise unbounded; the live mhpmebscfg is consulted during the walk.
module ebs_data_select
  import rvebs_pkg::*;
#(
  localparam int unsigned IW = $clog2(SAMPLE_REGS)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            capture_i,
  output logic            capture_ok_o,
  input  ebscfg_t         cfg_i,
  input  logic [XLEN-1:0] maddr_i,
  input  logic            maddr_wr_i,
  output logic [IW-1:0]   rd_idx_o,
  input  logic [XLEN-1:0] rd_data_i,
  output logic            st_valid_o,
  output ebs_store_t      st_o,
  input  logic            st_ready_i,
  output logic            busy_o,
  output logic            stall_o,
  output logic            sample_done_o,
  output logic [XLEN-1:0] maddr_offset_o
);

  logic            busy_q;
  logic [IW-1:0]   idx_q;
  logic [XLEN-1:0] offset_q;
  logic            sel, last, advance;

  always_comb begin
    sel = 1'b0;
    if (32'(idx_q) == SLOT_PC)
      sel = 1'b1;
    else if (32'(idx_q) < SLOT_GPR0)
      sel = cfg_i.cnt_en[32'(idx_q) - SLOT_CNT0];
    else if (32'(idx_q) < SAMPLE_REGS)
      sel = cfg_i.gpr_en[32'(idx_q) - SLOT_GPR0];
    last          = (32'(idx_q) == SAMPLE_REGS - 1);
    st_valid_o    = busy_q && sel;
    advance       = busy_q && (!sel || st_ready_i);
    capture_ok_o  = !busy_q || (last && advance);
    stall_o       = st_valid_o && !st_ready_i;
    sample_done_o = last && advance;
  end

  assign rd_idx_o       = idx_q;
  assign st_o.addr      = maddr_i + offset_q;
  assign st_o.data      = rd_data_i;
  assign busy_o         = busy_q;
  assign maddr_offset_o = offset_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q   <= 1'b0;
      idx_q    <= '0;
      offset_q <= '0;
    end else begin
      if (capture_i) begin
        busy_q <= 1'b1;
        idx_q  <= '0;
      end else if (advance) begin
        if (last) busy_q <= 1'b0;
        else      idx_q  <= idx_q + 1'b1;
      end
      if (maddr_wr_i)                   offset_q <= '0;
      else if (st_valid_o && st_ready_i) offset_q <= offset_q + XLEN'(SAMPLE_WORD_BYTES);
    end
  end

  // A capture is only accepted when the previous walk is over.
  a_capture_ok : assert property (@(posedge clk_i) disable iff (!rst_ni)
    capture_i |-> capture_ok_o);
  // A word offered to the buffer stays put until it is taken.
  a_hold : assert property (@(posedge clk_i) disable iff (!rst_ni)
    st_valid_o && !st_ready_i && !maddr_wr_i |=> st_valid_o && $stable(st_o));

endmodule
