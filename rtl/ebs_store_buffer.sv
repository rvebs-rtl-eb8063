// ebs_store_buffer: the RVEBS Store Buffer, a small FIFO placed in the L1.5
// cache adapter next to the L1 request queues.
//
// The Data Selection Logic pushes {address, data} words through a
// valid/ready port (push_ready_o is low while the FIFO is full). The head
// word is sent to the L1.5 cache as a non-cacheable 8-byte write, but a
// request is only started in a cycle where the L1 instruction and data
// request queues are empty (l1_queues_empty_i), so sampling traffic never
// competes with the core's own misses. Once started, l15_val_o holds with a
// stable request until l15_ack_i pops the word.
//
// Following the document: a small FIFO in the adapter, non-cacheable
// writes, requests only when the L1 queues are empty. This design's choices:
// DEPTH = 4, the valid/ack request handshake, and that a request already
// presented is held even if the L1 queues refill meanwhile.
module ebs_store_buffer
  import rvebs_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            push_valid_i,
  input  ebs_store_t      push_i,
  output logic            push_ready_o,
  input  logic            l1_queues_empty_i,
  output logic            l15_val_o,
  output logic [XLEN-1:0] l15_addr_o,
  output logic [XLEN-1:0] l15_data_o,
  output logic [2:0]      l15_size_o,
  output logic            l15_nc_o,
  input  logic            l15_ack_i,
  output logic [AW:0]     count_o,
  output logic            full_o
);

  ebs_store_t      mem_q [DEPTH];
  logic [AW-1:0]   rd_q, wr_q;
  logic [AW:0]     cnt_q;
  logic            issued_q;
  logic            push, pop;

  assign full_o       = (32'(cnt_q) == DEPTH);
  assign push_ready_o = !full_o;
  assign push         = push_valid_i && push_ready_o;
  assign l15_val_o    = (cnt_q != '0) && (issued_q || l1_queues_empty_i);
  assign pop          = l15_val_o && l15_ack_i;
  assign l15_addr_o   = mem_q[rd_q].addr;
  assign l15_data_o   = mem_q[rd_q].data;
  assign l15_size_o   = 3'd3;  // 2^3 = 8 bytes
  assign l15_nc_o     = 1'b1;
  assign count_o      = cnt_q;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q     <= '0;
      wr_q     <= '0;
      cnt_q    <= '0;
      issued_q <= 1'b0;
      for (int unsigned i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (push) begin
        mem_q[wr_q] <= push_i;
        wr_q        <= incr(wr_q);
      end
      if (pop) rd_q <= incr(rd_q);
      cnt_q    <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
      issued_q <= l15_val_o && !l15_ack_i;
    end
  end

  a_l15_hold : assert property (@(posedge clk_i) disable iff (!rst_ni)
    l15_val_o && !l15_ack_i |=> l15_val_o && $stable(l15_addr_o) && $stable(l15_data_o));

endmodule
