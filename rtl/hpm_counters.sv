// hpm_counters: the hardware performance monitor counters that the sampling
// extension builds on.
//
// Holds mcycle, minstret and NUM_PROG programmable counters
// (mhpmcounter3..), each programmable counter counting the event line chosen
// by its mhpmevent register (0 selects nothing), plus mcountinhibit. The
// time value is supplied from outside and shown at counter index 1 so that
// all counters share one index space (see rvebs_pkg).
//
// Besides the present value of every counter, the module outputs the value
// each counter takes at the next clock edge (cnt_next_o), including a
// software write in this cycle. The trigger logic compares against that value
// so that a sample is taken in the same cycle as the event that completes an
// interval, which keeps PC attribution exact. cnt_wr_o pulses for a counter
// written by software in this cycle.
//
// CSR port: single-cycle, csr_we_i writes csr_wdata_i to csr_addr_i;
// csr_rdata_o/csr_hit_o answer combinationally for csr_addr_i.
//
// Following the document: six programmable counters next to mcycle and
// minstret, counting continuously. This design's choices: the width of the
// event vector, one event per line per cycle, up to NR_COMMIT retirements
// per cycle, all counters reset to zero.
module hpm_counters
  import rvebs_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 32,
  parameter int unsigned NR_COMMIT  = 2,
  localparam int unsigned EVW = $clog2(NUM_EVENTS),
  localparam int unsigned IRW = $clog2(NR_COMMIT + 1)
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic [NUM_EVENTS-1:0] event_i,
  input  logic [IRW-1:0]        instret_inc_i,
  input  logic [XLEN-1:0]       time_i,
  input  logic [11:0]           csr_addr_i,
  input  logic                  csr_we_i,
  input  logic [XLEN-1:0]       csr_wdata_i,
  output logic [XLEN-1:0]       csr_rdata_o,
  output logic                  csr_hit_o,
  output cnt_t [NUM_CNT-1:0]    cnt_o,
  output cnt_t [NUM_CNT-1:0]    cnt_next_o,
  output logic [NUM_CNT-1:0]    cnt_wr_o
);

  cnt_t [NUM_CNT-1:0]        cnt_q;
  cnt_t [NUM_CNT-1:0]        cnt_d;
  logic [NUM_PROG-1:0][EVW-1:0] event_sel_q;
  logic [NUM_CNT-1:0]        inhibit_q;

  always_comb begin
    cnt_d    = cnt_q;
    cnt_wr_o = '0;
    // Counting.
    if (!inhibit_q[CNT_CYCLE])   cnt_d[CNT_CYCLE]   = cnt_q[CNT_CYCLE] + 1'b1;
    if (!inhibit_q[CNT_INSTRET]) cnt_d[CNT_INSTRET] = cnt_q[CNT_INSTRET] + XLEN'(instret_inc_i);
    for (int unsigned i = 0; i < NUM_PROG; i++) begin
      if (!inhibit_q[3+i] && event_sel_q[i] != '0 && event_i[event_sel_q[i]])
        cnt_d[3+i] = cnt_q[3+i] + 1'b1;
    end
    // A software write takes precedence over counting.
    if (csr_we_i) begin
      if (csr_addr_i == CSR_MCYCLE) begin
        cnt_d[CNT_CYCLE]    = csr_wdata_i;
        cnt_wr_o[CNT_CYCLE] = 1'b1;
      end
      if (csr_addr_i == CSR_MINSTRET) begin
        cnt_d[CNT_INSTRET]    = csr_wdata_i;
        cnt_wr_o[CNT_INSTRET] = 1'b1;
      end
      for (int unsigned i = 0; i < NUM_PROG; i++) begin
        if (csr_addr_i == CSR_MHPMCOUNTER3 + 12'(i)) begin
          cnt_d[3+i]    = csr_wdata_i;
          cnt_wr_o[3+i] = 1'b1;
        end
      end
    end
    cnt_d[CNT_TIME] = time_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q       <= '0;
      event_sel_q <= '0;
      inhibit_q   <= '0;
    end else begin
      cnt_q <= cnt_d;
      if (csr_we_i) begin
        if (csr_addr_i == CSR_MCOUNTINHIBIT) begin
          inhibit_q <= csr_wdata_i[NUM_CNT-1:0];
          inhibit_q[CNT_TIME] <= 1'b0;
        end
        for (int unsigned i = 0; i < NUM_PROG; i++)
          if (csr_addr_i == CSR_MHPMEVENT3 + 12'(i)) event_sel_q[i] <= csr_wdata_i[EVW-1:0];
      end
    end
  end

  always_comb begin
    cnt_o       = cnt_q;
    cnt_o[CNT_TIME] = time_i;
    cnt_next_o  = cnt_d;
    csr_rdata_o = '0;
    csr_hit_o   = 1'b0;
    if (csr_addr_i == CSR_MCOUNTINHIBIT) begin
      csr_rdata_o = XLEN'(inhibit_q);
      csr_hit_o   = 1'b1;
    end
    if (csr_addr_i == CSR_MCYCLE) begin
      csr_rdata_o = cnt_q[CNT_CYCLE];
      csr_hit_o   = 1'b1;
    end
    if (csr_addr_i == CSR_MINSTRET) begin
      csr_rdata_o = cnt_q[CNT_INSTRET];
      csr_hit_o   = 1'b1;
    end
    for (int unsigned i = 0; i < NUM_PROG; i++) begin
      if (csr_addr_i == CSR_MHPMCOUNTER3 + 12'(i)) begin
        csr_rdata_o = cnt_q[3+i];
        csr_hit_o   = 1'b1;
      end
      if (csr_addr_i == CSR_MHPMEVENT3 + 12'(i)) begin
        csr_rdata_o = XLEN'(event_sel_q[i]);
        csr_hit_o   = 1'b1;
      end
    end
  end

endmodule
