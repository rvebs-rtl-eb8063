// tb_ebs_store_buffer: self-checking test of the RVEBS Store Buffer.
// Pushes numbered words with random valid, toggles the L1-queues-empty
// input and acknowledges requests with random delay. Checks FIFO order and
// contents, that no request starts while the L1 queues are busy, that a
// started request is held until acknowledged, that the buffer refuses
// pushes when full (and does fill up), and the non-cacheable 8-byte
// request attributes.
module tb_ebs_store_buffer;
  import rvebs_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid, push_ready, l1_empty, val, nc, ack, full;
  ebs_store_t push;
  logic [63:0] a, d;
  logic [2:0]  size;
  logic [2:0]  count;
  int checks = 0, failures = 0;
  int n_full = 0, n_blocked = 0, sent = 0, recv = 0;
  logic prev_val = 1'b0, prev_ack = 1'b0;

  ebs_store_buffer #(.DEPTH(DEPTH)) dut (.clk_i(clk), .rst_ni(rst_n), .push_valid_i(push_valid),
    .push_i(push), .push_ready_o(push_ready), .l1_queues_empty_i(l1_empty), .l15_val_o(val),
    .l15_addr_o(a), .l15_data_o(d), .l15_size_o(size), .l15_nc_o(nc), .l15_ack_i(ack),
    .count_o(count), .full_o(full));

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
    push_valid = 1'b0; push = '0; l1_empty = 1'b1; ack = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      // Phases: long L1-busy stretches to fill the buffer.
      l1_empty   = ((n / 50) % 3 != 0) && ($urandom_range(0, 3) != 0);
      push_valid = (sent < 3000) && ($urandom_range(0, 1) == 0 || (n / 50) % 3 == 0);
      push.addr  = 64'h1000 + 64'(sent) * 8;
      push.data  = {32'hABCD0000, 32'(sent)};
      ack        = val && ($urandom_range(0, 2) == 0);
      #1;
      check(push_ready == !full && full == (count == 3'(DEPTH)), "ready/full/count agree");
      if (full) n_full++;
      if (val) begin
        check(size == 3'd3 && nc, "non-cacheable 8-byte write");
        // A request is new if last cycle had none or last one was acked.
        if (!prev_val || prev_ack) begin
          check(l1_empty, "new request only with empty L1 queues");
        end
        check(a == 64'h1000 + 64'(recv) * 8 && d == {32'hABCD0000, 32'(recv)}, $sformatf("FIFO order word %0d", recv));
        if (ack) recv++;
      end else if (count != 0) begin
        n_blocked++;
        check(!l1_empty, "waits only for busy L1 queues");
      end
      if (push_valid && push_ready) sent++;
      prev_val = val; prev_ack = ack;
      @(posedge clk); #1;
    end
    push_valid = 1'b0; l1_empty = 1'b1;
    repeat (20) begin
      ack = val; #1;
      if (val && ack) recv++;
      @(posedge clk); #1;
    end
    check(recv == sent && count == 0, $sformatf("all words delivered (%0d of %0d)", recv, sent));
    check(n_full > 20, "buffer filled up");
    check(n_blocked > 20, "requests held back by busy L1 queues");
    $display("full=%0d blocked=%0d words=%0d", n_full, n_blocked, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
