// Self-checking testbench of lsq (depth 32, issue width 4): random issue
// groups of 0-4 load/stores in any slot pattern enter while the cache side
// drains at a random rate. Entries must leave oldest first, in slot order
// within a group, unchanged (including the IPC class); enq_ready must be
// high exactly when at least 4 entries are free; the queue must fill and
// stall the issue side at least once.
module tb_lsq;
  import dac_pkg::*;

  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] enq_valid;
  mem_req_t enq [IW];
  logic enq_ready, deq_valid, deq_ready;
  mem_req_t deq;
  logic [$clog2(DEPTH+1)-1:0] count;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0, n_out = 0;
  mem_req_t q [$];

  lsq #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    enq_valid = '0; deq_ready = 0;
    for (int i = 0; i < IW; i++) enq[i] = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      enq_valid = IW'($urandom);
      for (int i = 0; i < IW; i++)
        enq[i] = '{addr: $urandom, wdata: $urandom, be: 4'($urandom), store: 1'($urandom),
                   id: 6'($urandom), ipc: ipc_class_t'($urandom)};
      deq_ready = (t % 2000 < 1000) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      #1;
      chk(enq_ready == (q.size() <= DEPTH - IW), "enq_ready rule");
      chk(int'(count) == q.size(), "count");
      chk(deq_valid == (q.size() != 0), "deq_valid");
      if (deq_valid) chk(deq == q[0], "head entry");
      if (!enq_ready) stalls++;
      @(posedge clk);
      if (deq_valid && deq_ready) begin void'(q.pop_front()); n_out++; end
      if (enq_ready) for (int i = 0; i < IW; i++) if (enq_valid[i]) q.push_back(enq[i]);
      #1;
    end
    chk(stalls > 0, "full queue seen");
    chk(n_out > 1000, "entries drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
