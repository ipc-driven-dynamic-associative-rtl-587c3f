// End-to-end testbench of ipc_dcache_top at its default size (512 sets,
// 32-entry load/store queue), with the L2 behavioural model.
//
// Each cycle an issue group of k = 1..4 granted slots is drawn with the
// class mix reported for SPEC2000 (about 5% IPC-1, 15% IPC-2, 20% IPC-3 and
// 60% IPC-4), and some of its slots are loads or stores into a working set
// that conflicts in 32 sets. Every completion is checked in order against
// dac_ref_pkg's model: id, load data, L1 hit and the number of probes; the
// way activations seen on way_en are checked against the model's total.
// Half way, the queue is drained and the IPC-4 schedule row is rewritten.
// The testbench counts each mechanism (hits in probe 1, 2 and 3, misses with
// refill, write-through stores, a full queue stalling issue, completion and
// L2 back-pressure, the schedule rewrite, multi-op issue groups, each IPC
// class) and fails if one never happened; the consistency monitor must see
// every access. It also prints the array energy
// relative to probing all four ways, following the design's energy model.
module tb_ipc_dcache_top;
  import dac_pkg::*;
  import dac_ref_pkg::*;

  localparam int N_OPS  = 20000;
  localparam int SETS   = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [IW-1:0] sel_valid, sel_is_mem;
  issue_op_t sel_op [IW];
  logic issue_ready;
  logic [$clog2(IW+1)-1:0] issue_count;
  logic [$clog2(32+1)-1:0] lsq_count;
  logic resp_valid, resp_ready;
  mem_resp_t resp;
  logic sched_wr_en;
  ipc_class_t sched_wr_class;
  schedule_t sched_wr;
  way_mask_t way_en;
  logic way_we;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t l2_resp_line;
  int n_reads, n_writes;
  logic mon_clear;
  logic [31:0] mon_same, mon_diff, mon_new;

  ipc_dcache_top dut (.*);

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
                 .req(l2_req), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
                 .n_reads, .n_writes);

  int checks = 0, failures = 0, cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // mechanism counters
  int hits_at[4] = '{0, 0, 0, 0};
  int misses = 0, stores = 0, lsq_full = 0, resp_bp = 0, l2_bp = 0, rewrites = 0, groups_multi = 0;
  int cls_seen[4] = '{0, 0, 0, 0};
  longint way_acts = 0, exp_acts = 0, probes_total = 0, accesses = 0;

  typedef struct { issue_op_t op; int cls; } pend_t;
  pend_t pend [$];
  dac_ref ref_m;
  int issued = 0, done = 0;
  bit hold_issue = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!way_we) way_acts <= way_acts + $countones(way_en);
      if (!issue_ready) lsq_full++;
      if (resp_valid && !resp_ready) resp_bp++;
      if (l2_req_valid && !l2_req_ready) l2_bp++;
    end
  end

  // Completion checker.
  always @(posedge clk) begin
    if (rst_n && resp_valid && resp_ready) begin
      pend_t p;
      if (pend.size() == 0) begin
        chk(0, "completion with nothing pending");
      end else begin
        p = pend.pop_front();
        ref_m.access(p.op.addr, p.op.store, p.op.wdata, p.op.be, p.cls);
        chk(resp.id == p.op.id, "id");
        chk(resp.store == p.op.store, "store flag");
        chk(resp.l1_hit == ref_m.hit, $sformatf("hit %0d exp %0d", resp.l1_hit, ref_m.hit));
        chk(int'(resp.probes) == ref_m.probes, $sformatf("probes %0d exp %0d", resp.probes, ref_m.probes));
        if (!p.op.store) chk(resp.rdata == ref_m.rdata, $sformatf("rdata %h exp %h", resp.rdata, ref_m.rdata));
        if (ref_m.hit) hits_at[ref_m.probes]++; else misses++;
        if (p.op.store) stores++;
        exp_acts += longint'(ref_m.ways_read);
        probes_total += longint'(ref_m.probes);
        accesses++;
        // running totals: way activations and L2 line reads so far
        chk(way_acts + longint'(!way_we ? $countones(way_en) : 0) == exp_acts,
            $sformatf("way activations %0d exp %0d", way_acts, exp_acts));
        chk(n_reads == misses, $sformatf("line reads %0d exp %0d", n_reads, misses));
        done++;
      end
    end
  end

  function automatic int draw_k();
    int r = $urandom_range(0, 99);
    if (r < 5) return 1;
    if (r < 20) return 2;
    if (r < 40) return 3;
    return 4;
  endfunction

  function automatic logic [31:0] draw_addr();
    // 32 conflicting sets, 6 tags each, any word of the line
    return ($urandom_range(0, 5) << 13) | ($urandom_range(0, 31) << 4) | ($urandom_range(0, 3) << 2);
  endfunction

  // Issue driver: drive in the negative half, sample handshakes at the edge.
  initial begin
    sel_valid = '0; sel_is_mem = '0;
    for (int i = 0; i < IW; i++) sel_op[i] = '{default: '0};
    mon_clear = 0;
    resp_ready = 0; sched_wr_en = 0; sched_wr_class = '0; sched_wr = '0;
    ref_m = new(SETS);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (issued < N_OPS) begin
      int k, nm;
      if (issued >= N_OPS / 2 && rewrites == 0) begin
        // drain, then rebind the IPC-4 row to {0,1} then {2,3}
        sel_valid = '0; sel_is_mem = '0; resp_ready = 1;
        while (done < issued) @(posedge clk);
        #1 sched_wr_en = 1; sched_wr_class = 2'd3; sched_wr = '{4'b0000, 4'b1100, 4'b0011};
        @(posedge clk); #1 sched_wr_en = 0;
        ref_m.sched[3][0] = 4'b0011; ref_m.sched[3][1] = 4'b1100; ref_m.sched[3][2] = 4'b0000;
        rewrites++;
      end
      k = draw_k();
      sel_valid = '0; sel_is_mem = '0;
      while ($countones(sel_valid) < k) sel_valid[$urandom_range(0, IW - 1)] = 1'b1;
      nm = 0;
      for (int i = 0; i < IW; i++) begin
        sel_is_mem[i] = sel_valid[i] && ($urandom_range(0, 2) != 0);
        sel_op[i] = '{addr: draw_addr(), wdata: $urandom, be: 4'($urandom_range(1, 15)),
                      store: ($urandom_range(0, 9) < 3), id: 6'($urandom)};
      end
      // the select logic grants load/stores only when the queue has room
      if (!issue_ready) sel_is_mem = '0;
      // a short burst of stalled completions now and then fills the queue
      resp_ready = ((cyc % 400) < 120) ? 1'b0 : ($urandom_range(0, 3) != 0);
      #1;
      chk(int'(issue_count) == k, "issue count");
      @(posedge clk);
      for (int i = 0; i < IW; i++)
        if (sel_is_mem[i]) begin
          pend.push_back('{op: sel_op[i], cls: k - 1});
          issued++; nm++;
          cls_seen[k - 1]++;
        end
      if (nm > 1) groups_multi++;
      #1;
    end
    sel_valid = '0; sel_is_mem = '0; resp_ready = 1;
    while (done < issued) @(posedge clk);
    @(posedge clk);
    repeat (3) @(posedge clk);
    chk(mon_same + mon_diff + mon_new == 32'(accesses), "monitor counts every access");
    chk(mon_same > 0 && mon_diff > 0 && mon_new > 0, "monitor saw same, different and new");
    $display("classification: same %0d, different %0d, new %0d", mon_same, mon_diff, mon_new);
    chk(way_acts == exp_acts, $sformatf("way activations %0d exp %0d", way_acts, exp_acts));
    chk(n_writes == stores, "write-through count");
    chk(n_reads == misses, "line read count");
    chk(hits_at[1] > 0, "hit in probe 1 seen");
    chk(hits_at[2] > 0, "hit in probe 2 seen");
    chk(hits_at[3] > 0, "hit in probe 3 seen");
    chk(misses > 0, "miss and refill seen");
    chk(stores > 0, "write-through store seen");
    chk(lsq_full > 0, "full queue stall seen");
    chk(resp_bp > 0, "completion back-pressure seen");
    chk(l2_bp > 0, "L2 back-pressure seen");
    chk(rewrites > 0, "schedule rewrite done");
    chk(groups_multi > 0, "multi-op issue group seen");
    for (int c = 0; c < 4; c++) chk(cls_seen[c] > 0, $sformatf("IPC-%0d seen", c + 1));
    $display("ops=%0d hits probe1=%0d probe2=%0d probe3=%0d misses=%0d stores=%0d",
             accesses, hits_at[1], hits_at[2], hits_at[3], misses, stores);
    $display("class mix IPC1..4 = %0d %0d %0d %0d; queue-full cycles=%0d", cls_seen[0], cls_seen[1],
             cls_seen[2], cls_seen[3], lsq_full);
    $display("way activations per access %.3f (all-way lookup: 4), decoder uses per access %.3f",
             real'(way_acts) / real'(accesses), real'(probes_total) / real'(accesses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
