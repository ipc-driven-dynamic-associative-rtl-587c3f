// IPC-driven dynamic associative data cache subsystem: issue-stage IPC
// classifier, load/store queue and sequential-way L1 data cache.
//
// In every issue cycle the core's select logic presents its granted slots.
// The classifier counts them (the issue IPC k of that cycle) and every
// granted load/store is written into the load/store queue tagged IPC-k. The
// queue feeds the cache one operation at a time; there the class picks the
// way schedule used for lookup and for placement on a miss. A monitor on the
// same stream counts how consistently recurring addresses are classified. The core itself
// (wakeup/select, register file, reorder buffer) and the L2 cache are outside
// this module: the grant vector comes in as ports, L2 traffic goes out.
//
// Interface:
//   sel_valid/sel_is_mem/sel_op - this cycle's select grants; sel_op[i] is
//     slot i's load/store. issue_ready must be high for a load/store to be
//     granted (the queue has room for a full issue group).
//   resp_valid/resp_ready/resp - completions, in queue order.
//   sched_wr_*   - rewrite one row of the schedule table.
//   way_en/way_we - way activations of the arrays each cycle.
//   l2_*         - line reads and write-through word writes to L2.
//   issue_count/lsq_count - issue IPC of this cycle and queue occupancy.
// Timing: a load/store enters the queue at the grant edge and can be handed
// to the cache in the next cycle; cache timing is that of dyn_assoc_dcache.
//   mon_*        - classification consistency counters: accesses whose line
//     was seen recently with the same class, with another class, or not at
//     all (ipc_consistency_monitor on the stream entering the cache).
module ipc_dcache_top
  import dac_pkg::*;
#(
  parameter int unsigned SETS      = 512,
  parameter int unsigned LSQ_DEPTH = 32,
  parameter int unsigned MON_ENTRIES = 1024
)(
  input  logic       clk,
  input  logic       rst_n,
  // issue select stage
  input  logic [IW-1:0] sel_valid,
  input  logic [IW-1:0] sel_is_mem,
  input  issue_op_t  sel_op [IW],
  output logic       issue_ready,
  output logic [$clog2(IW+1)-1:0] issue_count,
  output logic [$clog2(LSQ_DEPTH+1)-1:0] lsq_count,
  // completions
  output logic       resp_valid,
  input  logic       resp_ready,
  output mem_resp_t  resp,
  // schedule table binding
  input  logic       sched_wr_en,
  input  ipc_class_t sched_wr_class,
  input  schedule_t  sched_wr,
  // way activity
  output way_mask_t  way_en,
  output logic       way_we,
  // classification consistency counters
  input  logic        mon_clear,
  output logic [31:0] mon_same,
  output logic [31:0] mon_diff,
  output logic [31:0] mon_new,
  // L2
  output logic       l2_req_valid,
  input  logic       l2_req_ready,
  output l2_req_t    l2_req,
  input  logic       l2_resp_valid,
  input  line_t      l2_resp_line
);

  ipc_class_t   ipc_class;
  logic [IW-1:0] mem_tagged;
  mem_req_t     enq [IW];
  logic         c_req_valid, c_req_ready;
  mem_req_t     c_req;


  ipc_classifier u_classify (
    .sel_valid  (sel_valid),
    .sel_is_mem (sel_is_mem),
    .sel_count  (issue_count),
    .ipc_class  (ipc_class),
    .mem_tagged (mem_tagged)
  );

  always_comb begin
    for (int i = 0; i < IW; i++)
      enq[i] = '{addr: sel_op[i].addr, wdata: sel_op[i].wdata, be: sel_op[i].be,
                 store: sel_op[i].store, id: sel_op[i].id, ipc: ipc_class};
  end

  lsq #(.DEPTH(LSQ_DEPTH)) u_lsq (
    .clk       (clk),
    .rst_n     (rst_n),
    .enq_valid (mem_tagged),
    .enq       (enq),
    .enq_ready (issue_ready),
    .deq_valid (c_req_valid),
    .deq_ready (c_req_ready),
    .deq       (c_req),
    .count     (lsq_count)
  );

  dyn_assoc_dcache #(.SETS(SETS)) u_dcache (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (c_req_valid),
    .req_ready      (c_req_ready),
    .req            (c_req),
    .resp_valid     (resp_valid),
    .resp_ready     (resp_ready),
    .resp           (resp),
    .sched_wr_en    (sched_wr_en),
    .sched_wr_class (sched_wr_class),
    .sched_wr       (sched_wr),
    .way_en         (way_en),
    .way_we         (way_we),
    .l2_req_valid   (l2_req_valid),
    .l2_req_ready   (l2_req_ready),
    .l2_req         (l2_req),
    .l2_resp_valid  (l2_resp_valid),
    .l2_resp_line   (l2_resp_line)
  );

  // Every access handed to the cache is checked for a consistent class.
  ipc_consistency_monitor #(.ENTRIES(MON_ENTRIES)) u_monitor (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (mon_clear),
    .obs_valid (c_req_valid && c_req_ready),
    .obs_addr  (c_req.addr),
    .obs_class (c_req.ipc),
    .cnt_same  (mon_same),
    .cnt_diff  (mon_diff),
    .cnt_new   (mon_new)
  );

  // A granted load/store must find room in the queue.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
    |mem_tagged |-> issue_ready);

endmodule
