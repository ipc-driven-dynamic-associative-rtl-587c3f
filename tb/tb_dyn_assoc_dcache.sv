// Self-checking testbench of dyn_assoc_dcache.
//
// Random loads and stores of random IPC class go to a small cache (16 sets)
// over few tags, so that hits in probe 1, 2 and 3, misses, refills and
// evictions all occur. Each completion is compared with dac_ref_pkg's model:
// load data, hit/miss, probes used, the number of way activations during the
// probes, and for hits the latency of probes+2 cycles from acceptance.
// Midway the IPC-4 row of the schedule table is rewritten and the model
// follows it.
module tb_dyn_assoc_dcache;
  import dac_pkg::*;
  import dac_ref_pkg::*;

  localparam int SETS = 16;
  localparam int N_OPS = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       req_valid, req_ready, resp_valid, resp_ready;
  mem_req_t   req;
  mem_resp_t  resp;
  logic       sched_wr_en;
  ipc_class_t sched_wr_class;
  schedule_t  sched_wr;
  way_mask_t  way_en;
  logic       way_we;
  logic       l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t    l2_req;
  line_t      l2_resp_line;
  int         n_reads, n_writes;

  dyn_assoc_dcache #(.SETS(SETS)) dut (.*);

  l2_model u_l2 (.clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
                 .req(l2_req), .resp_valid(l2_resp_valid), .resp_line(l2_resp_line),
                 .n_reads, .n_writes);

  int checks = 0, failures = 0;
  int cyc = 0;
  int way_acts = 0;
  int hits_at[4] = '{0, 0, 0, 0};
  int misses = 0, stores = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!way_we) way_acts <= way_acts + $countones(way_en);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  dac_ref ref_m;

  task automatic one_access(input logic [31:0] addr, input bit st, input logic [31:0] wd,
                            input logic [3:0] be, input int cls, input logic [5:0] id);
    int t0, acts0, lat;
    req = '{addr: addr, wdata: wd, be: be, store: st, id: id, ipc: ipc_class_t'(cls)};
    req_valid = 1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc; acts0 = way_acts;
    #1 req_valid = 0;
    ref_m.access(addr, st, wd, be, cls);
    resp_ready = ($urandom_range(0, 3) != 0);
    while (!(resp_valid && resp_ready)) begin
      @(posedge clk); #1;
      if (!resp_ready) resp_ready = ($urandom_range(0, 1) != 0);
      if (resp_valid && !resp_ready) continue;
    end
    lat = cyc - t0;
    chk(resp.id == id, "id");
    chk(resp.store == st, "store flag");
    chk(resp.l1_hit == ref_m.hit, $sformatf("hit exp %0d", ref_m.hit));
    chk(int'(resp.probes) == ref_m.probes, $sformatf("probes %0d exp %0d", resp.probes, ref_m.probes));
    if (!st) chk(resp.rdata == ref_m.rdata, $sformatf("rdata %h exp %h", resp.rdata, ref_m.rdata));
    if (ref_m.hit && resp_ready) begin
      // resp_ready was high when resp_valid first rose only if lat is minimal
    end
    if (ref_m.hit) begin
      chk(lat >= ref_m.probes + 2, $sformatf("hit latency %0d", lat));
      hits_at[ref_m.probes]++;
    end else misses++;
    if (st) stores++;
    @(posedge clk); #1;
    resp_ready = 0;
    // way activations made for this access: probes, plus nothing else
    chk(way_acts - acts0 == ref_m.ways_read, $sformatf("way activations %0d exp %0d",
        way_acts - acts0, ref_m.ways_read));
  endtask

  // Exact hit latency with an always-ready consumer.
  task automatic timed_hit(input logic [31:0] addr, input int cls);
    int t0;
    ref_m.access(addr, 0, 0, 0, cls);
    req = '{addr: addr, wdata: 0, be: 0, store: 0, id: 6'h2a, ipc: ipc_class_t'(cls)};
    req_valid = 1; resp_ready = 1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    #1 req_valid = 0;
    while (!resp_valid) begin @(posedge clk); #1; end
    chk(ref_m.hit, "timed access is a hit");
    chk(cyc - t0 == ref_m.probes + 2, $sformatf("exact latency %0d for %0d probes", cyc - t0, ref_m.probes));
    chk(resp.rdata == ref_m.rdata, "timed rdata");
    @(posedge clk); #1 resp_ready = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a;
    ref_m = new(SETS);
    req_valid = 0; resp_ready = 0; sched_wr_en = 0; sched_wr_class = '0; sched_wr = '0;
    req = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Same line through every class: placed by IPC-1 into way 0, then found
    // in probe 1 (IPC-1), probe 1 (IPC-2), probe 2 (IPC-3/4).
    one_access(32'h0000_1230, 0, 0, 0, 0, 1);
    for (int c = 0; c < 4; c++) timed_hit(32'h0000_1230, c);
    // IPC-1 line found in ways 2/3 takes three probes.
    one_access(32'h0004_5670, 0, 0, 0, 3, 2);   // placed in way 2
    timed_hit(32'h0004_5670, 0);
    for (int i = 0; i < N_OPS; i++) begin
      if (i == N_OPS / 2) begin
        @(posedge clk); #1;
        sched_wr_en = 1; sched_wr_class = 2'd3;
        sched_wr = '{4'b0000, 4'b1100, 4'b0011};   // IPC-4: {0,1} then {2,3}
        ref_m.sched[3][0] = 4'b0011; ref_m.sched[3][1] = 4'b1100; ref_m.sched[3][2] = 4'b0000;
        @(posedge clk); #1 sched_wr_en = 0;
      end
      a = ($urandom_range(0, 4) << 14) | ($urandom_range(0, 3) << 4) | ($urandom_range(0, 3) << 2);
      one_access(a, $urandom_range(0, 9) < 3, $urandom, 4'($urandom_range(1, 15)),
                 $urandom_range(0, 3), 6'($urandom));
    end
    chk(hits_at[1] > 0 && hits_at[2] > 0 && hits_at[3] > 0, "hits in probes 1,2,3 seen");
    chk(misses > 0 && stores > 0, "misses and stores seen");
    chk(n_writes == stores, $sformatf("write-through count %0d exp %0d", n_writes, stores));
    chk(n_reads == misses, $sformatf("line reads %0d exp %0d", n_reads, misses));
    $display("hits probe1=%0d probe2=%0d probe3=%0d misses=%0d stores=%0d",
             hits_at[1], hits_at[2], hits_at[3], misses, stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
