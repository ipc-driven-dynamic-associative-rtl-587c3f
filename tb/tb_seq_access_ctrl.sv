// Self-checking testbench of seq_access_ctrl.
//
// The ways and the schedule table are modelled here, not taken from the RTL:
// the testbench answers each way enable one cycle later with hit/line from
// its own tag arrays and serves the schedule rows from its own copy of the
// default schedule. Every cycle it checks that the controller enables
// exactly the next mask of the access's schedule (and nothing after a hit),
// that a miss fills a way of the first mask (an invalid one first, else the
// two in turn) with the L2 line, that
// a store writes the hitting way and is written through to L2, and the
// completion fields and latency (probes+2 cycles for a hit).
module tb_seq_access_ctrl;
  import dac_pkg::*;

  localparam int SETS = 8;
  localparam int INDEX_W = $clog2(SETS);
  localparam int TAG_W = ADDR_W - OFFSET_W - INDEX_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid, resp_ready;
  mem_req_t req;
  mem_resp_t resp;
  ipc_class_t sched_class;
  schedule_t sched;
  way_mask_t way_en, way_hit, way_valid;
  int fills = 0;
  logic way_we, way_tag_we;
  logic [INDEX_W-1:0] way_index;
  logic [TAG_W-1:0] way_tag;
  line_t way_wdata;
  logic [LINE_BYTES-1:0] way_wbmask;
  line_t way_rdata [NWAYS];
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  l2_req_t l2_req;
  line_t l2_resp_line;

  seq_access_ctrl #(.SETS(SETS)) dut (.*);

  // Testbench schedule: Table 1.
  logic [3:0] tsched [4][3];
  initial begin
    tsched[0] = '{4'b0001, 4'b0010, 4'b1100};
    tsched[1] = '{4'b0011, 4'b1100, 4'b0000};
    tsched[2] = '{4'b1100, 4'b0011, 4'b0000};
    tsched[3] = '{4'b1100, 4'b0011, 4'b0000};
  end
  always_comb for (int c = 0; c < 3; c++) sched[c] = tsched[sched_class][c];

  // Way models.
  logic [TAG_W-1:0] ttag [NWAYS][SETS];
  bit               tvld [NWAYS][SETS];
  line_t            tdat [NWAYS][SETS];
  always_ff @(posedge clk) begin
    for (int w = 0; w < NWAYS; w++) begin
      way_hit[w] <= way_en[w] && !way_we && tvld[w][way_index] && ttag[w][way_index] == way_tag;
      if (way_en[w] && !way_we) way_valid[w] <= tvld[w][way_index];
      way_rdata[w] <= tdat[w][way_index];
      if (way_en[w] && way_we) begin
        for (int b = 0; b < LINE_BYTES; b++)
          if (way_wbmask[b]) tdat[w][way_index][b*8 +: 8] <= way_wdata[b*8 +: 8];
        if (way_tag_we) begin ttag[w][way_index] <= way_tag; tvld[w][way_index] <= 1; end
      end
    end
  end

  // L2: fixed 3-cycle line reads, line content from address.
  int l2cnt = 0; logic [31:0] l2addr; int l2_writes = 0; l2_req_t last_wr;
  assign l2_req_ready = 1'b1;
  always_ff @(posedge clk) begin
    l2_resp_valid <= 0;
    if (l2_req_valid && !l2_req.write) begin l2cnt <= 3; l2addr <= l2_req.addr; end
    if (l2_req_valid && l2_req.write) begin l2_writes <= l2_writes + 1; last_wr <= l2_req; end
    if (l2cnt == 1) begin
      l2_resp_valid <= 1;
      for (int k = 0; k < 4; k++) l2_resp_line[k*32 +: 32] <= l2addr + 32'(k*4) + 32'h0100_0000;
    end
    if (l2cnt > 0) l2cnt <= l2cnt - 1;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cyc); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // One access; exp_way = way holding the line (-1 = absent).
  task automatic access(input logic [31:0] addr, input int cls, input bit st, input logic [31:0] wd);
    int set, exp_way, probes, c, t0, victim;
    logic [TAG_W-1:0] t;
    bit found;
    set = int'(addr[OFFSET_W +: INDEX_W]); t = addr[ADDR_W-1 -: TAG_W];
    exp_way = -1;
    for (int w = 0; w < NWAYS; w++) if (tvld[w][set] && ttag[w][set] == t) exp_way = w;
    req = '{addr: addr, wdata: wd, be: 4'hf, store: st, id: 6'(cls + 8), ipc: ipc_class_t'(cls)};
    req_valid = 1; resp_ready = 1;
    @(posedge clk); t0 = cyc; #1 req_valid = 0;
    // probe cycles
    probes = 0; found = 0; c = 0;
    while (!found && c < 3 && tsched[cls][c] != 0) begin
      #1;
      chk(way_en == tsched[cls][c] && !way_we, $sformatf("probe %0d mask %b exp %b", c, way_en, tsched[cls][c]));
      probes++;
      if (exp_way >= 0 && tsched[cls][c][exp_way]) found = 1;
      @(posedge clk); c++;
    end
    #1;
    if (found) begin
      if (st) begin
        chk(way_we && way_en == way_mask_t'(1 << exp_way), "store writes hit way");
      end else begin
        chk(way_en == 0, "no way after hit");
      end
    end else begin
      begin
        int cand[$];
        victim = -1;
        for (int w = 0; w < 4; w++) if (tsched[cls][0][w]) cand.push_back(w);
        foreach (cand[i]) if (victim < 0 && !tvld[cand[i]][set]) victim = cand[i];
        if (victim < 0) victim = cand[(fills % 4) % cand.size()];
        fills++;
      end
      chk(way_en == 0 && !l2_req_valid, "compare cycle after last probe");
      @(posedge clk); #1;
      chk(l2_req_valid && !l2_req.write && l2_req.addr == {addr[31:4], 4'h0}, "line read");
      while (!(way_we && way_tag_we)) begin @(posedge clk); #1; end
      chk(way_en == way_mask_t'(1 << victim), $sformatf("fill way %b exp %0d", way_en, victim));
    end
    while (!resp_valid) begin @(posedge clk); #1; end
    if (found && !st) chk(cyc - t0 == probes + 2, $sformatf("hit latency %0d probes %0d", cyc - t0, probes));
    chk(resp.l1_hit == found && int'(resp.probes) == probes && resp.id == 6'(cls + 8), "resp fields");
    if (!st && !found) chk(resp.rdata == {addr[31:4], 4'h0} + {28'h0, addr[3:2], 2'b00} + 32'h0100_0000, "miss rdata");
    if (st) chk(last_wr.addr == addr && last_wr.wdata == wd && last_wr.write, "write-through");
    @(posedge clk); #1 resp_ready = 0;
  endtask

  initial begin
    for (int w = 0; w < NWAYS; w++) for (int s = 0; s < SETS; s++) tvld[w][s] = 0;
    req_valid = 0; resp_ready = 0; req = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 3000; i++)
      access(($urandom_range(0, 5) << 16) | ($urandom_range(0, 3) << 4) | ($urandom_range(0, 3) << 2),
             $urandom_range(0, 3), $urandom_range(0, 3) == 0, $urandom);
    chk(l2_writes > 0, "stores seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
