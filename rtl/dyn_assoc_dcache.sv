// IPC-driven dynamic associative L1 data cache.
//
// A 32 KB, 4-way set-associative cache with 16-byte lines (512 sets) whose
// ways are looked up sequentially rather than all at once. Each access brings
// an IPC class; the schedule table maps the class to up to three way masks
// (by default: IPC-1 probes way 0, then way 1, then ways 2+3; IPC-2 probes
// ways 0+1, then 2+3; IPC-3 and IPC-4 probe ways 2+3, then 0+1). At most two
// ways are switched per probe cycle, and lines are placed where the first
// probe of their class looks, so that most hits need only one probe.
//
// This module wires the controller (seq_access_ctrl, which holds the
// selected way mask register), the schedule table and NWAYS cache_way
// instances. Timing and handshakes are those of seq_access_ctrl: a hit in
// probe n completes n+2 cycles after the request is accepted.
//
// The sched_wr_* port rewrites one row of the schedule table (dynamic
// binding); rows must keep all ways reachable. way_en is brought out so that
// the number of way activations, which sets the array energy, can be counted.
module dyn_assoc_dcache
  import dac_pkg::*;
#(
  parameter int unsigned SETS = 512
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  mem_req_t   req,
  output logic       resp_valid,
  input  logic       resp_ready,
  output mem_resp_t  resp,
  input  logic       sched_wr_en,
  input  ipc_class_t sched_wr_class,
  input  schedule_t  sched_wr,
  output way_mask_t  way_en,
  output logic       way_we,
  output logic       l2_req_valid,
  input  logic       l2_req_ready,
  output l2_req_t    l2_req,
  input  logic       l2_resp_valid,
  input  line_t      l2_resp_line
);

  localparam int unsigned INDEX_W = $clog2(SETS);
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W;

  ipc_class_t            sched_class;
  schedule_t             sched;
  logic                  way_tag_we;
  logic [INDEX_W-1:0]    way_index;
  logic [TAG_W-1:0]      way_tag;
  line_t                 way_wdata;
  logic [LINE_BYTES-1:0] way_wbmask;
  way_mask_t             way_hit;
  way_mask_t             way_valid;
  line_t                 way_rdata [NWAYS];

  access_schedule_table u_table (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (sched_wr_en),
    .wr_class (sched_wr_class),
    .wr_sched (sched_wr),
    .rd_class (sched_class),
    .rd_sched (sched)
  );

  seq_access_ctrl #(.SETS(SETS)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .req_valid     (req_valid),
    .req_ready     (req_ready),
    .req           (req),
    .resp_valid    (resp_valid),
    .resp_ready    (resp_ready),
    .resp          (resp),
    .sched_class   (sched_class),
    .sched         (sched),
    .way_en        (way_en),
    .way_we        (way_we),
    .way_tag_we    (way_tag_we),
    .way_index     (way_index),
    .way_tag       (way_tag),
    .way_wdata     (way_wdata),
    .way_wbmask    (way_wbmask),
    .way_hit       (way_hit),
    .way_valid     (way_valid),
    .way_rdata     (way_rdata),
    .l2_req_valid  (l2_req_valid),
    .l2_req_ready  (l2_req_ready),
    .l2_req        (l2_req),
    .l2_resp_valid (l2_resp_valid),
    .l2_resp_line  (l2_resp_line)
  );

  for (genvar w = 0; w < NWAYS; w++) begin : g_way
    cache_way #(.SETS(SETS)) u_way (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (way_en[w]),
      .we      (way_we),
      .tag_we  (way_tag_we),
      .index   (way_index),
      .wtag    (way_tag),
      .wdata   (way_wdata),
      .wbmask  (way_wbmask),
      .cmp_tag (way_tag),
      .hit     (way_hit[w]),
      .valid   (way_valid[w]),
      .rdata   (way_rdata[w])
    );
  end

endmodule
