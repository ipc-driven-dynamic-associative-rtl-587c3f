// Shared constants and types of the IPC-driven dynamic associative data cache.
//
// The cache is a 4-way set-associative L1 data cache inside a 4-issue
// superscalar core. Every load/store carries an IPC class (how many
// instructions the issue select logic picked in the cycle it was selected),
// and that class chooses a fixed sequence of way masks ("access schedule")
// used both to look the access up and to place a missing line.
//
// Fixed by the architecture: issue width 4, 4 ways, schedules of at most 3
// probe cycles, 16-byte lines. The 32-bit address and data word, the 6-bit
// request id and the 4-bit byte enables are this design's own choices.
package dac_pkg;

  localparam int unsigned IW        = 4;   // issue width (IPC classes 1..IW)
  localparam int unsigned NWAYS     = 4;   // cache ways
  localparam int unsigned NCYC      = 3;   // probe cycles in one schedule
  localparam int unsigned ADDR_W    = 32;  // byte address
  localparam int unsigned WORD_W    = 32;  // load/store data word
  localparam int unsigned BE_W      = WORD_W / 8;
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned LINE_W    = LINE_BYTES * 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / BE_W;
  localparam int unsigned OFFSET_W  = $clog2(LINE_BYTES);
  localparam int unsigned WSEL_W    = $clog2(WORDS_PER_LINE);
  localparam int unsigned CLASS_W   = $clog2(IW);   // class k stored as k-1
  localparam int unsigned ID_W      = 6;            // request tag (64-entry window)
  localparam int unsigned PROBE_W   = $clog2(NCYC + 1);

  typedef logic [NWAYS-1:0]  way_mask_t;
  typedef way_mask_t [NCYC-1:0] schedule_t;  // [0] = cycle I mask
  typedef logic [CLASS_W-1:0] ipc_class_t;   // 0 means IPC-1, IW-1 means IPC-IW
  typedef logic [LINE_W-1:0]  line_t;

  // One memory operation travelling from the issue stage to the cache.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
    logic [BE_W-1:0]   be;      // byte enables of a store
    logic              store;   // 1 = store, 0 = load
    logic [ID_W-1:0]   id;      // returned with the response
    ipc_class_t        ipc;     // IPC classification from the issue stage
  } mem_req_t;

  // A load/store as the issue stage selects it, before classification.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
    logic [BE_W-1:0]   be;
    logic              store;
    logic [ID_W-1:0]   id;
  } issue_op_t;

  // Completion of a memory operation.
  typedef struct packed {
    logic [WORD_W-1:0]  rdata;   // load data (word at addr)
    logic               store;
    logic [ID_W-1:0]    id;
    logic               l1_hit;  // found in L1 during the probe cycles
    logic [PROBE_W-1:0] probes;  // probe cycles spent (1..NCYC)
  } mem_resp_t;

  // Request to the next level (L2). Reads fetch a whole line; writes carry
  // one word (the L1 is write-through).
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
    logic [BE_W-1:0]   be;
  } l2_req_t;

  // Table 1 of the design: the reset contents of the schedule table.
  //   IPC-1 : {0} then {1} then {2,3}
  //   IPC-2 : {0,1} then {2,3}
  //   IPC-3 : {2,3} then {0,1}
  //   IPC-4 : {2,3} then {0,1}
  function automatic schedule_t default_schedule(input int unsigned cls);
    schedule_t s;
    s = '0;
    case (cls)
      0: begin s[0] = 4'b0001; s[1] = 4'b0010; s[2] = 4'b1100; end
      1: begin s[0] = 4'b0011; s[1] = 4'b1100; end
      default: begin s[0] = 4'b1100; s[1] = 4'b0011; end
    endcase
    return s;
  endfunction

endpackage
