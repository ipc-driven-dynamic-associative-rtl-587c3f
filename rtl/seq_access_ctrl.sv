// Sequential way access controller of the IPC-driven data cache.
//
// One memory operation is handled at a time. When a request is accepted, the
// schedule row of its IPC class is read from the schedule table and loaded
// into the selected way mask register. The head mask then enables only those
// ways for the first probe; on a miss the register shifts and the next mask
// is probed, until a way hits or the schedule is used up. A miss after the
// last mask is an L1 miss: the line is read from L2 and placed in one of the
// ways of the cycle I mask of the same schedule (placement uses the same
// schedule as lookup), so an access of the same class finds it in its first
// probe next time. Among two ways of that mask an invalid one is taken
// first, otherwise they are used in turn (a 2-bit fill counter); this choice
// is this design's own, the design only says the line goes to the ways its
// first probe enables.
//
// Stores are write-through with write-allocate: a store hit writes the word
// into the hitting way, a store miss fills the line and merges the word, and
// in both cases the word is also written to L2 before the store completes.
// Write policy, handshakes and the one-request-at-a-time structure are this
// design's choices; the design does not specify them.
//
// Timing (cycles after the request handshake edge): probe 1 is issued in
// cycle 1, its result compared in cycle 2, and each further probe adds one
// cycle, so a hit in probe n shows resp_valid in cycle n+2. The next probe is
// enabled in the same cycle as the previous result is compared, gated by
// that result, so no way is enabled after a hit. A miss adds the L2 read,
// one fill cycle and, for stores, the L2 write.
//
// Interfaces: req/resp are valid/ready; l2_req is valid/ready and must hold
// its value while waiting; l2_resp_valid is a one-cycle pulse with the line.
// The way_* outputs go to the NWAYS cache_way instances; sched_* to the
// schedule table. way_valid is each way's valid bit of the set as read by its
// last probe; with a schedule that covers all ways it is current at a miss.
module seq_access_ctrl
  import dac_pkg::*;
#(
  parameter int unsigned SETS    = 512,
  localparam int unsigned INDEX_W = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // request from the load/store queue
  input  logic                  req_valid,
  output logic                  req_ready,
  input  mem_req_t              req,
  // completion
  output logic                  resp_valid,
  input  logic                  resp_ready,
  output mem_resp_t             resp,
  // schedule table read port
  output ipc_class_t            sched_class,
  input  schedule_t             sched,
  // ways
  output way_mask_t             way_en,
  output logic                  way_we,
  output logic                  way_tag_we,
  output logic [INDEX_W-1:0]    way_index,
  output logic [TAG_W-1:0]      way_tag,
  output line_t                 way_wdata,
  output logic [LINE_BYTES-1:0] way_wbmask,
  input  way_mask_t             way_hit,
  input  way_mask_t             way_valid,
  input  line_t                 way_rdata [NWAYS],
  // next level
  output logic                  l2_req_valid,
  input  logic                  l2_req_ready,
  output l2_req_t               l2_req,
  input  logic                  l2_resp_valid,
  input  line_t                 l2_resp_line
);

  typedef enum logic [2:0] {
    S_IDLE, S_PROBE, S_CHECK, S_L2_RD, S_L2_WAIT, S_FILL, S_WT, S_RESP
  } state_t;

  state_t             state_q, state_d;
  mem_req_t           r_q;
  way_mask_t          first_mask_q;
  logic [PROBE_W-1:0] probes_q;
  line_t              line_q;
  mem_resp_t          resp_q;

  // Selected way mask register.
  logic      mask_load, mask_shift, mask_more;
  way_mask_t mask_head;

  way_mask_register u_mask (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (mask_load),
    .sched_in (sched),
    .shift    (mask_shift),
    .head     (mask_head),
    .more     (mask_more)
  );

  // Address fields of the held request.
  logic [WSEL_W-1:0]  r_wsel;
  logic [INDEX_W-1:0] r_index;
  logic [TAG_W-1:0]   r_tag;
  assign r_wsel  = r_q.addr[OFFSET_W-1 -: WSEL_W];
  assign r_index = r_q.addr[OFFSET_W +: INDEX_W];
  assign r_tag   = r_q.addr[ADDR_W-1 -: TAG_W];

  // Word of the request replicated over a line, and its byte mask.
  line_t                 store_line;
  logic [LINE_BYTES-1:0] store_bmask;
  always_comb begin
    store_line  = {WORDS_PER_LINE{r_q.wdata}};
    store_bmask = '0;
    store_bmask[r_wsel*BE_W +: BE_W] = r_q.be;
  end

  // Data of the hitting way (at most one way can hit).
  line_t hit_line;
  always_comb begin
    hit_line = '0;
    for (int w = 0; w < NWAYS; w++)
      if (way_hit[w]) hit_line = hit_line | way_rdata[w];
  end

  // Placement way, chosen among the ways of the cycle I mask: the lowest
  // invalid one if there is one, otherwise the (fill_cnt mod m)-th of the m
  // ways of the mask in ascending order. fill_cnt counts fills.
  way_mask_t             victim;
  logic [PROBE_W:0]      n_cand;     // ways in the cycle I mask
  logic [1:0]            fill_cnt_q;
  always_comb begin
    int unsigned pick;
    int unsigned seen;
    victim = '0;
    n_cand = '0;
    pick   = 0;
    seen   = 0;
    for (int w = 0; w < NWAYS; w++)
      if (first_mask_q[w]) n_cand = n_cand + 1'b1;
    for (int w = NWAYS - 1; w >= 0; w--)
      if (first_mask_q[w] && !way_valid[w]) victim = way_mask_t'(1) << w;
    if (victim == '0 && n_cand != '0) begin
      pick = 32'(fill_cnt_q) % 32'(n_cand);
      for (int w = 0; w < NWAYS; w++)
        if (first_mask_q[w]) begin
          if (seen == pick) victim = way_mask_t'(1) << w;
          seen++;
        end
    end
    if (victim == '0) victim = way_mask_t'(1);
  end

  function automatic logic [WORD_W-1:0] word_of(input line_t l, input logic [WSEL_W-1:0] s);
    return l[s*WORD_W +: WORD_W];
  endfunction

  assign sched_class = req.ipc;
  assign req_ready   = (state_q == S_IDLE);
  assign resp_valid  = (state_q == S_RESP);
  assign resp        = resp_q;

  always_comb begin
    state_d      = state_q;
    mask_load    = 1'b0;
    mask_shift   = 1'b0;
    way_en       = '0;
    way_we       = 1'b0;
    way_tag_we   = 1'b0;
    way_wdata    = store_line;
    way_wbmask   = store_bmask;
    l2_req_valid = 1'b0;
    l2_req       = '{write: 1'b0, addr: {r_q.addr[ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}},
                     wdata: r_q.wdata, be: r_q.be};
    unique case (state_q)
      S_IDLE: begin
        if (req_valid) begin
          mask_load = 1'b1;
          state_d   = S_PROBE;
        end
      end
      S_PROBE: begin
        way_en     = mask_head;
        mask_shift = 1'b1;
        state_d    = mask_more ? S_CHECK : S_L2_RD;
      end
      S_CHECK: begin
        if (|way_hit) begin
          if (r_q.store) begin
            way_en  = way_hit;
            way_we  = 1'b1;
            state_d = S_WT;
          end else begin
            state_d = S_RESP;
          end
        end else if (mask_more) begin
          way_en     = mask_head;
          mask_shift = 1'b1;
        end else begin
          state_d = S_L2_RD;
        end
      end
      S_L2_RD: begin
        l2_req_valid = 1'b1;
        if (l2_req_ready) state_d = S_L2_WAIT;
      end
      S_L2_WAIT: begin
        if (l2_resp_valid) state_d = S_FILL;
      end
      S_FILL: begin
        way_en     = victim;
        way_we     = 1'b1;
        way_tag_we = 1'b1;
        way_wdata  = line_q;
        way_wbmask = '1;
        state_d    = r_q.store ? S_WT : S_RESP;
      end
      S_WT: begin
        l2_req_valid = 1'b1;
        l2_req.write = 1'b1;
        l2_req.addr  = r_q.addr;
        if (l2_req_ready) state_d = S_RESP;
      end
      S_RESP: begin
        if (resp_ready) state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign way_index = r_index;
  assign way_tag   = r_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      r_q          <= '0;
      first_mask_q <= '0;
      fill_cnt_q   <= '0;
      probes_q     <= '0;
      line_q       <= '0;
      resp_q       <= '0;
    end else begin
      state_q <= state_d;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          r_q      <= req;
          probes_q <= '0;
        end
        S_PROBE: begin
          first_mask_q <= mask_head;
          if (mask_more) probes_q <= probes_q + 1'b1;
        end
        S_CHECK: begin
          if (|way_hit) begin
            resp_q <= '{rdata: word_of(hit_line, r_wsel), store: r_q.store, id: r_q.id,
                        l1_hit: 1'b1, probes: probes_q};
          end else if (mask_more) begin
            probes_q <= probes_q + 1'b1;
          end
        end
        S_L2_WAIT: if (l2_resp_valid) begin
          // Merge the store word into the fetched line (write-allocate).
          for (int b = 0; b < LINE_BYTES; b++)
            line_q[b*8 +: 8] <= (r_q.store && store_bmask[b]) ? store_line[b*8 +: 8]
                                                              : l2_resp_line[b*8 +: 8];
        end
        S_FILL: begin
          fill_cnt_q <= fill_cnt_q + 1'b1;
          resp_q <= '{rdata: word_of(line_q, r_wsel), store: r_q.store, id: r_q.id,
                      l1_hit: 1'b0, probes: probes_q};
        end
        default: ;
      endcase
    end
  end

  // A set holds a line in at most one way, so at most one probed way hits.
  a_one_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(way_hit));
  // The L2 request is held stable until accepted.
  a_l2_stable: assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req));
  // A completion is held until taken.
  a_resp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp));

endmodule
