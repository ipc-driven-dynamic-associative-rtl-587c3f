// Load/store queue between the issue stage and the data cache.
//
// Load/stores selected in one issue cycle enter together, already carrying
// their IPC classification, and leave one per cycle, oldest first, towards
// the cache; the class travels unchanged in the entry. Up to IW operations
// (slots with enq_valid set, in any pattern) are written per cycle in slot
// order into a circular buffer of DEPTH entries (32, the queue size of the
// evaluated core). The design names this queue only as the carrier of the
// annotation: in-order issue, no address disambiguation or store-to-load
// forwarding, and the "room for a full issue group" ready rule are this
// design's simplifications.
//
// Interface: enq_ready is high when at least IW entries are free; an
// enqueue happens in a cycle with enq_ready high. deq_valid/deq_ready is a
// valid/ready pair; deq is the head entry. Synchronous active-low reset
// empties the queue.
module lsq
  import dac_pkg::*;
#(
  parameter int unsigned DEPTH = 32
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [IW-1:0] enq_valid,
  input  mem_req_t    enq [IW],
  output logic        enq_ready,
  output logic        deq_valid,
  input  logic        deq_ready,
  output mem_req_t    deq,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  mem_req_t          mem [DEPTH];
  logic [PTR_W-1:0]  head_q, tail_q;
  logic [CNT_W-1:0]  count_q;

  logic             do_enq, do_deq;
  logic [CNT_W-1:0] n_enq;

  assign enq_ready = (count_q <= CNT_W'(DEPTH - IW));
  assign do_enq    = enq_ready && (|enq_valid);
  assign deq_valid = (count_q != '0);
  assign do_deq    = deq_valid && deq_ready;
  assign deq       = mem[head_q];
  assign count     = count_q;

  always_comb begin
    n_enq = '0;
    for (int i = 0; i < IW; i++)
      n_enq = n_enq + CNT_W'(enq_valid[i]);
  end

  function automatic logic [PTR_W-1:0] wrap(input logic [PTR_W-1:0] p, input int unsigned k);
    return PTR_W'((32'(p) + k) % DEPTH);
  endfunction

  always_ff @(posedge clk) begin
    if (do_enq) begin
      int unsigned pos;
      pos = 0;
      for (int i = 0; i < IW; i++) begin
        if (enq_valid[i]) begin
          mem[wrap(tail_q, pos)] <= enq[i];
          pos++;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (do_enq) tail_q <= wrap(tail_q, 32'(n_enq));
      if (do_deq) head_q <= wrap(head_q, 1);
      count_q <= count_q + (do_enq ? n_enq : '0) - CNT_W'(do_deq);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count_q <= CNT_W'(DEPTH));

endmodule
