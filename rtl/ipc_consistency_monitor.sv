// IPC classification consistency monitor.
//
// The scheme only pays off if a recurring load/store is given the same IPC
// class each time, because its class decides where its line is placed and
// where it is looked for. This monitor measures that. It keeps a buffer of
// the ENTRIES (1024) most recently seen addresses with the class each had.
// For every observed access the buffer is searched: if the address is there,
// the new class is compared with the stored one and the "same" or the
// "different" counter is incremented, and the stored class is updated; if it
// is not there, a new entry is created (replacing the oldest, first in first
// out) and the "new" counter is incremented.
//
// The buffer size and the three outcomes follow the design's description of
// its consistency measurement. Keying entries by line address, FIFO
// replacement, updating the stored class and 32-bit saturating counters are
// this design's choices.
//
// Timing: obs_valid/obs_addr/obs_class are registered; the search runs in
// the next cycle and the counters show the result one cycle after that. Two
// accesses to one address in back-to-back cycles are handled (the second
// sees the first). clear zeroes the counters; reset also empties the buffer.
module ipc_consistency_monitor
  import dac_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        obs_valid,
  input  logic [ADDR_W-1:0] obs_addr,
  input  ipc_class_t  obs_class,
  output logic [31:0] cnt_same,
  output logic [31:0] cnt_diff,
  output logic [31:0] cnt_new
);

  localparam int unsigned KEY_W = ADDR_W - OFFSET_W;
  localparam int unsigned PTR_W = $clog2(ENTRIES);

  logic [KEY_W-1:0] key_q   [ENTRIES];
  ipc_class_t       cls_q   [ENTRIES];
  logic [ENTRIES-1:0] vld_q;
  logic [PTR_W-1:0] fifo_ptr_q;

  // Stage 1: registered observation.
  logic             s_valid;
  logic [KEY_W-1:0] s_key;
  ipc_class_t       s_class;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_key   <= '0;
      s_class <= '0;
    end else begin
      s_valid <= obs_valid;
      s_key   <= obs_addr[ADDR_W-1:OFFSET_W];
      s_class <= obs_class;
    end
  end

  // Stage 2: associative search.
  logic             found;
  logic [PTR_W-1:0] found_idx;
  always_comb begin
    found     = 1'b0;
    found_idx = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld_q[e] && key_q[e] == s_key) begin
        found     = 1'b1;
        found_idx = PTR_W'(e);
      end
  end

  function automatic logic [31:0] sat_inc(input logic [31:0] c);
    return (c == '1) ? c : c + 32'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (s_valid) begin
      if (found) cls_q[found_idx] <= s_class;
      else begin
        key_q[fifo_ptr_q] <= s_key;
        cls_q[fifo_ptr_q] <= s_class;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_q      <= '0;
      fifo_ptr_q <= '0;
    end else if (s_valid && !found) begin
      vld_q[fifo_ptr_q] <= 1'b1;
      fifo_ptr_q        <= PTR_W'((32'(fifo_ptr_q) + 1) % ENTRIES);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt_same <= '0;
      cnt_diff <= '0;
      cnt_new  <= '0;
    end else if (s_valid) begin
      if (!found)                        cnt_new  <= sat_inc(cnt_new);
      else if (cls_q[found_idx] == s_class) cnt_same <= sat_inc(cnt_same);
      else                               cnt_diff <= sat_inc(cnt_diff);
    end
  end

endmodule
