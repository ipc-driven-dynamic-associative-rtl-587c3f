// Behavioural model of the next memory level (L2 and memory) for testbenches.
//
// Accepts one request per cycle when ready. A line read answers with the
// 16-byte line after LAT cycles (6 by default, the L2 hit time of the
// evaluated core); a word write updates the model's memory at once. Memory
// starts from dac_ref_pkg::init_word, so it needs no initialisation file.
// With STALL set, req_ready drops pseudo-randomly to exercise the handshake.
module l2_model
  import dac_pkg::*;
#(
  parameter int LAT   = 6,
  parameter bit STALL = 1'b1
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  l2_req_t req,
  output logic    resp_valid,
  output line_t   resp_line,
  output int      n_reads,
  output int      n_writes
);

  logic [31:0] mem[logic [31:0]];
  int          cnt;
  logic        busy;
  logic [31:0] rd_addr;

  function automatic logic [31:0] rd(input logic [31:0] wa);
    if (mem.exists(wa)) return mem[wa];
    return dac_ref_pkg::init_word(wa);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) req_ready <= 1'b1;
    else        req_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  always_ff @(posedge clk) begin
    resp_valid <= 1'b0;
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; n_reads <= 0; n_writes <= 0;
    end else begin
      if (req_valid && req_ready) begin
        if (req.write) begin
          logic [31:0] w;
          w = rd(req.addr >> 2);
          for (int b = 0; b < 4; b++) if (req.be[b]) w[b*8 +: 8] = req.wdata[b*8 +: 8];
          mem[req.addr >> 2] = w;
          n_writes <= n_writes + 1;
        end else begin
          busy <= 1'b1; cnt <= LAT; rd_addr <= req.addr;
          n_reads <= n_reads + 1;
        end
      end
      if (busy) begin
        if (cnt <= 1) begin
          busy <= 1'b0;
          resp_valid <= 1'b1;
          for (int k = 0; k < 4; k++)
            resp_line[k*32 +: 32] <= rd((rd_addr >> 2) + 32'(k));
        end else cnt <= cnt - 1;
      end
    end
  end

endmodule
