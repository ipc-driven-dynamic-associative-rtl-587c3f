// One way of the data cache: tag array, data array, valid bits and the tag
// comparator of that way.
//
// A way does work only in a cycle when its enable is set. Keeping the other
// ways idle is where the energy saving of the design comes from: a probe of
// one way switches the word line, bit lines and sense amplifiers of one way
// instead of all four. A read is synchronous: index and enable are presented
// in cycle t, the tag, valid bit and line appear in cycle t+1, where hit is
// the comparison of that stored tag with cmp_tag. hit is forced low in a
// cycle following one in which the way was not read, so only probed ways can
// report a hit.
//
// Writes (en && we) store the line bytes selected by wbmask and, with
// tag_we, also the tag and set the valid bit (a refill); a write cycle is not
// a probe. valid is the set's valid bit as read by the way's last probe, for
// the controller's choice of a placement way. Valid bits are cleared by a synchronous active-low reset; tag and
// data arrays have no reset. Arrays, read timing and reset are this design's
// choices: the design only gives a tag and a data SRAM per way.
module cache_way
  import dac_pkg::*;
#(
  parameter int unsigned SETS    = 512,
  localparam int unsigned INDEX_W = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W - OFFSET_W - INDEX_W
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  we,
  input  logic                  tag_we,
  input  logic [INDEX_W-1:0]    index,
  input  logic [TAG_W-1:0]      wtag,
  input  line_t                 wdata,
  input  logic [LINE_BYTES-1:0] wbmask,
  input  logic [TAG_W-1:0]      cmp_tag,
  output logic                  hit,
  output logic                  valid,
  output line_t                 rdata
);

  logic [TAG_W-1:0] tag_mem  [SETS];
  line_t            data_mem [SETS];
  logic [SETS-1:0]  valid_q;

  logic [TAG_W-1:0] tag_q;
  logic             vld_q;
  logic             probed_q;

  // Data array: byte-masked write, synchronous read.
  always_ff @(posedge clk) begin
    if (en && we) begin
      for (int b = 0; b < LINE_BYTES; b++)
        if (wbmask[b]) data_mem[index][b*8 +: 8] <= wdata[b*8 +: 8];
    end
    if (en && !we)
      rdata <= data_mem[index];
  end

  // Tag array.
  always_ff @(posedge clk) begin
    if (en && we && tag_we)
      tag_mem[index] <= wtag;
    if (en && !we)
      tag_q <= tag_mem[index];
  end

  // Valid bits and probe flag.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q  <= '0;
      vld_q    <= 1'b0;
      probed_q <= 1'b0;
    end else begin
      if (en && we && tag_we)
        valid_q[index] <= 1'b1;
      if (en && !we)
        vld_q <= valid_q[index];
      probed_q <= en && !we;
    end
  end

  assign hit   = probed_q && vld_q && (tag_q == cmp_tag);
  assign valid = vld_q;

endmodule
