// IPC classifier at the issue select stage.
//
// Each cycle the wakeup/select logic grants up to IW issue slots. The number
// k of granted slots is the issue IPC of that cycle, and every load/store
// among the granted instructions is annotated as an IPC-k access; that
// annotation travels with it to the data cache and selects its way schedule.
// A cycle with no grant produces no annotation.
//
// Interface: sel_valid[i] is slot i's select grant, sel_is_mem[i] marks a
// load/store in that slot. Outputs are purely combinational, in the same
// cycle as the grant: the count of granted slots, the class (k-1 encoded in
// CLASS_W bits) and a per-slot flag marking which slots get a class.
// The counting rule follows the design; the k-1 encoding is this design's
// choice.
module ipc_classifier
  import dac_pkg::*;
(
  input  logic [IW-1:0]          sel_valid,
  input  logic [IW-1:0]          sel_is_mem,
  output logic [$clog2(IW+1)-1:0] sel_count,
  output ipc_class_t             ipc_class,
  output logic [IW-1:0]          mem_tagged
);

  always_comb begin
    sel_count = '0;
    for (int i = 0; i < IW; i++)
      sel_count = sel_count + {{($clog2(IW+1)-1){1'b0}}, sel_valid[i]};
  end

  // sel_count is at least 1 whenever a slot is tagged; with no grant the
  // class output is don't-care and reads as IPC-1.
  always_comb begin
    if (sel_count == '0) ipc_class = '0;
    else                 ipc_class = CLASS_W'(sel_count - 1'b1);
  end

  assign mem_tagged = sel_valid & sel_is_mem;

endmodule
