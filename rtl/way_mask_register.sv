// Selected way mask register.
//
// When a load/store starts its cache access, the NCYC temporal way masks of
// its schedule are loaded here in parallel. The head (cycle I mask) drives the
// way enables of the first probe; each probe shifts the register down by one
// position so that the next cycle's mask becomes the head, and an empty
// (all-zero) head means the schedule is used up. This follows the design's
// description of the register; the synchronous, active-low reset to all-zero
// is this design's choice.
//
// Interface: load (with sched_in) takes priority over shift. head and more
// (head is not zero) are combinational from the register.
module way_mask_register
  import dac_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  schedule_t sched_in,
  input  logic      shift,
  output way_mask_t head,
  output logic      more
);

  schedule_t q;

  always_ff @(posedge clk) begin
    if (!rst_n)
      q <= '0;
    else if (load)
      q <= sched_in;
    else if (shift) begin
      for (int c = 0; c < NCYC - 1; c++)
        q[c] <= q[c+1];
      q[NCYC-1] <= '0;
    end
  end

  assign head = q[0];
  assign more = |q[0];

endmodule
