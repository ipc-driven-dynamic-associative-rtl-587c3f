// Sequential access schedule table.
//
// One row per IPC class (IW rows); a row holds the NCYC way masks probed in
// cycle I, II and III. The row of the access's class is read combinationally
// and loaded into the selected way mask register. Reset loads the fixed
// schedule of the design (Table 1, see dac_pkg::default_schedule); the write
// port lets software rebind a row at run time, e.g. when a process starts,
// which is the "dynamic binding" the design allows for.
//
// Rows must together keep every way reachable by every class (each row's
// masks should cover all NWAYS ways); otherwise a line placed by one class
// could be missed by another and be fetched twice. Nothing checks this: it is
// a rule for whoever writes the table.
//
// Interface: wr_en/wr_class/wr_sched write one whole row at a clock edge;
// rd_class -> rd_sched is combinational. Synchronous active-low reset.
module access_schedule_table
  import dac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  ipc_class_t wr_class,
  input  schedule_t  wr_sched,
  input  ipc_class_t rd_class,
  output schedule_t  rd_sched
);

  schedule_t table_q [IW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < IW; r++)
        table_q[r] <= default_schedule(r);
    end else if (wr_en) begin
      table_q[wr_class] <= wr_sched;
    end
  end

  assign rd_sched = table_q[rd_class];

endmodule
