// Self-checking testbench of access_schedule_table: after reset every row
// must read as the design's schedule (IPC-1: way0, way1, ways2+3; IPC-2:
// ways0+1, ways2+3; IPC-3 and IPC-4: ways2+3, ways0+1); random rows are then
// written and read back against a model, and a second reset restores the
// defaults.
module tb_access_schedule_table;
  import dac_pkg::*;

  logic clk = 0, rst_n = 0, wr_en;
  ipc_class_t wr_class, rd_class;
  schedule_t wr_sched, rd_sched;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] exp_tab [4];
  logic [11:0] model [4];

  access_schedule_table dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_defaults();
    for (int r = 0; r < 4; r++) begin
      rd_class = ipc_class_t'(r); #1;
      chk(rd_sched == exp_tab[r], $sformatf("row %0d = %h exp %h", r, rd_sched, exp_tab[r]));
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // {cycle III, cycle II, cycle I}
    exp_tab[0] = {4'b1100, 4'b0010, 4'b0001};
    exp_tab[1] = {4'b0000, 4'b1100, 4'b0011};
    exp_tab[2] = {4'b0000, 4'b0011, 4'b1100};
    exp_tab[3] = {4'b0000, 4'b0011, 4'b1100};
    wr_en = 0; wr_class = '0; wr_sched = '0; rd_class = '0;
    @(posedge clk); #1 rst_n = 1;
    check_defaults();
    model = exp_tab;
    for (int t = 0; t < 300; t++) begin
      wr_en = 1'($urandom % 2); wr_class = ipc_class_t'($urandom); wr_sched = schedule_t'($urandom);
      @(posedge clk); #1;
      if (wr_en) model[wr_class] = wr_sched;
      wr_en = 0;
      rd_class = ipc_class_t'($urandom); #1;
      chk(rd_sched == model[rd_class], "read back");
    end
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    check_defaults();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
