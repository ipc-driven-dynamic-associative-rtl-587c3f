// Self-checking testbench of way_mask_register: random schedules are loaded
// and shifted; the head must show the cycle I, II, III masks in turn, then
// zero, with "more" flagging a non-empty head; a load overrides a shift and
// reset clears the register.
module tb_way_mask_register;
  import dac_pkg::*;

  logic clk = 0, rst_n = 0, load, shift, more;
  schedule_t sched_in;
  way_mask_t head;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  way_mask_register dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] m [3];
    load = 0; shift = 0; sched_in = '0;
    @(posedge clk); #1 rst_n = 1;
    chk(head == 0 && !more, "reset clears");
    for (int t = 0; t < 200; t++) begin
      for (int c = 0; c < 3; c++) m[c] = 4'($urandom);
      sched_in = {m[2], m[1], m[0]};
      load = 1; shift = (t % 2 == 0);   // load wins over shift
      @(posedge clk); #1 load = 0; shift = 0;
      for (int c = 0; c < 3; c++) begin
        chk(head == m[c] && more == (m[c] != 0), $sformatf("head %b exp %b", head, m[c]));
        if (($urandom % 4) == 0) begin
          @(posedge clk); #1;   // no shift: hold
          chk(head == m[c], "hold without shift");
        end
        shift = 1; @(posedge clk); #1 shift = 0;
      end
      chk(head == 0 && !more, "empty after three shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
