// Self-checking testbench of ipc_consistency_monitor with a 16-entry buffer.
// Random accesses over 40 lines (so entries are evicted), sometimes in
// back-to-back bursts, with a random class that repeats the previous class of
// the line most of the time. A model keeps the addresses in insertion order
// (oldest dropped at 16) with their latest class and predicts the three
// counters, which are compared two cycles after each observation. A clear
// in the middle must zero the counters but keep the buffer.
module tb_ipc_consistency_monitor;
  import dac_pkg::*;

  localparam int ENTRIES = 16;
  logic clk = 0, rst_n = 0, clear, obs_valid;
  logic [ADDR_W-1:0] obs_addr;
  ipc_class_t obs_class;
  logic [31:0] cnt_same, cnt_diff, cnt_new;
  always #5 clk = ~clk;

  ipc_consistency_monitor #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  int e_same = 0, e_diff = 0, e_new = 0, evictions = 0;
  logic [27:0] order [$];
  ipc_class_t  cls_of [logic [27:0]];
  ipc_class_t  last_cls [40];

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic void model(input logic [31:0] a, input ipc_class_t c);
    logic [27:0] k = a[31:4];
    if (cls_of.exists(k)) begin
      if (cls_of[k] == c) e_same++; else e_diff++;
      cls_of[k] = c;
    end else begin
      e_new++;
      if (order.size() == ENTRIES) begin cls_of.delete(order.pop_front()); evictions++; end
      order.push_back(k);
      cls_of[k] = c;
    end
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int line;
    clear = 0; obs_valid = 0; obs_addr = '0; obs_class = '0;
    for (int i = 0; i < 40; i++) last_cls[i] = ipc_class_t'($urandom);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      line = $urandom_range(0, 39);
      obs_valid = 1;
      obs_addr = (32'(line) << 4) | 32'h0123_0000 | ($urandom_range(0, 15));
      obs_class = ($urandom_range(0, 3) == 0) ? ipc_class_t'($urandom) : last_cls[line];
      last_cls[line] = obs_class;
      model(obs_addr, obs_class);
      @(posedge clk); #1;
      obs_valid = 0;
      if ($urandom_range(0, 2) != 0) begin      // otherwise back-to-back
        @(posedge clk); #1;
        chk(cnt_same == 32'(e_same) && cnt_diff == 32'(e_diff) && cnt_new == 32'(e_new),
            $sformatf("counters %0d/%0d/%0d exp %0d/%0d/%0d", cnt_same, cnt_diff, cnt_new, e_same, e_diff, e_new));
      end
      if (t == 1500) begin
        @(posedge clk); #1;
        clear = 1; @(posedge clk); #1 clear = 0;
        e_same = 0; e_diff = 0; e_new = 0;
        chk(cnt_same == 0 && cnt_diff == 0 && cnt_new == 0, "clear");
      end
    end
    @(posedge clk); @(posedge clk); #1;
    chk(cnt_same == 32'(e_same) && cnt_diff == 32'(e_diff) && cnt_new == 32'(e_new), "final counters");
    chk(evictions > 0 && e_diff > 0 && e_same > 0, "evictions, same and different seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
