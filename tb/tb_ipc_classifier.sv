// Self-checking testbench of ipc_classifier: every combination of select
// grants and load/store flags of a 4-wide issue stage. The issue IPC is the
// number of granted slots, each granted load/store is tagged with class
// IPC-k (k-1 encoded), and ungranted slots are never tagged.
module tb_ipc_classifier;
  import dac_pkg::*;

  logic [IW-1:0] sel_valid, sel_is_mem, mem_tagged;
  logic [$clog2(IW+1)-1:0] sel_count;
  ipc_class_t ipc_class;
  int checks = 0, failures = 0;

  ipc_classifier dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int m = 0; m < 16; m++) begin
        int k;
        sel_valid = 4'(v); sel_is_mem = 4'(m);
        #1;
        k = 0;
        for (int i = 0; i < 4; i++) if (((v >> i) & 1) != 0) k++;
        checks++; if (int'(sel_count) != k) begin failures++; $display("count %0d exp %0d", sel_count, k); end
        checks++; if (mem_tagged != 4'(v & m)) failures++;
        if (k > 0) begin
          checks++; if (int'(ipc_class) != k - 1) begin failures++; $display("class %0d exp %0d", ipc_class, k - 1); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
