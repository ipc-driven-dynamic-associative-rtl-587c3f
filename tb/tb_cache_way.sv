// Self-checking testbench of cache_way (32 sets): random refills, byte-masked
// stores and reads against a model of tag, valid and line per set. A read
// must report hit one cycle later exactly when the set is valid with the
// compared tag, return the stored line and the set's valid bit, and report no hit in a cycle after
// a write or an idle cycle. Reset must invalidate every set.
module tb_cache_way;
  import dac_pkg::*;

  localparam int SETS = 32;
  localparam int INDEX_W = $clog2(SETS);
  localparam int TAG_W = ADDR_W - OFFSET_W - INDEX_W;

  logic clk = 0, rst_n = 0, en, we, tag_we, hit, valid;
  logic [INDEX_W-1:0] index;
  logic [TAG_W-1:0] wtag, cmp_tag;
  line_t wdata, rdata;
  logic [LINE_BYTES-1:0] wbmask;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cache_way #(.SETS(SETS)) dut (.*);

  logic [TAG_W-1:0] mtag [SETS];
  bit               mvld [SETS];
  line_t            mdat [SETS];

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int op, s;
    en = 0; we = 0; tag_we = 0; index = '0; wtag = '0; cmp_tag = '0; wdata = '0; wbmask = '0;
    for (int i = 0; i < SETS; i++) mvld[i] = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      op = $urandom_range(0, 9); s = $urandom_range(0, SETS - 1);
      index = INDEX_W'(s);
      if (op == 0) begin            // refill
        en = 1; we = 1; tag_we = 1; wtag = TAG_W'($urandom_range(0, 3)); wbmask = '1;
        wdata = {$urandom, $urandom, $urandom, $urandom};
        mtag[s] = wtag; mvld[s] = 1; mdat[s] = wdata;
        @(posedge clk); #1;
        chk(!hit, "no hit after write");
      end else if (op == 1) begin   // byte store
        en = 1; we = 1; tag_we = 0; wbmask = LINE_BYTES'($urandom);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        for (int b = 0; b < LINE_BYTES; b++) if (wbmask[b]) mdat[s][b*8 +: 8] = wdata[b*8 +: 8];
        @(posedge clk); #1;
      end else if (op == 2) begin   // idle
        en = 0; we = 0;
        @(posedge clk); #1;
        chk(!hit, "no hit after idle cycle");
      end else begin                // probe
        en = 1; we = 0; cmp_tag = TAG_W'($urandom_range(0, 3));
        @(posedge clk); #1;
        en = 0;
        chk(hit == (mvld[s] && mtag[s] == cmp_tag), $sformatf("hit %0d set %0d", hit, s));
        if (mvld[s]) chk(rdata == mdat[s], "line data");
        chk(valid == mvld[s], "valid bit of the probed set");
      end
      en = 0; we = 0; tag_we = 0;
    end
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < SETS; i++) begin
      index = INDEX_W'(i); cmp_tag = mtag[i]; en = 1;
      @(posedge clk); #1 en = 0;
      chk(!hit, "invalid after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
