// Reference model used by the testbenches of the IPC-driven data cache.
//
// dac_ref models, independently of the RTL, what the cache must do: the
// memory contents seen through a write-through L1, the tags held in each way
// of each set, and for every access the schedule probes it takes, whether it
// hits and in which probe. Memory starts from a fixed hash of the word
// address, the same rule the L2 model uses, so no file is needed.
package dac_ref_pkg;

  localparam int NW = 4;
  localparam int NC = 3;

  function automatic logic [31:0] init_word(input logic [31:0] waddr);
    return (waddr * 32'h9E3779B1) ^ 32'h5A5A_1234;
  endfunction

  class dac_ref;
    int                sets;
    logic [31:0]       mem[logic [31:0]];   // word address -> word
    logic [31:0]       tag[][NW];
    bit                vld[][NW];
    logic [3:0]        sched[4][NC];        // [class][cycle] way mask

    // results of the last access
    bit  hit;
    int  probes;
    int  ways_read;       // way activations of the probes
    int  hit_way;
    int  fill_cnt = 0;    // fills so far, selects between two placement ways
    logic [31:0] rdata;

    function new(int sets_);
      sets = sets_;
      tag = new[sets];
      vld = new[sets];
      foreach (vld[s, w]) vld[s][w] = 0;
      // Table 1
      sched[0][0] = 4'b0001; sched[0][1] = 4'b0010; sched[0][2] = 4'b1100;
      sched[1][0] = 4'b0011; sched[1][1] = 4'b1100; sched[1][2] = 4'b0000;
      sched[2][0] = 4'b1100; sched[2][1] = 4'b0011; sched[2][2] = 4'b0000;
      sched[3][0] = 4'b1100; sched[3][1] = 4'b0011; sched[3][2] = 4'b0000;
    endfunction

    function logic [31:0] read_word(logic [31:0] addr);
      logic [31:0] wa = addr >> 2;
      if (mem.exists(wa)) return mem[wa];
      return init_word(wa);
    endfunction

    function void write_word(logic [31:0] addr, logic [31:0] d, logic [3:0] be);
      logic [31:0] w = read_word(addr);
      for (int b = 0; b < 4; b++) if (be[b]) w[b*8 +: 8] = d[b*8 +: 8];
      mem[addr >> 2] = w;
    endfunction

    function int popc(logic [3:0] m);
      return int'(m[0]) + int'(m[1]) + int'(m[2]) + int'(m[3]);
    endfunction

    // One access of class cls (0-based). Updates state, sets the results.
    function void access(logic [31:0] addr, bit store, logic [31:0] wd, logic [3:0] be, int cls);
      int set = int'((addr >> 4) % sets);
      logic [31:0] t = (addr >> 4) / sets;
      int victim;
      hit = 0; probes = 0; ways_read = 0; hit_way = -1;
      for (int c = 0; c < NC && !hit; c++) begin
        if (sched[cls][c] == 0) break;
        probes++;
        ways_read += popc(sched[cls][c]);
        for (int w = 0; w < NW; w++)
          if (sched[cls][c][w] && vld[set][w] && tag[set][w] == t) begin
            hit = 1; hit_way = w;
          end
      end
      rdata = read_word(addr);
      if (!hit) begin
        // placement: a way of the first mask, invalid ones first, else in turn
        int cand[$];
        victim = -1;
        for (int w = 0; w < NW; w++) if (sched[cls][0][w]) cand.push_back(w);
        foreach (cand[i]) if (victim < 0 && !vld[set][cand[i]]) victim = cand[i];
        if (victim < 0) victim = cand[(fill_cnt % 4) % cand.size()];
        fill_cnt++;
        tag[set][victim] = t;
        vld[set][victim] = 1;
      end
      if (store) write_word(addr, wd, be);
    endfunction
  endclass

endpackage
