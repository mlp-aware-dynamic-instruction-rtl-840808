// tb_load_store_queue: self-checking test of the resizable load/store queue.
// A reference model holds the live memory instructions in program order. Each cycle the
// test dispatches, writes addresses and store data at random, retires finished leading
// entries and sometimes flushes. The model decides which loads must be picked (the two
// oldest with an address, not yet sent, and no older store of unknown address) and what
// each must return (data of the youngest older store to the same address, or a cache
// access); the queue's result must match and appear one cycle after the pick at level 1
// and two cycles after it at levels 2 and 3. Committed stores must leave in order with
// their address and data. Capacity per level and shrink_ok are checked too.
module tb_load_store_queue;
  import diw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, shrink = 1'b0;
  level_e level = LVL1;
  logic [3:0] disp_valid = '0, disp_is_store = '0;
  rob_idx_t   disp_rob [4];
  logic [7:0] disp_idx [4];
  logic [8:0] free_n, count;
  logic       shrink_ok;
  logic [3:0] agu_valid = '0;
  logic [7:0] agu_idx [4];
  logic [ADDR_W-1:0] agu_addr [4];
  logic [DATA_W-1:0] agu_data [4];
  logic [1:0] ld_res_valid;
  ld_res_t    ld_res [2];
  logic [2:0] retire_n = '0;
  logic [3:0] st_commit_valid;
  logic [ADDR_W-1:0] st_commit_addr [4];
  logic [DATA_W-1:0] st_commit_data [4];
  int checks = 0, failures = 0, cyc = 0;
  int lvl_at = 0;
  int n_fwd = 0, n_cache = 0, n_blocked = 0, n_flush = 0, n_st = 0;

  load_store_queue #(.ENTRIES(256), .WIDTH(4), .NLD(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  typedef struct {
    int   idx;
    int   rob;
    logic st;
    logic known;
    int   addr;
    int   data;
    logic sent;
    logic done;
  } ent_t;
  ent_t live [$];

  typedef struct {
    int   due;
    int   idx;
    int   rob;
    int   addr;
    logic fwd;
    int   data;
  } res_t;
  res_t expq [$];
  int rob_next = 0;

  function automatic int sz(level_e l);
    return l == LVL1 ? 64 : l == LVL2 ? 160 : 256;
  endfunction

  task automatic clear_inputs();
    disp_valid = '0; disp_is_store = '0; agu_valid = '0; retire_n = '0;
    flush = 1'b0; shrink = 1'b0;
    for (int w = 0; w < 4; w++) begin
      disp_rob[w] = '0; agu_idx[w] = '0; agu_addr[w] = '0; agu_data[w] = '0;
    end
  endtask

  task automatic cycle_rand(input int p_disp, input int p_flush, input logic exact);
    int nd, na, nr, np, depth;
    logic unk;
    clear_inputs();
    depth = (level == LVL1) ? 1 : 2;
    // right after a level change, results already in flight keep their old timing
    if (cyc < lvl_at + 3) exact = 1'b0;
    if ($urandom_range(0, 999) < p_flush) flush = 1'b1;
    // dispatch
    nd = 0;
    if ($urandom_range(0, 99) < p_disp && int'(free_n) >= 4) nd = $urandom_range(1, 4);
    for (int w = 0; w < nd; w++) begin
      disp_valid[w]    = 1'b1;
      disp_is_store[w] = ($urandom_range(0, 2) == 0);
      disp_rob[w]      = rob_idx_t'(rob_next + w);
    end
    // address generation for random live entries
    na = 0;
    foreach (live[k]) begin
      if (!live[k].known && na < 4 && $urandom_range(0, 5) == 0) begin
        agu_valid[na] = 1'b1;
        agu_idx[na]   = 8'(live[k].idx);
        agu_addr[na]  = ADDR_W'($urandom_range(0, 7));
        agu_data[na]  = DATA_W'($urandom());
        na++;
      end
    end
    // retire finished leading entries
    nr = 0;
    for (int k = 0; k < live.size() && k < 4; k++) begin
      if (live[k].st ? live[k].known : live[k].done) nr++;
      else break;
    end
    if (nr > 0) nr = $urandom_range(0, nr);
    retire_n = 3'(nr);
    #2;
    // results due this cycle
    for (int p = 0; p < 2; p++) begin
      if (ld_res_valid[p]) begin
        int m;
        m = -1;
        foreach (expq[j]) if (m < 0 && expq[j].idx == int'(ld_res[p].lsq_idx)) m = j;
        check(m >= 0, "result for a picked load");
        if (m >= 0) begin
          check(!exact || expq[m].due == cyc, $sformatf("result after %0d cycles", depth));
          check(int'(ld_res[p].rob_idx) == expq[m].rob && int'(ld_res[p].addr) == expq[m].addr &&
                ld_res[p].fwd == expq[m].fwd && (!expq[m].fwd || int'(ld_res[p].data) == expq[m].data),
                "result contents (forwarding)");
          if (ld_res[p].fwd) n_fwd++; else n_cache++;
          foreach (live[k]) if (live[k].idx == expq[m].idx) live[k].done = 1'b1;
          expq.delete(m);
        end
      end
    end
    if (exact) foreach (expq[j]) check(expq[j].due > cyc, "no result is late");
    // committed stores
    for (int w = 0; w < 4; w++) begin
      logic exp_st;
      exp_st = (w < nr) && live[w].st;
      check(st_commit_valid[w] == exp_st, "store commit valid");
      if (exp_st) begin
        n_st++;
        check(int'(st_commit_addr[w]) == live[w].addr && int'(st_commit_data[w]) == live[w].data,
              "store commit address and data");
      end
    end
    check(int'(count) == live.size(), $sformatf("count %0d model %0d", count, live.size()));
    // model pick, from the state before this edge
    np = 0;
    unk = 1'b0;
    foreach (live[k]) begin
      if (live[k].st) begin
        if (!live[k].known) unk = 1'b1;
      end else if (live[k].known && !live[k].sent) begin
        if (unk) n_blocked++;
        else if (np < 2) begin
          res_t r;
          r.due = cyc + depth; r.idx = live[k].idx; r.rob = live[k].rob;
          r.addr = live[k].addr; r.fwd = 1'b0; r.data = 0;
          for (int j = 0; j < k; j++)
            if (live[j].st && live[j].addr == live[k].addr) begin r.fwd = 1'b1; r.data = live[j].data; end
          live[k].sent = 1'b1;
          if (!flush) expq.push_back(r);
          np++;
        end
      end
    end
    for (int w = 0; w < nd; w++) begin
      ent_t e;
      check(int'(disp_idx[w]) < sz(level), "index within size");
      foreach (live[k]) check(live[k].idx != int'(disp_idx[w]), "index not live");
      e = '{int'(disp_idx[w]), (rob_next + w) % 512, disp_is_store[w], 1'b0, 0, 0, 1'b0, 1'b0};
      live.push_back(e);
    end
    for (int a = 0; a < na; a++)
      foreach (live[k]) if (live[k].idx == int'(agu_idx[a])) begin
        live[k].known = 1'b1; live[k].addr = int'(agu_addr[a]); live[k].data = int'(agu_data[a]);
      end
    repeat (nr) void'(live.pop_front());
    rob_next += nd;
    if (flush) begin live.delete(); expq.delete(); n_flush++; end
    @(posedge clk); #1;
  endtask

  initial begin
    int n;
    clear_inputs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int l = 0; l < 3; l++) begin
      level = level_e'(l);
      #1 check(int'(free_n) == sz(level), "capacity per level");
    end
    level = LVL1;
    repeat (3000) cycle_rand(40, 2, 1'b1);
    level = LVL2; lvl_at = cyc;
    repeat (3000) cycle_rand(60, 2, 1'b1);
    level = LVL3; lvl_at = cyc;
    repeat (3000) cycle_rand(80, 2, 1'b1);
    // shrink: drain with no dispatch until shrink_ok, then shrink step by step
    n = 0;
    while (!shrink_ok && n < 2000) begin cycle_rand(0, 0, 1'b1); n++; end
    check(shrink_ok, "shrinkable after draining");
    clear_inputs(); shrink = 1'b1; @(posedge clk); #1 shrink = 1'b0; level = LVL2; lvl_at = cyc;
    n = 0;
    while (!shrink_ok && n < 2000) begin cycle_rand(0, 0, 1'b1); n++; end
    clear_inputs(); shrink = 1'b1; @(posedge clk); #1 shrink = 1'b0; level = LVL1; lvl_at = cyc;
    repeat (3000) cycle_rand(40, 1, 1'b1);
    check(n_fwd > 50 && n_cache > 50 && n_blocked > 50 && n_flush > 5 && n_st > 50,
          $sformatf("mechanisms seen: fwd %0d cache %0d blocked %0d flush %0d stores %0d",
                    n_fwd, n_cache, n_blocked, n_flush, n_st));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
