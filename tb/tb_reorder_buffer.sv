// tb_reorder_buffer: self-checking test of the resizable reorder buffer.
// A reference model keeps the live instructions in program order with the cycle each
// completed. Each cycle the test allocates, completes (in random order) and changes the
// level at random (growing at any time, shrinking only when shrink_ok says it may), and
// checks that the ROB commits exactly the leading instructions the model says may
// commit: done one cycle earlier at level 1, two cycles earlier at levels 2 and 3, at most
// 4 per cycle, stopping after a mispredicted branch, which must raise flush. It also
// checks the capacities 128/320/512, the done queries, and that indices handed out at
// allocation never collide with a live entry.
module tb_reorder_buffer;
  import diw_pkg::*;

  localparam int unsigned NCP = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  level_e level = LVL1;
  logic shrink = 1'b0;
  logic [3:0] disp_valid = '0;
  logic [PAY_W-1:0] disp_payload [4];
  logic [3:0] disp_is_mem = '0;
  logic [8:0] disp_idx [4];
  logic [9:0] free_n, count;
  logic shrink_ok;
  logic [NCP-1:0] cp_valid = '0, cp_mispred = '0;
  logic [8:0] cp_idx [NCP];
  logic [8:0] q_tag [8];
  logic [7:0] q_done;
  logic [3:0] commit_valid, commit_is_mem;
  logic [8:0] commit_idx [4];
  logic [PAY_W-1:0] commit_payload [4];
  logic flush;
  int checks = 0, failures = 0, cyc = 0;

  reorder_buffer #(.ENTRIES(512), .WIDTH(4), .NCP(NCP), .NQ(8)) dut (.*);

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

  // model: live instructions, oldest first
  typedef struct {
    int idx;
    int seq;
    int done_cyc;   // -1 while not done
    logic mis;
  } ent_t;
  ent_t live [$];
  int seq_next = 0;
  int n_shrink = 0;

  function automatic int sz(level_e l);
    return l == LVL1 ? 128 : l == LVL2 ? 320 : 512;
  endfunction

  task automatic clear_inputs();
    disp_valid = '0; cp_valid = '0; cp_mispred = '0; shrink = 1'b0;
    for (int w = 0; w < 4; w++) begin disp_payload[w] = '0; cp_idx[w] = '0; end
    for (int q = 0; q < 8; q++) q_tag[q] = '0;
  endtask

  // one random cycle; p_mis: chance (per 1000) that a completion is a mispredict
  task automatic cycle_rand(input int p_alloc, input int p_mis, input logic levels,
                           input logic cp_en = 1'b1);
    int nd, nc, ncommit, exp_n;
    logic exp_flush, deep;
    level_e nl;
    clear_inputs();
    deep = level != LVL1;
    // level change: grow any time, shrink when allowed (then no allocation)
    nl = level;
    if (levels && $urandom_range(0, 99) == 0) begin
      if (level != LVL3 && $urandom_range(0, 1) == 0) nl = level_e'(int'(level) + 1);
      else if (level != LVL1 && shrink_ok) begin
        nl = level_below(level);
        shrink = 1'b1;
        n_shrink++;
      end
    end
    // allocation
    nd = 0;
    if (!shrink && !flush && $urandom_range(0, 99) < p_alloc && int'(free_n) >= 4) nd = $urandom_range(1, 4);
    for (int w = 0; w < nd; w++) begin
      disp_valid[w]   = 1'b1;
      disp_payload[w] = PAY_W'(seq_next + w);
    end
    // completion of random not-done live entries
    nc = 0;
    for (int k = 0; k < live.size() && nc < NCP; k++) begin
      if (cp_en && live[k].done_cyc < 0 && $urandom_range(0, 3) == 0) begin
        cp_valid[nc]   = 1'b1;
        cp_idx[nc]     = 9'(live[k].idx);
        cp_mispred[nc] = ($urandom_range(0, 999) < p_mis);
        nc++;
      end
    end
    // queries of random live entries
    for (int q = 0; q < 8; q++)
      if (live.size() > 0) q_tag[q] = 9'(live[$urandom_range(0, live.size() - 1)].idx);
    #2;
    // expected commits
    exp_n = 0;
    exp_flush = 1'b0;
    for (int k = 0; k < 4 && k < live.size(); k++) begin
      if (live[k].done_cyc >= 0 && live[k].done_cyc < cyc - (deep ? 1 : 0)) begin
        exp_n++;
        if (live[k].mis) begin exp_flush = 1'b1; break; end
      end else break;
    end
    ncommit = 0;
    for (int w = 0; w < 4; w++) if (commit_valid[w]) ncommit++;
    check(ncommit == exp_n, $sformatf("commit count %0d expected %0d", ncommit, exp_n));
    check(flush == exp_flush, "flush on mispredicted branch");
    for (int w = 0; w < exp_n; w++)
      check(commit_valid[w] && int'(commit_payload[w]) == (live[w].seq & 16'hffff) &&
            int'(commit_idx[w]) == live[w].idx, "commit in program order");
    check(int'(count) == live.size(), $sformatf("count %0d model %0d", count, live.size()));
    check(int'(free_n) + int'(count) <= sz(level), "free + count within size");
    for (int q = 0; q < 8; q++) begin
      for (int k = 0; k < live.size(); k++)
        if (live[k].idx == int'(q_tag[q]))
          check(q_done[q] == (live[k].done_cyc >= 0), "done query");
    end
    // allocated indices must be free and in range
    for (int w = 0; w < nd; w++) begin
      check(int'(disp_idx[w]) < sz(level), "index within size");
      for (int k = 0; k < live.size(); k++)
        check(live[k].idx != int'(disp_idx[w]), "index not live");
    end
    // update the model
    for (int c = 0; c < nc; c++)
      for (int k = 0; k < live.size(); k++)
        if (live[k].idx == int'(cp_idx[c])) begin live[k].done_cyc = cyc; live[k].mis = cp_mispred[c]; end
    repeat (exp_n) void'(live.pop_front());
    if (exp_flush) live.delete();
    else for (int w = 0; w < nd; w++) live.push_back('{int'(disp_idx[w]), seq_next + w, -1, 1'b0});
    seq_next += nd;
    @(posedge clk); #1;
    level = nl;
  endtask

  initial begin
    int n;
    clear_inputs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // capacities
    for (int l = 0; l < 3; l++) begin
      level = level_e'(l);
      #1;
      check(int'(free_n) == sz(level), $sformatf("level %0d capacity %0d", l + 1, free_n));
    end
    level = LVL1;
    // fill level 1 to full without completing
    n = 0;
    while (free_n >= 4 && n < 200) begin cycle_rand(100, 0, 1'b0, 1'b0); n++; end
    check(count >= 125 && count <= 128, "level 1 fills to 128");
    // growing while the live region wraps gives room only once the head wraps
    level = LVL2;
    #1 if (count == 128) check(free_n == 0, "no room while wrapped after growth");
    // from empty: 100 entries at level 1, then grow twice and fill to 512
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1; live.delete();
    level = LVL1;
    repeat (25) cycle_rand(100, 0, 1'b0, 1'b0);
    level = LVL2;
    n = 0;
    while (free_n >= 4 && n < 200) begin cycle_rand(100, 0, 1'b0, 1'b0); n++; end
    check(count >= 317 && count <= 320, "grows to 320 entries");
    level = LVL3;
    #1 check(int'(free_n) == 512 - int'(count), "growth without wrap is immediate");
    n = 0;
    while (free_n >= 4 && n < 200) begin cycle_rand(100, 0, 1'b0, 1'b0); n++; end
    check(count >= 509 && count <= 512, "level 3 fills to 512");
    // drain at level 3, then run at fixed levels
    repeat (600) cycle_rand(0, 0, 1'b0);
    check(count == 0, "drained");
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    level = LVL1;
    repeat (400) cycle_rand(60, 0, 1'b0);
    // random with level changes and mispredictions
    repeat (20000) cycle_rand(70, 5, 1'b1);
    check(n_shrink > 10, $sformatf("shrinks exercised (%0d)", n_shrink));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
