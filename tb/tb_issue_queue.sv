// tb_issue_queue: self-checking test of the resizable issue queue.
// Directed: a dependent pair issues back to back at level 1 and with a one-cycle bubble at
// levels 2 and 3; an external wakeup releases a waiting entry the next cycle; capacity
// per level (64/160/256); shrink_ok. Random: at each level, a stream of instructions with
// random dependences; every instruction must issue exactly once, never more than 4 per
// cycle, and never before the wakeups of its sources reached the queue.
module tb_issue_queue;
  import diw_pkg::*;

  localparam int unsigned NWK = 2;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  level_e level = LVL1;
  logic [3:0] disp_valid = '0;
  iq_in_t     disp_entry [4];
  logic [8:0] free_n, count;
  logic [3:0] iss_valid;
  iss_uop_t   iss_uop [4];
  logic [NWK-1:0] ext_wk_valid = '0;
  rob_idx_t   ext_wk_tag [NWK];
  logic       shrink_ok;
  int checks = 0, failures = 0, cyc = 0;

  issue_queue #(.ENTRIES(256), .WIDTH(4), .NWK(NWK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic iq_in_t mk(input int tag, input logic w1, input int t1, input logic w2,
                                input int t2, input logic sw);
    iq_in_t e;
    e = '0;
    e.src1_wait = w1; e.src1_tag = rob_idx_t'(t1);
    e.src2_wait = w2; e.src2_tag = rob_idx_t'(t2);
    e.uop.rob_idx = rob_idx_t'(tag);
    e.uop.self_wake = sw;
    e.uop.payload = PAY_W'(tag);
    return e;
  endfunction

  task automatic clear_inputs();
    disp_valid = '0; ext_wk_valid = '0;
    for (int w = 0; w < 4; w++) disp_entry[w] = '0;
    for (int k = 0; k < NWK; k++) ext_wk_tag[k] = '0;
  endtask

  // cycle at which tag t issued (-1: not yet)
  int iss_cyc [512];
  // cycle whose wakeup bus carried tag t (-1: not yet)
  int wk_cyc [512];

  // directed: producer (tag 1) and consumer (tag 2) dispatched together
  task automatic pair_test(input level_e l, input int exp_gap);
    int p, c;
    level = l;
    clear_inputs();
    disp_entry[0] = mk(1, 0, 0, 0, 0, 1);
    disp_entry[1] = mk(2, 1, 1, 0, 0, 1);
    disp_valid = 4'b0011;
    @(posedge clk); #1;
    clear_inputs();
    p = -1; c = -1;
    for (int n = 0; n < 6; n++) begin
      for (int w = 0; w < 4; w++) if (iss_valid[w]) begin
        if (iss_uop[w].rob_idx == 1) p = n;
        if (iss_uop[w].rob_idx == 2) c = n;
      end
      @(posedge clk); #1;
    end
    check(p == 0, $sformatf("level %0d producer issues first cycle", int'(l) + 1));
    check(c - p == exp_gap, $sformatf("level %0d dependent issues %0d cycles after producer, expected %0d",
                                      int'(l) + 1, c - p, exp_gap));
  endtask

  task automatic fill_test(input level_e l, input int size);
    level = l;
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    clear_inputs();
    check(int'(free_n) == size, $sformatf("level %0d free entries %0d", int'(l) + 1, free_n));
    // never-ready entries wait on tag 500
    for (int n = 0; n < size / 4; n++) begin
      for (int w = 0; w < 4; w++) disp_entry[w] = mk(n * 4 + w, 1, 500, 0, 0, 0);
      disp_valid = 4'hf;
      @(posedge clk); #1;
    end
    clear_inputs();
    check(free_n == 0 && int'(count) == size, $sformatf("level %0d full at %0d", int'(l) + 1, size));
    check(iss_valid == 0, "nothing ready issues");
    check(shrink_ok == (l == LVL1), "shrink_ok reflects entries above lower size");
    // wake them all through the external port: 4 issue per cycle
    ext_wk_valid[0] = 1'b1; ext_wk_tag[0] = rob_idx_t'(500);
    @(posedge clk); #1;
    clear_inputs();
    for (int n = 0; n < size / 4; n++) begin
      check(iss_valid == 4'hf, "4 issue per cycle after external wakeup");
      @(posedge clk); #1;
    end
    check(count == 0 && iss_valid == 0, "drained");
  endtask

  task automatic random_test(input level_e l, input int n_instr);
    int next_tag, issued, t, oldest;
    level = l;
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    for (int i = 0; i < 512; i++) begin iss_cyc[i] = -1; wk_cyc[i] = -1; end
    next_tag = 0; issued = 0; oldest = 0;
    while (issued < n_instr) begin
      int s1, s2, nd, ok_n;
      logic w1, w2;
      clear_inputs();
      // external wakeups of non-self-waking producers, 1..5 cycles after issue
      for (int k = 0; k < NWK; k++) begin
        for (int i = 0; i < 512; i++) begin
          if (!ext_wk_valid[k] && iss_cyc[i] >= 0 && wk_cyc[i] < 0 &&
              cyc - iss_cyc[i] >= 1 + (i % 5) && (k == 0 || ext_wk_tag[0] != rob_idx_t'(i))) begin
            ext_wk_valid[k] = 1'b1; ext_wk_tag[k] = rob_idx_t'(i);
          end
        end
      end
      // dispatch up to 4
      // like a reorder buffer, keep at most 480 tags in flight so that none is reused early
      while (oldest < next_tag && iss_cyc[oldest % 512] >= 0 && wk_cyc[oldest % 512] >= 0 &&
             wk_cyc[oldest % 512] < cyc) oldest++;
      nd = (next_tag < n_instr && free_n >= 4 && next_tag + 4 - oldest <= 480)
           ? $urandom_range(0, 4) : 0;
      if (next_tag + nd > n_instr) nd = n_instr - next_tag;
      // tags being dispatched start a new life
      for (int w = 0; w < nd; w++) begin
        iss_cyc[(next_tag + w) % 512] = -1;
        wk_cyc[(next_tag + w) % 512]  = -1;
      end
      for (int w = 0; w < nd; w++) begin
        t = next_tag + w;
        s1 = t - 1 - $urandom_range(0, 6);
        s2 = t - 1 - $urandom_range(0, 12);
        // a source waits unless its wakeup already went by
        w1 = s1 >= 0 && !(wk_cyc[s1 % 512] >= 0 && wk_cyc[s1 % 512] < cyc);
        w2 = s2 >= 0 && !(wk_cyc[s2 % 512] >= 0 && wk_cyc[s2 % 512] < cyc);
        disp_entry[w] = mk(t % 512, w1, s1 < 0 ? 0 : s1 % 512, w2, s2 < 0 ? 0 : s2 % 512,
                           $urandom_range(0, 2) != 0);
        disp_valid[w] = 1'b1;
        has1[t % 512] = s1 >= 0; src_t1[t % 512] = rob_idx_t'(s1 < 0 ? 0 : s1 % 512);
        has2[t % 512] = s2 >= 0; src_t2[t % 512] = rob_idx_t'(s2 < 0 ? 0 : s2 % 512);
      end
      #3;
      // sample this cycle's issue
      ok_n = 0;
      for (int w = 0; w < 4; w++) if (iss_valid[w]) begin
        int id;
        id = int'(iss_uop[w].rob_idx);
        ok_n++;
        check(iss_cyc[id] < 0, "issued once");
        iss_cyc[id] = cyc;
        issued++;
        if (iss_uop[w].self_wake) wk_cyc[id] = (l == LVL1) ? cyc : cyc + 1;
      end
      for (int k = 0; k < NWK; k++) if (ext_wk_valid[k]) wk_cyc[ext_wk_tag[k]] = cyc;
      // the sources of what issued had their wakeup in an earlier cycle
      for (int w = 0; w < 4; w++) if (iss_valid[w]) begin
        check(!has1[iss_uop[w].rob_idx] ||
              (wk_cyc[src_t1[iss_uop[w].rob_idx]] >= 0 && wk_cyc[src_t1[iss_uop[w].rob_idx]] < cyc),
              $sformatf("src1 woken before issue id=%0d src=%0d wk=%0d iss=%0d", iss_uop[w].rob_idx, src_t1[iss_uop[w].rob_idx], wk_cyc[src_t1[iss_uop[w].rob_idx]], iss_cyc[src_t1[iss_uop[w].rob_idx]]));
        check(!has2[iss_uop[w].rob_idx] ||
              (wk_cyc[src_t2[iss_uop[w].rob_idx]] >= 0 && wk_cyc[src_t2[iss_uop[w].rob_idx]] < cyc),
              "src2 woken before issue");
      end
      next_tag += nd;
      @(posedge clk); #1;
      if (cyc > 60000) break;
    end
    clear_inputs();
    check(issued == n_instr, $sformatf("level %0d all %0d issued (%0d)", int'(l) + 1, n_instr, issued));
  endtask

  logic     has1 [512], has2 [512];
  rob_idx_t src_t1 [512], src_t2 [512];

  initial begin
    clear_inputs();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    pair_test(LVL1, 1);
    pair_test(LVL2, 2);
    pair_test(LVL3, 2);
    // external wakeup
    level = LVL2;
    disp_entry[0] = mk(7, 1, 300, 0, 0, 0);
    disp_valid = 4'b0001;
    @(posedge clk); #1;
    clear_inputs();
    @(posedge clk); #1;
    check(iss_valid == 0, "waiting entry holds");
    ext_wk_valid[1] = 1'b1; ext_wk_tag[1] = rob_idx_t'(300);
    @(posedge clk); #1;
    clear_inputs();
    check(iss_valid[0] && iss_uop[0].rob_idx == 7, "external wakeup issues next cycle");
    @(posedge clk); #1;
    fill_test(LVL1, 64);
    fill_test(LVL2, 160);
    fill_test(LVL3, 256);
    random_test(LVL1, 2000);
    random_test(LVL2, 2000);
    random_test(LVL3, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
