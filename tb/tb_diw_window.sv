// tb_diw_window: end-to-end test of the resizable instruction window at its full size.
// The testbench plays the rest of a 4-wide core around diw_window: a front end that
// sends a random program (ALU operations, branches, loads, stores with register
// dependences), execution units (one-cycle ALU, address generation), a data cache with
// a 2-cycle L1 hit, a 14-cycle L2 hit and a 314-cycle LLC miss, and a main memory
// model. The program runs a compute phase (no LLC misses), a memory phase (frequent LLC
// misses) and a second compute phase. Checked: every instruction commits once, in
// program order; every load returns the value of the youngest older store to its address;
// a dependent instruction never issues earlier than the wakeup loop allows (the cycle
// after its producer at level 1, two cycles after at levels 2 and 3) and does issue back
// to back at level 1. Each mechanism of the design must happen at least once: level
// increase, level 3, level decrease, allocation stall, a shrink held back by occupied
// entries, store-to-load forwarding, a mispredicted-branch flush, a full window.
module tb_diw_window;
  import diw_pkg::*;

  localparam int NINSTR = 12000;
  localparam int NCP = 6;
  localparam int NADDR = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] disp_valid = '0;
  disp_uop_t  disp_uop [4];
  logic       disp_ready;
  rob_idx_t   disp_rob_idx [4];
  logic [3:0] iss_valid;
  iss_uop_t   iss_uop [4];
  logic [NCP-1:0] cp_valid = '0, cp_mispred = '0;
  rob_idx_t   cp_idx [NCP];
  logic [3:0] agu_valid = '0;
  lsq_idx_t   agu_idx [4];
  logic [ADDR_W-1:0] agu_addr [4];
  logic [DATA_W-1:0] agu_data [4];
  logic [1:0] ld_res_valid;
  ld_res_t    ld_res [2];
  logic [3:0] commit_valid;
  rob_idx_t   commit_idx [4];
  logic [PAY_W-1:0] commit_payload [4];
  logic [3:0] st_commit_valid;
  logic [ADDR_W-1:0] st_commit_addr [4];
  logic [DATA_W-1:0] st_commit_data [4];
  logic       flush;
  logic       llc_miss = 1'b0;
  level_e     level;
  logic       alloc_stall, lvl_up, lvl_down;
  logic [8:0] iq_count;
  logic [9:0] rob_count;
  logic [8:0] lsq_count;

  diw_window dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ---- program ----
  typedef enum int { ALU, BR, LD, ST } kind_e;
  kind_e kind [NINSTR];
  int    addr [NINSTR];
  int    src1 [NINSTR], src2 [NINSTR];  // producer sequence numbers, -1 for none
  logic  mis  [NINSTR];
  int    lvl_of_issue [NINSTR];
  int    iss_cyc [NINSTR];
  logic  committed [NINSTR];
  int    exp_val [NINSTR];              // loads: value the load must return
  rob_idx_t rob_of [NINSTR];
  int    seq_of_rob [512];
  int    miss_pct [NINSTR];

  // memory: committed state, and the architectural last store per address
  int mem [NADDR];
  int last_st [NADDR];

  // ---- pending completions ----
  typedef struct { int due; int seq; int epoch; } ev_t;
  ev_t evq [$];
  typedef struct { int due; int epoch; } miss_t;
  miss_t missq [$];
  int epoch = 0;

  // ---- counters of mechanisms ----
  int n_up = 0, n_down = 0, n_stall = 0, n_held = 0, n_l3 = 0, n_fwd = 0, n_flush = 0;
  int n_full = 0, n_llc = 0, n_b2b = 0, n_bubble = 0;
  int committed_n = 0;
  int inflight [$];      // dispatched, not committed, in program order
  int next_seq = 0;
  int last_producer [$];

  function automatic int pick_src(input int s);
    int d;
    if (last_producer.size() == 0 || $urandom_range(0, 3) == 0) return -1;
    d = $urandom_range(1, last_producer.size() < 6 ? last_producer.size() : 6);
    return last_producer[last_producer.size() - d];
  endfunction

  // generate instruction s; the phase sets the LLC miss rate of loads
  function automatic void gen(input int s);
    int r;
    r = $urandom_range(0, 99);
    kind[s] = (r < 50) ? ALU : (r < 60) ? BR : (r < 82) ? LD : ST;
    addr[s] = $urandom_range(0, NADDR - 1);
    src1[s] = pick_src(s);
    src2[s] = pick_src(s);
    mis[s]  = (kind[s] == BR) && ($urandom_range(0, 99) < 3);
    miss_pct[s] = (s < NINSTR / 3) ? 0 : (s < 2 * NINSTR / 3) ? 20 : 0;
    iss_cyc[s] = -1;
    committed[s] = 1'b0;
    if (kind[s] == ALU || kind[s] == LD) begin
      last_producer.push_back(s);
      if (last_producer.size() > 8) void'(last_producer.pop_front());
    end
  endfunction

  // ---- one cycle of the surrounding core ----
  int min_gap [3] = '{1000, 1000, 1000};
  logic was_held = 1'b0;

  initial begin
    for (int a = 0; a < NADDR; a++) begin mem[a] = 1000 + a; last_st[a] = 1000 + a; end
    for (int i = 0; i < 512; i++) seq_of_rob[i] = -1;
    for (int w = 0; w < 4; w++) begin
      disp_uop[w] = '0; agu_idx[w] = '0; agu_addr[w] = '0; agu_data[w] = '0;
    end
    for (int c = 0; c < NCP; c++) cp_idx[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (committed_n < NINSTR && cyc < 390000) begin
      int nd, ncp;
      disp_valid = '0; cp_valid = '0; cp_mispred = '0; agu_valid = '0; llc_miss = 1'b0;
      // LLC miss notifications
      for (int j = missq.size() - 1; j >= 0; j--)
        if (missq[j].due == cyc) begin
          if (missq[j].epoch == epoch) begin llc_miss = 1'b1; n_llc++; end
          missq.delete(j);
        end
      // completions due now, up to NCP
      ncp = 0;
      for (int j = 0; j < evq.size() && ncp < NCP; j++) begin
        if (evq[j].epoch != epoch) begin evq.delete(j); j--; end
        else if (evq[j].due <= cyc) begin
          cp_valid[ncp]   = 1'b1;
          cp_idx[ncp]     = rob_of[evq[j].seq];
          cp_mispred[ncp] = mis[evq[j].seq];
          ncp++;
          evq.delete(j); j--;
        end
      end
      // dispatch
      if (!disp_ready && !alloc_stall && !flush) n_full++;
      nd = 0;
      if (disp_ready && next_seq < NINSTR) begin
        nd = (NINSTR - next_seq < 4) ? NINSTR - next_seq : 4;
        for (int w = 0; w < nd; w++) begin
          int s;
          s = next_seq + w;
          gen(s);
          disp_valid[w] = 1'b1;
          disp_uop[w] = '0;
          disp_uop[w].is_load   = kind[s] == LD;
          disp_uop[w].is_store  = kind[s] == ST;
          disp_uop[w].self_wake = kind[s] == ALU || kind[s] == BR;
          disp_uop[w].payload   = PAY_W'(s);
          rob_of[s] = disp_rob_idx[w];
          if (src1[s] >= 0 && !committed[src1[s]]) begin
            disp_uop[w].src1_wait = 1'b1; disp_uop[w].src1_tag = rob_of[src1[s]];
          end
          if (src2[s] >= 0 && !committed[src2[s]]) begin
            disp_uop[w].src2_wait = 1'b1; disp_uop[w].src2_tag = rob_of[src2[s]];
          end
          if (kind[s] == LD) exp_val[s] = last_st[addr[s]];
          if (kind[s] == ST) last_st[addr[s]] = s;
        end
      end
      #2;
      // issue: execute
      for (int w = 0; w < 4; w++) if (iss_valid[w]) begin
        int s, lv;
        s = seq_of_rob[iss_uop[w].rob_idx];
        check(s >= 0 && int'(iss_uop[w].payload) == (s & 16'hffff), "issued instruction is live");
        if (s >= 0) begin
          check(iss_cyc[s] < 0, "issued once");
          iss_cyc[s] = cyc;
          lv = int'(level);
          lvl_of_issue[s] = lv;
          for (int k = 0; k < 2; k++) begin
            int p;
            p = (k == 0) ? src1[s] : src2[s];
            if (p >= 0 && iss_cyc[p] >= 0 && (kind[p] == ALU) && cyc - iss_cyc[p] < 4) begin
              int g, pl;
              g = cyc - iss_cyc[p];
              pl = lvl_of_issue[p];
              check(g >= (pl == 0 ? 1 : 2), $sformatf("dependent issued %0d cycles after producer at level %0d", g, pl + 1));
              if (pl == lv && g < min_gap[lv]) min_gap[lv] = g;
              if (pl == 0 && lv == 0 && g == 1) n_b2b++;
              if (pl != 0 && lv != 0 && g == 2) n_bubble++;
            end
          end
          case (kind[s])
            ALU, BR: evq.push_back('{cyc + 1, s, epoch});
            ST: begin
              agu_valid[w] = 1'b1; agu_idx[w] = iss_uop[w].lsq_idx;
              agu_addr[w] = ADDR_W'(addr[s]); agu_data[w] = DATA_W'(s);
              evq.push_back('{cyc + 1, s, epoch});
            end
            default: begin
              agu_valid[w] = 1'b1; agu_idx[w] = iss_uop[w].lsq_idx;
              agu_addr[w] = ADDR_W'(addr[s]); agu_data[w] = '0;
            end
          endcase
        end
      end
      // loads leaving the LSQ
      for (int p = 0; p < 2; p++) if (ld_res_valid[p]) begin
        int s, v;
        s = seq_of_rob[ld_res[p].rob_idx];
        check(s >= 0 && kind[s] == LD && int'(ld_res[p].addr) == addr[s], "load result matches load");
        if (s >= 0) begin
          if (ld_res[p].fwd) begin
            n_fwd++;
            v = int'(ld_res[p].data);
            evq.push_back('{cyc + 1, s, epoch});
          end else begin
            v = mem[addr[s]];
            if ($urandom_range(0, 99) < miss_pct[s]) begin
              missq.push_back('{cyc + 14, epoch});
              evq.push_back('{cyc + 314, s, epoch});
            end else
              evq.push_back('{cyc + ($urandom_range(0, 9) < 7 ? 2 : 14), s, epoch});
          end
          check(v == exp_val[s], $sformatf("load %0d value %0d expected %0d", s, v, exp_val[s]));
        end
      end
      // commit
      for (int w = 0; w < 4; w++) if (commit_valid[w]) begin
        int s;
        s = (inflight.size() > 0) ? inflight.pop_front() : -1;
        check(s >= 0 && int'(commit_payload[w]) == (s & 16'hffff) && iss_cyc[s] >= 0,
              "commit in program order");
        if (s >= 0) begin
          committed[s] = 1'b1;
          committed_n++;
          seq_of_rob[rob_of[s]] = -1;
        end
      end
      for (int w = 0; w < 4; w++) if (st_commit_valid[w]) mem[st_commit_addr[w]] = int'(st_commit_data[w]);
      // mechanisms
      if (lvl_up) n_up++;
      if (lvl_down) n_down++;
      if (alloc_stall) n_stall++;
      if (alloc_stall && !lvl_down) was_held = 1'b1;
      if (was_held && lvl_down) begin n_held++; was_held = 1'b0; end
      if (level == LVL3) n_l3++;
      // window state after this edge
      for (int w = 0; w < nd; w++) begin
        inflight.push_back(next_seq + w);
        seq_of_rob[disp_rob_idx[w]] = next_seq + w;
      end
      next_seq += nd;
      if (flush) begin
        // squash everything younger than the branch; the front end refetches
        n_flush++;
        epoch++;
        while (inflight.size() > 0) begin
          int s;
          s = inflight.pop_back();
          committed[s] = 1'b1;   // never committed: retired from the program
          committed_n++;
        end
        for (int i = 0; i < 512; i++) seq_of_rob[i] = -1;
        for (int a = 0; a < NADDR; a++) last_st[a] = mem[a];
        last_producer.delete();
      end
      @(posedge clk); #1;
    end
    check(committed_n == NINSTR, $sformatf("all instructions done (%0d of %0d)", committed_n, NINSTR));
    check(min_gap[0] == 1, "back-to-back issue at level 1");
    check(min_gap[1] >= 2 && min_gap[2] >= 2, "bubble at levels 2 and 3");
    $display("cycles %0d, level ups %0d, downs %0d, stall cycles %0d, held shrinks %0d, level-3 cycles %0d",
             cyc, n_up, n_down, n_stall, n_held, n_l3);
    $display("LLC misses %0d, forwards %0d, flushes %0d, window-full cycles %0d, back-to-back %0d, bubbles %0d",
             n_llc, n_fwd, n_flush, n_full, n_b2b, n_bubble);
    check(n_up > 0, "level increased");
    check(n_l3 > 0, "level 3 reached");
    check(n_down > 0, "level decreased");
    check(n_stall > 0, "allocation stalled");
    check(n_held > 0, "shrink held back until shrinkable");
    check(n_fwd > 0, "store-to-load forwarding");
    check(n_flush > 0, "misprediction flush");
    check(n_full > 0, "window full");
    check(n_b2b > 0 && n_bubble > 0, "back-to-back and bubble issue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
