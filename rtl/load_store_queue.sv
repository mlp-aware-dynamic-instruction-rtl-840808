// load_store_queue: resizable load/store queue with a one-stage search at level 1 and a
// two-stage search at levels 2 and 3.
//
// Memory instructions get an entry at dispatch, in program order (circular buffer of
// lsq_size(level) entries kept by ring_ctrl). The address generation units write the
// address (and, for a store, its data) through the agu ports. Each entry knows its age,
// its distance from the head, so "older" is a comparison of ages. Each cycle the queue
// picks up to NLD of the oldest loads that have their address, are not yet sent, and
// are younger than no store of unknown address. There is no memory-dependence
// speculation, so no ordering violation can occur. For each picked load, the youngest
// older store to the same address forwards its data; with none, the load is sent to the
// data cache. The result leaves on ld_res one cycle after the pick at depth 1 and two
// cycles after it at depth 2. Stores write the cache only at commit: retire_n head
// entries are released per cycle, and the stores among them appear on st_commit_*.
//
// The sizes and depths follow the original scheme, which treats the LSQ as one of the
// resized window resources; the disambiguation policy (conservative, oldest first,
// word-address match) is this design's choice.
//
// Timing: disp_idx and st_commit_* are combinational; ld_res_* are registered. flush
// empties the queue and kills searches in flight. Dispatch slots (disp_valid) must be a
// prefix.
module load_store_queue
  import diw_pkg::*;
#(
  parameter int unsigned ENTRIES = diw_pkg::LSQ_MAX,
  parameter int unsigned WIDTH   = diw_pkg::MACHINE_W,
  parameter int unsigned NLD     = 2,
  localparam int unsigned CW = $clog2(ENTRIES + 1),
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned NW = $clog2(WIDTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  level_e            level,
  input  logic              shrink,
  input  logic              flush,
  // allocation
  input  logic [WIDTH-1:0]  disp_valid,
  input  logic [WIDTH-1:0]  disp_is_store,
  input  rob_idx_t          disp_rob [WIDTH],
  output logic [IW-1:0]     disp_idx [WIDTH],
  output logic [CW-1:0]     free_n,
  output logic [CW-1:0]     count,
  output logic              shrink_ok,
  // address generation
  input  logic [WIDTH-1:0]  agu_valid,
  input  logic [IW-1:0]     agu_idx [WIDTH],
  input  logic [ADDR_W-1:0] agu_addr [WIDTH],
  input  logic [DATA_W-1:0] agu_data [WIDTH],
  // load results
  output logic [NLD-1:0]    ld_res_valid,
  output ld_res_t           ld_res [NLD],
  // commit
  input  logic [NW-1:0]     retire_n,
  output logic [WIDTH-1:0]  st_commit_valid,
  output logic [ADDR_W-1:0] st_commit_addr [WIDTH],
  output logic [DATA_W-1:0] st_commit_data [WIDTH]
);

  logic [ENTRIES-1:0] is_store, addr_valid, sent;
  rob_idx_t           rob [ENTRIES];
  logic [ADDR_W-1:0]  addr [ENTRIES];
  logic [DATA_W-1:0]  data [ENTRIES];

  logic [IW-1:0] head, tail;
  logic [CW-1:0] head_limit, cur_size, low_size;
  logic          wrap, deep;
  logic [NW-1:0] alloc_n;

  assign cur_size = CW'(lsq_size(level));
  assign low_size = CW'(lsq_size(level_below(level)));
  assign deep     = pipe_depth(level) > 1;

  ring_ctrl #(.MAX(ENTRIES), .WIDTH(WIDTH)) u_ring (
    .clk, .rst_n,
    .cur_size, .low_size, .alloc_n, .retire_n, .shrink, .flush,
    .head, .tail, .head_limit, .wrap, .free_n, .count, .shrink_ok
  );

  // index of the entry at age k (0 = head)
  function automatic logic [IW-1:0] at_age(logic [CW:0] k, logic [IW-1:0] h,
                                           logic w, logic [CW-1:0] lim);
    logic [CW:0] s;
    s = (CW+1)'(h) + k;
    return (w && s >= (CW+1)'(lim)) ? IW'(s - (CW+1)'(lim)) : IW'(s);
  endfunction

  // search stage registers
  logic [NLD-1:0] s1_v, s2_v;
  ld_res_t        s1 [NLD];
  ld_res_t        s2 [NLD];

  logic [CW-1:0]      age [ENTRIES];
  logic [ENTRIES-1:0] live, cand;
  logic [CW-1:0]      unk_age;

  // pick and search results of this cycle
  logic [NLD-1:0] pk_v;
  logic [IW-1:0]  pk_idx [NLD];
  ld_res_t        pk_res [NLD];

  always_comb begin
    alloc_n = '0;
    for (int w = 0; w < WIDTH; w++) begin
      if (disp_valid[w]) alloc_n++;
      disp_idx[w] = (CW'(tail) + CW'(w) >= cur_size) ? IW'(CW'(tail) + CW'(w) - cur_size)
                                                      : IW'(CW'(tail) + CW'(w));
    end

    // per-entry age (0 = head) and liveness
    for (int i = 0; i < ENTRIES; i++) begin
      age[i]  = (IW'(i) >= head) ? CW'(IW'(i) - head) : CW'(CW'(i) + head_limit - CW'(head));
      live[i] = wrap ? ((IW'(i) >= head && CW'(i) < head_limit) || IW'(i) < tail)
                     : (IW'(i) >= head && IW'(i) < tail);
    end

    // age of the oldest store whose address is still unknown
    unk_age = CW'(ENTRIES);
    for (int i = 0; i < ENTRIES; i++)
      if (live[i] && is_store[i] && !addr_valid[i] && age[i] < unk_age) unk_age = age[i];

    // loads that can be resolved now; pick the NLD oldest
    for (int i = 0; i < ENTRIES; i++)
      cand[i] = live[i] && !is_store[i] && addr_valid[i] && !sent[i] && age[i] < unk_age;
    for (int p = 0; p < NLD; p++) begin
      logic [CW-1:0] best;
      best = CW'(ENTRIES);
      pk_v[p]   = 1'b0;
      pk_idx[p] = '0;
      for (int i = 0; i < ENTRIES; i++)
        if (cand[i] && age[i] < best) begin
          best      = age[i];
          pk_idx[p] = IW'(i);
          pk_v[p]   = 1'b1;
        end
      if (pk_v[p]) cand[pk_idx[p]] = 1'b0;
    end

    // forwarding search: youngest older store to the same address wins
    for (int p = 0; p < NLD; p++) begin
      logic          hit;
      logic [CW-1:0] best;
      logic [IW-1:0] fi;
      hit  = 1'b0;
      best = '0;
      fi   = '0;
      for (int i = 0; i < ENTRIES; i++)
        if (live[i] && is_store[i] && addr[i] == addr[pk_idx[p]] && age[i] < age[pk_idx[p]] &&
            (!hit || age[i] > best)) begin
          hit  = 1'b1;
          best = age[i];
          fi   = IW'(i);
        end
      pk_res[p].rob_idx = rob[pk_idx[p]];
      pk_res[p].lsq_idx = LSQ_IW'(pk_idx[p]);
      pk_res[p].addr    = addr[pk_idx[p]];
      pk_res[p].fwd     = hit;
      pk_res[p].data    = hit ? data[fi] : '0;
    end

    // outputs: the second stage first, the first stage directly only at depth 1
    for (int p = 0; p < NLD; p++) begin
      ld_res_valid[p] = s2_v[p] || (!deep && s1_v[p]);
      ld_res[p]       = s2_v[p] ? s2[p] : s1[p];
    end

    // commit
    for (int w = 0; w < WIDTH; w++) begin
      logic [IW-1:0] i;
      i = at_age((CW+1)'(w), head, wrap, head_limit);
      st_commit_valid[w] = (NW'(w) < retire_n) && is_store[i];
      st_commit_addr[w]  = addr[i];
      st_commit_data[w]  = data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      s1_v <= '0;
      s2_v <= '0;
    end else begin
      s1_v <= pk_v;
      for (int p = 0; p < NLD; p++) begin
        s1[p]   <= pk_res[p];
        // s1 moves on unless it left directly this cycle
        s2_v[p] <= s1_v[p] && (deep || s2_v[p]);
        s2[p]   <= s1[p];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NLD; p++)
      if (pk_v[p]) sent[pk_idx[p]] <= 1'b1;
    for (int w = 0; w < WIDTH; w++) begin
      if (agu_valid[w]) begin
        addr_valid[agu_idx[w]] <= 1'b1;
        addr[agu_idx[w]]       <= agu_addr[w];
        data[agu_idx[w]]       <= agu_data[w];
      end
    end
    for (int w = 0; w < WIDTH; w++) begin
      if (disp_valid[w]) begin
        is_store[disp_idx[w]]   <= disp_is_store[w];
        addr_valid[disp_idx[w]] <= 1'b0;
        sent[disp_idx[w]]       <= 1'b0;
        rob[disp_idx[w]]        <= disp_rob[w];
      end
    end
  end

  for (genvar w = 1; w < WIDTH; w++) begin : g_chk
    a_prefix: assert property (@(posedge clk) disable iff (!rst_n || flush)
                               disp_valid[w] |-> disp_valid[w-1]);
  end

endmodule
