// issue_queue: resizable issue queue with a wakeup-select loop that is one stage deep
// at level 1 and two stages deep at levels 2 and 3.
//
// ENTRIES slots exist physically; only the first iq_size(level) are allocated. Each
// entry waits on up to two source tags (ROB indices). A tag broadcast on the wakeup bus
// clears the matching waits at the clock edge; an entry with no wait left is ready, and
// up to WIDTH ready entries are selected per cycle.
//
// Wakeup bus in a cycle: the ext_wk tags (results returned by variable-latency units
// such as loads) plus the destination tags of self_wake instructions (fixed one-cycle
// latency) selected
//   - in this same cycle at depth 1, so a dependent is selected in the next cycle
//     (back-to-back issue), or
//   - in the previous cycle at depth 2, so a dependent is selected two cycles after its
//     producer: the one-cycle issue bubble that the pipelined queue costs.
// Selected tags are always passed through the register when the level is 2 or 3, so a
// level change never loses a wakeup.
//
// Allocation: dispatch slot k (disp_valid must be a prefix) takes the k-th lowest free
// slot below the current size. Selection: lowest slot index first. Both orderings are
// this design's choice; the original scheme fixes the sizes and depths, not the selection
// policy. shrink_ok says that no valid entry sits at or above the next lower size, so
// the controller can lower the level; allocating low slots first helps that happen.
//
// Timing: dispatch writes at the clock edge; iss_* is combinational from the entry
// registers (select in the cycle the entry is ready). flush empties the queue.
module issue_queue
  import diw_pkg::*;
#(
  parameter int unsigned ENTRIES = diw_pkg::IQ_MAX,
  parameter int unsigned WIDTH   = diw_pkg::MACHINE_W,
  parameter int unsigned NWK     = 6,
  localparam int unsigned CW = $clog2(ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  level_e            level,
  input  logic              flush,
  // dispatch
  input  logic [WIDTH-1:0]  disp_valid,
  input  iq_in_t            disp_entry [WIDTH],
  output logic [CW-1:0]     free_n,
  // issue
  output logic [WIDTH-1:0]  iss_valid,
  output iss_uop_t          iss_uop [WIDTH],
  // external wakeup (completing variable-latency instructions)
  input  logic [NWK-1:0]    ext_wk_valid,
  input  rob_idx_t          ext_wk_tag [NWK],
  // resizing
  output logic              shrink_ok,
  output logic [CW-1:0]     count
);

  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned NB = NWK + WIDTH;   // wakeup bus width

  logic   [ENTRIES-1:0] valid;
  iq_in_t               ent [ENTRIES];

  logic [CW-1:0] cur_size, low_size;
  logic          deep;

  // registered self-wake tags for the two-stage loop
  logic [WIDTH-1:0] dly_valid;
  rob_idx_t         dly_tag [WIDTH];

  // wakeup bus
  logic [NB-1:0] bus_valid;
  rob_idx_t      bus_tag [NB];

  // allocation and selection
  logic [WIDTH-1:0] alloc_ok;
  logic [IW-1:0]    sel_slot [WIDTH];
  logic [ENTRIES-1:0] ready;

  assign cur_size = CW'(iq_size(level));
  assign low_size = CW'(iq_size(level_below(level)));
  assign deep     = pipe_depth(level) > 1;

  function automatic logic woken(rob_idx_t tag, logic [NB-1:0] bv, rob_idx_t bt [NB]);
    logic hit;
    hit = 1'b0;
    for (int b = 0; b < NB; b++) hit |= bv[b] && (bt[b] == tag);
    return hit;
  endfunction

  // lowest set bit of a vector, and the index of a one-hot vector
  function automatic logic [ENTRIES-1:0] lowest(logic [ENTRIES-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  function automatic logic [IW-1:0] encode(logic [ENTRIES-1:0] oh);
    logic [IW-1:0] r;
    r = '0;
    for (int i = 0; i < ENTRIES; i++) if (oh[i]) r |= IW'(i);
    return r;
  endfunction

  logic [ENTRIES-1:0] in_size, in_low;
  logic [ENTRIES-1:0] sel_req [WIDTH+1];
  logic [ENTRIES-1:0] alc_req [WIDTH+1];
  logic [ENTRIES-1:0] sel_oh [WIDTH];
  logic [ENTRIES-1:0] alc_oh [WIDTH];

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      ready[i]   = valid[i] && !ent[i].src1_wait && !ent[i].src2_wait;
      in_size[i] = CW'(i) < cur_size;
      in_low[i]  = CW'(i) < low_size;
    end
    // selection: WIDTH cascaded lowest-index pickers over the ready vector
    sel_req[0] = ready;
    alc_req[0] = ~valid & in_size;
    for (int w = 0; w < WIDTH; w++) begin
      sel_oh[w]     = lowest(sel_req[w]);
      alc_oh[w]     = lowest(alc_req[w]);
      iss_valid[w]  = |sel_req[w];
      sel_slot[w]   = encode(sel_oh[w]);
      iss_uop[w]    = ent[sel_slot[w]].uop;
      alloc_ok[w]   = |alc_req[w];
      sel_req[w+1]  = sel_req[w] & ~sel_oh[w];
      alc_req[w+1]  = alc_req[w] & ~alc_oh[w];
    end
    free_n    = CW'($countones(~valid & in_size));
    count     = CW'($countones(valid));
    shrink_ok = !(|(valid & ~in_low));

    // wakeup bus
    for (int k = 0; k < NWK; k++) begin
      bus_valid[k] = ext_wk_valid[k];
      bus_tag[k]   = ext_wk_tag[k];
    end
    for (int w = 0; w < WIDTH; w++) begin
      if (deep) begin
        bus_valid[NWK+w] = dly_valid[w];
        bus_tag[NWK+w]   = dly_tag[w];
      end else begin
        bus_valid[NWK+w] = dly_valid[w] || (iss_valid[w] && iss_uop[w].self_wake);
        bus_tag[NWK+w]   = dly_valid[w] ? dly_tag[w] : iss_uop[w].rob_idx;
      end
    end
  end

  // tag match against the wakeup bus, one comparator set per dispatch slot
  logic [WIDTH-1:0] dwk1, dwk2;

  for (genvar w = 0; w < WIDTH; w++) begin : g_dwk
    assign dwk1[w] = woken(disp_entry[w].src1_tag, bus_valid, bus_tag);
    assign dwk2[w] = woken(disp_entry[w].src2_tag, bus_valid, bus_tag);
  end

  // registered self-wake tags of the two-stage loop
  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      dly_valid <= '0;
    end else begin
      for (int w = 0; w < WIDTH; w++) begin
        dly_valid[w] <= deep && iss_valid[w] && iss_uop[w].self_wake;
        dly_tag[w]   <= iss_uop[w].rob_idx;
      end
    end
  end

  // one register set per entry: written by dispatch, woken by the bus, freed by issue
  for (genvar i = 0; i < ENTRIES; i++) begin : g_ent
    logic   wk1, wk2, d_hit, i_hit, d_wk1, d_wk2;
    iq_in_t d_ent;

    assign wk1 = woken(ent[i].src1_tag, bus_valid, bus_tag);
    assign wk2 = woken(ent[i].src2_tag, bus_valid, bus_tag);

    always_comb begin
      d_hit = 1'b0;
      i_hit = 1'b0;
      d_ent = disp_entry[0];
      d_wk1 = 1'b0;
      d_wk2 = 1'b0;
      for (int w = 0; w < WIDTH; w++) begin
        if (iss_valid[w] && sel_oh[w][i]) i_hit = 1'b1;
        if (disp_valid[w] && alc_oh[w][i]) begin
          d_hit = 1'b1;
          d_ent = disp_entry[w];
          d_wk1 = dwk1[w];
          d_wk2 = dwk2[w];
        end
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n || flush) begin
        valid[i] <= 1'b0;
      end else if (d_hit) begin
        valid[i]           <= 1'b1;
        ent[i]             <= d_ent;
        ent[i].src1_wait   <= d_ent.src1_wait && !d_wk1;
        ent[i].src2_wait   <= d_ent.src2_wait && !d_wk2;
      end else begin
        if (i_hit) valid[i] <= 1'b0;
        if (wk1) ent[i].src1_wait <= 1'b0;
        if (wk2) ent[i].src2_wait <= 1'b0;
      end
    end
  end

  // Dispatch slots form a prefix and each has a free slot to go to.
  for (genvar w = 0; w < WIDTH; w++) begin : g_chk
    a_disp_fits: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                  disp_valid[w] |-> alloc_ok[w]);
    if (w > 0) begin : g_prefix
      a_prefix: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                 disp_valid[w] |-> disp_valid[w-1]);
    end
  end

endmodule
