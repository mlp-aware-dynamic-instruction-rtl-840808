// diw_window: the dynamically resized instruction window of a 4-wide out-of-order core.
//
// A large instruction window lets cache-missing loads issue early and overlap their
// memory accesses (memory-level parallelism, MLP), but a window that large must be
// pipelined to keep the clock, and a pipelined issue queue cannot issue dependent
// instructions back to back, which costs instruction-level parallelism (ILP). This window
// therefore changes size at run time. resize_ctrl raises the level on an LLC miss and
// lowers it once a memory latency passes without one; the issue queue, reorder buffer
// and load/store queue follow the level (64/128/64 entries at depth 1, 160/320/160 at
// depth 2, 256/512/256 at depth 2).
//
// Interfaces (all synchronous to clk):
//  - dispatch: up to WIDTH renamed instructions per cycle, as a prefix of disp_valid,
//    accepted as a group when disp_ready is high. disp_rob_idx gives each slot's ROB
//    index (its result tag), so that later slots can name earlier ones as sources.
//    srcN_wait says the producer is still in the window; the window itself clears it if
//    that producer has already completed.
//  - issue: iss_valid/iss_uop, up to WIDTH per cycle, to the execution units.
//  - completion: cp_* marks ROB entries done and wakes dependents in the issue queue.
//  - agu_*: addresses and store data of issued memory instructions, to the LSQ.
//  - ld_res_*: loads leaving the LSQ, forwarded or to be read from the data cache.
//  - commit_*, st_commit_*: in-order commit, stores written to the cache at commit.
//  - flush: a mispredicted branch committed; the window is emptied.
//  - llc_miss: an LLC miss occurred (from the memory hierarchy), drives the resizing.
//
// disp_ready needs room for a full group of WIDTH in every resource; this, the number of
// ports and the queue policies are this design's choices.
module diw_window
  import diw_pkg::*;
#(
  parameter int unsigned IQ_ENTRIES  = diw_pkg::IQ_MAX,
  parameter int unsigned ROB_ENTRIES = diw_pkg::ROB_MAX,
  parameter int unsigned LSQ_ENTRIES = diw_pkg::LSQ_MAX,
  parameter int unsigned MEM_LATENCY = diw_pkg::MEM_LAT_CYC,
  parameter int unsigned WIDTH       = diw_pkg::MACHINE_W,
  parameter int unsigned NCP         = 6,
  parameter int unsigned NLD         = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic [WIDTH-1:0]  disp_valid,
  input  disp_uop_t         disp_uop [WIDTH],
  output logic              disp_ready,
  output rob_idx_t          disp_rob_idx [WIDTH],
  // issue
  output logic [WIDTH-1:0]  iss_valid,
  output iss_uop_t          iss_uop [WIDTH],
  // completion
  input  logic [NCP-1:0]    cp_valid,
  input  rob_idx_t          cp_idx [NCP],
  input  logic [NCP-1:0]    cp_mispred,
  // address generation
  input  logic [WIDTH-1:0]  agu_valid,
  input  lsq_idx_t          agu_idx [WIDTH],
  input  logic [ADDR_W-1:0] agu_addr [WIDTH],
  input  logic [DATA_W-1:0] agu_data [WIDTH],
  // loads out of the LSQ
  output logic [NLD-1:0]    ld_res_valid,
  output ld_res_t           ld_res [NLD],
  // commit
  output logic [WIDTH-1:0]  commit_valid,
  output rob_idx_t          commit_idx [WIDTH],
  output logic [PAY_W-1:0]  commit_payload [WIDTH],
  output logic [WIDTH-1:0]  st_commit_valid,
  output logic [ADDR_W-1:0] st_commit_addr [WIDTH],
  output logic [DATA_W-1:0] st_commit_data [WIDTH],
  output logic              flush,
  // resizing
  input  logic              llc_miss,
  output level_e            level,
  output logic              alloc_stall,
  output logic              lvl_up,
  output logic              lvl_down,
  output logic [$clog2(IQ_ENTRIES+1)-1:0]  iq_count,
  output logic [$clog2(ROB_ENTRIES+1)-1:0] rob_count,
  output logic [$clog2(LSQ_ENTRIES+1)-1:0] lsq_count
);

  localparam int unsigned NW  = $clog2(WIDTH + 1);
  localparam int unsigned ICW = $clog2(IQ_ENTRIES + 1);
  localparam int unsigned RCW = $clog2(ROB_ENTRIES + 1);
  localparam int unsigned LCW = $clog2(LSQ_ENTRIES + 1);
  localparam int unsigned LIW = $clog2(LSQ_ENTRIES);

  logic [ICW-1:0] iq_free;
  logic [RCW-1:0] rob_free;
  logic [LCW-1:0] lsq_free;
  logic iq_sok, rob_sok, lsq_sok;

  logic [WIDTH-1:0] acc;            // accepted dispatch slots
  logic [WIDTH-1:0] is_mem, is_st;
  localparam int unsigned RW = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  logic [RW-1:0]    mem_rank [WIDTH];
  logic [WIDTH-1:0] lsq_dv, lsq_dst;
  rob_idx_t         lsq_drob [WIDTH];
  logic [LIW-1:0]   lsq_didx [WIDTH];
  iq_in_t           iq_in [WIDTH];
  logic [2*WIDTH-1:0] q_done;
  rob_idx_t           q_tag [2*WIDTH];
  logic [NW-1:0]    lsq_retire;
  logic [WIDTH-1:0] commit_is_mem;
  logic [PAY_W-1:0] disp_pay [WIDTH];
  logic [LIW-1:0]   agu_idx_l [WIDTH];

  always_comb
    for (int w = 0; w < WIDTH; w++) agu_idx_l[w] = LIW'(agu_idx[w]);

  resize_ctrl #(.MEM_LATENCY(MEM_LATENCY)) u_ctrl (
    .clk, .rst_n, .llc_miss,
    .shrink_ok(iq_sok && rob_sok && lsq_sok),
    .level, .alloc_stall, .lvl_up, .lvl_down
  );

  assign disp_ready = !alloc_stall && !flush &&
                      iq_free  >= ICW'(WIDTH) &&
                      rob_free >= RCW'(WIDTH) &&
                      lsq_free >= LCW'(WIDTH);

  // a source produced by the window already done (not by an earlier slot of this group)
  function automatic logic src_pending(logic wt, rob_idx_t tag, int unsigned slot,
                                       logic done_q, rob_idx_t ridx [WIDTH],
                                       logic [NCP-1:0] cv, rob_idx_t ci [NCP]);
    logic in_group, cp_hit;
    in_group = 1'b0;
    cp_hit   = 1'b0;
    for (int j = 0; j < WIDTH; j++)
      if (j < slot && ridx[j] == tag) in_group = 1'b1;
    for (int c = 0; c < NCP; c++)
      if (cv[c] && ci[c] == tag) cp_hit = 1'b1;
    return wt && (in_group || (!done_q && !cp_hit));
  endfunction

  always_comb begin
    int unsigned m;
    m = 0;
    lsq_dv  = '0;
    lsq_dst = '0;
    for (int w = 0; w < WIDTH; w++) begin
      lsq_drob[w] = '0;
      acc[w]      = disp_valid[w] && disp_ready;
      is_mem[w]   = disp_uop[w].is_load || disp_uop[w].is_store;
      is_st[w]    = disp_uop[w].is_store;
      disp_pay[w] = disp_uop[w].payload;
      q_tag[2*w]   = disp_uop[w].src1_tag;
      q_tag[2*w+1] = disp_uop[w].src2_tag;
    end
    // memory instructions are packed into the leading LSQ slots
    for (int w = 0; w < WIDTH; w++) begin
      mem_rank[w] = RW'(m);
      if (acc[w] && is_mem[w]) begin
        lsq_dv[m]   = 1'b1;
        lsq_dst[m]  = is_st[w];
        lsq_drob[m] = disp_rob_idx[w];
        m++;
      end
    end
    for (int w = 0; w < WIDTH; w++) begin
      iq_in[w].src1_wait = src_pending(disp_uop[w].src1_wait, disp_uop[w].src1_tag, w,
                                       q_done[2*w], disp_rob_idx, cp_valid, cp_idx);
      iq_in[w].src1_tag  = disp_uop[w].src1_tag;
      iq_in[w].src2_wait = src_pending(disp_uop[w].src2_wait, disp_uop[w].src2_tag, w,
                                       q_done[2*w+1], disp_rob_idx, cp_valid, cp_idx);
      iq_in[w].src2_tag  = disp_uop[w].src2_tag;
      iq_in[w].uop.rob_idx   = disp_rob_idx[w];
      iq_in[w].uop.lsq_idx   = LSQ_IW'(lsq_didx[mem_rank[w]]);
      iq_in[w].uop.is_load   = disp_uop[w].is_load;
      iq_in[w].uop.is_store  = disp_uop[w].is_store;
      iq_in[w].uop.self_wake = disp_uop[w].self_wake;
      iq_in[w].uop.payload   = disp_uop[w].payload;
    end
    lsq_retire = '0;
    for (int w = 0; w < WIDTH; w++)
      if (commit_valid[w] && commit_is_mem[w]) lsq_retire++;
  end

  issue_queue #(.ENTRIES(IQ_ENTRIES), .WIDTH(WIDTH), .NWK(NCP)) u_iq (
    .clk, .rst_n, .level, .flush,
    .disp_valid(acc), .disp_entry(iq_in), .free_n(iq_free),
    .iss_valid, .iss_uop,
    .ext_wk_valid(cp_valid), .ext_wk_tag(cp_idx),
    .shrink_ok(iq_sok), .count(iq_count)
  );

  reorder_buffer #(.ENTRIES(ROB_ENTRIES), .WIDTH(WIDTH), .NCP(NCP), .NQ(2*WIDTH)) u_rob (
    .clk, .rst_n, .level, .shrink(lvl_down),
    .disp_valid(acc), .disp_payload(disp_pay), .disp_is_mem(is_mem),
 .disp_idx(disp_rob_idx),
    .free_n(rob_free), .count(rob_count), .shrink_ok(rob_sok),
    .cp_valid, .cp_idx, .cp_mispred,
    .q_tag, .q_done,
    .commit_valid, .commit_idx, .commit_payload, .commit_is_mem,
    .flush
  );

  load_store_queue #(.ENTRIES(LSQ_ENTRIES), .WIDTH(WIDTH), .NLD(NLD)) u_lsq (
    .clk, .rst_n, .level, .shrink(lvl_down), .flush,
    .disp_valid(lsq_dv), .disp_is_store(lsq_dst), .disp_rob(lsq_drob),
    .disp_idx(lsq_didx), .free_n(lsq_free), .count(lsq_count), .shrink_ok(lsq_sok),
    .agu_valid, .agu_idx(agu_idx_l), .agu_addr, .agu_data,
    .ld_res_valid, .ld_res,
    .retire_n(lsq_retire),
    .st_commit_valid, .st_commit_addr, .st_commit_data
  );

endmodule
