// reorder_buffer: resizable reorder buffer, one stage at level 1 and two stages at
// levels 2 and 3.
//
// ENTRIES slots exist physically; rob_size(level) are used, managed as a circular buffer
// by ring_ctrl. Up to WIDTH instructions are allocated per cycle at the tail (disp_idx
// tells the renamer which index each one gets: that index is the instruction's result
// tag). Completion ports mark entries done, optionally as a mispredicted branch.
// Up to WIDTH done entries commit per cycle, in order, from the head. When a
// mispredicted branch commits, the younger commit slots of that cycle are dropped and
// flush is raised: the whole window (this ROB included) is emptied at that edge and
// fetch restarts on the right path.
//
// Pipelining: at depth 2 the commit stage sees a done bit one cycle late (done_d), so an
// instruction commits one cycle later than at level 1 and a mispredicted branch flushes
// one cycle later: the extra branch misprediction penalty of the pipelined levels.
// Which stage of the ROB the extra cycle sits in is this design's choice; the original
// scheme gives the sizes and the depth.
//
// q_tag/q_done let dispatch ask whether a source's producer has already completed.
// Timing: disp_idx, commit_*, flush, q_done are combinational from registers and inputs
// of the same cycle; all state changes at the clock edge.
module reorder_buffer
  import diw_pkg::*;
#(
  parameter int unsigned ENTRIES = diw_pkg::ROB_MAX,
  parameter int unsigned WIDTH   = diw_pkg::MACHINE_W,
  parameter int unsigned NCP     = 6,
  parameter int unsigned NQ      = 2 * diw_pkg::MACHINE_W,
  localparam int unsigned CW = $clog2(ENTRIES + 1),
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned NW = $clog2(WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  level_e           level,
  input  logic             shrink,
  // allocation
  input  logic [WIDTH-1:0] disp_valid,
  input  logic [PAY_W-1:0] disp_payload [WIDTH],
  input  logic [WIDTH-1:0] disp_is_mem,
  output logic [IW-1:0]    disp_idx [WIDTH],
  output logic [CW-1:0]    free_n,
  output logic [CW-1:0]    count,
  output logic             shrink_ok,
  // completion
  input  logic [NCP-1:0]   cp_valid,
  input  logic [IW-1:0]    cp_idx [NCP],
  input  logic [NCP-1:0]   cp_mispred,
  // source status queries
  input  logic [IW-1:0]    q_tag [NQ],
  output logic [NQ-1:0]    q_done,
  // commit
  output logic [WIDTH-1:0] commit_valid,
  output logic [IW-1:0]    commit_idx [WIDTH],
  output logic [PAY_W-1:0] commit_payload [WIDTH],
  output logic [WIDTH-1:0] commit_is_mem,
  output logic             flush
);

  logic [ENTRIES-1:0] done, done_d, mispred, is_mem;
  logic [PAY_W-1:0]   payload [ENTRIES];

  logic [IW-1:0] head, tail;
  logic [CW-1:0] head_limit, cur_size, low_size;
  logic          wrap, deep;
  logic [NW-1:0] alloc_n, retire_n;

  assign cur_size = CW'(rob_size(level));
  assign low_size = CW'(rob_size(level_below(level)));
  assign deep     = pipe_depth(level) > 1;

  ring_ctrl #(.MAX(ENTRIES), .WIDTH(WIDTH)) u_ring (
    .clk, .rst_n,
    .cur_size, .low_size, .alloc_n, .retire_n, .shrink, .flush,
    .head, .tail, .head_limit, .wrap, .free_n, .count, .shrink_ok
  );

  always_comb begin
    logic stop;
    alloc_n = '0;
    for (int w = 0; w < WIDTH; w++) begin
      if (disp_valid[w]) alloc_n++;
      disp_idx[w] = (CW'(tail) + CW'(w) >= cur_size) ? IW'(CW'(tail) + CW'(w) - cur_size)
                                                      : IW'(CW'(tail) + CW'(w));
    end

    for (int q = 0; q < NQ; q++) q_done[q] = done[q_tag[q]];

    commit_valid = '0;
    retire_n = '0;
    flush = 1'b0;
    stop = 1'b0;
    for (int w = 0; w < WIDTH; w++) begin
      commit_idx[w] = (wrap && CW'(head) + CW'(w) >= head_limit)
                      ? IW'(CW'(head) + CW'(w) - head_limit) : IW'(CW'(head) + CW'(w));
      commit_payload[w]  = payload[commit_idx[w]];
      commit_is_mem[w]   = is_mem[commit_idx[w]];
      if (!stop && CW'(w) < count &&
          (deep ? done_d[commit_idx[w]] : done[commit_idx[w]])) begin
        commit_valid[w] = 1'b1;
        retire_n++;
        if (mispred[commit_idx[w]]) begin
          flush = 1'b1;
          stop  = 1'b1;
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    done_d <= done;
    for (int c = 0; c < NCP; c++) begin
      if (cp_valid[c]) begin
        done[cp_idx[c]]    <= 1'b1;
        mispred[cp_idx[c]] <= cp_mispred[c];
      end
    end
    for (int w = 0; w < WIDTH; w++) begin
      if (disp_valid[w]) begin
        done[disp_idx[w]]     <= 1'b0;
        done_d[disp_idx[w]]   <= 1'b0;
        mispred[disp_idx[w]]  <= 1'b0;
        is_mem[disp_idx[w]]   <= disp_is_mem[w];
        payload[disp_idx[w]]  <= disp_payload[w];
      end
    end
  end

  a_no_disp_on_flush: assert property (@(posedge clk) disable iff (!rst_n)
                                       flush |-> disp_valid == '0);

endmodule
