// ring_ctrl: head/tail bookkeeping of a resizable circular buffer (used by the ROB and
// the LSQ).
//
// The buffer has MAX physical entries of which the first cur_size are in use. Entries
// are allocated at the tail and released at the head, up to WIDTH of each per cycle.
// Resizing while entries are live needs care with the wrap point:
//  - Growing is always allowed. The head must still wrap where the tail wrapped, so the
//    size in force when the tail last wrapped is kept in head_limit, and the wrap flag
//    says that the live region crosses the physical end.
//  - Shrinking to low_size is allowed only when the buffer is empty, or the live region
//    does not wrap and ends at or below low_size (shrink_ok). On shrink the pointers are brought inside the new
//    size: an empty buffer restarts at 0, and a tail equal to low_size wraps to 0.
//
// Timing: alloc_n, retire_n, shrink and flush act at the clock edge; free_n, count and
// shrink_ok are combinational from the registers. flush empties the buffer.
// The wrap scheme is this design's own; the sizes come from the caller.
module ring_ctrl #(
  parameter int unsigned MAX   = 512,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned IW = $clog2(MAX),
  localparam int unsigned CW = $clog2(MAX + 1),
  localparam int unsigned NW = $clog2(WIDTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cur_size,
  input  logic [CW-1:0] low_size,
  input  logic [NW-1:0] alloc_n,
  input  logic [NW-1:0] retire_n,
  input  logic          shrink,
  input  logic          flush,
  output logic [IW-1:0] head,
  output logic [IW-1:0] tail,
  output logic [CW-1:0] head_limit,
  output logic          wrap,
  output logic [CW-1:0] free_n,
  output logic [CW-1:0] count,
  output logic          shrink_ok
);

  logic [CW:0] tail_sum, head_sum;
  logic        tail_wraps, head_wraps;
  logic [IW-1:0] tail_nx, head_nx;

  always_comb begin
    count     = wrap ? CW'(head_limit - CW'(head) + CW'(tail)) : CW'(tail - head);
    free_n    = wrap ? CW'(head - tail) : CW'(cur_size - CW'(tail) + CW'(head));
    shrink_ok = !wrap && (tail == head || CW'(tail) <= low_size);

    tail_sum   = (CW+1)'(tail) + (CW+1)'(alloc_n);
    tail_wraps = tail_sum >= (CW+1)'(cur_size);
    tail_nx    = tail_wraps ? IW'(tail_sum - (CW+1)'(cur_size)) : IW'(tail_sum);

    head_sum   = (CW+1)'(head) + (CW+1)'(retire_n);
    head_wraps = wrap && (head_sum >= (CW+1)'(head_limit));
    head_nx    = head_wraps ? IW'(head_sum - (CW+1)'(head_limit)) : IW'(head_sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      head       <= '0;
      tail       <= '0;
      wrap       <= 1'b0;
      head_limit <= CW'(MAX);
    end else begin
      head <= head_nx;
      tail <= tail_nx;
      if (tail_wraps) head_limit <= cur_size;
      wrap <= wrap ? !head_wraps : tail_wraps;
      if (shrink) begin
        // shrink_ok guarantees !wrap and tail <= low_size, and nothing is allocated.
        if (tail == head_nx) begin
          head <= '0;
          tail <= '0;
        end else if (CW'(tail) == low_size) begin
          tail       <= '0;
          wrap       <= 1'b1;
          head_limit <= low_size;
        end
      end
    end
  end

  a_alloc_fits: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                 CW'(alloc_n) <= free_n);
  a_retire_fits: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                  CW'(retire_n) <= count);
  a_shrink_legal: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   shrink |-> shrink_ok && alloc_n == '0);

endmodule
