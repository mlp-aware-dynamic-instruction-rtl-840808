// resize_ctrl: MLP predictor and window-level controller.
//
// LLC misses come in clusters, so one miss predicts that memory-level parallelism (MLP)
// can be exploited for a while, and the window is enlarged one level (more entries,
// deeper pipeline). When a full memory latency has passed since the last LLC miss,
// MLP is predicted gone and instruction-level parallelism is worth more: the window
// should shrink one level. A shrink is only legal when no live entry of the IQ, ROB or
// LSQ sits in the part being switched off (shrink_ok). If that is not yet so, the
// controller stops allocation (alloc_stall) so that the resources drain, and lowers the
// level in the first cycle they are all shrinkable. An LLC miss while waiting cancels
// the pending shrink and raises the level instead.
//
// Timing: a cycle counter restarts at 1 on every LLC miss and every level decrease and
// saturates at MEM_LATENCY, so the shrink is considered exactly MEM_LATENCY cycles after
// the miss. lvl_up / lvl_down are combinational pulses valid in the cycle
// of the decision; level changes at the following clock edge, and the resources apply
// the shrink at that same edge. alloc_stall is a function of registers only, so it is
// already high in the cycle lvl_down fires and nothing is allocated into the part that
// goes away.
//
// From the original scheme: the level table, "increase on LLC miss", "decrease after a
// memory latency if shrinkable, else stop allocation". This design's choices: one level
// per step in both directions, and the counter restarting after a decrease, so that a
// level-3 window steps down to level 1 over two memory latencies.
module resize_ctrl
  import diw_pkg::*;
#(
  parameter int unsigned MEM_LATENCY = diw_pkg::MEM_LAT_CYC
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   llc_miss,
  input  logic   shrink_ok,
  output level_e level,
  output logic   alloc_stall,
  output logic   lvl_up,
  output logic   lvl_down
);

  localparam int unsigned CW = $clog2(MEM_LATENCY + 1);

  logic [CW-1:0] since_miss;
  logic          lapsed;

  assign lapsed      = (since_miss == CW'(MEM_LATENCY));
  assign alloc_stall = lapsed && (level != LVL1);
  assign lvl_up      = llc_miss && (level != LVL3);
  assign lvl_down    = !llc_miss && alloc_stall && shrink_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level      <= LVL1;
      since_miss <= CW'(MEM_LATENCY);
    end else begin
      if (llc_miss || lvl_down) since_miss <= CW'(1);
      else if (!lapsed)         since_miss <= since_miss + 1'b1;

      if (lvl_up)        level <= (level == LVL1) ? LVL2 : LVL3;
      else if (lvl_down) level <= level_below(level);
    end
  end

  a_no_both: assert property (@(posedge clk) disable iff (!rst_n) !(lvl_up && lvl_down));
  a_legal:   assert property (@(posedge clk) disable iff (!rst_n) level != 2'd3);

endmodule
