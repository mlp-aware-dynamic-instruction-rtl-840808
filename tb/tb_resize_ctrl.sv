// tb_resize_ctrl: self-checking test of the MLP predictor / level controller.
// Directed part: level steps up on LLC misses, saturates at level 3, steps down exactly
// MEM_LATENCY cycles after the last miss when shrinkable, stalls allocation while not
// shrinkable, and a miss cancels a pending shrink. Random part: LLC misses and
// shrink_ok driven at random, outputs compared each cycle with a reference model.
module tb_resize_ctrl;
  import diw_pkg::*;

  localparam int unsigned LAT = 300;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   llc_miss = 1'b0, shrink_ok = 1'b0;
  level_e level;
  logic   alloc_stall, lvl_up, lvl_down;
  int     checks = 0, failures = 0;
  int     cyc = 0;

  resize_ctrl #(.MEM_LATENCY(LAT)) dut (.*);

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
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s (level=%0d stall=%0b up=%0b down=%0b)", cyc, what, level,
               alloc_stall, lvl_up, lvl_down);
    end
  endtask

  // drive inputs just after the clock edge, sample just before the next one
  task automatic step(input logic miss, input logic sok);
    llc_miss  = miss;
    shrink_ok = sok;
    #4;
  endtask

  // reference model
  int ref_level = 1, ref_cnt = LAT;

  initial begin
    int t0, n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(level == LVL1 && !alloc_stall, "reset state");

    // one miss: level 2 at the next edge
    step(1, 1);
    check(lvl_up && !lvl_down, "lvl_up pulse on miss");
    @(posedge clk); #1;
    t0 = cyc;
    check(level == LVL2, "level 2 after one miss");
    // count cycles until lvl_down with shrink_ok held high
    n = 0;
    step(0, 1);
    while (!lvl_down && n < 2 * LAT) begin
      @(posedge clk); #1; n++;
      step(0, 1);
    end
    check(n == LAT - 1, $sformatf("shrink %0d cycles after miss cycle, expected %0d", n + 1, LAT));
    check(alloc_stall, "stall high in shrink cycle");
    @(posedge clk); #1;
    check(level == LVL1 && !alloc_stall, "back to level 1");

    // two misses: level 3, a third saturates
    step(1, 0); @(posedge clk); #1;
    step(1, 0); @(posedge clk); #1;
    check(level == LVL3, "level 3 after two misses");
    step(1, 0);
    check(!lvl_up, "no lvl_up at level 3");
    @(posedge clk); #1;
    check(level == LVL3, "level 3 saturates");
    // not shrinkable: stall after LAT cycles and hold level
    step(0, 0);
    repeat (LAT + 20) begin @(posedge clk); #1; step(0, 0); end
    check(alloc_stall && level == LVL3 && !lvl_down, "stall while not shrinkable");
    // a miss cancels the pending shrink
    step(1, 1);
    check(!lvl_down, "miss wins over shrink");
    @(posedge clk); #1;
    check(level == LVL3 && !alloc_stall, "miss cancels stall");
    // drain: shrink becomes possible later
    step(0, 0);
    repeat (LAT + 5) begin @(posedge clk); #1; step(0, 0); end
    step(0, 1);
    check(lvl_down, "shrink once shrinkable");
    @(posedge clk); #1;
    check(level == LVL2 && !alloc_stall, "level 2 after shrink, stall released");
    n = 0;
    step(0, 1);
    while (!lvl_down && n < 2 * LAT) begin @(posedge clk); #1; n++; step(0, 1); end
    check(n == LAT - 1, "second step down one latency later");
    @(posedge clk); #1;
    check(level == LVL1, "level 1 at the end of the directed part");

    // random part against the reference model
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    ref_level = 1; ref_cnt = LAT;
    repeat (20000) begin
      logic m, s, rstall, rup, rdown;
      m = ($urandom_range(0, 399) == 0);
      s = ($urandom_range(0, 3) == 0);
      step(m, s);
      rstall = (ref_cnt == LAT) && ref_level != 1;
      rup    = m && ref_level != 3;
      rdown  = !m && rstall && s;
      check(alloc_stall == rstall && lvl_up == rup && lvl_down == rdown &&
            int'(level) + 1 == ref_level, "random vs model");
      if (m || rdown) ref_cnt = 1; else if (ref_cnt < LAT) ref_cnt++;
      if (rup) ref_level++; else if (rdown) ref_level--;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
