// tree_addr_tb: sweeps trees of every depth 1..5 in both directions, with
// random pauses, and checks each index against the expected scan order,
// its level (from the level entry points), the leaf / root marks, the
// parent location (idx-1)/4, the first child 4*idx+1, the last mark and the
// end of the pass. The pass must take exactly one cycle per node.
module tree_addr_tb;
  import zt_pkg::*;

  localparam int unsigned LEVELS = 5;
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, top_down = 1'b1, step = 1'b0;
  logic [LVL_W-1:0] levels = '0;
  logic active, is_leaf, is_root, last;
  logic [AW-1:0] idx, parent_idx, child_base;
  logic [LVL_W-1:0] level;

  tree_addr #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl_of(int i);
    int l = 0;
    while (i >= int'(((4 ** (l + 1)) - 1) / 3)) l++;
    return l;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lv = 1; lv <= int'(LEVELS); lv++) begin
      for (int dir = 0; dir < 2; dir++) begin
        automatic int n = ((4 ** lv) - 1) / 3;
        automatic int steps = 0, cycles = 0;
        automatic bit pauses = (lv % 2 == 0);
        @(negedge clk);
        start = 1'b1; top_down = dir[0]; levels = LVL_W'(lv);
        @(negedge clk);
        start = 1'b0;
        while (steps < n) begin
          automatic int e = dir ? steps : n - 1 - steps;
          automatic int el = lvl_of(e);
          step = pauses ? ($urandom_range(0, 3) != 0) : 1'b1;
          #1;
          checks++;
          if (!active || int'(idx) != e || int'(level) != el || is_leaf != (el == lv - 1) ||
              is_root != (e == 0) || (e > 0 && int'(parent_idx) != (e - 1) / 4) ||
              (el < lv - 1 && int'(child_base) != 4 * e + 1) || last != (steps == n - 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL lv=%0d dir=%0d step=%0d: idx=%0d lvl=%0d leaf=%0d par=%0d ch=%0d last=%0d",
                       lv, dir, steps, idx, level, is_leaf, parent_idx, child_base, last);
          end
          if (step) steps++;
          cycles++;
          @(negedge clk);
        end
        step = 1'b0;
        #1;
        checks++;
        if (active) begin failures++; $display("FAIL: still active after pass"); end
        if (!pauses) begin
          checks++;
          if (cycles != n) begin failures++; $display("FAIL: pass took %0d cycles for %0d nodes", cycles, n); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
