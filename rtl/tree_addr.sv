// tree_addr: address generator for tree-depth scanning of one wavelet tree
// stored breadth-first in the tree memory.
//
// A pass is started with start, choosing the direction with top_down: the
// top-down scan walks the indices 0, 1, ..., N-1 (N = (4^levels-1)/3), the
// bottom-up scan walks N-1 down to 0, so every node is visited after all its
// descendants. Each step advances one index. Alongside the index the block
// keeps the current level, updated against the per-level entry points
// (4^l-1)/3, and gives the parent location (idx-1)/4 (for the fourth child
// 4p+4 this is idx/4-1) and the first child location 4*idx+1 (children
// 4*idx+1..4*idx+4). No other address arithmetic is needed.
//
// Timing: start loads the first index at the next edge; active is then high
// until the step taken while last is high. levels is sampled at start and
// must be 1..LEVELS. The breadth-first organisation and the parent / child
// formulas follow the architecture; the start/step handshake is this
// design's choice.
module tree_addr
  import zt_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW    = LVL_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          top_down,
  input  logic [LW-1:0] levels,
  input  logic          step,
  output logic          active,
  output logic [AW-1:0] idx,
  output logic [LW-1:0] level,
  output logic          is_leaf,
  output logic          is_root,
  output logic [AW-1:0] parent_idx,
  output logic [AW-1:0] child_base,
  output logic          last
);

  logic          dir_down;    // 1: top-down (increasing index)
  logic [LW-1:0] lv_cnt;      // number of levels of this pass
  logic [AW-1:0] n_last;      // N-1

  // Entry point of each level, and the last index of each tree size.
  function automatic logic [AW:0] base_of(logic [LW-1:0] l);
    logic [AW:0] b;
    b = '0;
    for (int unsigned i = 0; i < LEVELS + 1; i++)
      if (i == int'(l)) b = (AW + 1)'(((4 ** i) - 1) / 3);
    return b;
  endfunction

  logic [AW:0] next_base;     // entry point of level+1
  logic [AW:0] cur_base;      // entry point of level

  assign next_base = base_of(level + 1'b1);
  assign cur_base  = base_of(level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      dir_down <= 1'b1;
      idx      <= '0;
      level    <= '0;
      lv_cnt   <= LW'(1);
      n_last   <= '0;
    end else if (start) begin
      active   <= 1'b1;
      dir_down <= top_down;
      lv_cnt   <= levels;
      n_last   <= AW'(base_of(levels) - 1'b1);
      if (top_down) begin
        idx   <= '0;
        level <= '0;
      end else begin
        idx   <= AW'(base_of(levels) - 1'b1);
        level <= levels - 1'b1;
      end
    end else if (active && step) begin
      if (last) begin
        active <= 1'b0;
      end else if (dir_down) begin
        idx <= idx + 1'b1;
        if ((AW + 1)'(idx) + 1'b1 == next_base) level <= level + 1'b1;
      end else begin
        idx <= idx - 1'b1;
        if ((AW + 1)'(idx) == cur_base) level <= level - 1'b1;
      end
    end
  end

  assign last       = active && (dir_down ? (idx == n_last) : (idx == '0));
  assign is_leaf    = (level == lv_cnt - 1'b1);
  assign is_root    = (idx == '0);
  assign parent_idx = is_root ? '0 : AW'((idx - 1'b1) >> 2);
  assign child_base = AW'({idx, 2'b00} + 1'b1);

endmodule
