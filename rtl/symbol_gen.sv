// symbol_gen: the symbol-generation (SG) stage, run once per SNR layer over
// one wavelet tree in top-down (tree-depth) order.
//
// The controller issues a tree-memory read for each node in increasing index
// order, which is the tree-depth scan order, whenever can_issue is high. One
// cycle later the stored first-pass symbol and quantized value arrive, and
// the node's flag register is read: a set flag means the node lies under a
// ZTR or VZTR, and ZTR_D is output in place of the stored symbol. The result,
// tagged with the node's level and the SNR layer, enters a two-entry output
// queue towards the arithmetic coder, which takes symbols with a
// valid/ready handshake.
//
// Timing: with out_ready held high one symbol leaves per clock, one cycle
// after its read. can_issue counts the reads in flight so that a read is only
// issued when its result is sure to find room in the queue; a low out_ready
// therefore stalls the scan without losing or repeating a symbol. idle is
// high when no read is in flight and the queue is empty. The ZTR_D override
// from the flag follows the architecture; the queue and the handshake are
// this design's choices.
module symbol_gen
  import zt_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue side
  input  logic             issue,
  input  logic [AW-1:0]    idx,
  input  logic [LVL_W-1:0] level,
  input  logic [LAY_W-1:0] layer,
  input  logic             layer_last,
  input  logic             tree_last,
  output logic             can_issue,
  output logic             idle,
  // data side (one cycle after issue)
  input  tree_word_t       rdata,
  output logic [AW-1:0]    flag_rd_idx,
  input  logic             ztrd_flag,
  // output to the arithmetic coder
  output logic             out_valid,
  input  logic             out_ready,
  output sym_out_t         out_data
);

  // read in flight
  logic             s1_vld;
  logic [AW-1:0]    s1_idx;
  logic [LVL_W-1:0] s1_level;
  logic [LAY_W-1:0] s1_layer;
  logic             s1_llast;
  logic             s1_tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vld   <= 1'b0;
      s1_idx   <= '0;
      s1_level <= '0;
      s1_layer <= '0;
      s1_llast <= 1'b0;
      s1_tlast <= 1'b0;
    end else begin
      s1_vld <= issue;
      if (issue) begin
        s1_idx   <= idx;
        s1_level <= level;
        s1_layer <= layer;
        s1_llast <= layer_last;
        s1_tlast <= tree_last;
      end
    end
  end

  assign flag_rd_idx = s1_idx;

  sym_out_t gen;
  always_comb begin
    gen.sym        = ztrd_flag ? SYM_ZTR_D : sym_e'({1'b0, rdata.sym});
    gen.value      = rdata.qv;
    gen.level      = s1_level;
    gen.layer      = s1_layer;
    gen.layer_last = s1_llast;
    gen.tree_last  = s1_tlast;
  end

  // two-entry output queue
  sym_out_t   q_mem [2];
  logic       rd_ptr, wr_ptr;
  logic [1:0] count;
  logic       push, pop;

  assign push      = s1_vld;
  assign pop       = out_valid && out_ready;
  assign out_valid = (count != 2'd0);
  assign out_data  = q_mem[rd_ptr];

  // room for the result of a read issued now, given what is in flight
  logic [2:0] occ_next;
  assign occ_next  = 3'(count) + 3'(s1_vld) - 3'(pop);
  assign can_issue = (occ_next <= 3'd1);
  assign idle      = !s1_vld && (count == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count  <= 2'd0;
    end else begin
      if (push) begin
        q_mem[wr_ptr] <= gen;
        wr_ptr        <= ~wr_ptr;
      end
      if (pop) rd_ptr <= ~rd_ptr;
      count <= 2'(3'(count) + 3'(push) - 3'(pop));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (count < 2'd2) || pop);
  a_issue_room:  assert property (@(posedge clk) disable iff (!rst_n)
                                  issue |-> can_issue);
  a_out_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                  out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
