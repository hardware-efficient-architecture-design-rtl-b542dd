// symbol_assign: the symbol-assignment (SA) stage, run once per SNR layer
// over one wavelet tree in bottom-up order.
//
// For each node the controller issues a tree-memory read together with the
// node's index, parent and first-child locations. One cycle later the word
// arrives: its residual is quantized with the layer's power-of-two step
// (pot_quant), and the symbol is decided from the quantized value and the
// node's flag register, which by then holds "some descendant is
// significant" (all descendants are visited first in bottom-up order):
//   q != 0, no significant descendant   -> VZTR
//   q != 0, significant descendant      -> VAL
//   q == 0, significant descendant      -> IZ
//   q == 0, no significant descendant   -> ZTR
// In the same cycle the word {new residual, q, symbol} is written back to the
// same address, the node's flag is cleared, the parent's flag is set if the
// node or a descendant is significant, and, for a ZTR or VZTR that is not a
// leaf, the four children's flags are set as ZTR_D candidates. A leaf has no
// children, so it is a ZTR when zero and a VZTR when non-zero.
//
// Timing: one node per clock, one read and one write per node, latency one
// cycle from issue to write-back. The symbol rules and the flag registration
// follow the architecture; the one-cycle pipeline and the leaf rule are this
// design's reading of it.
module symbol_assign
  import zt_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // issue side (same cycle as the memory read)
  input  logic               issue,
  input  logic [AW-1:0]      idx,
  input  logic               is_leaf,
  input  logic               is_root,
  input  logic [AW-1:0]      parent_idx,
  input  logic [AW-1:0]      child_base,
  input  logic [SHIFT_W-1:0] shift,
  // data side (one cycle later)
  input  tree_word_t         rdata,
  output logic [AW-1:0]      flag_rd_idx,
  input  logic               desc_sig,
  // write-back to the tree memory
  output logic               mem_we,
  output logic [AW-1:0]      mem_waddr,
  output tree_word_t         mem_wdata,
  // flag register update
  output logic               flag_upd,
  output logic               flag_par_set,
  output logic [AW-1:0]      flag_par_idx,
  output logic               flag_chld_wr,
  output logic [AW-1:0]      flag_chld_base,
  output logic               flag_chld_val,
  // decided symbol of the node written this cycle (observation)
  output sa_sym_e            sym
);

  logic                      s1_vld;
  logic [AW-1:0]             s1_idx;
  logic                      s1_leaf;
  logic                      s1_root;
  logic [AW-1:0]             s1_par;
  logic [AW-1:0]             s1_chld;
  logic [SHIFT_W-1:0]        s1_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vld   <= 1'b0;
      s1_idx   <= '0;
      s1_leaf  <= 1'b0;
      s1_root  <= 1'b0;
      s1_par   <= '0;
      s1_chld  <= '0;
      s1_shift <= '0;
    end else begin
      s1_vld <= issue;
      if (issue) begin
        s1_idx   <= idx;
        s1_leaf  <= is_leaf;
        s1_root  <= is_root;
        s1_par   <= parent_idx;
        s1_chld  <= child_base;
        s1_shift <= shift;
      end
    end
  end

  logic signed [COEF_W-1:0] q, rec, res_nxt;
  logic                     q_nz;

  pot_quant u_quant (
    .res_in (rdata.res),
    .shift  (s1_shift),
    .q      (q),
    .rec    (rec),
    .res_out(res_nxt),
    .q_nz   (q_nz)
  );

  always_comb begin
    unique case ({q_nz, desc_sig})
      2'b10:   sym = SA_VZTR;
      2'b11:   sym = SA_VAL;
      2'b01:   sym = SA_IZ;
      default: sym = SA_ZTR;
    endcase
  end

  assign flag_rd_idx     = s1_idx;
  assign mem_we          = s1_vld;
  assign mem_waddr       = s1_idx;
  assign mem_wdata.res   = res_nxt;
  assign mem_wdata.qv    = q;
  assign mem_wdata.sym   = sym;
  assign flag_upd        = s1_vld;
  assign flag_par_set    = s1_vld && !s1_root && (q_nz || desc_sig);
  assign flag_par_idx    = s1_par;
  assign flag_chld_wr    = s1_vld && !s1_leaf;
  assign flag_chld_val   = (sym == SA_ZTR) || (sym == SA_VZTR);
  assign flag_chld_base  = s1_chld;

  // rec is the inverse-quantized value; the new residual already accounts for it.
  logic unused_rec;
  assign unused_rec = ^rec;

endmodule
