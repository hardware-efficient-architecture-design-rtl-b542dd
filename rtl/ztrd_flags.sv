// ztrd_flags: one flag bit per tree-memory element, the symbol-registration
// register set.
//
// The same bit serves two purposes one after the other during the bottom-up
// symbol-assignment (SA) pass. Before node k is processed, flag[k] collects
// "some descendant of k is significant": every child that is non-zero or has
// a significant descendant sets its parent's flag. When k itself is
// processed the flag is read (rd_flag, combinational) and cleared. When k's
// parent is processed later, the parent writes the flags of its four
// children at once: 1 if the parent became ZTR or VZTR, making the children
// ZTR_D candidates. A ZTR child in turn flags its own children, so after the
// pass every node below a zerotree is flagged. The symbol-generation pass
// only reads the flags. Because these are registers and not SRAM words, the
// four-child write costs no memory access.
//
// Interface: clr_all clears every flag (start of each SA pass). With upd
// high, at the clock edge: flag[self_idx] <= 0; if par_set, flag[par_idx] <= 1;
// if chld_wr, flag[chld_base+0..3] <= chld_val. The indices touched in one
// update are always distinct. Reset clears all flags.
module ztrd_flags #(
  parameter int unsigned DEPTH = 341,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr_all,
  input  logic          upd,
  input  logic [AW-1:0] self_idx,
  input  logic          par_set,
  input  logic [AW-1:0] par_idx,
  input  logic          chld_wr,
  input  logic [AW-1:0] chld_base,
  input  logic          chld_val,
  input  logic [AW-1:0] rd_idx,
  output logic          rd_flag
);

  logic [DEPTH-1:0] flags;

  assign rd_flag = (int'(rd_idx) < DEPTH) ? flags[rd_idx] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
    end else if (clr_all) begin
      flags <= '0;
    end else if (upd) begin
      flags[self_idx] <= 1'b0;
      if (par_set) flags[par_idx] <= 1'b1;
      if (chld_wr) begin
        for (int j = 0; j < 4; j++) flags[chld_base + AW'(j)] <= chld_val;
      end
    end
  end

`ifndef SYNTHESIS
  a_chld_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 upd && chld_wr |-> int'(chld_base) + 3 < DEPTH);
  a_par_self:   assert property (@(posedge clk) disable iff (!rst_n)
                                 upd && par_set |-> par_idx != self_idx);
`endif

endmodule
