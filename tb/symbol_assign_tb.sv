// symbol_assign_tb: issues random nodes to the SA stage, returns a random
// memory word and descendant-significance flag one cycle later, and checks
// the write-back (address, new residual, quantized value, symbol) and the
// flag updates (parent set, children written, their value) in that cycle
// against a model of the zerotree symbol rules.
module symbol_assign_tb;
  import zt_pkg::*;

  localparam int unsigned LEVELS = 5;
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic issue = 1'b0, is_leaf = 1'b0, is_root = 1'b0, desc_sig = 1'b0;
  logic [AW-1:0] idx = '0, parent_idx = '0, child_base = '0, flag_rd_idx, mem_waddr, flag_par_idx, flag_chld_base;
  logic [SHIFT_W-1:0] shift = '0;
  tree_word_t rdata, mem_wdata;
  logic mem_we, flag_upd, flag_par_set, flag_chld_wr, flag_chld_val;
  sa_sym_e sym;

  symbol_assign #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sym [4] = '{default: 0};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_idx, e_sh, e_r, e_q, e_res;
    bit e_leaf, e_root, e_iss;
    sa_sym_e e_sym;
    rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e_iss = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      // data cycle of the previous issue
      e_r      = (($urandom_range(0, 2) == 0) ? 0 : ($urandom_range(0, 8191) - 4096));
      rdata.res = COEF_W'(e_r);
      rdata.qv  = COEF_W'($urandom);
      rdata.sym = sa_sym_e'($urandom_range(0, 3));
      desc_sig  = $urandom_range(0, 1);
      // new issue in the same cycle
      issue      = $urandom_range(0, 3) != 0;
      #1;
      checks++;
      if (mem_we != e_iss || flag_upd != e_iss) begin failures++; $display("FAIL: write enable"); end
      if (e_iss) begin
        e_q   = e_r / (1 << e_sh);
        e_res = e_r - e_q * (1 << e_sh);
        if (e_q != 0) e_sym = desc_sig ? SA_VAL : SA_VZTR;
        else          e_sym = desc_sig ? SA_IZ  : SA_ZTR;
        n_sym[e_sym]++;
        checks++;
        if (int'(mem_waddr) != e_idx || int'(flag_rd_idx) != e_idx || int'(mem_wdata.res) != e_res ||
            int'(mem_wdata.qv) != e_q || mem_wdata.sym != e_sym || sym != e_sym ||
            flag_par_set != (!e_root && (e_q != 0 || desc_sig)) ||
            (!e_root && int'(flag_par_idx) != (e_idx - 1) / 4) ||
            flag_chld_wr != !e_leaf || (!e_leaf && int'(flag_chld_base) != 4 * e_idx + 1) ||
            flag_chld_val != (e_sym == SA_ZTR || e_sym == SA_VZTR)) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d idx=%0d r=%0d sh=%0d: q=%0d res=%0d sym=%0d (exp %0d %0d %0d) par=%0d chw=%0d chv=%0d",
                     k, e_idx, e_r, e_sh, mem_wdata.qv, mem_wdata.res, mem_wdata.sym, e_q, e_res, e_sym,
                     flag_par_set, flag_chld_wr, flag_chld_val);
        end
      end
      // remember what is issued now
      e_iss  = issue;
      e_idx  = $urandom_range(0, DEPTH - 1);
      e_root = (e_idx == 0);
      e_leaf = (e_idx >= 85);
      e_sh   = $urandom_range(0, 9);
      idx = AW'(e_idx); is_root = e_root; is_leaf = e_leaf;
      parent_idx = AW'(e_root ? 0 : (e_idx - 1) / 4);
      child_base = AW'(4 * e_idx + 1);
      shift = SHIFT_W'(e_sh);
      @(negedge clk);
    end
    foreach (n_sym[s]) begin
      checks++;
      if (n_sym[s] == 0) begin failures++; $display("FAIL: symbol %0d never assigned", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
