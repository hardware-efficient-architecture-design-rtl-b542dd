// zerotree_coder_tb: tree-level test of the zerotree coder at its default
// size (five-level trees of 341 coefficients, up to five SNR layers).
//
// Random wavelet trees with zero subtrees are sent through the coder with a
// mix of configurations (tree depth 1..5, 1..5 SNR layers, different shift
// sequences), with and without gaps on the input and back-pressure on the
// output. A reference model computes the expected symbol stream directly
// from the zerotree definitions (recursively over descendants and
// ancestors, not by the flag method of the hardware) and every output
// record is compared with it. For trees sent without stalls the cycle
// count from the first coefficient to tree_done must be 1 + N + L*(2N+4).
// The test also counts how often each mechanism occurred (input gaps,
// output stalls, each symbol, multi-layer trees, shallow trees, a change of
// configuration) and counts a failure for any that never did.
module zerotree_coder_tb;
  import zt_pkg::*;

  localparam int unsigned LEVELS = MAX_LEVELS;
  localparam int unsigned SNR    = MAX_SNR;
  localparam int unsigned DEPTH  = ((4 ** LEVELS) - 1) / 3;
  localparam int unsigned NTREES = 16;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic [LVL_W-1:0]            cfg_levels = LVL_W'(LEVELS);
  logic [NSNR_W-1:0]           cfg_layers = NSNR_W'(1);
  logic [SNR-1:0][SHIFT_W-1:0] cfg_shift = '0;
  logic                        in_valid = 1'b0;
  logic                        in_ready;
  logic signed [COEF_W-1:0]    in_coef = '0;
  logic                        out_valid;
  logic                        out_ready = 1'b1;
  sym_out_t                    out_data;
  mode_e                       mode;
  logic                        tree_done;
  // frame-memory request port, not used by this test
  logic                        fm_start = 1'b0;
  logic                        fm_req_ready = 1'b0;
  logic                        fm_busy, fm_req_valid, fm_req_tree_last, fm_req_frame_last;
  logic [$clog2(704 * 576)-1:0] fm_req_addr;

  zerotree_coder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;


  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int          ref_res [DEPTH];
  int          ref_q   [DEPTH];
  sym_e        ref_sym [DEPTH];
  sym_out_t    expq [$];

  function automatic int lvl_of(int i);
    int l = 0;
    while (i >= int'(((4 ** (l + 1)) - 1) / 3)) l++;
    return l;
  endfunction

  // any descendant of i non-zero in the tree of n nodes
  function automatic bit desc_nz(int i, int n);
    for (int j = 1; j <= 4; j++) begin
      int c = 4 * i + j;
      if (c < n) if (ref_q[c] != 0 || desc_nz(c, n)) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic bit under_zerotree(int i);
    int p = i;
    while (p > 0) begin
      p = (p - 1) / 4;
      if (ref_sym[p] == SYM_ZTR || ref_sym[p] == SYM_VZTR) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic model_layer(int n, int sh, int layer, bit last_layer);
    sym_out_t e;
    for (int i = 0; i < n; i++) begin
      int m = (ref_res[i] < 0) ? -ref_res[i] : ref_res[i];
      int qm = m >> sh;
      ref_q[i] = (ref_res[i] < 0) ? -qm : qm;
      ref_res[i] = ref_res[i] - ref_q[i] * (1 << sh);
    end
    for (int i = 0; i < n; i++) begin
      bit d = desc_nz(i, n);
      if (ref_q[i] != 0) ref_sym[i] = d ? SYM_VAL : SYM_VZTR;
      else               ref_sym[i] = d ? SYM_IZ  : SYM_ZTR;
    end
    for (int i = 0; i < n; i++) begin
      e.sym        = under_zerotree(i) ? SYM_ZTR_D : ref_sym[i];
      e.value      = COEF_W'(ref_q[i]);
      e.level      = LVL_W'(lvl_of(i));
      e.layer      = LAY_W'(layer);
      e.layer_last = (i == n - 1);
      e.tree_last  = (i == n - 1) && last_layer;
      expq.push_back(e);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_gap = 0, n_out_stall = 0, n_multi_layer = 0, n_shallow = 0, n_cfg_change = 0;
  int n_sym [5] = '{default: 0};
  int n_timed = 0;

  // ---------------- stimulus ----------------
  bit stall_in, stall_out;
  int coefs [DEPTH];

  task automatic gen_tree(int n);
    bit dead [DEPTH];
    for (int i = 0; i < n; i++) begin
      int l = lvl_of(i);
      dead[i] = (i > 0 && dead[(i - 1) / 4]) || ($urandom_range(0, 99) < 22);
      if (dead[i] || $urandom_range(0, 99) < 40) coefs[i] = 0;
      else begin
        int mag = $urandom_range(1, (1 << (13 - 2 * l)));
        coefs[i] = $urandom_range(0, 1) ? -mag : mag;
      end
    end
  endtask

  task automatic send(int c);
    in_valid = 1'b1;
    in_coef  = COEF_W'(c);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  int exp_cycles [NTREES];
  bit timed      [NTREES];
  int t_idx_start = 0, t_idx_done = 0;
  longint t_start [NTREES];

  initial begin : driver
    int prev_lv = -1, prev_nl = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NTREES; t++) begin
      int lv, nl, n;
      int sh [SNR];
      case (t)
        0: begin lv = 5; nl = 3; end
        1: begin lv = 5; nl = 1; end
        2: begin lv = 3; nl = 2; end
        3: begin lv = 1; nl = 1; end
        4: begin lv = 5; nl = 5; end
        5: begin lv = 3; nl = 1; end
        default: begin lv = $urandom_range(1, LEVELS); nl = $urandom_range(1, SNR); end
      endcase
      n = ((4 ** lv) - 1) / 3;
      // coarse to fine power-of-two steps
      sh[0] = $urandom_range(4, 10);
      for (int k = 1; k < SNR; k++) sh[k] = (sh[k-1] > 0) ? sh[k-1] - $urandom_range(1, 2) : 0;
      for (int k = 0; k < SNR; k++) if (sh[k] < 0) sh[k] = 0;
      stall_in  = (t % 3 == 1);
      stall_out = (t % 3 == 2) || (t == 4);
      timed[t]  = !stall_in && !stall_out;
      exp_cycles[t] = 1 + n + nl * (2 * n + 4);
      if (lv < 5) n_shallow++;
      if (nl > 1) n_multi_layer++;
      if (prev_lv != -1 && (lv != prev_lv || nl != prev_nl)) n_cfg_change++;
      prev_lv = lv; prev_nl = nl;
      if (t == 5) begin
        // the published 3-level example tree, coded losslessly (shift 0)
        int fig5 [21] = '{33, -16, 20, -13, -11, 1, 0, 14, -11, -2, 0, 9, 7,
                          0, 0, 0, 0, -5, 0, 15, 6};
        foreach (fig5[i]) coefs[i] = fig5[i];
        sh[0] = 0;
      end else begin
        gen_tree(n);
      end
      for (int i = 0; i < n; i++) ref_res[i] = coefs[i];
      for (int k = 0; k < nl; k++) model_layer(n, sh[k], k, k == nl - 1);
      if (t == 5) begin
        // expected symbols of the example: only the four children of -13
        // (a VZTR) are flagged as ZTR_D
        sym_e fig5_sym [21] = '{SYM_VAL, SYM_VAL, SYM_VAL, SYM_VZTR, SYM_VAL,
                                SYM_VZTR, SYM_ZTR, SYM_VZTR, SYM_VZTR,
                                SYM_VZTR, SYM_ZTR, SYM_VZTR, SYM_VZTR,
                                SYM_ZTR_D, SYM_ZTR_D, SYM_ZTR_D, SYM_ZTR_D,
                                SYM_VZTR, SYM_ZTR, SYM_VZTR, SYM_VZTR};
        for (int i = 0; i < 21; i++) begin
          checks++;
          if (expq[expq.size() - 21 + i].sym != fig5_sym[i]) begin
            failures++;
            $display("FAIL: example tree node %0d: model gives %0d", i, expq[expq.size() - 21 + i].sym);
          end
        end
      end
      // wait until the coder is idle so the new configuration is in place
      while (mode != M_IDLE) @(negedge clk);
      cfg_levels = LVL_W'(lv);
      cfg_layers = NSNR_W'(nl);
      for (int k = 0; k < SNR; k++) cfg_shift[k] = SHIFT_W'(sh[k]);
      for (int i = 0; i < n; i++) begin
        if (stall_in && $urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(1, 3)) begin
            @(negedge clk);
            if (in_ready) n_in_gap++;
          end
        end
        send(coefs[i]);
      end
      // wait until this tree has been fully emitted
      while (t_idx_done <= t) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    // final checks
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d expected symbols never appeared", expq.size());
    end
    begin
      int counts [11];
      string names [11];
      counts = '{n_in_gap, n_out_stall, n_multi_layer, n_shallow, n_cfg_change,
                 n_sym[0], n_sym[1], n_sym[2], n_sym[3], n_sym[4], n_timed};
      names  = '{"input gap", "output stall", "multi-layer tree", "shallow tree", "config change",
                 "ZTR", "IZ", "VAL", "VZTR", "ZTR_D", "timed tree"};
      for (int k = 0; k < 11; k++) begin
        checks++;
        $display("mechanism %-16s occurred %0d times", names[k], counts[k]);
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL: mechanism %s never occurred", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  initial begin : monitor
    mode_e prev_mode = M_IDLE;
    forever begin
      @(negedge clk);
      out_ready = (stall_out && $urandom_range(0, 2) == 0) ? 1'b0 : 1'b1;
      if (out_valid && !out_ready) n_out_stall++;
      if (mode == M_LOAD && prev_mode == M_IDLE) t_start[t_idx_start++] = cyc - 1;
      prev_mode = mode;
      if (tree_done) begin
        if (timed[t_idx_done]) begin
          longint took;
          took = cyc - t_start[t_idx_done];
          checks++;
          n_timed++;
          if (took != longint'(exp_cycles[t_idx_done])) begin
            failures++;
            $display("FAIL: tree %0d took %0d cycles, expected %0d", t_idx_done, took, exp_cycles[t_idx_done]);
          end
        end
        t_idx_done++;
      end
      if (out_valid && out_ready) begin
        sym_out_t e;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output %p", out_data);
        end else begin
          e = expq.pop_front();
          if (out_data !== e) begin
            failures++;
            if (failures < 10) $display("FAIL: got %p expected %p", out_data, e);
          end
          if (int'(out_data.sym) < 5) n_sym[out_data.sym]++;
        end
      end
    end
  end

endmodule
