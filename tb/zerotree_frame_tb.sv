// zerotree_frame_tb: end-to-end test of the zerotree coder at its default
// parameters on whole 704x576 (4CIF) coefficient maps.
//
// The testbench builds a synthetic wavelet coefficient map whose trees have
// zero subtrees and magnitudes that shrink towards the finer levels, and
// holds it in a behavioural frame memory: the memory takes the coder's
// read requests (fm_req_*) and returns the words, in order, after two
// cycles on the coefficient input. Every output symbol is compared with a
// reference computed from the map directly from the zerotree definitions.
//
// Frame 1 is the main configuration: 5 levels (1188 trees of 341 nodes),
// 3 SNR layers, no stalls. It must finish within 100e6/30 cycles (30 frames
// per second at 100 MHz) and take 2400 cycles per tree. Frame 2 switches to
// 4 levels and 2 layers with random gaps in the frame memory and random
// back-pressure on the output. Frame 3 is the largest configuration, 5
// levels and 5 SNR layers, which must take 3772 cycles per tree. The test counts how often each mechanism
// occurred (input gaps, output stalls, each symbol, several layers, the
// level switch, frame end) and counts a failure for any that never did.
module zerotree_frame_tb;
  import zt_pkg::*;

  localparam int unsigned IMG_W = 704, IMG_H = 576;
  localparam int unsigned SNR   = MAX_SNR;
  localparam int unsigned DEPTH = ((4 ** MAX_LEVELS) - 1) / 3;
  localparam int unsigned FAW   = $clog2(IMG_W * IMG_H);

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic                        fm_start = 1'b0;
  logic                        fm_busy, fm_req_valid, fm_req_tree_last, fm_req_frame_last;
  logic                        fm_req_ready = 1'b0;
  logic [FAW-1:0]              fm_req_addr;
  logic [LVL_W-1:0]            cfg_levels = LVL_W'(5);
  logic [NSNR_W-1:0]           cfg_layers = NSNR_W'(3);
  logic [SNR-1:0][SHIFT_W-1:0] cfg_shift = '0;
  logic                        in_valid = 1'b0;
  logic                        in_ready;
  logic signed [COEF_W-1:0]    in_coef = '0;
  logic                        out_valid;
  logic                        out_ready = 1'b1;
  sym_out_t                    out_data;
  mode_e                       mode;
  logic                        tree_done;

  zerotree_coder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- coefficient map and frame memory ----------------
  int fmem [IMG_W * IMG_H];
  int f_levels, f_layers;
  int f_shift [SNR];

  // position of node i of tree t, independently of the hardware: walk the
  // path from the root given by the base-4 digits of the in-level position
  task automatic node_pos(int levels, int t, int i, output int r, output int c);
    int hdc = IMG_H >> levels, wdc = IMG_W >> levels;
    int dp = t / 3, b = t % 3;
    int l = 0, p;
    r = dp / wdc + ((b == 0) ? 0 : hdc);
    c = dp % wdc + ((b == 1) ? 0 : wdc);
    while (i >= int'(((4 ** (l + 1)) - 1) / 3)) l++;
    p = i - ((4 ** l) - 1) / 3;
    for (int k = l - 1; k >= 0; k--) begin
      int d = (p >> (2 * k)) & 3;
      r = 2 * r + d / 2;
      c = 2 * c + d % 2;
    end
  endtask

  task automatic build_map(int levels, int seed_mix);
    int ntrees = 3 * (IMG_H >> levels) * (IMG_W >> levels);
    int n = ((4 ** levels) - 1) / 3;
    bit dead [DEPTH];
    foreach (fmem[a]) fmem[a] = 0;
    for (int t = 0; t < ntrees; t++)
      for (int i = 0; i < n; i++) begin
        int r, c, l = 0, v;
        while (i >= int'(((4 ** (l + 1)) - 1) / 3)) l++;
        dead[i] = (i > 0 && dead[(i - 1) / 4]) || ($urandom_range(0, 99) < 20 + seed_mix);
        if (dead[i] || $urandom_range(0, 99) < 35) v = 0;
        else begin
          v = $urandom_range(1, 1 << (13 - 2 * l));
          if ($urandom_range(0, 1)) v = -v;
        end
        node_pos(levels, t, i, r, c);
        fmem[r * IMG_W + c] = v;
      end
  endtask

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

  task automatic model_tree(int t);
    int n = ((4 ** f_levels) - 1) / 3;
    sym_out_t e;
    for (int i = 0; i < n; i++) begin
      int r, c;
      node_pos(f_levels, t, i, r, c);
      ref_res[i] = fmem[r * IMG_W + c];
    end
    for (int k = 0; k < f_layers; k++) begin
      int sh = f_shift[k];
      for (int i = 0; i < n; i++) begin
        int m = (ref_res[i] < 0) ? -ref_res[i] : ref_res[i];
        ref_q[i] = (ref_res[i] < 0) ? -(m >> sh) : (m >> sh);
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
        e.layer      = LAY_W'(k);
        e.layer_last = (i == n - 1);
        e.tree_last  = (i == n - 1) && (k == f_layers - 1);
        expq.push_back(e);
      end
    end
  endtask

  // ---------------- frame memory model and monitor ----------------
  int     rq_data [$];
  longint rq_time [$];
  bit     gaps = 1'b0, stalls = 1'b0;
  int     n_in_gap = 0, n_out_stall = 0, n_frame_last = 0, n_tree_last_req = 0;
  int     n_sym [5] = '{default: 0};
  int     n_out = 0, n_trees_done = 0, next_tree = 0;
  int     n_level_switch = 0, prev_levels = -1;

  initial begin : memory_and_monitor
    forever begin
      @(negedge clk);
      // frame memory: accept a request, return words after two cycles
      fm_req_ready = (rq_data.size() < 4) && !(gaps && $urandom_range(0, 3) == 0);
      if (fm_req_valid && fm_req_ready) begin
        rq_data.push_back(fmem[fm_req_addr]);
        rq_time.push_back(cyc + 2);
        if (fm_req_tree_last) n_tree_last_req++;
        if (fm_req_frame_last) n_frame_last++;
      end
      in_valid = (rq_data.size() > 0) && (rq_time[0] <= cyc);
      in_coef  = in_valid ? COEF_W'(rq_data[0]) : '0;
      if (mode == M_LOAD && in_ready && !in_valid) n_in_gap++;
      if (in_valid && in_ready) begin
        void'(rq_data.pop_front());
        void'(rq_time.pop_front());
      end
      // symbol output
      out_ready = (stalls && $urandom_range(0, 2) == 0) ? 1'b0 : 1'b1;
      if (out_valid && !out_ready) n_out_stall++;
      if (tree_done) n_trees_done++;
      if (out_valid && out_ready) begin
        sym_out_t e;
        if (expq.size() == 0) model_tree(next_tree++);
        e = expq.pop_front();
        checks++;
        n_out++;
        if (out_data !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: symbol %0d got %p expected %p", n_out, out_data, e);
        end
        if (int'(out_data.sym) < 5) n_sym[out_data.sym]++;
      end
    end
  end

  task automatic run_frame(int levels, int layers, bit g, bit s, output longint took);
    int ntrees = 3 * (IMG_H >> levels) * (IMG_W >> levels);
    longint t0;
    if (prev_levels != -1 && levels != prev_levels) n_level_switch++;
    prev_levels = levels;
    f_levels = levels;
    f_layers = layers;
    for (int k = 0; k < int'(SNR); k++) begin
      f_shift[k] = (layers - 1 - k) * 2 + 1;
      if (f_shift[k] < 0) f_shift[k] = 0;
      cfg_shift[k] = SHIFT_W'(f_shift[k]);
    end
    cfg_levels = LVL_W'(levels);
    cfg_layers = NSNR_W'(layers);
    gaps = g;
    stalls = s;
    next_tree = 0;
    n_trees_done = 0;
    expq.delete();
    @(negedge clk);
    fm_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    fm_start = 1'b0;
    while (n_trees_done < ntrees) @(negedge clk);
    took = cyc - t0;
    // let the last symbols leave
    repeat (4) @(negedge clk);
    checks++;
    if (next_tree != ntrees || expq.size() != 0) begin
      failures++;
      $display("FAIL: frame with %0d levels: %0d of %0d trees emitted, %0d symbols missing",
               levels, next_tree, ntrees, expq.size());
    end
  endtask

  initial begin : main
    longint took1, took2, took3;
    int n1, n2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // frame 1: 5 levels, 3 SNR layers, no stalls
    build_map(5, 0);
    run_frame(5, 3, 1'b0, 1'b0, took1);
    n1 = n_out;
    $display("frame 1: 1188 trees, 3 layers, %0d symbols in %0d cycles (%0.2f frames/s at 100 MHz)",
             n1, took1, 100.0e6 / real'(took1));
    checks++;
    if (n1 != 1188 * 341 * 3) begin failures++; $display("FAIL: %0d symbols in frame 1", n1); end
    checks++;
    if (took1 > 100000000 / 30) begin failures++; $display("FAIL: frame 1 slower than 30 frames/s"); end
    checks++;
    if (took1 > 1188 * 2400 + 16) begin failures++; $display("FAIL: frame 1 took more than 2400 cycles per tree"); end
    // frame 2: 4 levels, 2 layers, gaps and stalls
    build_map(4, 10);
    run_frame(4, 2, 1'b1, 1'b1, took2);
    $display("frame 2: 4752 trees, 2 layers, %0d symbols in %0d cycles", n_out - n1, took2);
    checks++;
    if (n_out - n1 != 4752 * 85 * 2) begin failures++; $display("FAIL: %0d symbols in frame 2", n_out - n1); end
    n2 = n_out;
    // frame 3: the largest configuration, 5 levels and 5 SNR layers, no stalls
    build_map(5, 5);
    run_frame(5, 5, 1'b0, 1'b0, took3);
    $display("frame 3: 1188 trees, 5 layers, %0d symbols in %0d cycles (%0.2f frames/s at 100 MHz)",
             n_out - n2, took3, 100.0e6 / real'(took3));
    checks++;
    if (n_out - n2 != 1188 * 341 * 5) begin failures++; $display("FAIL: %0d symbols in frame 3", n_out - n2); end
    checks++;
    if (took3 > 1188 * 3772 + 16) begin failures++; $display("FAIL: frame 3 took more than 3772 cycles per tree"); end
    begin
      int counts [10];
      string names [10];
      counts = '{n_in_gap, n_out_stall, n_frame_last, n_tree_last_req,
                 n_sym[0], n_sym[1], n_sym[2], n_sym[3], n_sym[4], n_level_switch};
      names  = '{"input gap", "output stall", "frame end", "tree end",
                 "ZTR", "IZ", "VAL", "VZTR", "ZTR_D", "level switch"};
      for (int k = 0; k < 10; k++) begin
        checks++;
        $display("mechanism %-12s occurred %0d times", names[k], counts[k]);
        if (counts[k] == 0) begin failures++; $display("FAIL: mechanism %s never occurred", names[k]); end
      end
      checks++;
      if (n_frame_last != 3 || n_tree_last_req != 1188 + 4752 + 1188) begin
        failures++; $display("FAIL: %0d frame ends, %0d tree ends requested", n_frame_last, n_tree_last_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
