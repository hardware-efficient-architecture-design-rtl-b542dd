// tds_scan_addr_tb: checks the tree-depth scan of the coefficient map.
// Part 1, 16x16 with 3 levels and the DC band: the position of every output
// must carry the scan number given by an independent breadth-first
// reference (a queue of positions per tree), and a set of positions is
// checked against the scan numbers of the published 16x16 example. Part 2,
// a 704x576 (4CIF) map with 5 levels and AC only, with random back-pressure:
// every AC position must be produced exactly once, 1188 trees of 341 nodes,
// frame_last on the final one, one address per cycle while ready is high.
module tds_scan_addr_tb;
  import zt_pkg::*;

  // ---------------- part 1: 16x16, 3 levels ----------------
  localparam int W1 = 16, H1 = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic s1_start = 1'b0, s1_ready = 1'b0, s1_with_dc = 1'b1;
  logic [LVL_W-1:0] s1_levels = LVL_W'(3);
  logic s1_busy, s1_valid, s1_dc, s1_tf, s1_tl, s1_fl;
  logic [$clog2(W1*H1)-1:0] s1_addr;
  logic [$clog2(H1)-1:0] s1_row;
  logic [$clog2(W1)-1:0] s1_col;

  tds_scan_addr #(.IMG_W(W1), .IMG_H(H1), .LEVELS(3)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(s1_start), .levels(s1_levels), .with_dc(s1_with_dc),
    .busy(s1_busy), .valid(s1_valid), .ready(s1_ready), .addr(s1_addr), .row(s1_row),
    .col(s1_col), .dc(s1_dc), .tree_first(s1_tf), .tree_last(s1_tl), .frame_last(s1_fl));

  // ---------------- part 2: 704x576, 5 levels ----------------
  localparam int W2 = 704, H2 = 576;
  logic s2_start = 1'b0, s2_ready = 1'b0;
  logic s2_busy, s2_valid, s2_dc, s2_tf, s2_tl, s2_fl;
  logic [$clog2(W2*H2)-1:0] s2_addr;
  logic [$clog2(H2)-1:0] s2_row;
  logic [$clog2(W2)-1:0] s2_col;

  tds_scan_addr dut2 (
    .clk(clk), .rst_n(rst_n), .start(s2_start), .levels(LVL_W'(5)), .with_dc(1'b0),
    .busy(s2_busy), .valid(s2_valid), .ready(s2_ready), .addr(s2_addr), .row(s2_row),
    .col(s2_col), .dc(s2_dc), .tree_first(s2_tf), .tree_last(s2_tl), .frame_last(s2_fl));

  int refmap [H1][W1];

  task automatic build_ref(int levels);
    int n = 0;
    int hdc = H1 >> levels, wdc = W1 >> levels;
    int qr [$], qc [$];
    for (int r = 0; r < hdc; r++) for (int c = 0; c < wdc; c++) refmap[r][c] = n++;
    for (int r = 0; r < hdc; r++)
      for (int c = 0; c < wdc; c++)
        for (int b = 0; b < 3; b++) begin
          qr.push_back(b == 0 ? r : r + hdc);
          qc.push_back(b == 1 ? c : c + wdc);
          while (qr.size() > 0) begin
            int rr = qr.pop_front(), cc = qc.pop_front();
            refmap[rr][cc] = n++;
            if (2 * rr < H1 && 2 * cc < W1 && rr >= hdc || 2 * rr < H1 && 2 * cc < W1 && cc >= wdc) begin
              for (int j = 0; j < 4; j++) begin
                qr.push_back(2 * rr + j / 2);
                qc.push_back(2 * cc + j % 2);
              end
            end
          end
        end
  endtask

  bit seen [H2*W2];

  initial begin
    // printed scan numbers of the 16x16, 3-level example: {row, col, number}
    int fig [18][3] = '{'{0,2,4}, '{2,0,25}, '{2,2,46}, '{0,3,67}, '{2,1,88}, '{2,3,109},
                        '{1,2,130}, '{3,0,151}, '{3,2,172}, '{1,3,193}, '{3,1,214}, '{3,3,235},
                        '{0,4,5}, '{1,5,8}, '{0,8,9}, '{3,11,24}, '{11,3,45}, '{15,15,255}};
    int k, trees, nodes, cyc_cnt, ready_cyc;
    bit fl_seen;
    foreach (seen[i]) seen[i] = 1'b0;
    build_ref(3);
    foreach (fig[i]) begin
      checks++;
      if (refmap[fig[i][0]][fig[i][1]] != fig[i][2]) begin
        failures++; $display("FAIL: reference disagrees with the example at (%0d,%0d)", fig[i][0], fig[i][1]);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    s1_start = 1'b1;
    @(negedge clk);
    s1_start = 1'b0;
    k = 0;
    while (s1_busy) begin
      s1_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (s1_valid && s1_ready) begin
        checks++;
        if (refmap[s1_row][s1_col] != k || int'(s1_addr) != s1_row * W1 + s1_col ||
            s1_dc != (k < 4) || s1_tf != (k >= 4 && (k - 4) % 21 == 0) ||
            s1_tl != (k >= 4 && (k - 4) % 21 == 20) || s1_fl != (k == 255)) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d at (%0d,%0d) has number %0d", k, s1_row, s1_col, refmap[s1_row][s1_col]);
        end
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != 256) begin failures++; $display("FAIL: 16x16 scan gave %0d outputs", k); end

    // part 2
    @(negedge clk);
    s2_start = 1'b1;
    @(negedge clk);
    s2_start = 1'b0;
    k = 0; trees = 0; nodes = 0; cyc_cnt = 0; ready_cyc = 0; fl_seen = 0;
    while (s2_busy) begin
      s2_ready = (k > 200000) ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (s2_ready) ready_cyc++;
      if (s2_valid && s2_ready) begin
        automatic int a = s2_row * W2 + s2_col;
        if (seen[a] || (s2_row < H2 / 32 && s2_col < W2 / 32) || int'(s2_addr) != a) begin
          failures++;
          if (failures < 10) $display("FAIL: 4CIF position (%0d,%0d) repeated, in DC band or wrong address", s2_row, s2_col);
        end
        seen[a] = 1'b1;
        if (s2_tf && nodes != 0) begin failures++; $display("FAIL: tree_first inside a tree"); end
        nodes++;
        if (s2_tl) begin
          checks++;
          if (nodes != 341) begin failures++; $display("FAIL: tree of %0d nodes", nodes); end
          nodes = 0;
          trees++;
        end
        if (s2_fl) fl_seen = 1'b1;
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != W2 * H2 - (W2 / 32) * (H2 / 32) || trees != 1188 || !fl_seen) begin
      failures++; $display("FAIL: 4CIF scan gave %0d outputs, %0d trees, frame_last %0d", k, trees, fl_seen);
    end
    checks++;
    if (ready_cyc != k) begin failures++; $display("FAIL: %0d ready cycles for %0d addresses", ready_cyc, k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
