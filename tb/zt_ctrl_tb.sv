// zt_ctrl_tb: runs the controller (with its address generator) through
// several trees of different depth and layer count. It checks that the load
// writes indices 0..N-1 only while in_ready, that each layer clears the
// flags once, issues N SA reads in bottom-up order with that layer's shift
// and then N SG reads in top-down order only when the SG stage has room,
// that tree_done follows the last layer, and that an unstalled tree takes
// 1 + N + L*(2N+4) cycles.
module zt_ctrl_tb;
  import zt_pkg::*;

  localparam int unsigned LEVELS = 5;
  localparam int unsigned SNR    = 5;
  localparam int unsigned DEPTH  = ((4 ** LEVELS) - 1) / 3;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LVL_W-1:0] cfg_levels = '0;
  logic [NSNR_W-1:0] cfg_layers = '0;
  logic [SNR-1:0][SHIFT_W-1:0] cfg_shift = '0;
  logic in_valid = 1'b0, in_ready, ld_we, rd_en, sg_can_issue = 1'b1;
  logic [AW-1:0] ld_waddr, addr_idx, addr_parent, addr_child;
  logic [LVL_W-1:0] addr_level;
  logic addr_leaf, addr_root, addr_last, sa_issue, sg_issue, flags_clr, last_layer, tree_done;
  mode_e mode;
  logic [SHIFT_W-1:0] shift;
  logic [LAY_W-1:0] layer;

  zt_ctrl #(.LEVELS(LEVELS), .SNR(SNR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  initial begin
    int lvs [6] = '{5, 2, 3, 1, 5, 4};
    int nls [6] = '{3, 1, 5, 2, 1, 4};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      automatic int n = ((4 ** lvs[t]) - 1) / 3;
      automatic int nl = nls[t];
      automatic bit stall = (t % 2 == 1);
      automatic int cycles = 0, lds = 0, clrs = 0, sas = 0, sgs = 0, layer_seen = 0;
      automatic bit done = 0;
      cfg_levels = LVL_W'(lvs[t]);
      cfg_layers = NSNR_W'(nl);
      for (int k = 0; k < int'(SNR); k++) cfg_shift[k] = SHIFT_W'(9 - 2 * k + t);
      in_valid = 1'b1;
      while (!done) begin
        sg_can_issue = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        cycles++;
        if (in_ready && mode != M_LOAD) fail("in_ready outside LOAD");
        if (ld_we) begin
          checks++;
          if (int'(ld_waddr) != lds) fail($sformatf("load address %0d, expected %0d", ld_waddr, lds));
          lds++;
        end
        if (flags_clr) begin
          checks++;
          clrs++;
          if (lds != n) fail("flags cleared before the load finished");
          if (sas != (clrs - 1) * n || sgs != (clrs - 1) * n) fail("flags cleared inside a layer");
          if (int'(layer) != clrs - 1) fail("wrong layer number");
        end
        if (sa_issue) begin
          checks++;
          if (int'(addr_idx) != n - 1 - (sas % n)) fail($sformatf("SA address %0d", addr_idx));
          if (shift != cfg_shift[layer]) fail("SA shift");
          if (sgs != (sas / n) * n) fail("SA read during SG pass");
          sas++;
        end
        if (sg_issue) begin
          checks++;
          if (!sg_can_issue) fail("SG read without room");
          if (int'(addr_idx) != sgs % n) fail($sformatf("SG address %0d", addr_idx));
          if (sas != (sgs / n + 1) * n) fail("SG read before SA pass finished");
          sgs++;
        end
        if (rd_en != (sa_issue || sg_issue)) fail("rd_en");
        @(negedge clk);
        in_valid = (lds < n) && (mode == M_IDLE || mode == M_LOAD);
        if (tree_done) done = 1;
        if (cycles > 20000) begin fail("tree never finished"); done = 1; end
      end
      checks++;
      if (lds != n || clrs != nl || sas != nl * n || sgs != nl * n)
        fail($sformatf("tree %0d: %0d loads %0d clears %0d SA %0d SG", t, lds, clrs, sas, sgs));
      if (!stall) begin
        checks++;
        if (cycles != 1 + n + nl * (2 * n + 4))
          fail($sformatf("tree %0d took %0d cycles, expected %0d", t, cycles, 1 + n + nl * (2 * n + 4)));
      end
      checks++;
      if (mode != M_IDLE) fail("not idle after tree_done");
      layer_seen = layer_seen + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
