// symbol_gen_tb: feeds the SG stage from a model tree memory and flag array,
// issuing reads whenever it offers room, with random back-pressure on the
// output. Every output record must equal the stored symbol (or ZTR_D where
// the flag is set) with its value and tags, in issue order, with none lost or
// repeated. With the output always ready the stage must accept a read every
// cycle and deliver one symbol per cycle.
module symbol_gen_tb;
  import zt_pkg::*;

  localparam int unsigned LEVELS = 5;
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic issue = 1'b0, layer_last = 1'b0, tree_last = 1'b0, out_ready = 1'b0;
  logic [AW-1:0] idx = '0, flag_rd_idx;
  logic [LVL_W-1:0] level = '0;
  logic [LAY_W-1:0] layer = '0;
  logic can_issue, idle, out_valid, ztrd_flag;
  tree_word_t rdata;
  sym_out_t out_data;

  symbol_gen #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  tree_word_t words [DEPTH];
  bit         flags [DEPTH];
  sym_out_t   expq [$];

  always @(posedge clk) if (issue) rdata <= words[idx];
  assign ztrd_flag = flags[flag_rd_idx];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0, n_stall = 0, n_ztrd = 0;
  int phase_fast = 1;
  int fast_cycles = 0, fast_issues = 0, fast_outs = 0;

  initial begin
    sym_out_t e;
    for (int i = 0; i < DEPTH; i++) begin
      words[i].res = COEF_W'($urandom);
      words[i].qv  = COEF_W'($urandom);
      words[i].sym = sa_sym_e'($urandom_range(0, 3));
      flags[i]     = ($urandom_range(0, 2) == 0);
    end
    rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++) begin
      automatic int i = 0;
      phase_fast = (pass % 2 == 0);
      while (i < int'(DEPTH)) begin
        out_ready = phase_fast ? 1'b1 : ($urandom_range(0, 2) == 0);
        #1;
        // compare the transfer that happens at the coming edge
        if (out_valid && !out_ready) n_stall++;
        if (out_valid && out_ready) begin
          checks++;
          n_out++;
          if (phase_fast) fast_outs++;
          if (expq.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
          else begin
            e = expq.pop_front();
            if (out_data !== e) begin
              failures++;
              if (failures < 10) $display("FAIL: got %p expected %p", out_data, e);
            end
            if (out_data.sym == SYM_ZTR_D) n_ztrd++;
          end
        end
        issue = can_issue && (phase_fast || $urandom_range(0, 1));
        if (phase_fast && i > 0) begin
          fast_cycles++;
          if (issue) fast_issues++;
        end
        if (issue) begin
          idx = AW'(i);
          level = LVL_W'($urandom_range(0, 4));
          layer = LAY_W'(pass);
          layer_last = (i == int'(DEPTH) - 1);
          tree_last = layer_last && (pass == 3);
          e.sym = flags[i] ? SYM_ZTR_D : sym_e'({1'b0, words[i].sym});
          e.value = words[i].qv;
          e.level = level;
          e.layer = layer;
          e.layer_last = layer_last;
          e.tree_last = tree_last;
          expq.push_back(e);
          i++;
        end
        @(negedge clk);
        issue = 1'b0;
      end
      // drain
      out_ready = 1'b1;
      while (!idle) begin
        #1;
        if (out_valid) begin
          checks++;
          n_out++;
          e = expq.pop_front();
          if (out_data !== e) begin failures++; $display("FAIL (drain): got %p expected %p", out_data, e); end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_out != 4 * int'(DEPTH) || expq.size() != 0) begin
      failures++; $display("FAIL: %0d outputs, %0d left", n_out, expq.size());
    end
    checks++;
    if (fast_issues != fast_cycles) begin
      failures++; $display("FAIL: with output ready, %0d reads in %0d cycles", fast_issues, fast_cycles);
    end
    checks++;
    if (n_stall == 0 || n_ztrd == 0) begin failures++; $display("FAIL: no stall or no ZTR_D seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
