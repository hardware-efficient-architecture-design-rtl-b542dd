// tree_mem_tb: random writes and reads against a reference array. Checks the
// one-cycle read latency, that rdata holds while re is low, and that a read
// of an address being written in the same cycle returns the old word.
module tree_mem_tb;
  localparam int unsigned DEPTH = 341;
  localparam int unsigned WIDTH = 34;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  tree_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_q;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // sequential read of all words, one per cycle
    for (int i = 0; i < DEPTH; i++) begin
      re = 1'b1; raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL read %0d", i); end
    end
    // random mix
    for (int k = 0; k < 3000; k++) begin
      automatic bit do_w = $urandom_range(0, 1);
      automatic bit do_r = $urandom_range(0, 2) != 0;
      we = do_w; waddr = AW'($urandom_range(0, DEPTH - 1)); wdata = {$urandom, $urandom};
      re = do_r; raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      if (do_r) expect_q = model[raddr];
      if (do_w) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== expect_q) begin failures++; $display("FAIL mix %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
