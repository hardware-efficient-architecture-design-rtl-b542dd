// ztrd_flags_tb: drives random flag updates (self clear, parent set, four
// children written at once, clear-all) against a reference bit array and
// checks the combinational read port and every flag after each update.
module ztrd_flags_tb;
  localparam int unsigned DEPTH = 341;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr_all = 1'b0, upd = 1'b0, par_set = 1'b0, chld_wr = 1'b0, chld_val = 1'b0;
  logic [AW-1:0] self_idx = '0, par_idx = '0, chld_base = '0, rd_idx = '0;
  logic rd_flag;

  ztrd_flags #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit model [DEPTH];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1500; k++) begin
      automatic int s = $urandom_range(1, (DEPTH - 2) / 4);   // a node with children
      clr_all   = ($urandom_range(0, 199) == 0);
      upd       = $urandom_range(0, 3) != 0;
      self_idx  = AW'(s);
      par_set   = $urandom_range(0, 1);
      par_idx   = AW'((s - 1) / 4);
      chld_wr   = $urandom_range(0, 1);
      chld_base = AW'(4 * s + 1);
      chld_val  = $urandom_range(0, 1);
      rd_idx    = AW'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rd_flag !== model[rd_idx]) begin failures++; $display("FAIL read %0d", rd_idx); end
      if (clr_all) foreach (model[i]) model[i] = 1'b0;
      else if (upd) begin
        model[s] = 1'b0;
        if (par_set) model[(s - 1) / 4] = 1'b1;
        if (chld_wr) for (int j = 1; j <= 4; j++) model[4 * s + j] = chld_val;
      end
      @(negedge clk);
      upd = 1'b0; clr_all = 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        rd_idx = AW'(i);
        #1;
        if (rd_flag !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d flag %0d = %0d, expected %0d", k, i, rd_flag, model[i]);
        end
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
