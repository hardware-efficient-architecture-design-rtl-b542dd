// pot_quant_tb: checks the power-of-two quantizer against integer division
// (which truncates towards zero): q = r / 2**s, rec = q * 2**s,
// residual = r - rec, for random and corner-case residuals and all shifts.
module pot_quant_tb;
  import zt_pkg::*;

  logic signed [COEF_W-1:0]  res_in;
  logic        [SHIFT_W-1:0] shift;
  logic signed [COEF_W-1:0]  q, rec, res_out;
  logic                      q_nz;

  pot_quant dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int r, int s);
    int eq, erec, eres;
    res_in = COEF_W'(r);
    shift  = SHIFT_W'(s);
    #1;
    eq   = r / (1 << s);
    erec = eq * (1 << s);
    eres = r - erec;
    checks++;
    if (int'(q) != eq || int'(rec) != erec || int'(res_out) != eres || q_nz != (eq != 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL r=%0d s=%0d: q=%0d rec=%0d res=%0d nz=%0d (expected %0d %0d %0d)",
                 r, s, q, rec, res_out, q_nz, eq, erec, eres);
    end
  endtask

  initial begin
    int corner [8] = '{0, 1, -1, 32767, -32767, -32768, 255, -256};
    for (int s = 0; s < (1 << SHIFT_W); s++) begin
      foreach (corner[k]) check(corner[k], s);
      repeat (400) check($urandom_range(0, 65535) - 32768, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
