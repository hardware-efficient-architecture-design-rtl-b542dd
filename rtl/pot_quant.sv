// pot_quant: one step of the multiple (successive) quantization with a
// power-of-two (POT) quantizer.
//
// The step size is 2**shift, so the division of a generic scalar quantizer
// becomes a shift. The residual r left by the previous layers is quantized in
// sign-magnitude form, q = sign(r) * (|r| >> shift); the inverse quantizer
// gives rec = q * 2**shift, and the residual handed to the next (finer) layer
// is r - rec, which keeps the sign of r and is smaller than the step. The
// POT step and the quantize / inverse-quantize / subtract loop follow the
// architecture; truncation towards zero with no reconstruction offset is
// this design's choice. Purely combinational.
module pot_quant
  import zt_pkg::*;
(
  input  logic signed [COEF_W-1:0]  res_in,
  input  logic        [SHIFT_W-1:0] shift,
  output logic signed [COEF_W-1:0]  q,
  output logic signed [COEF_W-1:0]  rec,
  output logic signed [COEF_W-1:0]  res_out,
  output logic                      q_nz
);

  logic              neg;
  logic [COEF_W-1:0] mag;
  logic [COEF_W-1:0] qmag;
  logic [COEF_W-1:0] rmag;

  always_comb begin
    neg     = res_in[COEF_W-1];
    mag     = neg ? (~res_in + 1'b1) : res_in;   // |r|, -2^(W-1) maps to 2^(W-1)
    qmag    = mag >> shift;
    rmag    = mag & ~({COEF_W{1'b1}} << shift);  // |r| mod 2**shift
    q       = neg ? -$signed(qmag) : $signed(qmag);
    rec     = neg ? -$signed(mag - rmag) : $signed(mag - rmag);
    res_out = neg ? -$signed(rmag) : $signed(rmag);
    q_nz    = (qmag != '0);
  end

endmodule
