// posit_to_fp32: converts a posit<N,ES> to IEEE binary32.
//
// The absolute value of the posit goes to the regime decoder (find first set on
// the body) and to a left shifter that drops sign, regime run and terminating
// bit; the remaining bits are the exponent bits and the fraction. The float's
// biased exponent is the posit scale (regime value, times 2^ES, plus exponent
// bits) plus 127, the mantissa is the top 23 fraction bits and the sign is the
// posit's sign. For posit<16,1> and smaller every value is exact in binary32.
// Zero gives +0.0 and NaR gives the quiet NaN 0x7FC00000 (this design's choice).
// Combinational.
module posit_to_fp32 #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic [N-1:0] posit_i,
  output logic [31:0]  fp_o
);
  import posit_pkg::*;

  unum_t              u;
  logic [SCALE_W-1:0] bexp;

  posit_decode #(.N(N), .ES(ES)) u_dec (
    .posit_i(posit_i),
    .u_o    (u)
  );

  always_comb begin
    bexp = u.scale + SCALE_W'(127);
    if (u.nar)       fp_o = FP32_QNAN;
    else if (u.zero) fp_o = 32'h0000_0000;
    else             fp_o = {u.sign, bexp[7:0], u.frac[UFRAC_W-1 -: 23]};
  end

endmodule
