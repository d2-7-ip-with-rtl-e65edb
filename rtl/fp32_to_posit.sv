// fp32_to_posit: converts an IEEE binary32 number to posit<N,ES>.
//
// The float is split into sign, biased exponent and 23-bit mantissa. Because a
// float is sign-magnitude and a posit is two's complement, the positive posit is
// built first and the sign is applied at the end by a two's complement. The
// unbiased exponent (E - 127) becomes the posit scale, the mantissa becomes the
// fraction; the regime encoder, right shifter, OR and output multiplexers of
// posit_encode then form the word. Mantissa bits that do not fit are dropped
// (round toward zero). Special inputs: infinities and NaNs give NaR; zeros and
// subnormals (posits have none) give zero; magnitudes beyond the posit range
// saturate to maxpos / minpos.
// Defaults N=16, ES=0 give the posit<16,0> converter; the unit also uses
// (8,0) and (16,1). Combinational.
module fp32_to_posit #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic [31:0]  fp_i,
  output logic [N-1:0] posit_o
);
  import posit_pkg::*;

  logic       sign;
  logic [7:0] bexp;
  logic [22:0] mant;
  unum_t      u;

  always_comb begin
    sign    = fp_i[31];
    bexp    = fp_i[30:23];
    mant    = fp_i[22:0];
    u       = '0;
    u.nar   = (bexp == 8'hFF);
    u.zero  = (bexp == 8'h00);
    u.sign  = sign;
    u.scale = $signed({2'b00, bexp}) - SCALE_W'(127);
    u.frac  = {mant, {(UFRAC_W-23){1'b0}}};
  end

  posit_encode #(.N(N), .ES(ES)) u_enc (
    .u_i    (u),
    .posit_o(posit_o)
  );

endmodule
