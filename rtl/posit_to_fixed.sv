// posit_to_fixed: converts a posit<N,ES> to a two's complement fixed-point
// number of FW bits, FF of them below the binary point.
//
// The posit is decoded into sign, scale and fraction; the significand 1.fraction
// is shifted so that its leading one lands on bit FF + scale, and the result is
// negated for negative posits. With the formats the unit uses (posit<8,0> in
// Q8.8, posit<16,0> in Q16.16, posit<16,1> in Q32.32) every posit is exact, and
// for |x| <= 1 and ES = 0 the result equals the posit word shifted left by two
// (after sign handling). Bits below the LSB are dropped; magnitudes that do not
// fit saturate. Zero gives 0, NaR gives the most negative fixed-point word (this
// design's choice). Combinational.
module posit_to_fixed #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0,
  parameter int unsigned FW = 32,
  parameter int unsigned FF = 16
) (
  input  logic [N-1:0]  posit_i,
  output logic [FW-1:0] fixed_o
);
  import posit_pkg::*;

  localparam int unsigned SW = FW + UFRAC_W + 1;  // shift workspace

  unum_t                     u;
  logic [SW-1:0]             sig;
  logic [SW-1:0]             sh;
  logic signed [SCALE_W+1:0] pos;   // bit index of the leading one
  logic [FW-1:0]             mag;

  posit_decode #(.N(N), .ES(ES)) u_dec (
    .posit_i(posit_i),
    .u_o    (u)
  );

  always_comb begin
    // sig holds 1.frac with the leading one at bit UFRAC_W (binary point below it)
    sig = SW'({1'b1, u.frac});
    pos = $signed({{2{u.scale[SCALE_W-1]}}, u.scale}) + (SCALE_W+2)'(FF);
    mag = '0;
    sh  = '0;
    if (pos >= (SCALE_W+2)'(FW - 1)) begin
      mag = {1'b0, {(FW-1){1'b1}}};                    // saturate
    end else if (pos >= 0) begin
      // move the leading one from bit UFRAC_W to bit pos
      sh  = sig >> (UFRAC_W - int'(pos));
      mag = sh[FW-1:0];
    end
    if (u.nar)       fixed_o = {1'b1, {(FW-1){1'b0}}};
    else if (u.zero) fixed_o = '0;
    else             fixed_o = u.sign ? (~mag + 1'b1) : mag;
  end

endmodule
