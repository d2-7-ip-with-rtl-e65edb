// posit_decode: unpacks a posit<N,ES> into the common unum_t form.
//
// Zero (all bits clear) and NaR (only the sign bit set) are flagged. Any other
// word is made positive by a two's complement when its sign bit is set, the
// regime decoder measures the regime run, and a left shift by the run length
// plus one drops the sign, the run and its terminating bit so that the exponent
// bits and then the fraction bits sit at the top. Exponent bits cut off by a long
// regime read as zeros, as the posit definition requires. The scale is
// k * 2^ES + e. Combinational.
module posit_decode #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  logic [N-1:0]        posit_i,
  output posit_pkg::unum_t    u_o
);
  import posit_pkg::*;

  logic [N-1:0]           abs_val;
  logic signed [SCALE_W-1:0] k;
  logic [$clog2(N)-1:0]   len;
  logic [N-2:0]           body;
  logic [N-2:0]           shifted;
  logic [SCALE_W-1:0]     e;
  logic [N-1+UFRAC_W-1:0] wide;

  assign abs_val = posit_i[N-1] ? (~posit_i + 1'b1) : posit_i;

  posit_regime_decode #(.N(N)) u_regime (
    .abs_i(abs_val),
    .k_o  (k),
    .len_o(len)
  );

  always_comb begin
    body    = abs_val[N-2:0];
    shifted = body << (($clog2(N)+1)'(len) + 1'b1);
    e       = '0;
    if (ES > 0) e = SCALE_W'(shifted[N-2 -: ((ES > 0) ? ES : 1)]);
    u_o       = '0;
    u_o.zero  = (posit_i == '0);
    u_o.nar   = (posit_i == {1'b1, {(N-1){1'b0}}});
    u_o.sign  = posit_i[N-1];
    u_o.scale = (k <<< ES) + $signed(e);
    wide      = {shifted, {UFRAC_W{1'b0}}} << ES;
    u_o.frac  = wide[N-1+UFRAC_W-1 -: UFRAC_W];
  end

endmodule
