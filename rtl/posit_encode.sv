// posit_encode: packs the common unum_t form into a posit<N,ES>.
//
// This is the datapath of the FP32-to-posit converter, made generic:
//   1. the scale splits into a regime value k = scale >>> ES and exponent bits
//      e = scale mod 2^ES;
//   2. the regime encoder builds sign-plus-regime bits and the regime length;
//   3. a right shifter places {e, fraction} directly below the regime;
//   4. an OR merges the two, keeping the top N bits: the bits that do not fit are
//      dropped, so the magnitude is rounded toward zero;
//   5. a multiplexer substitutes the special words (zero, NaR, and the largest or
//      smallest positive posit when |k| > N-2);
//   6. a second multiplexer, steered by the sign, selects the word or its two's
//      complement.
// Saturation to maxpos/minpos and rounding toward zero are this design's choices.
// Combinational.
module posit_encode #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0
) (
  input  posit_pkg::unum_t u_i,
  output logic [N-1:0]     posit_o
);
  import posit_pkg::*;

  localparam int unsigned TW = ((ES > 0) ? ES : 0) + UFRAC_W;  // {e, frac}
  localparam int unsigned WW = N + TW;                         // merge width
  localparam logic signed [SCALE_W-1:0] KMAX = SCALE_W'(N-2);

  logic signed [SCALE_W-1:0] k, k_sat;
  logic [SCALE_W-1:0]        e;
  logic [N-1:0]              regime;
  logic [$clog2(N+1)-1:0]    rlen;
  logic [TW-1:0]             tail;
  logic [WW-1:0]             merged;
  logic [N-1:0]              mag;

  always_comb begin
    k     = u_i.scale >>> ES;
    e     = u_i.scale & SCALE_W'((1 << ES) - 1);
    k_sat = (k > KMAX) ? KMAX : ((k < -KMAX) ? -KMAX : k);
  end

  posit_regime_encode #(.N(N)) u_regime (
    .k_i     (k_sat),
    .regime_o(regime),
    .len_o   (rlen)
  );

  always_comb begin
    tail   = TW'({e, u_i.frac});     // e is already masked to its ES bits
    // tail starts right after the sign bit and the regime
    merged = {regime, {TW{1'b0}}} | ({1'b0, tail, {(N-1){1'b0}}} >> rlen);
    if (u_i.nar)              mag = {1'b1, {(N-1){1'b0}}};
    else if (u_i.zero)        mag = '0;
    else if (k > KMAX)        mag = {1'b0, {(N-1){1'b1}}};            // maxpos
    else if (k < -KMAX)       mag = {{(N-1){1'b0}}, 1'b1};            // minpos
    else                      mag = merged[WW-1 -: N];
    posit_o = (u_i.sign && !u_i.nar && !u_i.zero) ? (~mag + 1'b1) : mag;
  end

endmodule
