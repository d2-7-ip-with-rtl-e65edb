// posit_regime_decode: regime length and value of a positive posit<N,*>.
//
// The body is the word without its sign bit. The first body bit b gives the run
// polarity; a find-first-set on the body (b = 0) or on its complement (b = 1)
// yields the index i of the bit that ends the run, so the run length is
// l = (N-2) - i (l = 14 - i for 16-bit posits). When no bit ends the run, it fills
// the body and l = N-1. The regime value is k = l-1 for a run of ones and -l for a
// run of zeros. `len_o` is the run length l without the terminating bit; the
// posit decoder shifts the body left by l+1 to reach the exponent. Combinational.
module posit_regime_decode #(
  parameter int unsigned N = 16
) (
  input  logic        [N-1:0]                  abs_i,   // positive posit, sign bit 0
  output logic signed [posit_pkg::SCALE_W-1:0] k_o,
  output logic        [$clog2(N)-1:0]          len_o
);

  localparam int unsigned BW = N - 2;   // body bits after the first regime bit

  logic          b;
  logic [BW-1:0] rest;
  logic [$clog2(BW)-1:0] idx;
  logic          found;
  logic [$clog2(N)-1:0] l;

  assign b    = abs_i[N-2];
  assign rest = b ? ~abs_i[BW-1:0] : abs_i[BW-1:0];

  posit_ffs #(.W(BW)) u_ffs (
    .in_i   (rest),
    .idx_o  (idx),
    .found_o(found)
  );

  always_comb begin
    if (found) l = ($clog2(N))'(BW) - ($clog2(N))'(idx);
    else       l = ($clog2(N))'(N-1);
    len_o = l;
    if (b) k_o = posit_pkg::SCALE_W'(l) - posit_pkg::SCALE_W'(1);
    else   k_o = -posit_pkg::SCALE_W'(l);
  end

endmodule
