// posit_regime_encode: builds the regime field of a positive posit<N,*>.
//
// Input is the regime value k, already limited to -(N-2) .. N-2. Output is an
// N-bit word holding a zero sign bit followed by the regime run and its
// terminating bit, everything below it zero, and the regime length counted
// with the terminating bit (capped at N-1 when the run fills the word).
//   k >= 0 : k+1 ones, then a zero   (the negative-most integer 100..0, shifted
//            right arithmetically by k, then logically by one to clear the sign)
//   k <  0 : -k zeros, then a one    (the word 0010..0 shifted right by -k-1)
// The arithmetic-shift construction of the positive regime follows the design
// notes of the light PPU; the negative case is this design's own equivalent.
// Combinational.
module posit_regime_encode #(
  parameter int unsigned N = 16
) (
  input  logic signed [posit_pkg::SCALE_W-1:0] k_i,
  output logic        [N-1:0]                  regime_o,
  output logic        [$clog2(N+1)-1:0]        len_o
);

  localparam logic signed [N-1:0] MIN_WORD = {1'b1, {(N-1){1'b0}}};
  localparam logic        [N-1:0] NEG_SEED = {2'b00, 1'b1, {(N-3){1'b0}}};

  logic signed [N-1:0]              pos_run;
  logic        [posit_pkg::SCALE_W-1:0] len_full;

  always_comb begin
    pos_run = MIN_WORD >>> k_i;
    if (!k_i[posit_pkg::SCALE_W-1]) begin
      regime_o = pos_run >> 1;
      len_full = k_i + posit_pkg::SCALE_W'(2);
    end else begin
      regime_o = NEG_SEED >> (-k_i - posit_pkg::SCALE_W'(1));
      len_full = posit_pkg::SCALE_W'(1) - k_i;
    end
    if (len_full > posit_pkg::SCALE_W'(N-1)) len_o = ($clog2(N+1))'(N-1);
    else                                      len_o = len_full[$clog2(N+1)-1:0];
  end

endmodule
