// fixed_to_posit: converts a two's complement fixed-point number of FW bits, FF
// of them below the binary point, to posit<N,ES>.
//
// The magnitude is taken, a find-first-set locates its leading one at bit i, the
// scale is i - FF and the bits below the leading one, shifted to the top, form
// the fraction. posit_encode then builds the word, dropping bits that do not fit
// (round toward zero) and saturating to maxpos / minpos. Zero gives zero.
// Combinational.
module fixed_to_posit #(
  parameter int unsigned N  = 16,
  parameter int unsigned ES = 0,
  parameter int unsigned FW = 32,
  parameter int unsigned FF = 16
) (
  input  logic [FW-1:0] fixed_i,
  output logic [N-1:0]  posit_o
);
  import posit_pkg::*;

  logic [FW-1:0]          mag;
  logic [$clog2(FW)-1:0]  lead;
  logic                   nonzero;
  logic [FW-1:0]          below;
  unum_t                  u;

  assign mag = fixed_i[FW-1] ? (~fixed_i + 1'b1) : fixed_i;

  posit_ffs #(.W(FW)) u_ffs (
    .in_i   (mag),
    .idx_o  (lead),
    .found_o(nonzero)
  );

  always_comb begin
    below   = mag << (FW - int'(lead));    // bits under the leading one, at the top
    u       = '0;
    u.zero  = !nonzero;
    u.sign  = fixed_i[FW-1];
    u.scale = SCALE_W'(lead) - SCALE_W'(FF);
    u.frac  = UFRAC_W'(below) << (UFRAC_W - FW);
  end

  posit_encode #(.N(N), .ES(ES)) u_enc (
    .u_i    (u),
    .posit_o(posit_o)
  );

endmodule
