// posit_to_posit: converts posit<NI,ESI> to posit<NO,ESO>.
//
// The input is unpacked by posit_decode and repacked by posit_encode. Widening
// conversions are exact; narrowing ones drop fraction bits (round toward zero)
// and saturate to maxpos / minpos outside the narrower range. Zero and NaR map to
// zero and NaR. Combinational.
module posit_to_posit #(
  parameter int unsigned NI  = 16,
  parameter int unsigned ESI = 0,
  parameter int unsigned NO  = 8,
  parameter int unsigned ESO = 0
) (
  input  logic [NI-1:0] posit_i,
  output logic [NO-1:0] posit_o
);
  import posit_pkg::*;

  unum_t u;

  posit_decode #(.N(NI), .ES(ESI)) u_dec (
    .posit_i(posit_i),
    .u_o    (u)
  );

  posit_encode #(.N(NO), .ES(ESO)) u_enc (
    .u_i    (u),
    .posit_o(posit_o)
  );

endmodule
