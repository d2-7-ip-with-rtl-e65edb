// posit_ffs: find first set, scanning from the most significant bit.
//
// Returns the index of the highest set bit of `in_i` and a flag telling whether
// any bit is set at all (index 0 when none is). The posit regime decoder uses it
// on the posit body, or on its complement, to measure the length of the regime
// run. Purely combinational: a priority scan written as a loop, which synthesis
// turns into a priority encoder.
module posit_ffs #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0]         in_i,
  output logic [$clog2(W)-1:0] idx_o,
  output logic                 found_o
);

  always_comb begin
    idx_o   = '0;
    found_o = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (in_i[i]) begin
        idx_o   = i[$clog2(W)-1:0];
        found_o = 1'b1;
      end
    end
  end

endmodule
