// Partial-product generator: the AND array of the multiplier.
//
// pp[j][i] = a[i] & b[j], i.e. row j is the multiplicand gated by multiplier
// bit j, and bit pp[j][i] has weight 2**(i+j). This is the first of the three
// stages (generation, reduction, final addition) into which the multiplier is
// divided. The width defaults to the design's 5 bits. Purely combinational.
module pp_gen #(
  parameter int unsigned N = aam_pkg::N    // operand width
) (
  input  logic [N-1:0]         a,    // multiplicand
  input  logic [N-1:0]         b,    // multiplier
  output logic [N-1:0][N-1:0]  pp    // pp[j][i] = a[i] & b[j]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = a & {N{b[j]}};
    end
  end

endmodule : pp_gen
