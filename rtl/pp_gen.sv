// pp_gen: partial-product generator of the multiplier.
//
// Forms every partial-product bit pp[i][j] = a[i] & b[j] with one AND gate,
// all at once and before any addition starts. Bit pp[i][j] has weight
// 2^(i+j); the reduction stages collect each column c from the bits with
// i + j = c, which is the vertical-and-crosswise grouping of the Vedic
// Urdhva-Tiryagbhyam method. Operands are unsigned (this design's choice).
// Purely combinational; WIDTH defaults to 8, the multiplier's width.
module pp_gen #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  output logic [WIDTH-1:0][WIDTH-1:0] pp
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      for (int j = 0; j < WIDTH; j++)
        pp[i][j] = a[i] & b[j];
  end
endmodule
