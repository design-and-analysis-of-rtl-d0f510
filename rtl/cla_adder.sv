// cla_adder: carry-lookahead adder, {co, sum} = a + b + ci.
//
// Each compressor ends in one of these to add the counts of its two
// counter units in parallel. Generate g = a & b and propagate p = a ^ b are
// formed per bit; every carry is then one flat OR of AND terms,
//   c[k] = g[k-1] | p[k-1]g[k-2] | ... | p[k-1]..p[0]ci,
// so no carry waits on the one below it. The widths used are 2 (4:3, 5:3
// and 6:3 compressors) and 3 (7:3 compressor). The lookahead structure is
// this design's reading of "carry look-ahead"; the width is a parameter.
// Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] sum,
  output logic             co
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c[0] = ci;
    for (int k = 1; k <= WIDTH; k++) begin
      logic term;
      // carry-in propagated through all lower positions
      term = ci;
      for (int m = 0; m < k; m++) term = term & p[m];
      c[k] = term;
      // carry generated at j and propagated through j+1 .. k-1
      for (int j = 0; j < k; j++) begin
        term = g[j];
        for (int m = j + 1; m < k; m++) term = term & p[m];
        c[k] = c[k] | term;
      end
    end
  end

  assign sum = p ^ c[WIDTH-1:0];
  assign co  = c[WIDTH];
endmodule
