// half_adder: adds two bits. {c, s} is the number of ones among a and b.
//
// Used as a sub-unit of the 4:3 and 5:3 compressors and in the reduction
// stages of the multiplier. The usual XOR/AND form is this design's choice;
// only the function is fixed. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,  // sum, weight 1
  output logic c   // carry, weight 2
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
