// full_adder: counts the ones among three bits; {co, s} is the count
// (0..3). This is the 3:2 counter that the higher-order compressors
// generalise: no ones gives 00, one gives 01, two give 10, three give 11.
//
// Written as XOR for the sum and majority for the carry, the usual form;
// the gate structure is this design's choice. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,   // count bit 0
  output logic co   // count bit 1
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
