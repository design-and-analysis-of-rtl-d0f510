// hoc_vedic_mult8: 8x8 unsigned multiplier whose partial products are
// reduced by higher-order counter compressors in two stages.
//
// p = a * b, purely combinational, no clock, no reset. pp_gen forms the 64
// partial-product bits with AND gates. reduction_stage1 puts one counter
// (up to a 7:3 compressor) on each column and ripples its y2/y3 carries into
// the next two columns; it resolves product bits 0..4 and leaves a few bits
// per higher column. reduction_stage2 counts those with one more counter per
// column and delivers bits 5..15. Every compressor outputs a binary count,
// so there is no final carry-propagate adder. The two-stage structure, the
// compressors and the 8x8 size follow the published design; the exact bit
// routing of columns 7..9 and unsigned operands are this design's choices.
module hoc_vedic_mult8
  import hoc_mult_pkg::*;
(
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  output logic [PWIDTH-1:0] p
);
  pp_array_t    pp;
  logic [14:5]  s1;
  stage1_left_t left;

  pp_gen #(.WIDTH(WIDTH)) u_pp (.a(a), .b(b), .pp(pp));

  reduction_stage1 u_stage1 (.pp(pp), .p_low(p[4:0]), .s1(s1), .left(left));

  reduction_stage2 u_stage2 (.s1(s1), .left(left), .p_high(p[15:5]));
endmodule
