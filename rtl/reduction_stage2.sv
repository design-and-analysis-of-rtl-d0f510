// reduction_stage2: second and last reduction stage of the 8x8
// higher-order-compressor multiplier.
//
// Column c (c = 5..15) holds the y1 bit left by its stage-1 counter, the
// bits stage 1 passed on unreduced, and the carries of this stage's own
// counters in columns c-1 (y2) and c-2 (y3). One counter per column turns
// them into the single product bit P[c]:
//
//   column  5   6    7    8    9    10  11  12  13  14  15
//   bits    2   4    5    5    4    3   3   2   2   2   3
//   counter HA  4:3  5:3  5:3  4:3  FA  FA  HA  HA  HA  FA
//
// The counters of columns 5, 6 and 9..15 follow the published dot diagram;
// columns 7 and 8 hold five bits each in this design's stage-1 plan and use
// 5:3 compressors. The carry out of column 15 would have weight 2^16; it is
// always 0 for a product of two 8-bit numbers (checked by an assertion) and
// is not an output. Purely combinational.
module reduction_stage2
  import hoc_mult_pkg::*;
(
  input  logic [14:5]   s1,      // stage-1 y1 bits of columns 5..14
  input  stage1_left_t  left,    // stage-1 bits passed on unreduced
  output logic [15:5]   p_high   // final product bits 5..15
);
  logic       h5, k10, k11, k12, k13, k14, k15;
  logic [2:0] d6, d7, d8, d9;

  half_adder     u_c5  (.a(s1[5]), .b(left.c5), .s(p_high[5]), .c(h5));
  compressor_4_3 u_c6  (.i({h5, left.c6, s1[6]}),                  .y(d6));
  compressor_5_3 u_c7  (.i({d6[1], left.c7, s1[7]}),               .y(d7));
  compressor_5_3 u_c8  (.i({d7[1], d6[2], left.c8, s1[8]}),        .y(d8));
  compressor_4_3 u_c9  (.i({d8[1], d7[2], left.c9, s1[9]}),        .y(d9));
  full_adder     u_c10 (.a(s1[10]), .b(d9[1]), .ci(d8[2]), .s(p_high[10]), .co(k10));
  full_adder     u_c11 (.a(s1[11]), .b(d9[2]), .ci(k10),   .s(p_high[11]), .co(k11));
  half_adder     u_c12 (.a(s1[12]), .b(k11), .s(p_high[12]), .c(k12));
  half_adder     u_c13 (.a(s1[13]), .b(k12), .s(p_high[13]), .c(k13));
  half_adder     u_c14 (.a(s1[14]), .b(k13), .s(p_high[14]), .c(k14));
  full_adder     u_c15 (.a(left.c15[0]), .b(left.c15[1]), .ci(k14),
                        .s(p_high[15]), .co(k15));

  assign p_high[6] = d6[0];
  assign p_high[7] = d7[0];
  assign p_high[8] = d8[0];
  assign p_high[9] = d9[0];

  // An 8x8 product fits in 16 bits, so nothing may carry out of column 15.
  always_comb begin
    assert (k15 == 1'b0)
      else $error("reduction_stage2: carry out of column 15 (inputs are not an 8x8 product)");
  end
endmodule
