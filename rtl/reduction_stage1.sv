// reduction_stage1: first of the two reduction stages of the 8x8
// higher-order-compressor multiplier.
//
// Every column c (weight 2^c, c = 0..15; the published dot diagram numbers
// them 1..16) gets one counter: a wire, a half adder, a full adder or a
// 4:3 .. 7:3 compressor. A counter's y2 output is fed into column c+1 and
// its y3 output into column c+2 of this same stage, so the carries move
// left as the columns are counted, and each column's y1 stays in place:
//
//   column  0    1    2    3    4    5..10  11   12   13   14   15
//   bits    1    2    4    5    7    8,9,10,9,8,7    6    5    4    3    2
//   counter wire HA   4:3  5:3  7:3  7:3   6:3  5:3  4:3  FA   none
//
// (bits = partial products + carries that arrive from columns c-1, c-2).
// Columns 0..4 end with a single bit: these are the product bits P[4:0].
// Columns 5..9 hold more than seven bits; the 7:3 compressor takes the
// partial products first, and the bits it cannot take (late carries, and
// the eighth partial product of column 7) go to stage 2 unreduced in
// `left`. Column 15 receives only two carries, also passed on in `left`.
// The counter sizes follow the published dot diagram; the choice of which
// bits are left over is this design's. Two outputs are plain wires from the
// input: product bit 0 (the lone partial product of column 0) and left.c7[0]
// (the eighth partial product of column 7). Purely combinational.
module reduction_stage1
  import hoc_mult_pkg::*;
(
  input  pp_array_t     pp,     // pp[i][j] = a[i] & b[j]
  output logic [4:0]    p_low,  // final product bits 0..4
  output logic [14:5]   s1,     // y1 (or sum) of the counter of columns 5..14
  output stage1_left_t  left    // unreduced bits for stage 2
);
  // col[c][k]: the k-th partial product of column c, in order of rising i
  logic [WIDTH-1:0] col [PWIDTH];

  always_comb begin
    for (int c = 0; c < PWIDTH; c++) begin
      col[c] = '0;
      for (int i = 0; i < WIDTH; i++) begin
        if (c - i >= 0 && c - i < WIDTH)
          col[c][i - ((c > WIDTH - 1) ? c - (WIDTH - 1) : 0)] = pp[i][c-i];
      end
    end
  end

  // counter outputs of columns 2..13 (y[0] = y1, y[1] = y2, y[2] = y3)
  logic [2:0] y2c, y3c, y4c, y5c, y6c, y7c, y8c, y9c, y10c, y11c, y12c, y13c;
  logic       k1, k14;

  // columns 0..4: complete product bits
  assign p_low[0] = col[0][0];
  half_adder     u_c1  (.a(col[1][0]), .b(col[1][1]), .s(p_low[1]), .c(k1));
  compressor_4_3 u_c2  (.i({k1, col[2][2:0]}),                 .y(y2c));
  compressor_5_3 u_c3  (.i({y2c[1], col[3][3:0]}),             .y(y3c));
  compressor_7_3 u_c4  (.i({y3c[1], y2c[2], col[4][4:0]}),     .y(y4c));
  assign p_low[2] = y2c[0];
  assign p_low[3] = y3c[0];
  assign p_low[4] = y4c[0];

  // columns 5..9: more than seven bits, the surplus goes to stage 2
  compressor_7_3 u_c5  (.i({y3c[2], col[5][5:0]}),             .y(y5c));
  compressor_7_3 u_c6  (.i(col[6][6:0]),                       .y(y6c));
  compressor_7_3 u_c7  (.i(col[7][6:0]),                       .y(y7c));
  compressor_7_3 u_c8  (.i(col[8][6:0]),                       .y(y8c));
  compressor_7_3 u_c9  (.i({y7c[2], col[9][5:0]}),             .y(y9c));

  assign left.c5 = y4c[1];
  assign left.c6 = {y5c[1], y4c[2]};
  assign left.c7 = {y6c[1], y5c[2], col[7][7]};
  assign left.c8 = {y7c[1], y6c[2]};
  assign left.c9 = y8c[1];

  // columns 10..14
  compressor_7_3 u_c10 (.i({y9c[1], y8c[2], col[10][4:0]}),    .y(y10c));
  compressor_6_3 u_c11 (.i({y10c[1], y9c[2], col[11][3:0]}),   .y(y11c));
  compressor_5_3 u_c12 (.i({y11c[1], y10c[2], col[12][2:0]}),  .y(y12c));
  compressor_4_3 u_c13 (.i({y12c[1], y11c[2], col[13][1:0]}),  .y(y13c));
  full_adder     u_c14 (.a(col[14][0]), .b(y12c[2]), .ci(y13c[1]),
                        .s(s1[14]), .co(k14));

  assign s1[13:5] = {y13c[0], y12c[0], y11c[0], y10c[0], y9c[0],
                     y8c[0], y7c[0], y6c[0], y5c[0]};

  // column 15: two carries, no partial product
  assign left.c15 = {k14, y13c[2]};
endmodule
