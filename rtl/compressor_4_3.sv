// compressor_4_3: counts the ones among four bits and gives the count in
// binary, y = number of ones (0..4), y[0] = y1 (weight 1), y[1] = y2,
// y[2] = y3 (weight 4).
//
// Unlike a conventional 4:2 compressor, the result is a plain binary count,
// so no further adder is needed after it. Two half adders count the pairs
// (i4, i3) and (i2, i1); a 2-bit carry-lookahead adder adds the two 2-bit
// counts. That structure follows the published block diagram. The input
// vector is i[0] = i1 .. i[3] = i4. Purely combinational.
module compressor_4_3 (
  input  logic [3:0] i,
  output logic [2:0] y
);
  logic s_hi, c_hi, s_lo, c_lo;

  half_adder u_ha_hi (.a(i[3]), .b(i[2]), .s(s_hi), .c(c_hi));
  half_adder u_ha_lo (.a(i[1]), .b(i[0]), .s(s_lo), .c(c_lo));

  cla_adder #(.WIDTH(2)) u_cla (
    .a  ({c_hi, s_hi}),
    .b  ({c_lo, s_lo}),
    .ci (1'b0),
    .sum(y[1:0]),
    .co (y[2])
  );
endmodule
