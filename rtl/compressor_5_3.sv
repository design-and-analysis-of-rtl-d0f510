// compressor_5_3: counts the ones among five bits, y = count (0..5) in
// binary, y[0] = y1 (weight 1) .. y[2] = y3 (weight 4).
//
// A half adder counts (i5, i4), a full adder counts (i3, i2, i1), and a
// 2-bit carry-lookahead adder adds the two 2-bit counts, as in the
// published block diagram. Input vector i[0] = i1 .. i[4] = i5. Purely
// combinational.
module compressor_5_3 (
  input  logic [4:0] i,
  output logic [2:0] y
);
  logic s_hi, c_hi, s_lo, c_lo;

  half_adder u_ha (.a(i[4]), .b(i[3]), .s(s_hi), .c(c_hi));
  full_adder u_fa (.a(i[2]), .b(i[1]), .ci(i[0]), .s(s_lo), .co(c_lo));

  cla_adder #(.WIDTH(2)) u_cla (
    .a  ({c_hi, s_hi}),
    .b  ({c_lo, s_lo}),
    .ci (1'b0),
    .sum(y[1:0]),
    .co (y[2])
  );
endmodule
