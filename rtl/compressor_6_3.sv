// compressor_6_3: counts the ones among six bits, y = count (0..6) in
// binary, y[0] = y1 (weight 1) .. y[2] = y3 (weight 4).
//
// Two full adders count (i6, i5, i4) and (i3, i2, i1); a 2-bit
// carry-lookahead adder adds the two 2-bit counts, as in the published
// block diagram. Input vector i[0] = i1 .. i[5] = i6. Purely combinational.
module compressor_6_3 (
  input  logic [5:0] i,
  output logic [2:0] y
);
  logic s_hi, c_hi, s_lo, c_lo;

  full_adder u_fa_hi (.a(i[5]), .b(i[4]), .ci(i[3]), .s(s_hi), .co(c_hi));
  full_adder u_fa_lo (.a(i[2]), .b(i[1]), .ci(i[0]), .s(s_lo), .co(c_lo));

  cla_adder #(.WIDTH(2)) u_cla (
    .a  ({c_hi, s_hi}),
    .b  ({c_lo, s_lo}),
    .ci (1'b0),
    .sum(y[1:0]),
    .co (y[2])
  );
endmodule
