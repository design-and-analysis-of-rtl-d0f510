// compressor_7_3: counts the ones among seven bits, y = count (0..7) in
// binary, y[0] = y1 (weight 1) .. y[2] = y3 (weight 4).
//
// A 4:3 compressor counts (i7 .. i4) into 3 bits, a full adder counts
// (i3, i2, i1) into 2 bits, and a 3-bit carry-lookahead adder adds the two,
// as in the published block diagram. The count never exceeds 7, so the
// adder's carry-out is always 0; it is left unconnected on purpose.
// Input vector i[0] = i1 .. i[6] = i7. Purely combinational.
module compressor_7_3 (
  input  logic [6:0] i,
  output logic [2:0] y
);
  logic [2:0] cnt_hi;
  logic       s_lo, c_lo;

  compressor_4_3 u_c43 (.i(i[6:3]), .y(cnt_hi));
  full_adder     u_fa  (.a(i[2]), .b(i[1]), .ci(i[0]), .s(s_lo), .co(c_lo));

  cla_adder #(.WIDTH(3)) u_cla (
    .a  (cnt_hi),
    .b  ({1'b0, c_lo, s_lo}),
    .ci (1'b0),
    .sum(y),
    .co ()
  );
endmodule
