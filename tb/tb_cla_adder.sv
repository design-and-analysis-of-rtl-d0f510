// tb_cla_adder: exhaustive check of the carry-lookahead adder at its
// default width (2), at the width the 7:3 compressor uses (3) and at 5,
// against integer addition including the carry-in.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [2:0] a3, b3, s3;  logic ci3, co3;
  logic [4:0] a5, b5, s5;  logic ci5, co5;

  cla_adder              dut2 (.a(a2), .b(b2), .ci(ci2), .sum(s2), .co(co2));
  cla_adder #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .ci(ci3), .sum(s3), .co(co3));
  cla_adder #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .ci(ci5), .sum(s5), .co(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      {ci5, a5, b5} = v[10:0];
      {ci3, a3, b3} = v[6:0];
      {ci2, a2, b2} = v[4:0];
      #1;
      checks++;
      if (int'({co5, s5}) != int'(a5) + int'(b5) + int'(ci5)) begin
        failures++;
        $display("FAIL w5 %0d+%0d+%0d -> %0d", a5, b5, ci5, {co5, s5});
      end
      if (v < (1 << 7)) begin
        checks++;
        if (int'({co3, s3}) != int'(a3) + int'(b3) + int'(ci3)) begin
          failures++;
          $display("FAIL w3 %0d+%0d+%0d -> %0d", a3, b3, ci3, {co3, s3});
        end
      end
      if (v < (1 << 5)) begin
        checks++;
        if (int'({co2, s2}) != int'(a2) + int'(b2) + int'(ci2)) begin
          failures++;
          $display("FAIL w2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
