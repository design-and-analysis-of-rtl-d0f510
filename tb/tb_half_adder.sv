// tb_half_adder: exhaustive check of the half adder against a + b.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if ({c, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> c=%b s=%b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
