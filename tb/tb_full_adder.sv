// tb_full_adder: exhaustive check of the full adder as a counter of ones:
// {co, s} must equal the number of ones among its three inputs.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = v[2:0];
      #1;
      checks++;
      if (int'({co, s}) != $countones(v[2:0])) begin
        failures++;
        $display("FAIL in=%b -> co=%b s=%b", v[2:0], co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
