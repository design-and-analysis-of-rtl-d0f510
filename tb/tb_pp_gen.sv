// tb_pp_gen: exhaustive check of the partial-product generator at its
// default width: every pp[i][j] must equal a[i] & b[j], and the weighted
// sum of all partial products must equal a * b.
module tb_pp_gen;
  logic [7:0]      a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      int unsigned acc;
      int          bad;
      {a, b} = v[15:0];
      #1;
      acc = 0;
      bad = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          if (pp[i][j] != (a[i] & b[j])) bad++;
          if (pp[i][j]) acc += 1 << (i + j);
        end
      checks++;
      if (bad != 0 || acc != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: %0d wrong bits, sum %0d", a, b, bad, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
