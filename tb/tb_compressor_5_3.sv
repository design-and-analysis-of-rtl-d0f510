// tb_compressor_5_3: exhaustive check of the 5:3 compressor. For each of
// the 32 input patterns the 3-bit output must be the binary count of
// ones at the input (the counter table of the design).
module tb_compressor_5_3;
  logic [5-1:0] i;
  logic [2:0]     y;
  int checks = 0, failures = 0;
  int seen [5+1];

  compressor_5_3 dut (.i(i), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int v = 0; v < (1 << 5); v++) begin
      i = v[5-1:0];
      #1;
      checks++;
      seen[$countones(i)]++;
      if (int'(y) != $countones(i)) begin
        failures++;
        $display("FAIL i=%b -> y=%0d, expected %0d", i, y, $countones(i));
      end
    end
    // every count 0..5 must have been produced
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL count %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
