// tb_hoc_vedic_mult8: end-to-end test of the 8x8 multiplier at its default
// (and only) size. All 65536 operand pairs are applied and every product is
// compared with a * b computed by the testbench.
//
// It also counts how often the design's particular mechanisms were used and
// fails if one never was:
//   - a 7:3 compressor seeing all seven inputs high (column 7 of stage 1),
//   - bits passed from stage 1 to stage 2 unreduced (columns 5..9),
//   - the carry-only column 15 receiving a one from stage 1,
//   - the stage-2 5:3 compressors of columns 7 and 8 counting 5.
module tb_hoc_vedic_mult8;
  logic [7:0]  a = '0, b = '0;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_full73 = 0, n_left = 0, n_c15 = 0, n_full53 = 0;

  hoc_vedic_mult8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      int unsigned prod;
      {a, b} = v[15:0];
      #1;
      prod = int'(a) * int'(b);
      checks++;
      if (p != prod[15:0]) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", a, b, prod, p);
      end
      if (dut.u_stage1.y7c == 3'd7) n_full73++;
      if ({dut.u_stage1.left.c9, dut.u_stage1.left.c8, dut.u_stage1.left.c7,
           dut.u_stage1.left.c6, dut.u_stage1.left.c5} != '0) n_left++;
      if (dut.u_stage1.left.c15 != '0) n_c15++;
      if (dut.u_stage2.d7 == 3'd5 || dut.u_stage2.d8 == 3'd5) n_full53++;
    end
    $display("full 7:3 in column 7: %0d, unreduced bits used: %0d, column 15 ones: %0d, full stage-2 5:3: %0d",
             n_full73, n_left, n_c15, n_full53);
    checks++;
    if (n_full73 == 0) begin failures++; $display("FAIL column-7 7:3 compressor never full"); end
    checks++;
    if (n_left == 0) begin failures++; $display("FAIL unreduced stage-1 bits never set"); end
    checks++;
    if (n_c15 == 0) begin failures++; $display("FAIL column 15 never received a one"); end
    checks++;
    if (n_full53 == 0) begin failures++; $display("FAIL stage-2 5:3 compressor never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
