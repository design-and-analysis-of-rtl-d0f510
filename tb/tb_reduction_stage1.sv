// tb_reduction_stage1: exhaustive check of the first reduction stage over
// all 65536 operand pairs. The testbench forms the partial products itself
// and checks that (1) the five finished product bits equal bits 0..4 of
// a * b and (2) everything the stage hands on (y1 bits and unreduced bits,
// each at its column weight) adds up to a * b exactly. It also requires
// that the unreduced path of columns 5..9 and 15 carried ones at some point.
module tb_reduction_stage1;
  import hoc_mult_pkg::*;

  logic [7:0]   a, b;
  pp_array_t    pp;
  logic [4:0]   p_low;
  logic [14:5]  s1;
  stage1_left_t left;
  int checks = 0, failures = 0;
  int left_used = 0, c15_used = 0;

  reduction_stage1 dut (.pp(pp), .p_low(p_low), .s1(s1), .left(left));

  function automatic int unsigned weighted(logic [4:0] lo, logic [14:5] s, stage1_left_t l);
    int unsigned acc = int'(lo);
    for (int c = 5; c <= 14; c++) acc += int'(s[c]) << c;
    acc += int'(l.c5) << 5;
    acc += $countones(l.c6) << 6;
    acc += $countones(l.c7) << 7;
    acc += $countones(l.c8) << 8;
    acc += int'(l.c9) << 9;
    acc += $countones(l.c15) << 15;
    return acc;
  endfunction

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
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          pp[i][j] = a[i] & b[j];
      #1;
      prod = int'(a) * int'(b);
      checks++;
      if (p_low != prod[4:0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: low bits %b, expected %b", a, b, p_low, prod[4:0]);
      end
      checks++;
      if (weighted(p_low, s1, left) != prod) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: stage value %0d, expected %0d", a, b, weighted(p_low, s1, left), prod);
      end
      if ({left.c9, left.c8, left.c7, left.c6, left.c5} != '0) left_used++;
      if (left.c15 != '0) c15_used++;
    end
    checks++;
    if (left_used == 0 || c15_used == 0) begin
      failures++;
      $display("FAIL unreduced path never used (%0d, %0d)", left_used, c15_used);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
