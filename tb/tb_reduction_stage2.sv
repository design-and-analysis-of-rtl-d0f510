// tb_reduction_stage2: random check of the second reduction stage on its
// own. Inputs are drawn at random; a pattern is applied only when its
// weighted value fits in 16 bits (as every real stage-1 output does), and
// the 11 output bits must then equal bits 5..15 of that value. The stage's
// inputs carry no bits of weight below 2^5, so the value's low five bits
// are always zero.
module tb_reduction_stage2;
  import hoc_mult_pkg::*;

  logic [14:5]  s1 = '0;
  stage1_left_t left = '0;
  logic [15:5]  p_high;
  int checks = 0, failures = 0;

  reduction_stage2 dut (.s1(s1), .left(left), .p_high(p_high));

  function automatic int unsigned weighted(logic [14:5] s, stage1_left_t l);
    int unsigned acc = 0;
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
    int applied = 0;
    s1 = '0;
    left = '0;
    while (applied < 50000) begin
      logic [14:5]  s_n;
      stage1_left_t l_n;
      int unsigned  val;
      s_n = 10'($urandom);
      l_n = stage1_left_t'($urandom);
      val = weighted(s_n, l_n);
      if (val < 32'h1_0000) begin
        s1 = s_n;
        left = l_n;
        #1;
        applied++;
        checks++;
        if ({p_high, 5'b0} != val[15:0]) begin
          failures++;
          if (failures < 10) $display("FAIL value %0d -> %0d", val, {p_high, 5'b0});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
