// tb_rpr_fixed_width: exhaustive self-checking test of the 6-bit fixed-width
// replica multiplier with ICV/MICV compensation.
//
// For all 4096 operand pairs the reference is computed row by row: row j of
// the kept part is b[j] * (a with its bits below M-j cleared) * 2^j, beta and
// alpha are counted from the two columns below, and the expected output is
// (MSP + 2^M * (beta + (beta == 0 && alpha != 0))) / 2^M. The flags cm1, cm2,
// cm are checked too. The test also checks that the output is never below
// the exact top bits of a*b (a*b >> M) and at most 2 above them, checks the
// published example (b = 010101 giving p = 000110 with cm1 = 0, cm2 = 1,
// cm = 0, for a = 010010), and counts how often the extra MICV carry fired.
module tb_rpr_fixed_width;
  localparam int unsigned M = 6;

  int unsigned checks = 0, failures = 0;
  int unsigned cm_fired = 0;

  logic [M-1:0] a, b, p;
  logic         cm1, cm2, cm;

  rpr_fixed_width dut (.a(a), .b(b), .p(p), .cm1(cm1), .cm2(cm2), .cm(cm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%b b=%b p=%b cm1=%b cm2=%b cm=%b", what, a, b, p, cm1, cm2, cm);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << M); ia++) begin
      for (int ib = 0; ib < (1 << M); ib++) begin
        int msp, beta, alpha, extra, exp_p, exact_top;
        a = M'(ia); b = M'(ib);
        #1;
        msp = 0;
        for (int j = 0; j < M; j++)
          if (ib[j]) msp += ((ia >> (M - j)) << (M - j)) << j;
        beta = 0; alpha = 0;
        for (int i = 0; i < M; i++) beta += ia[i] & ib[M-1-i];
        for (int i = 0; i < M - 1; i++) alpha += ia[i] & ib[M-2-i];
        extra = (beta == 0 && alpha != 0) ? 1 : 0;
        exp_p = (msp + ((beta + extra) << M)) >> M;
        exact_top = (ia * ib) >> M;
        check(int'(p) == exp_p, "product");
        check(cm1 == (beta == 0), "cm1");
        check(cm2 == (alpha != 0), "cm2");
        check(cm == extra[0], "cm");
        check(int'(p) >= exact_top && int'(p) - exact_top <= 2, "error bound");
        if (cm) cm_fired++;
      end
    end
    a = 6'b010010; b = 6'b010101;
    #1;
    check(p == 6'b000110 && !cm1 && cm2 && !cm, "published example");
    check(cm_fired > 0, "MICV carry never fired");
    $display("MICV extra carry fired for %0d of 4096 operand pairs", cm_fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
