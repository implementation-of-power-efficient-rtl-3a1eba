// tb_vedic_mul12: self-checking test of the 12 x 12 Vedic main multiplier.
// Corner operands (0, 1, all-one, single bits, half-word patterns) and 200,000
// random pairs are applied, and the 24-bit product is compared with an integer
// multiplication.
module tb_vedic_mul12;
  localparam int unsigned N = 12;

  int unsigned checks = 0, failures = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  vedic_mul12 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    longint unsigned exp_;
    a = ta; b = tb_;
    #1;
    exp_ = longint'(ta) * longint'(tb_);
    checks++;
    if (longint'(p) != exp_) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d got %0d exp %0d", ta, tb_, p, exp_);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 12'd1);
    apply(12'h03F, 12'hFC0);
    apply(12'hFC0, 12'hFC0);
    apply(12'h03F, 12'h03F);
    apply(12'd922, 12'd3173);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) apply(N'(1) << i, N'(1) << j);
    for (int i = 0; i < 200000; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
