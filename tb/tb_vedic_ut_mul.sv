// tb_vedic_ut_mul: exhaustive self-checking test of the 6 x 6 Urdhva
// Tiryagbhyam multiplier (all 4096 operand pairs), plus 20,000 random pairs
// on an 8 x 8 instance, each compared with an integer product.
module tb_vedic_ut_mul;
  localparam int unsigned W = 6;

  int unsigned checks = 0, failures = 0;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic [7:0]     a8, b8;
  logic [15:0]    p8;

  vedic_ut_mul #(.W(W)) dut  (.a(a),  .b(b),  .p(p));
  vedic_ut_mul #(.W(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, p);
        end
      end
    end
    for (int k = 0; k < 20000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks++;
      if (int'(p8) != int'(a8) * int'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d*%0d got %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
