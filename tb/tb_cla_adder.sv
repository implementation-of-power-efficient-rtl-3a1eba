// tb_cla_adder: self-checking test of the carry-lookahead adder at its default
// width (12 bits, groups of 4) and at a width that is not a multiple of the
// group size (10 bits). Corner values (all-zero, all-one, long propagate chains
// with carry in) and 50,000 random operand pairs per width are applied and the
// {cout, sum} result is compared with a plain integer addition.
module tb_cla_adder;
  localparam int unsigned W  = 12;
  localparam int unsigned W2 = 10;

  int unsigned checks = 0, failures = 0;

  logic [W-1:0]  a, b, s;
  logic          cin, cout;
  logic [W2-1:0] a2, b2, s2;
  logic          cin2, cout2;

  cla_adder #(.W(W))  dut  (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(cout));
  cla_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(s2), .cout(cout2));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] exp_;
    logic [W2:0] exp2;
    a = ta; b = tb_; cin = tc;
    a2 = ta[W2-1:0]; b2 = tb_[W2-1:0]; cin2 = tc;
    #1;
    exp_ = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    exp2 = {1'b0, ta[W2-1:0]} + {1'b0, tb_[W2-1:0]} + (W2+1)'(tc);
    checks += 2;
    if ({cout, s} !== exp_) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d a=%h b=%h cin=%b got %h exp %h", W, ta, tb_, tc, {cout, s}, exp_);
    end
    if ({cout2, s2} !== exp2) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d a=%h b=%h cin=%b got %h exp %h", W2, ta, tb_, tc, {cout2, s2}, exp2);
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
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 12'h001, 1'b0);
    apply(12'h555, 12'hAAA, 1'b1);
    apply(12'h0F0, 12'h00F, 1'b1);
    for (int i = 0; i < W; i++) apply(W'(1) << i, '1, 1'b0);
    for (int i = 0; i < 50000; i++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
