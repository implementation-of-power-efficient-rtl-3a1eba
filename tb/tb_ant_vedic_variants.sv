// tb_ant_vedic_variants: runs the ANT Vedic multiplier at the two other sizes
// the design description mentions, each with its own threshold recomputed
// from the maximum-replica-error definition:
//   N = 16, M = 8, TH = 34368257  (16-bit operands, 32-bit product)
//   N = 12, M = 8, TH = 128177    (12-bit operands, 8-bit replica)
// Each size is exercised by an ant_variant_check instance (error-free products
// and products with one flipped bit); the results are summed here.
module tb_ant_vedic_variants;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done16, done12;
  int   c16, f16, k16, c12, f12, k12;
  int   checks, failures;

  always #5 clk = ~clk;

  ant_variant_check #(.N(16), .M(8), .TH(64'd34368257), .NVEC(5000)) u_n16 (
    .clk(clk), .rst_n(rst_n), .done(done16), .checks(c16), .failures(f16), .n_corrected(k16)
  );
  ant_variant_check #(.N(12), .M(8), .TH(64'd128177), .NVEC(5000)) u_n12m8 (
    .clk(clk), .rst_n(rst_n), .done(done12), .checks(c12), .failures(f12), .n_corrected(k12)
  );

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c12, f16 + f12 + 1);
    $finish;
  end

  initial begin
    #22 rst_n = 1'b1;
    wait (done16 && done12);
    checks   = c16 + c12;
    failures = f16 + f12;
    $display("N=16 M=8: %0d checks, %0d corrected; N=12 M=8: %0d checks, %0d corrected",
             c16, k16, c12, k12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
