// tb_ant_error_correction: self-checking test of the ANT error-correction
// stage at N = 12, M = 6 and the default threshold.
//
// Each cycle a product ya and an estimate yr are driven before the rising
// edge. After the edge the test checks that the sampled values appear on
// ya_q/yr_q (one-clock latency), that err_sel is set exactly when
// |ya - yr*2^18| > TH, and that y_hat is the aligned estimate in that case and
// ya otherwise. Vectors sit exactly at TH and TH+1 on both sides of the
// estimate, plus random ones. Reset must clear the registers.
module tb_ant_error_correction;
  localparam int unsigned N  = 12;
  localparam int unsigned M  = 6;
  localparam int unsigned TH = 455553;
  localparam int unsigned SH = 2 * N - M;

  int unsigned checks = 0, failures = 0;
  int unsigned n_sel = 0, n_pass = 0;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [2*N-1:0] ya = '0, y_hat, ya_q;
  logic [M-1:0]   yr = '0, yr_q;
  logic           err_sel;

  ant_error_correction dut (
    .clk(clk), .rst_n(rst_n), .ya(ya), .yr(yr),
    .y_hat(y_hat), .ya_q(ya_q), .yr_q(yr_q), .err_sel(err_sel)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s ya_q=%h yr_q=%h y_hat=%h sel=%b", what, ya_q, yr_q, y_hat, err_sel);
    end
  endtask

  task automatic apply(input longint tya, input int tyr);
    longint ref_full, d;
    bit     exp_sel;
    @(negedge clk);
    ya = (2*N)'(tya); yr = M'(tyr);
    @(posedge clk);
    #1;
    ref_full = longint'(tyr) << SH;
    d = (tya > ref_full) ? tya - ref_full : ref_full - tya;
    exp_sel = d > longint'(TH);
    check(ya_q == (2*N)'(tya) && yr_q == M'(tyr), "sampling");
    check(err_sel == exp_sel, "select");
    check(y_hat == (exp_sel ? (2*N)'(ref_full) : (2*N)'(tya)), "output");
    if (exp_sel) n_sel++; else n_pass++;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ya = 24'hABCDEF; yr = 6'h2A;
    #12;
    check(ya_q == '0 && yr_q == '0, "reset");
    rst_n = 1'b1;
    for (int r = 0; r < 64; r += 9) begin
      longint base = longint'(r) << SH;
      apply(base + TH, r);
      apply(base + TH + 1, r);
      if (base >= TH + 1) begin
        apply(base - TH, r);
        apply(base - TH - 1, r);
      end
    end
    for (int i = 0; i < 5000; i++) apply(longint'($urandom) & 64'hFFFFFF, int'($urandom_range(63, 0)));
    // one-clock latency: an input changed after the edge must not show
    @(negedge clk);
    ya = 24'h123456; yr = 6'h04;
    #1;
    check(ya_q != 24'h123456, "latency");
    check(n_sel > 0 && n_pass > 0, "both MUX inputs used");
    $display("estimate selected %0d times, main product passed %0d times", n_sel, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
