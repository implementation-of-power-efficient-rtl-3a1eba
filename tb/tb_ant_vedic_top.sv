// tb_ant_vedic_top: end-to-end self-checking test of the ANT Vedic multiplier
// with every parameter at its default (12 x 12 main block, 6-bit replica).
//
// 1. The threshold is recomputed here from its definition, the largest
//    distance between an exact product and the replica estimate over all
//    inputs, using a reference replica model, and compared with the design's.
// 2. Error-free operation: random and corner operands with vos_err = 0. After
//    each edge y_hat must equal the exact product, err_sel must be 0 and yr_q
//    must equal the reference replica output (one-clock latency).
// 3. Emulated overscaling errors: vos_err flips one bit of the main product.
//    If the corrupted product is further than TH from the estimate, the
//    estimate must be selected; otherwise the corrupted product passes.
//    A corrected output must lie within TH of the true product, and a flip of
//    bit 20 or above (larger than 2*TH) must always be detected. Both cases,
//    and the error-free case, are counted and must each occur.
// 4. A back-to-back stream checks one result per clock.
module tb_ant_vedic_top;
  localparam int unsigned N  = ant_pkg::N_DEFAULT;
  localparam int unsigned M  = ant_pkg::M_DEFAULT;
  localparam int unsigned SH = 2 * N - M;

  int unsigned checks = 0, failures = 0;
  int unsigned n_clean = 0, n_corrected = 0, n_undetected = 0, n_cm = 0;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]   x = '0, y = '0;
  logic [2*N-1:0] vos_err = '0;
  logic [2*N-1:0] y_hat, ya_q;
  logic [M-1:0]   yr_q;
  logic           err_sel;

  ant_vedic_top dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .vos_err(vos_err),
    .y_hat(y_hat), .ya_q(ya_q), .yr_q(yr_q), .err_sel(err_sel)
  );

  always #5 clk = ~clk;

  // Reference replica: kept columns plus beta carries plus the MICV carry.
  function automatic int rpr_ref(input int a, input int b, output bit extra_o);
    int msp, beta, alpha;
    msp = 0; beta = 0; alpha = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        if (i + j >= M) msp += ((a >> i) & (b >> j) & 1) << (i + j);
    for (int i = 0; i < M; i++) beta += (a >> i) & (b >> (M - 1 - i)) & 1;
    for (int i = 0; i < M - 1; i++) alpha += (a >> i) & (b >> (M - 2 - i)) & 1;
    extra_o = (beta == 0 && alpha != 0);
    return (msp + ((beta + int'(extra_o)) << M)) >> M;
  endfunction

  function automatic longint absdiff(input longint u, input longint v);
    return (u > v) ? u - v : v - u;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%0d y=%0d y_hat=%0d ya_q=%0d yr_q=%0d sel=%b", what, x, y, y_hat, ya_q, yr_q, err_sel);
    end
  endtask

  // Drive one operand pair before an edge and check the result after it.
  task automatic apply(input int tx, input int ty, input longint terr);
    longint exact, ya_c, est;
    int     yr_e;
    bit     extra, exp_sel;
    @(negedge clk);
    x = N'(tx); y = N'(ty); vos_err = (2*N)'(terr);
    @(posedge clk);
    #1;
    exact = longint'(tx) * longint'(ty);
    ya_c  = exact ^ terr;
    yr_e  = rpr_ref(tx >> (N - M), ty >> (N - M), extra);
    est   = longint'(yr_e) << SH;
    exp_sel = absdiff(ya_c, est) > longint'(ant_pkg::TH_DEFAULT);
    check(int'(yr_q) == yr_e, "replica");
    check(longint'(ya_q) == ya_c, "main product");
    check(err_sel == exp_sel, "select");
    check(longint'(y_hat) == (exp_sel ? est : ya_c), "output");
    if (exp_sel) check(absdiff(longint'(y_hat), exact) <= longint'(ant_pkg::TH_DEFAULT), "corrected output within TH");
    if (terr >= (longint'(1) << 20)) check(err_sel, "large error not detected");
    if (extra) n_cm++;
    if (terr == 0) begin
      check(longint'(y_hat) == exact && !err_sel, "error-free output");
      n_clean++;
    end else if (exp_sel) n_corrected++;
    else n_undetected++;
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint th;
    bit     dummy;
    // 1. threshold from its definition
    th = 0;
    for (int xh = 0; xh < (1 << M); xh++)
      for (int yh = 0; yh < (1 << M); yh++) begin
        longint est, lo, hi;
        int     l;
        l   = (1 << (N - M)) - 1;
        est = longint'(rpr_ref(xh, yh, dummy)) << SH;
        lo  = longint'(xh << (N - M)) * longint'(yh << (N - M));
        hi  = longint'((xh << (N - M)) + l) * longint'((yh << (N - M)) + l);
        if (absdiff(lo, est) > th) th = absdiff(lo, est);
        if (absdiff(hi, est) > th) th = absdiff(hi, est);
      end
    check(th == longint'(ant_pkg::TH_DEFAULT), "threshold");
    $display("threshold from definition: %0d", th);

    // reset
    x = 12'hFFF; y = 12'hFFF;
    #12;
    check(ya_q == '0 && yr_q == '0, "reset");
    rst_n = 1'b1;

    // 2. error-free operation
    apply(922, 3173, 0);
    apply(0, 0, 0);
    apply(4095, 4095, 0);
    apply(4032, 4095, 0);
    apply(63, 4095, 0);
    for (int i = 0; i < 20000; i++) apply(int'($urandom_range(4095, 0)), int'($urandom_range(4095, 0)), 0);

    // 3. emulated overscaling errors, one flipped bit of the main product
    for (int i = 0; i < 4000; i++)
      apply(int'($urandom_range(4095, 0)), int'($urandom_range(4095, 0)),
            longint'(1) << $urandom_range(2 * N - 1, 0));

    // 4. back-to-back stream: a new pair every clock, result one clock later
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      x = N'(100 * i + 7); y = N'(4095 - 300 * i); vos_err = '0;
      @(posedge clk);
      #1;
      check(longint'(y_hat) == longint'(100 * i + 7) * longint'(4095 - 300 * i), "stream");
    end

    check(n_clean > 0, "error-free case never ran");
    check(n_corrected > 0, "correction never happened");
    check(n_undetected > 0, "sub-threshold error never happened");
    check(n_cm > 0, "MICV carry never fired");
    $display("error-free %0d, corrected %0d, below threshold %0d, MICV carry %0d",
             n_clean, n_corrected, n_undetected, n_cm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
