// ant_variant_check: reusable checker that drives one ant_vedic_top instance
// of a given size (N-bit operands, M-bit replica, threshold TH) and checks it
// against integer arithmetic. It first recomputes TH from its definition (the
// largest distance between an exact product and the replica estimate) and
// compares it with the TH it was given. It then applies NVEC random operand
// pairs without errors: y_hat must be the exact product and err_sel must stay
// 0. Finally it applies NVEC pairs with one flipped main-product bit: the
// estimate must be selected exactly when the corrupted product is more than TH
// away from it. done rises when it has finished; checks and failures count
// the results. Operands are drawn on the falling edge and checked after the
// next rising edge (one clock of latency).
module ant_variant_check #(
  parameter int unsigned N    = 12,
  parameter int unsigned M    = 6,
  parameter longint      TH   = 455553,
  parameter int unsigned NVEC = 5000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_corrected
);
  localparam int unsigned SH = 2 * N - M;
  localparam int unsigned L  = N - M;

  logic [N-1:0]   x = '0, y = '0;
  logic [2*N-1:0] vos_err = '0;
  logic [2*N-1:0] y_hat, ya_q;
  logic [M-1:0]   yr_q;
  logic           err_sel;

  ant_vedic_top #(.N(N), .M(M), .TH(TH)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .vos_err(vos_err),
    .y_hat(y_hat), .ya_q(ya_q), .yr_q(yr_q), .err_sel(err_sel)
  );

  function automatic longint rpr_ref(input longint a, input longint b);
    longint msp;
    int beta, alpha, extra;
    msp = 0; beta = 0; alpha = 0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        if (i + j >= M) msp += ((a >> i) & (b >> j) & 1) << (i + j);
    for (int i = 0; i < M; i++) beta += int'((a >> i) & (b >> (M - 1 - i)) & 1);
    for (int i = 0; i < M - 1; i++) alpha += int'((a >> i) & (b >> (M - 2 - i)) & 1);
    extra = (beta == 0 && alpha != 0) ? 1 : 0;
    return (msp + (longint'(beta + extra) << M)) >> M;
  endfunction

  function automatic longint absdiff(input longint u, input longint v);
    return (u > v) ? u - v : v - u;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d M=%0d %s x=%0d y=%0d y_hat=%0d", N, M, what, x, y, y_hat);
    end
  endtask

  task automatic apply(input longint tx, input longint ty, input longint terr);
    longint exact, ya_c, est;
    bit     exp_sel;
    @(negedge clk);
    x = N'(tx); y = N'(ty); vos_err = (2*N)'(terr);
    @(posedge clk);
    #1;
    exact   = tx * ty;
    ya_c    = exact ^ terr;
    est     = rpr_ref(tx >> L, ty >> L) << SH;
    exp_sel = absdiff(ya_c, est) > TH;
    check(longint'(ya_q) == ya_c, "main product");
    check(err_sel == exp_sel, "select");
    check(longint'(y_hat) == (exp_sel ? est : ya_c), "output");
    if (terr == 0) check(longint'(y_hat) == exact, "error-free output");
    else if (exp_sel) n_corrected++;
  endtask

  initial begin
    longint th, lo, hi, est;
    done = 1'b0; checks = 0; failures = 0; n_corrected = 0;
    th = 0;
    for (longint xh = 0; xh < (64'd1 << M); xh++)
      for (longint yh = 0; yh < (64'd1 << M); yh++) begin
        est = rpr_ref(xh, yh) << SH;
        lo  = (xh << L) * (yh << L);
        hi  = ((xh << L) + (64'd1 << L) - 1) * ((yh << L) + (64'd1 << L) - 1);
        if (absdiff(lo, est) > th) th = absdiff(lo, est);
        if (absdiff(hi, est) > th) th = absdiff(hi, est);
      end
    check(th == TH, "threshold");
    @(posedge rst_n);
    apply((64'd1 << N) - 1, (64'd1 << N) - 1, 0);
    for (int i = 0; i < NVEC; i++)
      apply(longint'($urandom) & ((64'd1 << N) - 1), longint'($urandom) & ((64'd1 << N) - 1), 0);
    for (int i = 0; i < NVEC; i++)
      apply(longint'($urandom) & ((64'd1 << N) - 1), longint'($urandom) & ((64'd1 << N) - 1),
            64'd1 << $urandom_range(2 * N - 1, 0));
    check(n_corrected > 0, "correction never happened");
    done = 1'b1;
  end
endmodule
