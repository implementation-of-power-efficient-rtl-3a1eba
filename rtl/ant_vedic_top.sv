// ant_vedic_top: 12 x 12 unsigned multiplier protected by algorithmic noise
// tolerance (ANT), with a Vedic main block and a 6-bit fixed-width replica.
//
// The main block (vedic_mul12) computes the exact 2N-bit product of x and y.
// In the intended use it runs from an overscaled supply, so its slowest paths
// can miss the sampling edge and corrupt ya. The reduced-precision replica
// (rpr_fixed_width) multiplies only the M most significant bits of x and y and
// is short enough to stay error-free; its M-bit result estimates the top of
// the product. The error-correction block (ant_error_correction) samples both,
// and outputs the replica estimate whenever the main product is further from
// it than the threshold TH, the largest distance an error-free product can
// have from the estimate.
//
// vos_err is XORed onto the main-block output before it is sampled. It stands
// in for the timing errors of voltage overscaling, which zero-delay RTL cannot
// produce, so that the correction path can be exercised; tie it to zero in use.
// This port is this design's own addition.
//
// Timing: x, y and vos_err are sampled on the rising clock edge; y_hat, ya_q,
// yr_q and err_sel show the result for them until the next edge (latency one
// clock, one result per clock). rst_n is active-low and asynchronous.
module ant_vedic_top #(
  parameter int unsigned N  = ant_pkg::N_DEFAULT,
  parameter int unsigned M  = ant_pkg::M_DEFAULT,
  parameter int unsigned TH = ant_pkg::TH_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-1:0] vos_err,
  output logic [2*N-1:0] y_hat,
  output logic [2*N-1:0] ya_q,
  output logic [M-1:0]   yr_q,
  output logic           err_sel
);
  logic [2*N-1:0] ya_exact;
  logic [2*N-1:0] ya;
  logic [M-1:0]   yr;

  vedic_mul12 #(.N(N)) u_main (.a(x), .b(y), .p(ya_exact));

  assign ya = ya_exact ^ vos_err;

  rpr_fixed_width #(.M(M)) u_rpr (
    .a(x[N-1:N-M]), .b(y[N-1:N-M]), .p(yr), .cm1(), .cm2(), .cm()
  );

  ant_error_correction #(.N(N), .M(M), .TH(TH)) u_ec (
    .clk(clk), .rst_n(rst_n), .ya(ya), .yr(yr),
    .y_hat(y_hat), .ya_q(ya_q), .yr_q(yr_q), .err_sel(err_sel)
  );
endmodule
