// rpr_fixed_width: M-bit fixed-width reduced-precision replica (RPR) multiplier
// with ICV/MICV error compensation (M = 6 by default).
//
// Inputs are the M most significant bits of the two main-block operands; the
// output p estimates the M most significant bits of their 2M-bit product,
// i.e. bits [2M-1:M] of a*b, which line up with bits [2N-1:2N-M] of the main
// product. The partial-product array a[i]&b[j] is split by column weight i+j:
//   MSP   i+j >= M     kept and summed
//   ICV   i+j == M-1   beta, M bit products
//   MICV  i+j == M-2   alpha, M-1 bit products
//   LSP   i+j <  M-2   dropped
//
// Structure: an array of full adders, one row per multiplier bit b[j]. An
// M-bit accumulator holds columns M..2M-1. Row j adds its kept products
// a[M-j..M-1]&b[j] (columns M..M+j-1) to the accumulator with a ripple chain of
// full adders, and its carry into column M is that row's ICV product
// a[M-1-j]&b[j]. So the ICV products are injected as carries at weight 2^M:
// rows 0..M-2 take theirs directly (C_1..C_(M-1)). The last row's carry-in
// is a[0]&b[M-1] ORed with cm, where
//   cm1 = (beta == 0), cm2 = (alpha != 0), cm = cm1 & cm2,
// so one extra unit is added exactly when the ICV column is empty but the MICV
// column is not. Row 0 has no kept product; its ICV product starts the
// accumulator. The final accumulator is p; it never carries out of column
// 2M-1 (asserted).
//
// Combinational; p settles in the same cycle as a and b. The column split,
// the directly injected ICV carries, the OR with the conditional MICV term
// and the use of full adders follow the design description; the row-by-row
// ripple organisation of the array is this design's choice.
module rpr_fixed_width #(
  parameter int unsigned M = ant_pkg::M_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p,
  output logic         cm1,
  output logic         cm2,
  output logic         cm
);
  logic [M-1:0] icv;    // beta column,  icv[i]  = a[i] & b[M-1-i]
  logic [M-2:0] micv;   // alpha column, micv[i] = a[i] & b[M-2-i]
  logic [M-1:0] rcin;   // carry into column M of row j

  always_comb begin
    for (int unsigned i = 0; i < M; i++)     icv[i]  = a[i] & b[M-1-i];
    for (int unsigned i = 0; i < M - 1; i++) micv[i] = a[i] & b[M-2-i];
  end

  assign cm1 = ~|icv;
  assign cm2 = |micv;
  assign cm  = cm1 & cm2;

  always_comb begin
    for (int unsigned j = 0; j < M - 1; j++) rcin[j] = icv[M-1-j];
    rcin[M-1] = icv[0] | cm;
  end

  // acc[j] is the accumulator after row j; bit k stands for column M+k.
  logic [M-1:0] acc [M];
  logic [M:0]   cy  [M];

  assign acc[0] = {{(M-1){1'b0}}, rcin[0]};
  assign cy[0]  = '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    logic [M-1:0] row;   // kept products of row j, column M+k
    always_comb begin
      row = '0;
      for (int unsigned k = 0; k < j; k++) row[k] = a[M-j+k] & b[j];
    end
    assign cy[j][0] = rcin[j];
    for (genvar k = 0; k < M; k++) begin : g_fa
      full_adder u_fa (
        .a(acc[j-1][k]), .b(row[k]), .ci(cy[j][k]),
        .s(acc[j][k]), .co(cy[j][k+1])
      );
    end
    // The partial sum of an M x M product above column M-1 fits in M bits.
    always_comb assert (cy[j][M] == 1'b0);
  end

  assign p = acc[M-1];
endmodule
