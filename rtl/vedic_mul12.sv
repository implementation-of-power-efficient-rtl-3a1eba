// vedic_mul12: N x N unsigned Vedic multiplier, the exact main block of the ANT
// multiplier (N = 12 by default).
//
// The operands are split into halves of H = N/2 bits, aL/aH and bL/bH, and four
// H x H Urdhva Tiryagbhyam multipliers form
//   q0 = aL*bL,  q1 = aH*bL,  q2 = aL*bH,  q3 = aH*bH   (each N bits).
// The low H bits of q0 are final product bits p[H-1:0]. Three N-bit
// carry-lookahead adders then combine the rest:
//   s1 = q1 + q2                       (carry c1)
//   s2 = s1 + {H zeros, q0[N-1:H]}     (carry c2)  -> p[N-1:H] = s2[H-1:0]
//   s3 = q3 + {zeros, c1 + c2, s2[N-1:H]}          -> p[2N-1:N] = s3
// c1 + c2 is a two-bit carry merge. s3 cannot overflow because the full product
// fits in 2N bits.
//
// Combinational; p settles in the same cycle as a and b. The four half-width
// Vedic multipliers, the zero-extended q0 high half and the use of CLAs follow
// the design description; using three N-bit adders plus a carry merge (the
// description counts its adders differently) is this design's choice.
module vedic_mul12 #(
  parameter int unsigned N = ant_pkg::N_DEFAULT
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  initial begin
    assert (N % 2 == 0 && N >= 4) else $error("vedic_mul12: N must be even and at least 4");
  end

  logic [N-1:0] q0, q1, q2, q3;
  logic [N-1:0] s1, s2, s3;
  logic         c1, c2, c3;
  logic [1:0]   cc;

  vedic_ut_mul #(.W(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vedic_ut_mul #(.W(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
  vedic_ut_mul #(.W(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
  vedic_ut_mul #(.W(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

  cla_adder #(.W(N)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1));
  cla_adder #(.W(N)) u_add2 (.a(s1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0),
                             .sum(s2), .cout(c2));

  assign cc = {1'b0, c1} + {1'b0, c2};

  cla_adder #(.W(N)) u_add3 (.a(q3), .b({{(H-2){1'b0}}, cc, s2[N-1:H]}), .cin(1'b0),
                             .sum(s3), .cout(c3));

  assign p = {s3, s2[H-1:0], q0[H-1:0]};

  // c3 is always 0: the product of two N-bit numbers fits in 2N bits.
  always_comb assert (c3 == 1'b0);
endmodule
