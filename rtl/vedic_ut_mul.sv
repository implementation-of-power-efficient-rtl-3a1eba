// vedic_ut_mul: W x W unsigned Urdhva Tiryagbhyam (vertical-crosswise) multiplier.
//
// The product is formed column by column, from the least significant column
// k = 0 up to k = 2W-2. Column k collects the crosswise bit products a[i]&b[j]
// with i + j = k (the "vertical" product for k = 0 and the growing then
// shrinking crosswise sets after it) and adds the carry left by column k-1. The
// lowest bit of that sum is product bit k; the rest of it is the carry handed
// to column k+1. The carry into column 0 is zero, and the carry left after the
// last column gives the top product bit. The carry is several bits wide because
// a column can hold up to W bit products.
//
// Combinational; p settles in the same cycle as a and b. This is the multiplier
// the design uses for each of the four 6 x 6 sub-products of the 12-bit main
// block; the column-and-carry scheme follows the design description, the width
// of the column adder is left to synthesis.
module vedic_ut_mul #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  // Wide enough for W bit products plus the incoming carry.
  localparam int unsigned CW = $clog2(2 * W + 2) + 1;

  always_comb begin
    logic [CW-1:0] colsum;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int unsigned k = 0; k < 2 * W - 1; k++) begin
      colsum = carry;
      for (int unsigned i = 0; i < W; i++) begin
        if (k >= i && k - i < W) colsum = colsum + CW'(a[i] & b[k-i]);
      end
      p[k]  = colsum[0];
      carry = colsum >> 1;
    end
    p[2*W-1] = carry[0];
  end
endmodule
