// cla_adder: W-bit two-level carry-lookahead adder.
//
// Every bit position forms a generate g = a & b and a propagate p = a ^ b.
// Bits are grouped G at a time. Inside a group each carry is written in
// lookahead form, c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[k]&c[k], so no
// carry ripples through a group. Each group also forms a group generate and a
// group propagate, and a second lookahead level computes the carry into every
// group from those and cin in the same flattened form. The sum is p ^ c.
// Purely combinational: sum and cout settle in the same cycle as a, b, cin.
//
// The per-position propagate/generate idea and the grouping follow the design
// description of the multiplier's adders; the group size of 4 is this design's
// choice. W need not be a multiple of G: the last group is shorter.
module cla_adder #(
  parameter int unsigned W = 12,
  parameter int unsigned G = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + G - 1) / G;

  logic [W-1:0]  g, p;
  logic [W:0]    c;
  logic [NG-1:0] gg, gp;   // group generate / propagate
  logic [NG:0]   gc;       // carry into each group

  assign g = a & b;
  assign p = a ^ b;

  // Group generate and propagate.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      logic gen, prop;
      gen  = 1'b0;
      prop = 1'b1;
      for (int unsigned i = k * G; i < (k + 1) * G && i < W; i++) begin
        gen  = g[i] | (p[i] & gen);
        prop = prop & p[i];
      end
      gg[k] = gen;
      gp[k] = prop;
    end
  end

  // Second level: carry into group k, flattened sum of products.
  always_comb begin
    gc[0] = cin;
    for (int unsigned k = 0; k < NG; k++) begin
      logic term, acc;
      acc  = 1'b0;
      // gg[j] propagated through groups j+1..k
      for (int unsigned j = 0; j <= k; j++) begin
        term = gg[j];
        for (int unsigned m = j + 1; m <= k; m++) term = term & gp[m];
        acc = acc | term;
      end
      term = cin;
      for (int unsigned m = 0; m <= k; m++) term = term & gp[m];
      gc[k+1] = acc | term;
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      c[k*G] = gc[k];
      for (int unsigned i = k * G; i < (k + 1) * G && i < W; i++) begin
        logic term, acc;
        acc = 1'b0;
        for (int unsigned j = k * G; j <= i; j++) begin
          term = g[j];
          for (int unsigned m = j + 1; m <= i; m++) term = term & p[m];
          acc = acc | term;
        end
        term = gc[k];
        for (int unsigned m = k * G; m <= i; m++) term = term & p[m];
        c[i+1] = acc | term;
      end
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
