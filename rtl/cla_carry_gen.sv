// cla_carry_gen: W-bit lookahead carry generator.
//
// From the propagate/generate pairs (p[i], g[i]) and a carry in, every carry is computed
// directly in two-level sum-of-products form, with no ripple:
//   c[i+1] = g[i] + p[i]g[i-1] + p[i]p[i-1]g[i-2] + ... + p[i]..p[0]cin
// This is the expansion C1..C4 of the lookahead equations, carried on to W terms. The same
// module serves inside each 8-bit block (bit p/g) and at the second level of the adder (group
// P/G). Output c[0] is cin; c[W] is the carry out of the block. Combinational.
module cla_carry_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W:0]   c
);

  always_comb begin
    logic term;
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      // carry in, propagated through bits 0..i
      term = cin;
      for (int k = 0; k <= i; k++) term &= p[k];
      c[i+1] = term;
      // each generate g[j], propagated through bits j+1..i
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term &= p[k];
        c[i+1] |= term;
      end
    end
  end

endmodule
