// cla_group_pg: group propagate and generate of a W-bit lookahead block.
//
//   gp = p[W-1] & ... & p[0]                                (carry in passes the whole block)
//   gg = g[W-1] + p[W-1]g[W-2] + ... + p[W-1]..p[1]g[0]     (block produces a carry by itself)
// These signals feed the second-level carry generator of cla_adder. Only the name and ports of
// this unit are fixed by the architecture; the equations are the standard block P/G.
// Combinational.
module cla_group_pg #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  output logic         gp,
  output logic         gg
);

  always_comb begin
    logic term;
    gp = &p;
    gg = 1'b0;
    for (int j = 0; j < W; j++) begin
      term = g[j];
      for (int k = j + 1; k < W; k++) term &= p[k];
      gg |= term;
    end
  end

endmodule
