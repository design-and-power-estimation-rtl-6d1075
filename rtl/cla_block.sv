// cla_block: W-bit carry lookahead sum block.
//
// Takes the bit propagate p = a xor b and generate g = a and b of W bit positions and the
// block's carry in. cla_carry_gen computes all carries in parallel, and each sum bit is
// S(i) = P(i) xor C(i). The block has no carry out of its own: in cla_adder the carry into
// the next block comes from the second-level generator, so the generator's top carry c[W]
// is left unused here. Combinational.
module cla_block #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W-1:0] sum
);

  logic [W:0] c;

  cla_carry_gen #(.W(W)) u_carry (
    .p  (p),
    .g  (g),
    .cin(cin),
    .c  (c)
  );

  assign sum = p ^ c[W-1:0];

endmodule
