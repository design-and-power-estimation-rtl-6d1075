// cla_adder: N-bit two-level carry lookahead adder.
//
// Level 0: bit propagate P(i) = A(i) xor B(i) and generate G(i) = A(i) and B(i).
// Level 1: the N bits are split into N/BLK blocks of BLK bits (default 8). cla_group_pg forms
//          each block's group propagate and generate, and cla_block forms its sum bits from
//          its block carry in.
// Level 2: a cla_carry_gen of width N/BLK turns the group P/G and cin into the carry into
//          every block and the carry out of the adder.
// For the default 64 bits this is eight 8-bit blocks and an 8-bit second-level generator.
// The 8-bit block, group P/G and carry generator units follow the architecture; how they are
// wired into two levels is this design's reading. Combinational:
// sum = (a + b + cin) mod 2^N, cout = carry out.
module cla_adder #(
  parameter int unsigned N   = 64,
  parameter int unsigned BLK = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = N / BLK;

  initial begin
    assert (N % BLK == 0 && N >= BLK)
      else $fatal(1, "cla_adder: N (%0d) must be a positive multiple of BLK (%0d)", N, BLK);
  end

  logic [N-1:0]  p, g;
  logic [NG-1:0] gp, gg;
  logic [NG:0]   gc;

  assign p = a ^ b;
  assign g = a & b;

  for (genvar k = 0; k < NG; k++) begin : g_blk
    cla_group_pg #(.W(BLK)) u_pg (
      .p (p[k*BLK +: BLK]),
      .g (g[k*BLK +: BLK]),
      .gp(gp[k]),
      .gg(gg[k])
    );

    cla_block #(.W(BLK)) u_blk (
      .p  (p[k*BLK +: BLK]),
      .g  (g[k*BLK +: BLK]),
      .cin(gc[k]),
      .sum(sum[k*BLK +: BLK])
    );
  end

  cla_carry_gen #(.W(NG)) u_group_carry (
    .p  (gp),
    .g  (gg),
    .cin(cin),
    .c  (gc)
  );

  assign cout = gc[NG];

endmodule
