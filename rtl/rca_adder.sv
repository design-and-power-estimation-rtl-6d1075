// rca_adder: N-bit ripple carry adder.
//
// N full_adder cells are cascaded so that the carry out of bit i is the carry in of bit i+1.
// The worst-case delay grows linearly with N (about 2N gate delays). Area and power also grow
// linearly, which makes this the small, low-power adder of the design. Combinational:
// sum = (a + b + cin) mod 2^N, cout = carry out of bit N-1. The default width of 64 is the
// width of the row adders in the multiplier. The cin port is this design's addition, so that
// the RCA has the same interface as cla_adder; the multiplier ties it to 0.
module rca_adder #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
