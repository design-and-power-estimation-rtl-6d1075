// full_adder: one-bit full adder, the cell that is chained into the ripple carry adder.
//
// sum  = a xor b xor cin
// cout = a.b + a.cin + b.cin (majority of the three inputs)
// Purely combinational. The gate-level form is this design's choice; only the function of
// the cell is fixed by the architecture.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);

endmodule
