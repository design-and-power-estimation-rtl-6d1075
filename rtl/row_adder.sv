// row_adder: the carry-propagate adder used for one row of the partial-product reduction.
//
// Instantiates either rca_adder or cla_adder, chosen at elaboration time by the ARCH
// parameter (booth_pkg::adder_arch_e). Its behaviour is the same in both cases:
// sum = (a + b + cin) mod 2^N, cout = carry out. Only the delay, area and power differ.
// The default is the ripple carry adder. Combinational.
module row_adder
  import booth_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter adder_arch_e ARCH = ADDER_RCA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  if (ARCH == ADDER_CLA) begin : g_cla
    cla_adder #(.N(N), .BLK(CLA_BLOCK_W)) u_add (
      .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
    );
  end else begin : g_rca
    rca_adder #(.N(N)) u_add (
      .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
    );
  end

endmodule
