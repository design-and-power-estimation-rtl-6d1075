// booth_r4_multiplier: combinational N x N signed radix-4 Booth multiplier.
//
// The multiplier is built in three steps.
//   1. Recoding: operand a, with a 0 appended below its LSB, is cut into N/2 overlapping
//      3-bit windows {a(2k+1), a(2k), a(2k-1)}, k = 0..N/2-1. Each window is one radix-4
//      digit in {-2,-1,0,+1,+2}.
//   2. Partial-product generation: one booth_r4_encoder per digit forms digit*b,
//      sign-extended to 2N bits. Partial product k is shifted left by 2k bits.
//   3. Reduction by rows: a chain of N/2-1 row adders, each 2N bits wide, accumulates the
//      shifted partial products one after another. The result of the last adder is the
//      product.
// With the default N = 32 there are 16 partial products and 15 64-bit adders. The adders are
// ripple carry by default (ARCH = ADDER_RCA); ARCH = ADDER_CLA uses carry lookahead adders.
// Every sum is taken modulo 2^(2N), so mul is the exact two's complement product a*b.
// overflow is the carry out of the last row adder, as in the reference structure. It is not a
// signed-overflow flag: a 2N-bit product always holds an N x N signed product. The carry outs
// of the other row adders are not used.
// The structure, widths and adder choice follow the architecture. The elaboration check that N
// is even is this design's own. Purely combinational: no clock and no latency.
module booth_r4_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter adder_arch_e ARCH = ADDER_RCA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] mul,
  output logic           overflow
);

  localparam int unsigned NPP = N / 2;
  localparam int unsigned W   = 2 * N;

  initial begin
    assert (N % 2 == 0 && N >= 4)
      else $fatal(1, "booth_r4_multiplier: N (%0d) must be even and at least 4", N);
  end

  logic [N:0]   tt;               // a with the implicit 0 below its LSB
  logic [W-1:0] pp   [NPP];       // unshifted partial products
  logic [W-1:0] acc  [NPP];       // running sums; acc[0] is the first partial product
  logic [NPP-1:0] row_cout;       // carry out of each row adder (row_cout[0] unused)

  assign tt = {a, 1'b0};

  for (genvar k = 0; k < NPP; k++) begin : g_pp
    booth_r4_encoder #(.N(N)) u_enc (
      .x  (b),
      .arg(tt[2*k +: 3]),
      .pp (pp[k])
    );
  end

  assign acc[0]      = pp[0];
  assign row_cout[0] = 1'b0;

  for (genvar k = 1; k < NPP; k++) begin : g_row
    row_adder #(.N(W), .ARCH(ARCH)) u_row (
      .a   (acc[k-1]),
      .b   (pp[k] << (2 * k)),
      .cin (1'b0),
      .sum (acc[k]),
      .cout(row_cout[k])
    );
  end

  assign mul      = acc[NPP-1];
  assign overflow = row_cout[NPP-1];

endmodule
