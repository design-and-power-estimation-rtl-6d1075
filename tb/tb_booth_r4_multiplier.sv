// tb_booth_r4_multiplier: end-to-end self-check of the radix-4 Booth multiplier.
//
// Four instances are checked against products and carries worked out in the testbench:
//   - 32 x 32 with ripple carry row adders (all defaults),
//   - 32 x 32 with carry lookahead row adders (ARCH = ADDER_CLA),
//   - 8 x 8 with each adder type, exhaustively over all 65536 operand pairs.
// The product must equal signed(a) * signed(b) in 2N bits. The overflow output must equal
// the carry out of the last row addition. The testbench derives that carry independently: it
// forms the partial products as digit * b, shifts them, and accumulates them in wider integer
// arithmetic. The design's mechanisms are counted: each of the five Booth digits
// (0, +1, +2, -1, -2) must be selected, the last-row carry must be seen both set and clear,
// and both adder architectures must be exercised. A mechanism that never occurs counts as a
// failure. The design is combinational, so each result is sampled 1 time unit after the
// operands change (zero cycles of latency).
module tb_booth_r4_multiplier
  import booth_pkg::*;
;
  int checks = 0, failures = 0;
  int digit_seen [5];
  int ovf_set = 0, ovf_clear = 0, rca_ops = 0, cla_ops = 0;

  logic [31:0] a32, b32;
  logic [63:0] mul_rca, mul_cla;
  logic        ovf_rca, ovf_cla;
  logic [7:0]  a8, b8;
  logic [15:0] mul8_rca, mul8_cla;
  logic        ovf8_rca, ovf8_cla;

  booth_r4_multiplier                                dut_rca  (.a(a32), .b(b32), .mul(mul_rca),  .overflow(ovf_rca));
  booth_r4_multiplier #(.ARCH(ADDER_CLA))            dut_cla  (.a(a32), .b(b32), .mul(mul_cla),  .overflow(ovf_cla));
  booth_r4_multiplier #(.N(8))                       dut8_rca (.a(a8),  .b(b8),  .mul(mul8_rca), .overflow(ovf8_rca));
  booth_r4_multiplier #(.N(8), .ARCH(ADDER_CLA))     dut8_cla (.a(a8),  .b(b8),  .mul(mul8_cla), .overflow(ovf8_cla));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model for n-bit operands (n <= 32): returns the product and the carry out of
  // the last row addition, and records which Booth digits the recoding of a selects.
  task automatic reference(input int n, input logic [31:0] a, input logic [31:0] b,
                           output logic [63:0] prod, output logic carry);
    logic [64:0] acc;
    longint      sb, pp;
    logic [63:0] mask, shifted;
    int          d;
    mask = (n == 32) ? '1 : ((64'd1 << (2 * n)) - 1);
    sb   = longint'(signed'(b << (32 - n))) >>> (32 - n);
    acc  = '0;
    carry = 1'b0;
    for (int k = 0; k < n / 2; k++) begin
      logic y0, y1, ym;
      y1 = a[2*k+1];
      y0 = a[2*k];
      ym = (k == 0) ? 1'b0 : a[2*k-1];
      d  = -2 * int'(y1) + int'(y0) + int'(ym);
      digit_seen[d + 2]++;
      pp = longint'(d) * sb;
      if (k == 0) acc = 65'(64'(pp) & mask);
      else begin
        shifted = 64'(pp) << (2 * k);
        acc = 65'(acc[63:0] & mask) + 65'(shifted & mask);
        carry = (n == 32) ? acc[64] : acc[2*n];
      end
    end
    prod = acc[63:0] & mask;
  endtask

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] ep, ep2; logic ec;
    longint      direct;
    a32 = a; b32 = b;
    #1;
    reference(32, a, b, ep, ec);
    direct = longint'(signed'(a)) * longint'(signed'(b));
    checks++;
    if (ep !== 64'(direct)) begin
      failures++; $display("reference model mismatch a=%h b=%h", a, b);
    end
    ep2 = 64'(direct);
    checks += 2;
    rca_ops++; cla_ops++;
    if (mul_rca !== ep2 || ovf_rca !== ec) begin
      failures++;
      $display("FAIL RCA a=%h b=%h mul=%h ovf=%b exp %h %b", a, b, mul_rca, ovf_rca, ep2, ec);
    end
    if (mul_cla !== ep2 || ovf_cla !== ec) begin
      failures++;
      $display("FAIL CLA a=%h b=%h mul=%h ovf=%b exp %h %b", a, b, mul_cla, ovf_cla, ep2, ec);
    end
    if (ec) ovf_set++; else ovf_clear++;
  endtask

  localparam logic [31:0] CORNER [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                                32'h8000_0000, 32'h5555_5555, 32'hAAAA_AAAA, 32'h0000_FFFF};

  initial begin
    foreach (CORNER[i])
      foreach (CORNER[j]) check32(CORNER[i], CORNER[j]);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom);

    // Exhaustive 8 x 8, both adder types.
    for (int v = 0; v < 65536; v++) begin
      logic [63:0] ep; logic ec; int direct;
      a8 = 8'(v >> 8); b8 = 8'(v);
      #1;
      reference(8, 32'(a8), 32'(b8), ep, ec);
      direct = int'(signed'(a8)) * int'(signed'(b8));
      checks += 2;
      rca_ops++; cla_ops++;
      if (mul8_rca !== 16'(direct) || ovf8_rca !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL8 RCA a=%h b=%h mul=%h ovf=%b exp %h %b", a8, b8, mul8_rca, ovf8_rca, 16'(direct), ec);
      end
      if (mul8_cla !== 16'(direct) || ovf8_cla !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL8 CLA a=%h b=%h mul=%h ovf=%b exp %h %b", a8, b8, mul8_cla, ovf8_cla, 16'(direct), ec);
      end
      if (ep[15:0] !== 16'(direct)) begin
        failures++; $display("reference model mismatch 8 bit a=%h b=%h", a8, b8);
      end
      if (ec) ovf_set++; else ovf_clear++;
    end

    $display("mechanisms: digit -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, last-row carry set:%0d clear:%0d, RCA ops:%0d CLA ops:%0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             ovf_set, ovf_clear, rca_ops, cla_ops);
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin failures++; $display("FAIL digit %0d never selected", d - 2); end
    end
    checks += 4;
    if (ovf_set == 0)   begin failures++; $display("FAIL last-row carry never set"); end
    if (ovf_clear == 0) begin failures++; $display("FAIL last-row carry never clear"); end
    if (rca_ops == 0)   begin failures++; $display("FAIL RCA never exercised"); end
    if (cla_ops == 0)   begin failures++; $display("FAIL CLA never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
