// tb_booth_r4_multiplier_full: the multiplier at its default configuration, 32 x 32 with
// ripple carry row adders and no parameter overrides. It multiplies a set of corner operand
// pairs and 1000 random pairs, and checks each 64-bit product against the signed product
// computed in the testbench. The design is combinational, so every result is sampled 1 time
// unit after the operands are applied.
module tb_booth_r4_multiplier_full;
  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] mul;
  logic        overflow;

  booth_r4_multiplier dut (.a(a), .b(b), .mul(mul), .overflow(overflow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    longint e;
    a = x; b = y;
    #1;
    e = longint'(signed'(x)) * longint'(signed'(y));
    checks++;
    if (mul !== 64'(e)) begin
      failures++;
      $display("FAIL a=%h b=%h mul=%h exp %h", x, y, mul, 64'(e));
    end
  endtask

  initial begin
    check(32'd3, -32'sd4);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h0, 32'h1234_5678);
    for (int i = 0; i < 1000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
