// tb_cla_block: exhaustive self-check of the 8-bit lookahead sum block.
// Every pair of 8-bit operands and both carry-in values are applied as p = a^b, g = a&b;
// sum must be the low 8 bits of a + b + cin.
module tb_cla_block;
  int checks = 0, failures = 0;
  logic [7:0] a, b, p, g, sum;
  logic       cin;

  assign p = a ^ b;
  assign g = a & b;

  cla_block dut (.p(p), .g(g), .cin(cin), .sum(sum));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [7:0] e;
      {cin, a, b} = 17'(v);
      #1;
      e = a + b + 8'(cin);
      checks++;
      if (sum !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b sum=%h exp %h", a, b, cin, sum, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
