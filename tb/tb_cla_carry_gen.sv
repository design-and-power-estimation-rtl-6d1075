// tb_cla_carry_gen: exhaustive self-check of the 8-bit lookahead carry generator.
// Every combination of p, g (8 bits each) and cin is applied. The reference is the rippled
// recurrence c[i+1] = g[i] | p[i] & c[i], evaluated bit by bit in the testbench.
module tb_cla_carry_gen;
  int checks = 0, failures = 0;
  logic [7:0] p, g;
  logic       cin;
  logic [8:0] c;

  cla_carry_gen dut (.p(p), .g(g), .cin(cin), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] e;
      {cin, p, g} = 17'(v);
      #1;
      e[0] = cin;
      for (int i = 0; i < 8; i++) e[i+1] = g[i] | (p[i] & e[i]);
      checks++;
      if (c !== e) begin
        failures++;
        if (failures < 10) $display("FAIL p=%b g=%b cin=%b c=%b exp %b", p, g, cin, c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
