// tb_cla_group_pg: exhaustive self-check of the 8-bit group propagate/generate unit.
// For every p, g: gp must be 1 exactly when all p bits are 1, and gg must equal the carry out
// of a rippled chain started with carry in 0.
module tb_cla_group_pg;
  int checks = 0, failures = 0;
  logic [7:0] p, g;
  logic       gp, gg;

  cla_group_pg dut (.p(p), .g(g), .gp(gp), .gg(gg));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      logic c, egp;
      {p, g} = 16'(v);
      #1;
      c = 1'b0;
      for (int i = 0; i < 8; i++) c = g[i] | (p[i] & c);
      egp = (p == 8'hFF);
      checks++;
      if (gp !== egp || gg !== c) begin
        failures++;
        if (failures < 10) $display("FAIL p=%b g=%b gp=%b gg=%b exp %b %b", p, g, gp, gg, egp, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
