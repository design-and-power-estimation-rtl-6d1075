// tb_booth_r4_encoder: self-check of the radix-4 Booth partial-product generator.
// For every 3-bit window and a set of multiplicands (0, +-1, the most positive and most
// negative values, random values), pp must equal d * x as a 2N-bit signed number. The digit d
// is worked out here from the window bits as -2*y(i+1) + y(i) + y(i-1). The N = 32 default is
// tested, and also N = 4 exhaustively.
module tb_booth_r4_encoder;
  int checks = 0, failures = 0;

  logic [31:0] x32;  logic [2:0] arg;  logic [63:0] pp32;
  logic [3:0]  x4;                     logic [7:0]  pp4;

  booth_r4_encoder          dut32 (.x(x32), .arg(arg), .pp(pp32));
  booth_r4_encoder #(.N(4)) dut4  (.x(x4),  .arg(arg), .pp(pp4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_of(input logic [2:0] w);
    return -2 * int'(w[2]) + int'(w[1]) + int'(w[0]);
  endfunction

  task automatic check32(input logic [31:0] x);
    for (int w = 0; w < 8; w++) begin
      longint e;
      x32 = x; arg = 3'(w);
      #1;
      e = longint'(digit_of(arg)) * longint'(signed'(x));
      checks++;
      if (pp32 !== 64'(e)) begin
        failures++;
        $display("FAIL32 x=%h arg=%b pp=%h exp %h", x, arg, pp32, 64'(e));
      end
    end
  endtask

  initial begin
    check32(32'h0000_0000);
    check32(32'h0000_0001);
    check32(32'hFFFF_FFFF);
    check32(32'h7FFF_FFFF);
    check32(32'h8000_0000);
    check32(32'h4000_0000);
    check32(32'hC000_0000);
    for (int i = 0; i < 500; i++) check32($urandom);
    for (int v = 0; v < 16; v++)
      for (int w = 0; w < 8; w++) begin
        int e;
        x4 = 4'(v); arg = 3'(w);
        #1;
        e = digit_of(arg) * int'(signed'(x4));
        checks++;
        if (pp4 !== 8'(e)) begin
          failures++;
          $display("FAIL4 x=%h arg=%b pp=%h exp %h", x4, arg, pp4, 8'(e));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
