// tb_rca_adder: self-check of the ripple carry adder at 64 bits (default), 16 and 8 bits,
// the three sizes evaluated for the adders. Corner vectors (all-ones carry chains, zero,
// alternating bits) and random vectors are applied; {cout, sum} must equal a + b + cin
// computed in N+1-bit integer arithmetic.
module tb_rca_adder;
  int checks = 0, failures = 0;

  logic [63:0] a64, b64, s64;  logic c64, co64;
  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [7:0]  a8,  b8,  s8;   logic c8,  co8;

  rca_adder                 dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));
  rca_adder #(.N(16))       dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  rca_adder #(.N(8))        dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] e64; logic [16:0] e16; logic [8:0] e8;
    a64 = x; b64 = y; c64 = ci;
    a16 = x[15:0]; b16 = y[15:0]; c16 = ci;
    a8  = x[7:0];  b8  = y[7:0];  c8  = ci;
    #1;
    e64 = 65'(x) + 65'(y) + 65'(ci);
    e16 = 17'(x[15:0]) + 17'(y[15:0]) + 17'(ci);
    e8  = 9'(x[7:0]) + 9'(y[7:0]) + 9'(ci);
    checks += 3;
    if ({co64, s64} !== e64) begin
      failures++; $display("FAIL64 %h + %h + %0b = %0b_%h exp %h", x, y, ci, co64, s64, e64);
    end
    if ({co16, s16} !== e16) begin
      failures++; $display("FAIL16 %h + %h + %0b = %0b_%h exp %h", x[15:0], y[15:0], ci, co16, s16, e16);
    end
    if ({co8, s8} !== e8) begin
      failures++; $display("FAIL8 %h + %h + %0b = %0b_%h exp %h", x[7:0], y[7:0], ci, co8, s8, e8);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, 64'd1, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
