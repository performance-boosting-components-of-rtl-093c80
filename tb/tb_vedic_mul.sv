// Self-checking testbench for vedic_mul.
// The 64 x 64 default is checked against the '*' operator on 128-bit values
// for corner operands and random ones (including operands with many set
// bits); a 4 x 4 instance is checked exhaustively.
module tb_vedic_mul;
  int checks = 0, failures = 0;

  logic [63:0]  a, b;
  logic [127:0] p;
  vedic_mul dut (.a(a), .b(b), .p(p));

  logic [3:0] a4, b4;
  logic [7:0] p4;
  vedic_mul #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] exp;
    a = x; b = y;
    #1;
    exp = {64'b0, x} * {64'b0, y};
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h: got %h exp %h", x, y, p, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'd0, 64'hFFFF_FFFF_FFFF_FFFF);
    check(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);
    check(64'd1, 64'h8000_0000_0000_0000);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'd3, 64'd5);
    for (int i = 0; i < 5000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 1000; i++)
      check({$urandom, $urandom} | {$urandom, $urandom}, {$urandom, $urandom} | {$urandom, $urandom});
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d got %0d", x, y, p4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
