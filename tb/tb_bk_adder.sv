// Self-checking testbench for bk_adder.
// Checks the 32-bit default against the worked example (A = 0xABCD1234,
// B = 0x1234ABCD, cin = 0 gives sum 0xBE01BE01, cout 0), against corner
// values and random operands, and checks a 4-bit and an 11-bit instance
// exhaustively / randomly. The reference is the integer '+' operator.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic        ci, co;
  bk_adder #(.W(32)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  bk_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));

  logic [10:0] a11, b11, s11;
  logic        ci11, co11;
  bk_adder #(.W(11)) dut11 (.a(a11), .b(b11), .cin(ci11), .sum(s11), .cout(co11));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(c);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL W=32 %h + %h + %0d: got %0d_%h exp %h", x, y, c, co, s, exp);
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
    // Worked example: expected values written out independently.
    a = 32'hABCD1234; b = 32'h1234ABCD; ci = 1'b0;
    #1;
    checks++;
    if (s !== 32'b10111110000000011011111000000001 || co !== 1'b0) begin
      failures++;
      $display("FAIL example: got %b %b", co, s);
    end
    check32(32'hFFFFFFFF, 32'h00000000, 1'b1);
    check32(32'hFFFFFFFF, 32'hFFFFFFFF, 1'b1);
    check32(32'h80000000, 32'h80000000, 1'b0);
    check32(32'h7FFFFFFF, 32'h00000001, 1'b0);
    check32(32'h0, 32'h0, 1'b0);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom, 1'($urandom));
    // Long carry chains: x + ~x + cin.
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x;
      x = $urandom;
      check32(x, ~x, 1'($urandom));
    end

    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); ci4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} !== 5'(x + y + c)) begin
            failures++;
            $display("FAIL W=4 %0d+%0d+%0d got %0d", x, y, c, {co4, s4});
          end
        end

    for (int i = 0; i < 5000; i++) begin
      a11 = 11'($urandom); b11 = 11'($urandom); ci11 = 1'($urandom);
      #1;
      checks++;
      if ({co11, s11} !== ({1'b0, a11} + {1'b0, b11} + 12'(ci11))) begin
        failures++;
        $display("FAIL W=11 %h+%h+%0d", a11, b11, ci11);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
