// Self-checking testbench for vedic_mul_signed (64-bit default).
// Reference: the magnitudes are multiplied with '*' on 128 bits, negated when
// the signs differ, and bits 126..63 are taken. Also checks simple fractions
// worked out by hand (0.5 * 0.5 = 0.25, -0.5 * 0.5 = -0.25, ...).
module tb_vedic_mul_signed;
  int checks = 0, failures = 0;
  logic [63:0] x, y, r;
  vedic_mul_signed dut (.x(x), .y(y), .r(r));

  localparam logic [63:0] HALF    = 64'h4000_0000_0000_0000;  // +0.5
  localparam logic [63:0] M_HALF  = 64'hC000_0000_0000_0000;  // -0.5 (sign-magnitude)
  localparam logic [63:0] QUARTER = 64'h2000_0000_0000_0000;  // +0.25
  localparam logic [63:0] M_QUART = 64'hE000_0000_0000_0000;  // -0.25 (two's complement)

  task automatic expect_r(input logic [63:0] xi, input logic [63:0] yi, input logic [63:0] exp);
    x = xi; y = yi;
    #1;
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %h * %h: got %h exp %h", xi, yi, r, exp);
    end
  endtask

  function automatic logic [63:0] model(input logic [63:0] xi, input logic [63:0] yi);
    logic [127:0] m;
    m = {65'b0, xi[62:0]} * {65'b0, yi[62:0]};
    if (xi[63] ^ yi[63]) m = -m;
    return m[126:63];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_r(HALF, HALF, QUARTER);
    expect_r(M_HALF, HALF, M_QUART);
    expect_r(M_HALF, M_HALF, QUARTER);
    expect_r(64'h0, M_HALF, 64'h0);
    expect_r(64'h8000_0000_0000_0000, HALF, 64'h0);  // -0 times 0.5
    for (int i = 0; i < 5000; i++) begin
      logic [63:0] xi, yi;
      xi = {$urandom, $urandom};
      yi = {$urandom, $urandom};
      expect_r(xi, yi, model(xi, yi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
