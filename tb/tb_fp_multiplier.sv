// Self-checking testbench for fp_multiplier (IEEE 754 double precision).
// The reference is the simulator's own double multiplication ($bitstoreal /
// $realtobits), which rounds to nearest even. Random operands are drawn with
// exponents that keep the product normal; directed cases cover exact
// products, a product of 2 or more (normalisation shift), a rounding carry,
// overflow to infinity, underflow to zero, zero, infinity and NaN operands.
// A single precision instance (EXP_W = 8, MAN_W = 23, the 32-bit layout) is
// checked against the exact double product of the two operands, rounded to
// 24 significant bits (nearest, ties to even) in the testbench.
module tb_fp_multiplier;
  int checks = 0, failures = 0;
  logic [63:0] a, b, y;
  logic        ovf, unf;
  fp_multiplier dut (.a(a), .b(b), .y(y), .overflow(ovf), .underflow(unf));

  logic [31:0] a32, b32, y32;
  logic        ovf32, unf32;
  fp_multiplier #(.EXP_W(8), .MAN_W(23)) dut_sp (
    .a(a32), .b(b32), .y(y32), .overflow(ovf32), .underflow(unf32)
  );

  function automatic logic [63:0] sp_to_dp(input logic [31:0] f);
    return {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
  endfunction

  // Round an exact double to single precision (normal results only).
  function automatic logic [31:0] dp_to_sp(input logic [63:0] d);
    logic [52:0] sig;
    logic [23:0] q;
    logic [28:0] rem;
    int e;
    sig = {1'b1, d[51:0]};
    q = sig[52:29];
    rem = sig[28:0];
    e = int'(d[62:52]) - 1023 + 127;
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && q[0])) begin
      if (q == 24'hFF_FFFF) begin
        q = 24'h80_0000;
        e++;
      end else q = q + 1;
    end
    return {d[63], 8'(e), q[22:0]};
  endfunction

  task automatic expect_y(input logic [63:0] ai, input logic [63:0] bi,
                          input logic [63:0] exp, input logic eo, input logic eu);
    a = ai; b = bi;
    #1;
    checks++;
    if (y !== exp || ovf !== eo || unf !== eu) begin
      failures++;
      $display("FAIL %h * %h: got %h o%b u%b exp %h o%b u%b", ai, bi, y, ovf, unf, exp, eo, eu);
    end
  endtask

  function automatic logic [63:0] ref_mul(input logic [63:0] ai, input logic [63:0] bi);
    return $realtobits($bitstoreal(ai) * $bitstoreal(bi));
  endfunction

  function automatic logic [63:0] rnd_normal(input int emin, input int emax);
    logic [63:0] v;
    int e;
    e = emin + int'($urandom % 32'(emax - emin + 1));
    v = {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
    return v;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exact products written out by hand.
    expect_y(64'h4000_0000_0000_0000, 64'h4008_0000_0000_0000, 64'h4018_0000_0000_0000, 0, 0); // 2*3=6
    expect_y(64'hBFF8_0000_0000_0000, 64'h3FF8_0000_0000_0000, 64'hC002_0000_0000_0000, 0, 0); // -1.5*1.5=-2.25
    expect_y(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 0, 0); // 1*1
    // Rounding carry: (1 + 2^-52) * (2 - 2^-52) = 2 + 2^-52 - 2^-103 -> 2 + 2^-51? check against reference.
    expect_y(64'h3FF0_0000_0000_0001, 64'h3FFF_FFFF_FFFF_FFFF,
             ref_mul(64'h3FF0_0000_0000_0001, 64'h3FFF_FFFF_FFFF_FFFF), 0, 0);
    // Overflow: 2^1000 * 2^100 -> +inf.
    expect_y(64'h7E70_0000_0000_0000, 64'h4630_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1, 0);
    // Underflow: 2^-1000 * -2^-100 -> -0.
    expect_y(64'h0170_0000_0000_0000, 64'hB9B0_0000_0000_0000, 64'h8000_0000_0000_0000, 0, 1);
    // Zero, infinity and NaN operands.
    expect_y(64'h0000_0000_0000_0000, 64'hC008_0000_0000_0000, 64'h8000_0000_0000_0000, 0, 0);
    expect_y(64'h7FF0_0000_0000_0000, 64'hC008_0000_0000_0000, 64'hFFF0_0000_0000_0000, 0, 0);
    expect_y(64'h7FF0_0000_0000_0000, 64'h0000_0000_0000_0000, 64'h7FF8_0000_0000_0000, 0, 0);
    expect_y(64'h7FF0_0000_0000_1234, 64'h3FF0_0000_0000_0000, 64'h7FF8_0000_0000_0000, 0, 0);
    // Random normal operands whose product stays well inside the normal range.
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] ai, bi;
      ai = rnd_normal(600, 1400);
      bi = rnd_normal(600, 1400);
      expect_y(ai, bi, ref_mul(ai, bi), 0, 0);
    end
    // Random operands near overflow: the reference says inf or not.
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] ai, bi, r;
      ai = rnd_normal(1530, 1560);
      bi = rnd_normal(1530, 1560);
      r = ref_mul(ai, bi);
      expect_y(ai, bi, r, r[62:52] == 11'h7FF, 0);
    end
    // Single precision instance.
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] r;
      a32 = {1'($urandom), 8'(70 + $urandom % 110), 23'($urandom)};
      b32 = {1'($urandom), 8'(70 + $urandom % 110), 23'($urandom)};
      if (i == 0) begin
        a32 = 32'h3FC0_0000;   // 1.5
        b32 = 32'h3FAA_AAAB;   // 1.3333334
      end
      #1;
      r = dp_to_sp(ref_mul(sp_to_dp(a32), sp_to_dp(b32)));
      checks++;
      if (y32 !== r || ovf32 || unf32) begin
        failures++;
        $display("FAIL sp %h * %h: got %h exp %h", a32, b32, y32, r);
      end
    end
    a32 = 32'h7E80_0000; b32 = 32'h4300_0000;  // 2^126 * 2^7 -> +inf
    #1;
    checks++;
    if (y32 !== 32'h7F80_0000 || !ovf32) begin
      failures++;
      $display("FAIL sp overflow: got %h", y32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
