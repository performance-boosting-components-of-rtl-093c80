// Self-checking testbench for fp_normalizer (double precision).
// Significand products are formed with '*'; the reference divides the
// product by 2^k (k = 53 when it is 2 or more, else 52), rounds the quotient
// to nearest even by comparing the remainder with one half, and renormalises
// if the rounding reaches 2^53. Also checks the overflow and underflow
// thresholds of the exponent and a forced rounding carry.
module tb_fp_normalizer;
  int checks = 0, failures = 0;
  int n_shift = 0, n_carry = 0;
  logic [105:0] prod;
  logic signed [12:0] es;
  logic [10:0] eo;
  logic [51:0] fo;
  logic ovf, unf;
  fp_normalizer dut (.prod(prod), .e_sum(es), .exp_o(eo), .frac_o(fo),
                     .overflow(ovf), .underflow(unf));

  task automatic run(input logic [52:0] sa, input logic [52:0] sb, input int e);
    logic [105:0] p, rem, half, q;
    int k, ef;
    logic exp_ovf, exp_unf;
    logic [10:0] exp_e;
    logic [51:0] exp_f;
    p = {53'b0, sa} * {53'b0, sb};
    k = p[105] ? 53 : 52;
    if (p[105]) n_shift++;
    q = p >> k;
    rem = p & ((106'd1 << k) - 1);
    half = 106'd1 << (k - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    ef = e + k - 52;
    if (q[53]) begin
      q = q >> 1;
      ef++;
      n_carry++;
    end
    exp_ovf = ef >= 2047;
    exp_unf = ef <= 0;
    exp_e = exp_ovf ? 11'h7FF : exp_unf ? 11'h0 : 11'(ef);
    exp_f = (exp_ovf || exp_unf) ? 52'h0 : q[51:0];
    prod = p; es = 13'(e);
    #1;
    checks++;
    if (eo !== exp_e || fo !== exp_f || ovf !== exp_ovf || unf !== exp_unf) begin
      failures++;
      $display("FAIL %h e=%0d: got %h %h %b%b exp %h %h %b%b", p, e, eo, fo, ovf, unf,
               exp_e, exp_f, exp_ovf, exp_unf);
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
    // All-ones significands: product just under 4.
    run({53{1'b1}}, {53{1'b1}}, 100);
    // 1.5 * 1.0101..01b = 2 - 2^-53: a tie with an odd fraction, so the
    // rounding carries into the exponent.
    run(53'h18_0000_0000_0000, 53'h15_5555_5555_5555, 100);
    // (1 + 3*2^-52) * 1.5: exactly half an ulp above an even fraction, so
    // ties-to-even rounds down.
    run(53'h10_0000_0000_0003, 53'h18_0000_0000_0000, 100);
    // (1 + 2^-52) * 1.5: a tie above an odd fraction, which rounds up.
    run(53'h10_0000_0000_0001, 53'h18_0000_0000_0000, 100);
    // Exponent thresholds.
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000, 2046);  // stays normal
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000, 2047);  // overflow
    run(53'h18_0000_0000_0000, 53'h18_0000_0000_0000, 2046);  // 2.25: shift -> overflow
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000, 1);     // smallest normal
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000, 0);     // underflow
    run(53'h10_0000_0000_0000, 53'h10_0000_0000_0000, -1023); // underflow
    for (int i = 0; i < 20000; i++)
      run({1'b1, 20'($urandom), 32'($urandom)}, {1'b1, 20'($urandom), 32'($urandom)},
          int'($urandom % 2200) - 100);
    if (n_shift == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL coverage shift=%0d carry=%0d", n_shift, n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
