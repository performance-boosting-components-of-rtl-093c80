// Self-checking testbench for fp_exponent_unit: every pair of 11-bit
// exponents on a grid plus random pairs, against ea + eb - 1023 computed with
// integers; an 8-bit (single precision, bias 127) instance exhaustively.
module tb_fp_exponent_unit;
  int checks = 0, failures = 0;
  logic [10:0] ea, eb;
  logic signed [12:0] es;
  fp_exponent_unit dut (.ea(ea), .eb(eb), .e_sum(es));

  logic [7:0] ea8, eb8;
  logic signed [9:0] es8;
  fp_exponent_unit #(.EXP_W(8)) dut8 (.ea(ea8), .eb(eb8), .e_sum(es8));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i += 7)
      for (int j = 0; j < 2048; j += 13) begin
        ea = 11'(i); eb = 11'(j);
        #1;
        checks++;
        if (int'(es) != i + j - 1023) begin
          failures++;
          $display("FAIL %0d + %0d: got %0d", i, j, es);
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ea8 = 8'(i); eb8 = 8'(j);
        #1;
        checks++;
        if (int'(es8) != i + j - 127) begin
          failures++;
          $display("FAIL8 %0d + %0d: got %0d", i, j, es8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
