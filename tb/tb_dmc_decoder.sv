// Self-checking testbench for dmc_decoder. Codewords come from the reference
// encoder; the upsets are: none; one 4-bit symbol in error; two adjacent
// symbols of one row in error; horizontal check bits only; vertical check
// bits only. Expected: the original data, and the flags as stated per case.
// (Flips in both kinds of check bits at once can make both syndromes
// non-zero and are outside what the code corrects.)
module tb_dmc_decoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  int checks = 0, failures = 0;
  dmc_codeword_t cw;
  logic [31:0] d_o;
  logic det, cor;
  dmc_decoder dut (.cw(cw), .d_o(d_o), .err_detected(det), .err_corrected(cor));

  task automatic run(input logic [31:0] d, input logic [67:0] up,
                     input logic exp_det, input logic exp_cor);
    cw = encode(d) ^ up;
    #1;
    checks++;
    if (d_o !== d || det !== exp_det || cor !== exp_cor) begin
      failures++;
      $display("FAIL d=%h upset=%h: got %h det%b cor%b", d, up, d_o, det, cor);
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
    // The document's correction example: bit 0 in error.
    run(32'hABCD1234, 68'h1, 1'b1, 1'b1);
    // Whole symbol 7 (bits 31..28) flipped.
    run(32'hABCD1234, 68'hF000_0000, 1'b1, 1'b1);
    for (int i = 0; i < 3000; i++) run($urandom, 68'h0, 1'b0, 1'b0);
    for (int i = 0; i < 3000; i++) run($urandom, burst(1'b0), 1'b1, 1'b1);
    for (int i = 0; i < 3000; i++) run($urandom, burst(1'b1), 1'b1, 1'b1);
    for (int i = 0; i < 1000; i++) begin
      logic [19:0] ch;
      logic [15:0] cv;
      do ch = 20'($urandom); while (ch == '0);
      do cv = 16'($urandom); while (cv == '0);
      run($urandom, {ch, 16'h0, 32'h0}, 1'b1, 1'b0);
      run($urandom, {20'h0, cv, 32'h0}, 1'b1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
