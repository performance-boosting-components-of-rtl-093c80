// Self-checking testbench for dmc_encoder: a worked example
// (d = 0xABCD1234 gives sums 6, 4, 24, 22 and v = 0x1234 ^ 0xABCD = 0xB9F9)
// and random words against the reference equations.
module tb_dmc_encoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] d;
  dmc_codeword_t cw;
  dmc_encoder dut (.d(d), .cw(cw));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'hABCD1234;
    #1;
    checks++;
    if (cw.h !== {5'd22, 5'd24, 5'd4, 5'd6} || cw.v !== 16'hB9F9 || cw.u !== d) begin
      failures++;
      $display("FAIL example: h=%h v=%h", cw.h, cw.v);
    end
    d = 32'hFFFFFFFF;
    #1;
    checks++;
    if (cw.h !== {4{5'd30}} || cw.v !== 16'h0) begin
      failures++;
      $display("FAIL all ones: h=%h v=%h", cw.h, cw.v);
    end
    for (int i = 0; i < 10000; i++) begin
      d = $urandom;
      #1;
      checks++;
      if (cw !== encode(d)) begin
        failures++;
        $display("FAIL %h: got %h exp %h", d, cw, encode(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
