// End-to-end testbench for vedic_dsp_top at its default parameters.
//
// One complete operation runs through all four components:
//   1. a fixed-point multiply-accumulate: Q0.63 products from the signed
//      Vedic multiplier, the top 32 bits of each summed by the Brent-Kung
//      adder into a 32-bit accumulator (two's complement, wrapping);
//   2. double precision products from the floating point multiplier;
//   3. every result word (accumulator values, both halves of each double
//      product) written to the DMC store, some with injected upsets, read
//      back and compared with the value written.
// References are computed in the testbench with '*', '+' and real
// arithmetic. Each mechanism is counted and must happen at least once:
// Brent-Kung carry out, negative Vedic product (two's complement stage),
// FP normalisation shift, FP overflow, FP underflow, DMC encode (write), DMC
// decode (read), DMC data correction and DMC check-bit-only detection.
module tb_vedic_dsp_top;
  import dmc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] bk_a, bk_b, bk_sum;
  logic bk_cin, bk_cout;
  logic [63:0] vm_x, vm_y, vm_r;
  logic [63:0] fp_a, fp_b, fp_y;
  logic fp_ovf, fp_unf;
  logic dmc_en;
  logic [3:0] dmc_addr;
  logic [31:0] dmc_din, dmc_dout;
  logic [67:0] dmc_upset;
  logic dmc_valid, dmc_det, dmc_cor;

  vedic_dsp_top dut (
    .clk(clk), .rst_n(rst_n),
    .bk_a(bk_a), .bk_b(bk_b), .bk_cin(bk_cin), .bk_sum(bk_sum), .bk_cout(bk_cout),
    .vm_x(vm_x), .vm_y(vm_y), .vm_r(vm_r),
    .fp_a(fp_a), .fp_b(fp_b), .fp_y(fp_y), .fp_overflow(fp_ovf), .fp_underflow(fp_unf),
    .dmc_en(dmc_en), .dmc_addr(dmc_addr), .dmc_din(dmc_din), .dmc_upset(dmc_upset),
    .dmc_dout(dmc_dout), .dmc_valid(dmc_valid), .dmc_err_detected(dmc_det),
    .dmc_err_corrected(dmc_cor)
  );

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_carry = 0, n_neg = 0, n_shift = 0, n_ovf = 0, n_unf = 0;
  int n_write = 0, n_read = 0, n_corr = 0, n_chk = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Store a word with the given upset class (0 none, 1 data burst, 2 check
  // bits only) and read it back through the decoder.
  task automatic store_and_load(input logic [31:0] w, input int k);
    @(negedge clk);
    dmc_en = 1'b1; dmc_addr = 4'($urandom); dmc_din = w;
    case (k)
      1:       dmc_upset = burst(1'($urandom));
      2:       dmc_upset = {20'h0, 16'($urandom | 1), 32'h0};
      default: dmc_upset = '0;
    endcase
    n_write++;
    @(negedge clk);
    dmc_en = 1'b0; dmc_upset = '0;
    @(negedge clk);
    n_read++;
    check(dmc_valid && dmc_dout == w && dmc_det == (k != 0) && dmc_cor == (k == 1),
          $sformatf("dmc word %h class %0d: got %h det%b cor%b", w, k, dmc_dout, dmc_det, dmc_cor));
    if (dmc_cor) n_corr++;
    if (dmc_det && !dmc_cor) n_chk++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] acc, acc_ref;
    bk_a = '0; bk_b = '0; bk_cin = 1'b0; vm_x = '0; vm_y = '0;
    fp_a = '0; fp_b = '0; dmc_en = 1'b0; dmc_addr = '0; dmc_din = '0; dmc_upset = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. Fixed-point multiply-accumulate.
    acc = '0; acc_ref = '0;
    for (int i = 0; i < 64; i++) begin
      logic [127:0] m;
      logic [63:0] r_ref;
      vm_x = {$urandom, $urandom};
      vm_y = {$urandom, $urandom};
      #1;
      m = {65'b0, vm_x[62:0]} * {65'b0, vm_y[62:0]};
      if (vm_x[63] ^ vm_y[63]) begin
        m = -m;
        if (m != 0) n_neg++;
      end
      r_ref = m[126:63];
      check(vm_r == r_ref, $sformatf("vedic %h*%h got %h exp %h", vm_x, vm_y, vm_r, r_ref));
      bk_a = acc; bk_b = vm_r[63:32]; bk_cin = 1'b0;
      #1;
      acc_ref = acc_ref + r_ref[63:32];
      check(bk_sum == acc_ref, $sformatf("acc got %h exp %h", bk_sum, acc_ref));
      if (bk_cout) n_carry++;
      acc = bk_sum;
      if (i % 8 == 7) store_and_load(acc, i % 3);
    end

    // 2. Floating point products, each stored as two words.
    for (int i = 0; i < 96; i++) begin
      logic [63:0] y_ref;
      logic ovf_ref, unf_ref;
      int ea, eb;
      case (i % 8)
        6:       begin ea = 1600; eb = 1600; end   // overflow
        7:       begin ea = 300;  eb = 400;  end   // underflow
        default: begin ea = 700 + int'($urandom % 600); eb = 700 + int'($urandom % 600); end
      endcase
      fp_a = {1'($urandom), 11'(ea), 20'($urandom), 32'($urandom)};
      fp_b = {1'($urandom), 11'(eb), 20'($urandom), 32'($urandom)};
      #1;
      if ($bitstoreal({12'h3FF, fp_a[51:0]}) * $bitstoreal({12'h3FF, fp_b[51:0]}) >= 2.0) n_shift++;
      y_ref = $realtobits($bitstoreal(fp_a) * $bitstoreal(fp_b));
      ovf_ref = (ea + eb - 1023 >= 2047);
      unf_ref = (ea + eb - 1023 <= -60);
      if (unf_ref) y_ref = {y_ref[63], 63'h0};   // flushed to zero
      check(fp_y == y_ref && fp_ovf == ovf_ref && fp_unf == unf_ref,
            $sformatf("fp %h*%h got %h o%b u%b exp %h", fp_a, fp_b, fp_y, fp_ovf, fp_unf, y_ref));
      if (fp_ovf) n_ovf++;
      if (fp_unf) n_unf++;
      store_and_load(fp_y[63:32], i % 3);
      store_and_load(fp_y[31:0], (i + 1) % 3);
    end

    check(n_carry > 0, "no Brent-Kung carry out");
    check(n_neg > 0, "no negative Vedic product");
    check(n_shift > 0, "no FP normalisation shift");
    check(n_ovf > 0, "no FP overflow");
    check(n_unf > 0, "no FP underflow");
    check(n_write > 0 && n_read > 0, "no DMC write/read");
    check(n_corr > 0, "no DMC correction");
    check(n_chk > 0, "no DMC check-bit-only detection");
    $display("mechanisms: carry=%0d neg=%0d shift=%0d ovf=%0d unf=%0d write=%0d read=%0d corr=%0d chk=%0d",
             n_carry, n_neg, n_shift, n_ovf, n_unf, n_write, n_read, n_corr, n_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
