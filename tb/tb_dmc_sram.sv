// Self-checking testbench for dmc_sram: writes random codewords to every
// address, reads them back in a different order, and checks that rdata
// appears exactly one clock after the read and that a write does not change
// rdata.
module tb_dmc_sram;
  import dmc_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;
  logic clk = 1'b0;
  logic we;
  logic [3:0] addr;
  dmc_codeword_t wdata, rdata;
  logic [67:0] shadow [DEPTH];

  dmc_sram #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 4'(i);
      wdata = {4'($urandom), 32'($urandom), 32'($urandom)};
      shadow[i] = wdata;
    end
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < DEPTH; i++) begin
        logic [67:0] rd_prev;
        @(negedge clk);
        we = 1'b0; addr = 4'((i * 7 + r) % DEPTH);
        @(negedge clk);
        checks++;
        if (rdata !== shadow[(i * 7 + r) % DEPTH]) begin
          failures++;
          $display("FAIL read %0d: got %h exp %h", (i * 7 + r) % DEPTH, rdata, shadow[(i * 7 + r) % DEPTH]);
        end
        // A write cycle leaves rdata alone.
        rd_prev = rdata;
        we = 1'b1; addr = 4'(i); wdata = {4'($urandom), 32'($urandom), 32'($urandom)};
        shadow[i] = wdata;
        @(negedge clk);
        checks++;
        if (rdata !== rd_prev) begin
          failures++;
          $display("FAIL rdata changed on write");
        end
        we = 1'b0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
