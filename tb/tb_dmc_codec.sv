// Self-checking testbench for dmc_codec. Writes random words with and
// without injected upsets (correctable symbol bursts, check-bit flips), reads
// them back and checks the data, the two flags and that dout_valid rises
// exactly one clock after each read cycle. Also checks the document's data
// word 0xABCD1234 with bit 0 upset.
module tb_dmc_codec;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [3:0] addr;
  logic [31:0] din, dout;
  logic [67:0] upset;
  logic valid, det, cor;
  logic [31:0] shadow [DEPTH];
  int kind [DEPTH];  // 0 clean, 1 data burst, 2 check bits only

  dmc_codec #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .addr(addr), .din(din), .upset(upset),
    .dout(dout), .dout_valid(valid), .err_detected(det), .err_corrected(cor)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [31:0] d, input int k);
    @(negedge clk);
    en = 1'b1; addr = 4'(a); din = d;
    case (k)
      1:       upset = burst(1'($urandom));
      2:       upset = ($urandom % 2) ? {20'($urandom | 1), 48'h0} : {20'h0, 16'($urandom | 1), 32'h0};
      default: upset = '0;
    endcase
    shadow[a] = d;
    kind[a] = k;
    @(negedge clk);
    checks++;
    if (valid !== 1'b0) begin
      failures++;
      $display("FAIL valid after a write");
    end
    en = 1'b0;
    upset = '0;
  endtask

  task automatic read(input int a);
    @(negedge clk);
    en = 1'b0; addr = 4'(a);
    @(negedge clk);
    checks++;
    if (valid !== 1'b1 || dout !== shadow[a] || det !== (kind[a] != 0) || cor !== (kind[a] == 1)) begin
      failures++;
      $display("FAIL read %0d kind %0d: dout %h exp %h valid%b det%b cor%b",
               a, kind[a], dout, shadow[a], valid, det, cor);
    end
  endtask

  initial begin
    en = 1'b1; addr = '0; din = '0; upset = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (valid !== 1'b0) begin
      failures++;
      $display("FAIL valid during reset");
    end
    rst_n = 1'b1;
    write(3, 32'hABCD1234, 0);
    @(negedge clk);
    en = 1'b1; addr = 4'd3; din = 32'hABCD1234; upset = 68'h1;
    @(negedge clk);
    en = 1'b0; upset = '0;
    kind[3] = 1;
    read(3);
    for (int r = 0; r < 200; r++) begin
      int a;
      a = int'($urandom % DEPTH);
      write(a, $urandom, int'($urandom % 3));
      read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
