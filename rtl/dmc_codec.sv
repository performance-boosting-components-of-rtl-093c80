// DMC protected store: encoder, codeword SRAM and decoder.
//
// The en signal selects the operation, as in the document's encoder table:
// en = 1 is a write, in which din is encoded and the codeword stored at addr;
// en = 0 is a read, in which the codeword at addr is fetched and the decoder
// recomputes the check bits, forms the syndromes and corrects the data.
//
// upset is a fault-injection input that models the bit flips the code
// guards against: the stored codeword is the encoded one XOR upset (bits
// 67..48 h, 47..32 v, 31..0 data, the dmc_codeword_t layout). Tie it to zero
// in normal use.
//
// Timing: a write takes effect on the clock edge. A read presents dout,
// err_detected and err_corrected one clock after the read cycle, with
// dout_valid high for that one cycle. rst_n (asynchronous, active low) only
// clears dout_valid.
// The encoder / decoder pair and the en function are the document's; the
// memory depth, the read latency, the valid flag and the fault-injection
// input are this design's.
module dmc_codec
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DATA_W-1:0]        din,
  input  logic [CW_W-1:0]          upset,
  output logic [DATA_W-1:0]        dout,
  output logic                     dout_valid,
  output logic                     err_detected,
  output logic                     err_corrected
);
  dmc_codeword_t cw_enc, cw_wr, cw_rd;

  dmc_encoder u_enc (.d(din), .cw(cw_enc));

  assign cw_wr = cw_enc ^ upset;

  dmc_sram #(.DEPTH(DEPTH)) u_mem (
    .clk(clk), .we(en), .addr(addr), .wdata(cw_wr), .rdata(cw_rd)
  );

  dmc_decoder u_dec (
    .cw(cw_rd), .d_o(dout), .err_detected(err_detected), .err_corrected(err_corrected)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= !en;
  end
endmodule
