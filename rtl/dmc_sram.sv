// Codeword memory of the DMC protected store.
//
// A single-port synchronous RAM holding DMC codewords (data plus horizontal
// and vertical check bits). A write stores wdata at addr on the rising clock
// edge when we is high; a read (we low) returns the word at addr on rdata one
// clock later. The array is written as a plain memory so a synthesis tool can
// map it to a RAM macro.
//
// The document only says that the check bits are stored in SRAM; the depth,
// the single port and the one-cycle read latency are this design's choices.
// Contents are not reset.
module dmc_sram
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  dmc_codeword_t            wdata,
  output dmc_codeword_t            rdata
);
  dmc_codeword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end
endmodule
