// Performance-boosting components of a Vedic DSP processor, side by side.
//
// The top gathers the four components and brings each one's ports out; the
// processor around them (pipeline, ALU, MAC, filters), which would connect
// them, is not part of this RTL:
//   - bk_*  : 32-bit Brent-Kung adder (combinational);
//   - vm_*  : 64-bit signed fractional Vedic multiplier, sign-magnitude
//             operands, two's complement result (combinational);
//   - fp_*  : IEEE 754 double precision multiplier with the Vedic
//             significand multiplier and Brent-Kung exponent adder
//             (combinational);
//   - dmc_* : DMC protected store of 32-bit words: encoder, codeword SRAM and
//             decoder; dmc_en = 1 writes (encodes), 0 reads (decodes and
//             corrects); the result appears one clock after the read with
//             dmc_valid. dmc_upset injects bit flips into the stored codeword
//             and is tied to zero in normal use.
// clk and rst_n (asynchronous, active low) are used by the DMC store only.
module vedic_dsp_top
  import dmc_pkg::*;
#(
  parameter int unsigned ADD_W     = 32,
  parameter int unsigned VM_W      = 64,
  parameter int unsigned FP_EXP_W  = 11,
  parameter int unsigned FP_MAN_W  = 52,
  parameter int unsigned DMC_DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // Brent-Kung adder
  input  logic [ADD_W-1:0]             bk_a,
  input  logic [ADD_W-1:0]             bk_b,
  input  logic                         bk_cin,
  output logic [ADD_W-1:0]             bk_sum,
  output logic                         bk_cout,
  // signed Vedic multiplier
  input  logic [VM_W-1:0]              vm_x,
  input  logic [VM_W-1:0]              vm_y,
  output logic [VM_W-1:0]              vm_r,
  // floating point multiplier
  input  logic [FP_EXP_W+FP_MAN_W:0]   fp_a,
  input  logic [FP_EXP_W+FP_MAN_W:0]   fp_b,
  output logic [FP_EXP_W+FP_MAN_W:0]   fp_y,
  output logic                         fp_overflow,
  output logic                         fp_underflow,
  // DMC protected store
  input  logic                         dmc_en,
  input  logic [$clog2(DMC_DEPTH)-1:0] dmc_addr,
  input  logic [DATA_W-1:0]            dmc_din,
  input  logic [CW_W-1:0]              dmc_upset,
  output logic [DATA_W-1:0]            dmc_dout,
  output logic                         dmc_valid,
  output logic                         dmc_err_detected,
  output logic                         dmc_err_corrected
);
  bk_adder #(.W(ADD_W)) u_bk (
    .a(bk_a), .b(bk_b), .cin(bk_cin), .sum(bk_sum), .cout(bk_cout)
  );

  vedic_mul_signed #(.W(VM_W)) u_vm (.x(vm_x), .y(vm_y), .r(vm_r));

  fp_multiplier #(.EXP_W(FP_EXP_W), .MAN_W(FP_MAN_W)) u_fp (
    .a(fp_a), .b(fp_b), .y(fp_y), .overflow(fp_overflow), .underflow(fp_underflow)
  );

  dmc_codec #(.DEPTH(DMC_DEPTH)) u_dmc (
    .clk(clk), .rst_n(rst_n), .en(dmc_en), .addr(dmc_addr), .din(dmc_din),
    .upset(dmc_upset), .dout(dmc_dout), .dout_valid(dmc_valid),
    .err_detected(dmc_err_detected), .err_corrected(dmc_err_corrected)
  );
endmodule
