// cr_ldpc_encoder -- CR-LDPC encoder: shift registers, information memory and
// output multiplexer.
//
// Information bits enter serially. Each one is stored in the memory and
// shifted into a rate-1 convolutional encoder (generator G), which emits one
// parity bit per input. After K information bits, LI zero bits are shifted in
// to extend the parity to K+LI bits; then the multiplexer sends the K stored
// information bits. Code word order: p_0 .. p_{K+LI-1}, u_0 .. u_{K-1}; the
// code rate is K / (2K+LI).
//
// Interface: in_valid/in_ready/in_data for the information; code_valid,
// code_bit and the block markers code_sof/code_eof/code_info for the code (no
// back-pressure). Timing: the first code bit leaves one cycle after the first
// information bit is accepted; with a continuous input a block takes 2K+LI
// cycles. The structure (Fig. 3-style shift registers + memory + multiplexer,
// zero insertion, parity first) follows the document; the handshake and
// markers are this design's own.
module cr_ldpc_encoder #(
  parameter int unsigned K    = cr_ldpc_pkg::K_DEF,
  parameter int unsigned LI   = cr_ldpc_pkg::LI_DEF,
  parameter int unsigned GLEN = cr_ldpc_pkg::GLEN_DEF,
  parameter logic [GLEN-1:0] G = GLEN'(cr_ldpc_pkg::G_DEF)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_data,
  output logic in_ready,
  output logic code_valid,
  output logic code_bit,
  output logic code_sof,
  output logic code_eof,
  output logic code_info
);

  logic conv_clr, conv_en, conv_din, conv_parity;
  logic mem_clr, mem_we, mem_wdata, mem_re, mem_rdata;

  cr_conv_encoder #(.GLEN(GLEN), .G(G)) u_shift_regs (
    .clk, .rst_n, .clr(conv_clr), .en(conv_en), .din(conv_din), .parity(conv_parity)
  );

  cr_info_memory #(.K(K)) u_memory (
    .clk, .rst_n, .clr(mem_clr), .we(mem_we), .wr_data(mem_wdata),
    .re(mem_re), .rd_data(mem_rdata)
  );

  cr_enc_control #(.K(K), .LI(LI)) u_control (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .conv_clr, .conv_en, .conv_din, .conv_parity,
    .mem_clr, .mem_we, .mem_wdata, .mem_re, .mem_rdata,
    .code_valid, .code_bit, .code_sof, .code_eof, .code_info
  );

endmodule
