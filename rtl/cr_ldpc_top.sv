// cr_ldpc_top -- CR-LDPC codec: encoder and decoder of the code side by side.
//
// The encoder turns K serial information bits into 2K+LI code bits (K+LI
// parity bits from the convolutional shift registers, then the K information
// bits). The decoder takes the 2K+LI channel LLRs of a received code word,
// re-inserts the LI known zero bits and decodes iteratively on the
// parity-check matrix derived from the same generator. Modulation, the
// channel and soft demapping lie between the two and are outside this block:
// the encoder's code stream and the decoder's LLR stream are brought out as
// ports. Both halves share the parameters K, LI, GLEN and G, so they always
// agree on the code. See cr_ldpc_encoder and cr_ldpc_decoder for timing.
module cr_ldpc_top #(
  parameter int unsigned K        = cr_ldpc_pkg::K_DEF,
  parameter int unsigned LI       = cr_ldpc_pkg::LI_DEF,
  parameter int unsigned GLEN     = cr_ldpc_pkg::GLEN_DEF,
  parameter logic [GLEN-1:0] G    = GLEN'(cr_ldpc_pkg::G_DEF),
  parameter int unsigned W        = cr_ldpc_pkg::LLR_W_DEF,
  parameter int unsigned MAX_ITER = cr_ldpc_pkg::MAX_ITER_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  // encoder: information in, code out
  input  logic         enc_in_valid,
  input  logic         enc_in_data,
  output logic         enc_in_ready,
  output logic         enc_code_valid,
  output logic         enc_code_bit,
  output logic         enc_code_sof,
  output logic         enc_code_eof,
  output logic         enc_code_info,
  // decoder: channel LLRs in, information out
  input  logic         dec_llr_valid,
  input  logic [W-1:0] dec_llr_data,
  output logic         dec_llr_ready,
  output logic         dec_valid,
  output logic [K-1:0] dec_info,
  output logic         dec_converged,
  output logic [$clog2(MAX_ITER+1)-1:0] dec_iters
);

  cr_ldpc_encoder #(.K(K), .LI(LI), .GLEN(GLEN), .G(G)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_data(enc_in_data), .in_ready(enc_in_ready),
    .code_valid(enc_code_valid), .code_bit(enc_code_bit),
    .code_sof(enc_code_sof), .code_eof(enc_code_eof), .code_info(enc_code_info)
  );

  cr_ldpc_decoder #(.K(K), .LI(LI), .GLEN(GLEN), .G(G), .W(W), .MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst_n,
    .llr_valid(dec_llr_valid), .llr_data(dec_llr_data), .llr_ready(dec_llr_ready),
    .dec_valid, .dec_info, .dec_converged, .dec_iters
  );

endmodule
