// cr_enc_control -- block sequencer and output multiplexer of the CR-LDPC
// encoder.
//
// One block of the code is produced in three phases:
//   DATA : K information bits are accepted (in_valid/in_ready); each goes to
//          the shift registers and to the information memory, and its parity
//          bit goes out.
//   ZERO : L_i zero bits are fed to the shift registers (nothing is accepted),
//          so the parity sequence grows from K to K+L_i bits. Skipped if L_i=0.
//   INFO : the multiplexer switches to the memory and the K stored
//          information bits go out after the parity. On the last one the shift
//          registers and the memory are cleared for the next block.
// A block therefore leaves as 2K+L_i code bits: K+L_i parity bits, then K
// information bits.
//
// Timing: the code outputs are registered, so a code bit appears one cycle
// after the cycle that produced it. With in_valid held high a block takes
// exactly 2K+L_i cycles and the output stream is gap-free; the next block is
// accepted right after the last information bit has been read. The output has
// no back-pressure. code_sof/code_eof mark the first and last bit of a block
// and code_info marks information bits.
//
// The phases, the zero insertion and the parity-then-information order follow
// the document; the handshake, the registered output and the markers are this
// design's own choices. mem_wdata is in_data passed straight on; it is kept
// as a port so that the controller drives the whole memory interface.
module cr_enc_control #(
  parameter int unsigned K  = cr_ldpc_pkg::K_DEF,   // information bits
  parameter int unsigned LI = cr_ldpc_pkg::LI_DEF   // inserted zero bits
) (
  input  logic clk,
  input  logic rst_n,
  // information input
  input  logic in_valid,
  input  logic in_data,
  output logic in_ready,
  // shift-register (convolutional encoder) side
  output logic conv_clr,
  output logic conv_en,
  output logic conv_din,
  input  logic conv_parity,
  // information memory side
  output logic mem_clr,
  output logic mem_we,
  output logic mem_wdata,
  output logic mem_re,
  input  logic mem_rdata,
  // code output
  output logic code_valid,
  output logic code_bit,
  output logic code_sof,
  output logic code_eof,
  output logic code_info
);

  typedef enum logic [1:0] {S_DATA, S_ZERO, S_INFO} phase_e;

  localparam int unsigned CNT_MAX = (K > LI) ? K : LI;
  localparam int unsigned CW      = $clog2(CNT_MAX + 1);

  phase_e        phase, phase_n;
  logic [CW-1:0] cnt, cnt_n;
  logic          accept;
  logic          bit_d, valid_d, sof_d, eof_d, info_d;

  assign accept   = (phase == S_DATA) && in_valid;
  assign in_ready = (phase == S_DATA);

  always_comb begin
    phase_n   = phase;
    cnt_n     = cnt;
    conv_clr  = 1'b0;
    conv_en   = 1'b0;
    conv_din  = 1'b0;
    mem_clr   = 1'b0;
    mem_we    = 1'b0;
    mem_wdata = in_data;
    mem_re    = 1'b0;
    valid_d   = 1'b0;
    bit_d     = conv_parity;
    sof_d     = 1'b0;
    eof_d     = 1'b0;
    info_d    = 1'b0;
    unique case (phase)
      S_DATA: if (accept) begin
        conv_en  = 1'b1;
        conv_din = in_data;
        mem_we   = 1'b1;
        valid_d  = 1'b1;
        sof_d    = (cnt == '0);
        if (cnt == CW'(K - 1)) begin
          cnt_n   = '0;
          phase_n = (LI > 0) ? S_ZERO : S_INFO;
        end else begin
          cnt_n = cnt + 1'b1;
        end
      end
      S_ZERO: begin
        conv_en  = 1'b1;       // conv_din stays 0: an inserted zero bit
        valid_d  = 1'b1;
        if (cnt == CW'(LI - 1)) begin
          cnt_n   = '0;
          phase_n = S_INFO;
        end else begin
          cnt_n = cnt + 1'b1;
        end
      end
      S_INFO: begin
        mem_re  = 1'b1;
        bit_d   = mem_rdata;   // multiplexer: information after the parity
        valid_d = 1'b1;
        info_d  = 1'b1;
        if (cnt == CW'(K - 1)) begin
          eof_d    = 1'b1;
          conv_clr = 1'b1;
          mem_clr  = 1'b1;
          cnt_n    = '0;
          phase_n  = S_DATA;
        end else begin
          cnt_n = cnt + 1'b1;
        end
      end
      default: phase_n = S_DATA;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= S_DATA;
      cnt        <= '0;
      code_valid <= 1'b0;
      code_bit   <= 1'b0;
      code_sof   <= 1'b0;
      code_eof   <= 1'b0;
      code_info  <= 1'b0;
    end else begin
      phase      <= phase_n;
      cnt        <= cnt_n;
      code_valid <= valid_d;
      code_bit   <= bit_d;
      code_sof   <= sof_d;
      code_eof   <= eof_d;
      code_info  <= info_d;
    end
  end

endmodule
