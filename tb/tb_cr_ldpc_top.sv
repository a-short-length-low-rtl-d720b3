// tb_cr_ldpc_top -- end-to-end test of the CR-LDPC codec at its default
// parameters (K=24, L_i=4, g=6111 octal, 6-bit LLRs, 20 iterations).
// Random information blocks go through the encoder; the code stream is
// checked against the reference encoder, mapped to LLRs (positive = 0) with
// channel impairments, and decoded. Each mechanism of the design is counted
// and must occur at least once: zero-bit insertion (K+L_i parity bits per
// block), multiplexer switch to the stored information, decoding without
// iterations, error correction by iterating, early termination before the
// iteration limit, stop at the iteration limit, and saturation of a -32
// input LLR. Blocks with light impairments must decode to the sent
// information.
module tb_cr_ldpc_top;
  import cr_ref_pkg::*;
  localparam int K = cr_ldpc_pkg::K_DEF, LI = cr_ldpc_pkg::LI_DEF;
  localparam int W = cr_ldpc_pkg::LLR_W_DEF, MAXIT = cr_ldpc_pkg::MAX_ITER_DEF;
  localparam int NT = 2 * K + LI;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_zero_ins = 0, n_mux = 0, n_noiter = 0, n_corrected = 0, n_early = 0,
      n_limit = 0, n_sat = 0;

  logic enc_in_valid = 0, enc_in_data = 0, enc_in_ready;
  logic enc_code_valid, enc_code_bit, enc_code_sof, enc_code_eof, enc_code_info;
  logic dec_llr_valid = 0, dec_llr_ready, dec_valid, dec_converged;
  logic [W-1:0] dec_llr_data = '0;
  logic [K-1:0] dec_info;
  logic [$clog2(MAXIT+1)-1:0] dec_iters;

  cr_ldpc_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("ERR t=%0t: %s", $time, what); end
  endtask

  task automatic encode_block(bit_q info, output bit_q code);
    int sent = 0, nparity = 0;
    bit seen_info = 0, order_ok = 1;
    code.delete();
    while (code.size() < NT) begin
      @(negedge clk);
      if (enc_code_valid) begin
        code.push_back(enc_code_bit);
        if (enc_code_info) seen_info = 1;
        else begin
          nparity++;
          if (seen_info) order_ok = 0;
        end
      end
      if (sent < K) begin
        enc_in_valid = 1'($urandom_range(5, 0) != 0);
        enc_in_data  = info[sent];
        #1;
        if (enc_in_valid && enc_in_ready) sent++;
      end else enc_in_valid = 0;
    end
    chk(nparity == K + LI && order_ok, "K+L_i parity bits, then information");
    if (nparity == K + LI && LI > 0) n_zero_ins++;
    if (order_ok && seen_info) n_mux++;
  endtask

  task automatic decode_block(int llr [$], output logic [K-1:0] info, output bit conv,
                              output int iters);
    int i = 0, cyc = 0, last = 0;
    while (i < NT) begin
      @(negedge clk);
      cyc++;
      dec_llr_valid = 1'b1;
      dec_llr_data  = W'(llr[i]);
      #1;
      if (dec_llr_ready) begin i++; last = cyc; end
    end
    @(negedge clk);
    cyc++;
    dec_llr_valid = 0;
    while (!dec_valid && cyc < last + MAXIT + 10) begin
      @(negedge clk);
      cyc++;
    end
    chk(dec_valid, "decoder finished");
    info = dec_info; conv = dec_converged; iters = int'(dec_iters);
    chk(cyc - last == iters + 2, "decode latency = iterations + 2");
  endtask

  initial begin
    bit_q info, code, ref_code;
    int llr [$];
    logic [K-1:0] exp, got;
    bit conv;
    int iters, v, kind;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 80; blk++) begin
      info.delete();
      for (int i = 0; i < K; i++) info.push_back(1'($urandom));
      foreach (info[i]) exp[i] = info[i];
      encode_block(info, code);
      ref_code = encode(info, LI, taps_6111());
      chk(code == ref_code, "code word matches reference encoder");
      llr.delete();
      kind = blk % 5;
      foreach (code[i]) begin
        case (kind)
          0: v = code[i] ? -12 : 12;                                   // clean
          1: v = code[i] ? -12 : 12;                                   // weak errors below
          2, 3: v = ((code[i] ? -1000 : 1000) + gauss_milli() * 6 / 10) * 6 / 1000;
          default: v = int'($urandom_range(20, 0)) - 10;               // garbage
        endcase
        llr.push_back((v > 31) ? 31 : (v < -31) ? -31 : v);
      end
      if (kind == 0 && blk % 10 == 0) begin
        foreach (llr[i]) if (llr[i] < 0) begin llr[i] = -32; n_sat++; break; end
      end
      if (kind == 1) begin
        for (int f = 0; f < 2; f++) begin
          v = int'($urandom_range(NT - 1, 0));
          llr[v] = code[v] ? 2 : -2;
        end
      end
      decode_block(llr, got, conv, iters);
      if (kind <= 1) chk(conv && got == exp, "lightly impaired block decoded");
      if (kind <= 3 && conv) chk(got == exp, "converged block matches");
      if (!conv) chk(iters == MAXIT, "stop at the iteration limit");
      if (conv && iters == 0) n_noiter++;
      if (conv && iters > 0 && got == exp) n_corrected++;
      if (conv && iters > 0 && iters < MAXIT) n_early++;
      if (!conv) n_limit++;
    end
    chk(n_zero_ins > 0, "zero insertion seen");
    chk(n_mux > 0, "multiplexer switch seen");
    chk(n_noiter > 0, "decode without iterations seen");
    chk(n_corrected > 0, "correction by iterating seen");
    chk(n_early > 0, "early termination seen");
    chk(n_limit > 0, "iteration limit seen");
    chk(n_sat > 0, "input saturation seen");
    $display("zero_ins=%0d mux=%0d noiter=%0d corrected=%0d early=%0d limit=%0d sat=%0d",
             n_zero_ins, n_mux, n_noiter, n_corrected, n_early, n_limit, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
