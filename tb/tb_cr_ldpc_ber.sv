// tb_cr_ldpc_ber -- bit-error-rate run of the CR-LDPC codec over an AWGN
// channel with BPSK/Gray-QPSK signalling (each code bit on one real
// dimension), for k = 24, g = 6111 (octal) with L_i = 4 (default build) and
// with L_i = 0 (rate 1/2). For each Eb/N0 point, random blocks are encoded by
// the RTL encoder, sent through Box-Muller Gaussian noise, turned into 6-bit
// LLRs (2y/sigma^2, 0.5 per LSB, saturated) and decoded by the RTL decoder.
// The testbench checks that every encoded word matches the reference
// encoder, that the decoded BER at 4 dB and 6 dB is below the uncoded
// hard-decision BER of the same channel samples, and that the coded BER does
// not rise with the SNR. The BER table is printed.
module tb_cr_ldpc_ber;
  import cr_ref_pkg::*;
  localparam int K = 24, W = 6, BLOCKS = 250;
  localparam int NSNR = 3;
  localparam real SNR_DB [NSNR] = '{2.0, 4.0, 6.0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // harness 0: LI = 4 (defaults), harness 1: LI = 0
  logic eiv [2], eid [2], eir [2], ecv [2], ecb [2], esof [2], eeof [2], einfo [2];
  logic lv [2], lr [2], dv [2], dconv [2];
  logic [W-1:0] ld [2];
  logic [K-1:0] dinfo [2];
  logic [4:0] dit [2];

  cr_ldpc_top u4 (.clk, .rst_n,
    .enc_in_valid(eiv[0]), .enc_in_data(eid[0]), .enc_in_ready(eir[0]),
    .enc_code_valid(ecv[0]), .enc_code_bit(ecb[0]), .enc_code_sof(esof[0]),
    .enc_code_eof(eeof[0]), .enc_code_info(einfo[0]),
    .dec_llr_valid(lv[0]), .dec_llr_data(ld[0]), .dec_llr_ready(lr[0]),
    .dec_valid(dv[0]), .dec_info(dinfo[0]), .dec_converged(dconv[0]), .dec_iters(dit[0]));
  cr_ldpc_top #(.LI(0)) u0 (.clk, .rst_n,
    .enc_in_valid(eiv[1]), .enc_in_data(eid[1]), .enc_in_ready(eir[1]),
    .enc_code_valid(ecv[1]), .enc_code_bit(ecb[1]), .enc_code_sof(esof[1]),
    .enc_code_eof(eeof[1]), .enc_code_info(einfo[1]),
    .dec_llr_valid(lv[1]), .dec_llr_data(ld[1]), .dec_llr_ready(lr[1]),
    .dec_valid(dv[1]), .dec_info(dinfo[1]), .dec_converged(dconv[1]), .dec_iters(dit[1]));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("ERR t=%0t: %s", $time, what); end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic run_point(int h, int li, real snr_db, output real ber_coded,
                           output real ber_uncoded, output real avg_iter);
    bit_q info, code;
    int llr [$];
    int err_c = 0, err_u = 0, iters = 0, sent, n, v;
    real rate, sigma, y;
    n = 2 * K + li;
    rate = real'(K) / real'(n);
    sigma = $sqrt(1.0 / (2.0 * rate * (10.0 ** (snr_db / 10.0))));
    for (int b = 0; b < BLOCKS; b++) begin
      info.delete(); code.delete(); llr.delete();
      for (int i = 0; i < K; i++) info.push_back(1'($urandom));
      // encode
      sent = 0;
      while (code.size() < n) begin
        @(negedge clk);
        if (ecv[h]) code.push_back(ecb[h]);
        eiv[h] = (sent < K);
        eid[h] = (sent < K) ? info[sent] : 1'b0;
        #1;
        if (eiv[h] && eir[h]) sent++;
      end
      eiv[h] = 0;
      chk(code == encode(info, li, taps_6111()), "encoder output");
      // channel
      foreach (code[i]) begin
        y = (code[i] ? -1.0 : 1.0) + sigma * gauss();
        v = int'(4.0 * y / (sigma * sigma));           // 2y/sigma^2 in 0.5 steps
        llr.push_back((v > 31) ? 31 : (v < -31) ? -31 : v);
        if (i >= K + li && ((y < 0.0) != code[i])) err_u++;
      end
      // decode
      for (int i = 0; i < n; ) begin
        @(negedge clk);
        lv[h] = 1; ld[h] = W'(llr[i]);
        #1;
        if (lr[h]) i++;
      end
      @(negedge clk);
      lv[h] = 0;
      while (!dv[h]) @(negedge clk);
      iters += int'(dit[h]);
      for (int i = 0; i < K; i++) if (dinfo[h][i] != info[i]) err_c++;
    end
    ber_coded   = real'(err_c) / real'(BLOCKS * K);
    ber_uncoded = real'(err_u) / real'(BLOCKS * K);
    avg_iter    = real'(iters) / real'(BLOCKS);
  endtask

  initial begin
    real bc [NSNR], bu [NSNR], it [NSNR];
    eiv = '{0, 0}; eid = '{0, 0}; lv = '{0, 0}; ld = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int h = 0; h < 2; h++) begin
      for (int s = 0; s < NSNR; s++) begin
        run_point(h, h == 0 ? 4 : 0, SNR_DB[s], bc[s], bu[s], it[s]);
        $display("L_i=%0d Eb/N0=%0.1f dB: coded BER %e, uncoded BER %e, mean iterations %0.2f",
                 h == 0 ? 4 : 0, SNR_DB[s], bc[s], bu[s], it[s]);
      end
      chk(bc[1] < bu[1], "coding gain at 4 dB");
      chk(bc[2] < bu[2], "coding gain at 6 dB");
      chk(bc[2] <= bc[1] && bc[1] <= bc[0], "BER falls with SNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
