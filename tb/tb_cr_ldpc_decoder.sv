// tb_cr_ldpc_decoder -- decoder test with code words from the reference
// encoder (K=24, L_i=4, g=6111 octal; and L_i=0).
//   1. clean words with strong LLRs: must decode in 0 iterations, converged;
//   2. words with a few weak wrong-sign LLRs: must be corrected, converged,
//      with at least one iteration;
//   3. noisy words (Gaussian noise): every converged result must match;
//   4. random LLRs (not code words): any unconverged result must have run
//      exactly MAX_ITER iterations, and this must happen at least once;
//   5. the most negative LLR input (-32) is accepted and saturated.
// The cycle count from the last accepted LLR to dec_valid must equal
// dec_iters + 2, and loading must take 2K+L_i cycles.
module tb_cr_ldpc_decoder;
  import cr_ref_pkg::*;
  localparam int K = 24, W = 6, MAXIT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_maxiter = 0, n_noisy_ok = 0;

  logic lv [2], lr [2], dv [2], dconv [2];
  logic [W-1:0] ld [2];
  logic [K-1:0] dinfo [2];
  logic [4:0] dit [2];

  cr_ldpc_decoder dut4 (.clk, .rst_n, .llr_valid(lv[0]), .llr_data(ld[0]), .llr_ready(lr[0]),
    .dec_valid(dv[0]), .dec_info(dinfo[0]), .dec_converged(dconv[0]), .dec_iters(dit[0]));
  cr_ldpc_decoder #(.LI(0)) dut0 (.clk, .rst_n, .llr_valid(lv[1]), .llr_data(ld[1]), .llr_ready(lr[1]),
    .dec_valid(dv[1]), .dec_info(dinfo[1]), .dec_converged(dconv[1]), .dec_iters(dit[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("ERR t=%0t: %s", $time, what); end
  endtask

  // Sends one LLR block to harness h, returns the decoder result.
  task automatic decode(int h, int llr [$], output logic [K-1:0] info,
                        output bit conv, output int iters);
    int i = 0, cyc = 0, last_cyc = 0, first_cyc = 0;
    while (i < llr.size()) begin
      @(negedge clk);
      cyc++;
      lv[h] = 1'($urandom_range(4, 0) != 0) || (i == llr.size() - 1);
      ld[h] = W'(llr[i]);
      #1;
      if (lv[h] && lr[h]) begin
        if (i == 0) first_cyc = cyc;
        i++;
        last_cyc = cyc;
      end
    end
    @(negedge clk);
    lv[h] = 0;
    cyc++;
    while (!dv[h]) begin
      @(negedge clk);
      cyc++;
      if (cyc > 1000) break;
    end
    info = dinfo[h]; conv = dconv[h]; iters = int'(dit[h]);
    chk(cyc - last_cyc == iters + 2, "latency = iterations + 2 cycles");
    chk(!conv -> iters == MAXIT, "unconverged only at the iteration limit");
  endtask

  function automatic int to_llr(bit b, int amp);
    return b ? -amp : amp;
  endfunction

  task automatic run(int h, int li);
    bit_q info, cw;
    int llr [$];
    logic [K-1:0] got, exp;
    bit conv;
    int iters, nflip, pos, v;
    for (int trial = 0; trial < 60; trial++) begin
      info.delete();
      for (int i = 0; i < K; i++) info.push_back(1'($urandom));
      cw = encode(info, li, taps_6111());
      foreach (info[i]) exp[i] = info[i];
      llr.delete();
      foreach (cw[i]) llr.push_back(to_llr(cw[i], 12));
      case (trial % 4)
        0: begin           // clean; one LLR at the most negative code
          if (trial % 8 == 0) foreach (llr[i]) if (llr[i] < 0) begin llr[i] = -32; break; end
          decode(h, llr, got, conv, iters);
          chk(conv && iters == 0 && got == exp, "clean word decoded without iterations");
          n_clean++;
        end
        1: begin           // a few weak errors
          nflip = 1 + trial % 3;
          for (int f = 0; f < nflip; f++) begin
            pos = int'($urandom_range(cw.size() - 1, 0));
            llr[pos] = to_llr(!cw[pos], 2);
          end
          decode(h, llr, got, conv, iters);
          chk(conv && got == exp, "weak errors corrected");
          if (iters > 0) n_corrected++;
        end
        2: begin           // Gaussian noise, about 4 dB
          foreach (llr[i]) begin
            v = (to_llr(cw[i], 1000) + gauss_milli() * 6 / 10) * 6 / 1000;
            llr[i] = (v > 31) ? 31 : (v < -31) ? -31 : v;
          end
          decode(h, llr, got, conv, iters);
          if (conv) begin
            chk(got == exp, "converged noisy word matches");
            n_noisy_ok++;
          end
        end
        default: begin     // not a code word
          foreach (llr[i]) llr[i] = int'($urandom_range(20, 0)) - 10;
          decode(h, llr, got, conv, iters);
          if (!conv) n_maxiter++;
        end
      endcase
    end
  endtask

  initial begin
    lv = '{0, 0}; ld = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 4);
    run(1, 0);
    chk(n_corrected > 0, "errors corrected by iterating");
    chk(n_maxiter > 0, "iteration limit reached");
    chk(n_noisy_ok > 0, "noisy words decoded");
    $display("clean=%0d corrected=%0d noisy_ok=%0d maxiter=%0d", n_clean, n_corrected, n_noisy_ok, n_maxiter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
