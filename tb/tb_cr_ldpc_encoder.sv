// tb_cr_ldpc_encoder -- end-to-end check of the CR-LDPC encoder against the
// reference convolution: for random information blocks the serial code must
// be the K+LI parity bits followed by the K information bits. Checks the
// one-cycle latency, the 2K+LI cycle block time with a continuous input, and
// the same with input gaps. Runs the default configuration (K=24, L_i=4,
// g=6111 octal) and L_i=0.
module tb_cr_ldpc_encoder;
  import cr_ref_pkg::*;
  localparam int K = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv [2], idat [2], rdy [2], cv [2], cb [2], csof [2], ceof [2], cinfo [2];

  cr_ldpc_encoder dut4 (.clk, .rst_n, .in_valid(iv[0]), .in_data(idat[0]), .in_ready(rdy[0]),
    .code_valid(cv[0]), .code_bit(cb[0]), .code_sof(csof[0]), .code_eof(ceof[0]), .code_info(cinfo[0]));
  cr_ldpc_encoder #(.LI(0)) dut0 (.clk, .rst_n, .in_valid(iv[1]), .in_data(idat[1]), .in_ready(rdy[1]),
    .code_valid(cv[1]), .code_bit(cb[1]), .code_sof(csof[1]), .code_eof(ceof[1]), .code_info(cinfo[1]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("ERR t=%0t: %s", $time, what); end
  endtask

  // Sends 'blocks' blocks on harness h and collects the code stream.
  task automatic run(int h, int li, int blocks, bit gaps);
    bit_q info, exp, got;
    int sent, first_in_cyc, first_out_cyc, last_out_cyc, cyc;
    for (int b = 0; b < blocks; b++) begin
      info.delete(); got.delete();
      for (int i = 0; i < K; i++) info.push_back(1'($urandom));
      if (b == 0) foreach (info[i]) info[i] = (i == 0);   // impulse
      exp = encode(info, li, taps_6111());
      sent = 0; cyc = 0; first_in_cyc = -1; first_out_cyc = -1;
      while (got.size() < 2 * K + li) begin
        @(negedge clk);
        cyc++;
        if (cv[h]) begin
          if (got.size() == 0) begin
            first_out_cyc = cyc;
            chk(csof[h], "sof on first bit");
          end
          chk(cinfo[h] == (got.size() >= K + li), "info marker");
          chk(ceof[h] == (got.size() == 2 * K + li - 1), "eof marker");
          got.push_back(cb[h]);
          last_out_cyc = cyc;
        end
        if (sent < K) begin
          iv[h] = gaps ? 1'($urandom_range(3, 0) != 0) : 1'b1;
          idat[h] = info[sent];
          #1;
          if (iv[h] && rdy[h]) begin
            if (sent == 0) first_in_cyc = cyc;
            sent++;
          end
        end else begin
          iv[h] = 0;
        end
      end
      foreach (exp[i]) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++;
          $display("ERR harness %0d block %0d bit %0d: got %0b exp %0b", h, b, i, got[i], exp[i]);
        end
      end
      chk(first_out_cyc == first_in_cyc + 1, "first code bit one cycle after first input");
      if (!gaps) chk(last_out_cyc - first_in_cyc == 2 * K + li, "2K+LI cycles per block");
    end
  endtask

  initial begin
    iv = '{0, 0}; idat = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 4, 6, 0);
    run(0, 4, 6, 1);
    run(1, 0, 6, 0);
    run(1, 0, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
