// tb_cr_enc_control -- checks the encoder sequencer and output multiplexer
// on its own. The shift-register parity and the memory read data are driven
// with random bits; the testbench predicts, cycle by cycle, which of them
// must reach the code output one cycle later, which control strobes must be
// active, and that a block with a continuous input takes exactly 2K+LI
// cycles. Run for L_i = 4 and for L_i = 0 (no zero phase).
module tb_cr_enc_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int K = 24;

  // one harness per L_i value
  logic       iv [2], idat [2], rdy [2];
  logic       cclr [2], cen [2], cdin [2], cpar [2];
  logic       mclr [2], mwe [2], mwd [2], mre [2], mrd [2];
  logic       cv [2], cb [2], csof [2], ceof [2], cinfo [2];

  cr_enc_control #(.K(K), .LI(4)) dut4 (.clk, .rst_n,
    .in_valid(iv[0]), .in_data(idat[0]), .in_ready(rdy[0]),
    .conv_clr(cclr[0]), .conv_en(cen[0]), .conv_din(cdin[0]), .conv_parity(cpar[0]),
    .mem_clr(mclr[0]), .mem_we(mwe[0]), .mem_wdata(mwd[0]), .mem_re(mre[0]), .mem_rdata(mrd[0]),
    .code_valid(cv[0]), .code_bit(cb[0]), .code_sof(csof[0]), .code_eof(ceof[0]), .code_info(cinfo[0]));
  cr_enc_control #(.K(K), .LI(0)) dut0 (.clk, .rst_n,
    .in_valid(iv[1]), .in_data(idat[1]), .in_ready(rdy[1]),
    .conv_clr(cclr[1]), .conv_en(cen[1]), .conv_din(cdin[1]), .conv_parity(cpar[1]),
    .mem_clr(mclr[1]), .mem_we(mwe[1]), .mem_wdata(mwd[1]), .mem_re(mre[1]), .mem_rdata(mrd[1]),
    .code_valid(cv[1]), .code_bit(cb[1]), .code_sof(csof[1]), .code_eof(ceof[1]), .code_info(cinfo[1]));

  task automatic chk(bit cond, string what, int h);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERR LI-harness %0d t=%0t: %s", h, $time, what);
    end
  endtask

  // Runs blocks on harness h with L_i = li; 'gaps' inserts idle input cycles.
  task automatic run(int h, int li, int blocks, bit gaps);
    int phase_pos;      // 0..2K+LI-1 position in the block
    bit exp_bit, exp_v, exp_sof, exp_eof, exp_info, prev_valid;
    int start_cyc, cyc;
    cyc = 0;
    for (int b = 0; b < blocks; b++) begin
      phase_pos = 0;
      prev_valid = 0;
      start_cyc = cyc;
      while (phase_pos < 2 * K + li) begin
        @(negedge clk);
        cyc++;
        // check the output produced by the previous cycle
        if (prev_valid || b > 0 || phase_pos > 0) begin
          chk(cv[h] == exp_v, "code_valid", h);
          if (exp_v) begin
            chk(cb[h] == exp_bit, "code_bit", h);
            chk(csof[h] == exp_sof && ceof[h] == exp_eof && cinfo[h] == exp_info, "markers", h);
          end
        end
        iv[h]   = gaps ? 1'($urandom_range(2, 0) != 0) : 1'b1;
        idat[h] = 1'($urandom);
        cpar[h] = 1'($urandom);
        mrd[h]  = 1'($urandom);
        #1;
        exp_v = 0; exp_sof = 0; exp_eof = 0; exp_info = 0;
        if (phase_pos < K) begin
          chk(rdy[h] == 1, "ready in data phase", h);
          chk(mre[h] == 0 && cclr[h] == 0, "no read in data phase", h);
          if (iv[h]) begin
            chk(cen[h] && cdin[h] == idat[h] && mwe[h] && mwd[h] == idat[h], "data to regs and memory", h);
            exp_v = 1; exp_bit = cpar[h]; exp_sof = (phase_pos == 0);
            phase_pos++;
          end else begin
            chk(!cen[h] && !mwe[h], "idle without valid", h);
          end
        end else if (phase_pos < K + li) begin
          chk(rdy[h] == 0 && cen[h] && cdin[h] == 0 && !mwe[h], "zero insertion", h);
          exp_v = 1; exp_bit = cpar[h];
          phase_pos++;
        end else begin
          chk(rdy[h] == 0 && mre[h] && !cen[h], "information read", h);
          exp_v = 1; exp_bit = mrd[h]; exp_info = 1;
          exp_eof = (phase_pos == 2 * K + li - 1);
          chk((cclr[h] && mclr[h]) == exp_eof, "clear on last bit", h);
          phase_pos++;
        end
        prev_valid = exp_v;
      end
      if (!gaps) chk(cyc - start_cyc == 2 * K + li, "block length 2K+LI cycles", h);
    end
    @(negedge clk);
    chk(cv[h] == exp_v && cb[h] == exp_bit && ceof[h] == 1, "last code bit", h);
    iv[h] = 0;
  endtask

  initial begin
    iv = '{0, 0};
    idat = '{0, 0}; cpar = '{0, 0}; mrd = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 4, 3, 0);
    run(0, 4, 3, 1);
    run(1, 0, 3, 0);
    run(1, 0, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
