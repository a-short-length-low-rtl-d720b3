// tb_cr_conv_encoder -- checks the rate-1 convolutional encoder against a
// direct convolution, for the 6111 (octal) generator and for the 13 (octal)
// example polynomial 1 + D^2 + D^3, including the clear between blocks.
module tb_cr_conv_encoder;
  import cr_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic p_a, p_b;
  int checks = 0, failures = 0;

  cr_conv_encoder dut_a (.clk, .rst_n, .clr, .en, .din, .parity(p_a));
  cr_conv_encoder #(.GLEN(4), .G(4'o13)) dut_b (.clk, .rst_n, .clr, .en, .din, .parity(p_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_q hist;
    int_q ta = taps_6111();
    int_q tb_ = '{0, 2, 3};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      hist.delete();
      for (int j = 0; j < 40; j++) begin
        @(negedge clk);
        en  = ($urandom_range(3, 0) != 0);
        din = (blk == 0 && j == 0) ? 1'b1 : 1'(($urandom & 1));
        if (blk == 0) din = (j == 0);       // impulse response first
        clr = 0;
        #1;
        if (en) begin
          hist.push_back(din);
          checks += 2;
          if (p_a !== conv_bit(hist, hist.size() - 1, ta)) begin
            failures++;
            $display("ERR 6111 blk %0d bit %0d: got %0b", blk, hist.size() - 1, p_a);
          end
          if (p_b !== conv_bit(hist, hist.size() - 1, tb_)) begin
            failures++;
            $display("ERR 13 blk %0d bit %0d: got %0b", blk, hist.size() - 1, p_b);
          end
        end
      end
      @(negedge clk);
      en = 0; clr = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
