// tb_cr_info_memory -- writes blocks of random bits into the information
// memory, reads them back and checks order and content; interleaves idle
// cycles and rewinds with clr between blocks.
module tb_cr_info_memory;
  localparam int K = 24;
  logic clk = 0, rst_n = 0, clr = 0, we = 0, wr_data = 0, re = 0, rd_data;
  int checks = 0, failures = 0;

  cr_info_memory #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit data [K];
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 30; blk++) begin
      n = (blk % 3 == 0) ? K : int'($urandom_range(K, 1));
      for (int i = 0; i < n; i++) begin
        data[i] = 1'($urandom);
        @(negedge clk);
        we = 1; wr_data = data[i];
        @(negedge clk);
        we = 0;
        if ($urandom_range(1, 0)) @(negedge clk);
      end
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        re = 1;
        #1;
        checks++;
        if (rd_data !== data[i]) begin
          failures++;
          $display("ERR blk %0d bit %0d: got %0b exp %0b", blk, i, rd_data, data[i]);
        end
        @(negedge clk);
        re = 0;
      end
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
