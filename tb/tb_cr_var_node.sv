// tb_cr_var_node -- compares the variable node with an integer reference:
// total = channel + sum of connected check messages, extrinsic outputs
// total - c2v[j] saturated to +-31, hard decision = (total < 0).
module tb_cr_var_node;
  localparam int M = 6, W = 6, LMAX = 31;
  localparam logic [M-1:0] MASK = 6'b110101;
  int checks = 0, failures = 0;
  logic [W-1:0] ch;
  logic [M-1:0][W-1:0] c2v, v2c;
  logic hard;

  cr_var_node #(.M(M), .MASK(MASK), .W(W)) dut (.ch, .c2v, .v2c, .hard);

  function automatic int sv(logic [W-1:0] x);
    return int'($signed(x));
  endfunction

  initial begin
    int total, e;
    for (int t = 0; t < 4000; t++) begin
      ch = (t % 3 == 0) ? W'(int'($urandom_range(8, 0)) - 4) : W'(int'($urandom_range(62, 0)) - 31);
      for (int j = 0; j < M; j++) c2v[j] = W'(int'($urandom_range(62, 0)) - 31);
      #1;
      total = sv(ch);
      for (int j = 0; j < M; j++) if (MASK[j]) total += sv(c2v[j]);
      checks++;
      if (hard != (total < 0)) begin
        failures++;
        $display("ERR t=%0d hard %0b total %0d", t, hard, total);
      end
      for (int j = 0; j < M; j++) begin
        e = MASK[j] ? total - sv(c2v[j]) : 0;
        if (e > LMAX) e = LMAX;
        if (e < -LMAX) e = -LMAX;
        checks++;
        if (sv(v2c[j]) != e) begin
          failures++;
          $display("ERR t=%0d j=%0d got %0d exp %0d", t, j, sv(v2c[j]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
