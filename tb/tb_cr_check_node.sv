// tb_cr_check_node -- compares the offset min-sum check node with a direct
// reference (for each edge: sign product and minimum magnitude over all
// other edges, minus the offset, floored at zero) on random and corner-case
// messages, for a row of weight 5 inside 8 positions and a full row.
module tb_cr_check_node;
  localparam int N = 8, W = 6, LMAX = 31;
  localparam logic [N-1:0] MASK_A = 8'b1011_0101;
  int checks = 0, failures = 0;
  logic [N-1:0][W-1:0] v2c, c2v_a, c2v_b;

  cr_check_node #(.N(N), .MASK(MASK_A), .W(W), .OFFSET(1)) dut_a (.v2c, .c2v(c2v_a));
  cr_check_node #(.N(N), .MASK('1), .W(W), .OFFSET(0)) dut_b (.v2c, .c2v(c2v_b));

  function automatic int sv(logic [W-1:0] x);
    int v = int'($signed(x));
    return (v < -LMAX) ? -LMAX : v;
  endfunction

  function automatic int ref_msg(logic [N-1:0] mask, int n, int off);
    int s = 1, m = LMAX, v;
    if (!mask[n]) return 0;
    for (int i = 0; i < N; i++) begin
      if (i == n || !mask[i]) continue;
      v = sv(v2c[i]);
      if (v < 0) s = -s;
      if ((v < 0 ? -v : v) < m) m = (v < 0 ? -v : v);
    end
    m = (m > off) ? m - off : 0;
    return s * m;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0: v2c[i] = W'($urandom);
          1: v2c[i] = W'(int'($urandom_range(6, 0)) - 3);          // small, with zeros
          2: v2c[i] = ($urandom_range(1, 0)) ? W'(LMAX) : W'(-LMAX); // saturated
          default: v2c[i] = (i == t % N) ? W'(1) : W'($urandom);
        endcase
      end
      #1;
      for (int n = 0; n < N; n++) begin
        checks += 2;
        if (sv(c2v_a[n]) != ref_msg(MASK_A, n, 1)) begin
          failures++;
          $display("ERR A t=%0d n=%0d got %0d exp %0d", t, n, sv(c2v_a[n]), ref_msg(MASK_A, n, 1));
        end
        if (sv(c2v_b[n]) != ref_msg('1, n, 0)) begin
          failures++;
          $display("ERR B t=%0d n=%0d got %0d exp %0d", t, n, sv(c2v_b[n]), ref_msg('1, n, 0));
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
