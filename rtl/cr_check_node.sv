// cr_check_node -- check-node processor of the CR-LDPC decoder (offset
// min-sum).
//
// One instance serves one row of the parity-check matrix. MASK marks the
// variable nodes the row connects to. For every connected edge n the output
// message is
//   c2v[n] = (product of the signs of the other inputs) *
//            max(min of the other input magnitudes - OFFSET, 0)
// computed from the smallest and second-smallest magnitude and the overall
// sign parity, so the cost grows linearly with the row weight. Outputs on
// unconnected positions are 0. Messages are signed two's complement, W bits,
// in the symmetric range +-(2^(W-1)-1); an input of -2^(W-1) is read as
// -(2^(W-1)-1).
//
// Purely combinational. The document decodes with the sum-product algorithm
// and names min-sum as an alternative; the offset min-sum approximation, the
// offset and the message width are this design's choices for hardware.
module cr_check_node #(
  parameter int unsigned N      = 56,            // variable nodes in the code
  parameter logic [N-1:0] MASK  = '1,            // edges of this row
  parameter int unsigned W      = cr_ldpc_pkg::LLR_W_DEF,
  parameter int unsigned OFFSET = 1
) (
  input  logic [N-1:0][W-1:0] v2c,   // variable-to-check messages
  output logic [N-1:0][W-1:0] c2v    // check-to-variable messages
);

  localparam logic [W-2:0] MAG_MAX = {(W-1){1'b1}};

  logic [N-1:0][W-2:0] mag;
  logic [N-1:0]        sgn;
  logic [W-2:0]        min1, min2;
  logic [$clog2(N)-1:0] min_idx;
  logic                sgn_all;

  always_comb begin
    for (int n = 0; n < N; n++) begin
      sgn[n] = v2c[n][W-1];
      if (v2c[n][W-1]) begin
        mag[n] = (v2c[n][W-2:0] == '0) ? MAG_MAX : (W-1)'(-v2c[n]);
      end else begin
        mag[n] = v2c[n][W-2:0];
      end
    end
  end

  always_comb begin
    min1    = MAG_MAX;
    min2    = MAG_MAX;
    min_idx = '0;
    sgn_all = 1'b0;
    for (int n = 0; n < N; n++) begin
      if (MASK[n]) begin
        sgn_all = sgn_all ^ sgn[n];
        if (mag[n] < min1) begin
          min2    = min1;
          min1    = mag[n];
          min_idx = ($clog2(N))'(n);
        end else if (mag[n] < min2) begin
          min2 = mag[n];
        end
      end
    end
  end

  always_comb begin
    logic [W-2:0] m;
    for (int n = 0; n < N; n++) begin
      m = (min_idx == ($clog2(N))'(n)) ? min2 : min1;
      m = (m > (W-1)'(OFFSET)) ? m - (W-1)'(OFFSET) : '0;
      if (!MASK[n])                 c2v[n] = '0;
      else if (sgn_all ^ sgn[n])    c2v[n] = W'(-$signed({1'b0, m}));
      else                          c2v[n] = {1'b0, m};
    end
  end

endmodule
