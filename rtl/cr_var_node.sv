// cr_var_node -- variable-node processor of the CR-LDPC decoder.
//
// One instance serves one column (one code bit) of the parity-check matrix.
// MASK marks the check nodes the column connects to. It forms the a-posteriori
// sum  total = ch + sum of the incoming check messages  in a wide adder and
// sends back to each connected check node the extrinsic value total - c2v[j],
// saturated to the symmetric W-bit range. The hard decision is 1 when the
// total is negative (LLR convention: positive means bit 0).
//
// Purely combinational. The update rule is the standard belief-propagation
// one; widths and saturation are this design's choices.
module cr_var_node #(
  parameter int unsigned M     = 28,             // check nodes in the code
  parameter logic [M-1:0] MASK = '1,             // edges of this column
  parameter int unsigned W     = cr_ldpc_pkg::LLR_W_DEF
) (
  input  logic [W-1:0]        ch,      // channel LLR of this bit
  input  logic [M-1:0][W-1:0] c2v,     // check-to-variable messages
  output logic [M-1:0][W-1:0] v2c,     // variable-to-check messages
  output logic                hard     // hard decision
);

  localparam int unsigned WT = W + $clog2(M + 2);
  localparam int          LMAX = (1 << (W - 1)) - 1;

  logic signed [WT-1:0] total;

  always_comb begin
    total = WT'($signed(ch));
    for (int j = 0; j < M; j++)
      if (MASK[j]) total = total + WT'($signed(c2v[j]));
  end

  assign hard = total[WT-1];

  always_comb begin
    logic signed [WT-1:0] e;
    for (int j = 0; j < M; j++) begin
      e = total - WT'($signed(c2v[j]));
      if (!MASK[j])                    v2c[j] = '0;
      else if (e > WT'(LMAX))          v2c[j] = W'(LMAX);
      else if (e < -WT'(LMAX))         v2c[j] = W'(-LMAX);
      else                             v2c[j] = W'(e);
    end
  end

endmodule
