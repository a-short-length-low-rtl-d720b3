// cr_ldpc_decoder -- iterative decoder of the CR-LDPC code.
//
// The parity-check matrix is derived from the convolutional generator at
// elaboration time: H = [G_c^T | I], KX = K+LI rows and 2*KX columns (see
// cr_ldpc_pkg). Columns 0..K-1 are the information bits, columns K..KX-1 the
// LI zero bits the encoder inserted, columns KX..2KX-1 the parity bits. The
// zero bits are not transmitted: the decoder re-inserts them as known bits
// with the largest positive LLR, so they never flip and keep feeding reliable
// messages to their checks. The decoder thus works on a KX x 2KX matrix even
// though only 2K+LI bits were sent.
//
// Architecture: fully parallel flooding schedule. There is one check-node unit
// per row and one variable-node unit per column, wired by generate loops
// wherever H has a one; the check-to-variable messages are the only iteration
// state (one register per edge). One iteration takes one clock cycle. After
// every iteration the syndrome of the hard decisions is checked and decoding
// stops as soon as it is zero (early termination) or after MAX_ITER
// iterations.
//
// Interface and timing:
//   llr_valid/llr_ready/llr_data : 2K+LI channel LLRs (signed, W bits,
//     positive = 0) in code order, parity p_0..p_{KX-1} first, then the
//     information u_0..u_{K-1}. llr_ready is high while the decoder loads.
//   dec_valid (one-cycle pulse), dec_info[i] = decoded u_i, dec_converged
//     (syndrome was zero), dec_iters (iterations run).
//   dec_valid rises dec_iters+2 cycles after the last LLR is accepted; the
//   next block can be loaded in the cycle after dec_valid.
//
// The matrix construction and the known zero bits follow the document; the
// document decodes with the sum-product algorithm, while this decoder uses
// offset min-sum, fixed-point messages, a flooding schedule and an iteration
// limit chosen here.
module cr_ldpc_decoder #(
  parameter int unsigned K        = cr_ldpc_pkg::K_DEF,
  parameter int unsigned LI       = cr_ldpc_pkg::LI_DEF,
  parameter int unsigned GLEN     = cr_ldpc_pkg::GLEN_DEF,
  parameter logic [GLEN-1:0] G    = GLEN'(cr_ldpc_pkg::G_DEF),
  parameter int unsigned W        = cr_ldpc_pkg::LLR_W_DEF,
  parameter int unsigned MAX_ITER = cr_ldpc_pkg::MAX_ITER_DEF,
  parameter int unsigned OFFSET   = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                llr_valid,
  input  logic [W-1:0]        llr_data,
  output logic                llr_ready,
  output logic                dec_valid,
  output logic [K-1:0]        dec_info,
  output logic                dec_converged,
  output logic [$clog2(MAX_ITER+1)-1:0] dec_iters
);

  localparam int unsigned KX = K + LI;        // rows, and parity length
  localparam int unsigned N  = 2 * KX;        // columns
  localparam int unsigned M  = KX;
  localparam int unsigned NT = 2 * K + LI;    // transmitted bits
  localparam int unsigned TW = $clog2(NT + 1);
  localparam int unsigned IW = $clog2(MAX_ITER + 1);
  localparam logic [W-1:0] LMAX = W'(cr_ldpc_pkg::llr_max(W));

  function automatic logic [N-1:0] row_mask(input int j);
    logic [N-1:0] r;
    for (int n = 0; n < int'(N); n++)
      r[n] = cr_ldpc_pkg::h_bit(64'(G), GLEN, KX, j, n);
    return r;
  endfunction

  function automatic logic [M-1:0] col_mask(input int n);
    logic [M-1:0] c;
    for (int j = 0; j < int'(M); j++)
      c[j] = cr_ldpc_pkg::h_bit(64'(G), GLEN, KX, j, n);
    return c;
  endfunction

  typedef enum logic {S_LOAD, S_ITER} state_e;

  state_e        state;
  logic [TW-1:0] tcnt;
  logic [IW-1:0] iter;

  logic [N-1:0][W-1:0] ch;                 // channel LLR per column
  logic [W-1:0]        ch_q [N];           // loaded LLRs (zero columns unused)
  logic [N-1:0]        hard;
  logic [M-1:0]        syn;

  // messages, indexed [check][variable]
  logic [N-1:0][W-1:0] c2v_q  [M];
  logic [N-1:0][W-1:0] c2v_nx [M];
  logic [N-1:0][W-1:0] v2c_cn [M];         // as seen by the check nodes
  logic [M-1:0][W-1:0] c2v_vn [N];         // as seen by the variable nodes
  logic [M-1:0][W-1:0] v2c_vn [N];

  for (genvar n = 0; n < N; n++) begin : g_ch
    if (n >= K && n < KX) begin : g_zero
      assign ch[n] = LMAX;                 // inserted zero bit: certain
    end else begin : g_rx
      assign ch[n] = ch_q[n];
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_cn
    localparam logic [N-1:0] ROW = row_mask(j);
    cr_check_node #(.N(N), .MASK(ROW), .W(W), .OFFSET(OFFSET)) u_cn (
      .v2c(v2c_cn[j]), .c2v(c2v_nx[j])
    );
    assign syn[j] = ^(hard & ROW);
  end

  for (genvar n = 0; n < N; n++) begin : g_vn
    localparam logic [M-1:0] COL = col_mask(n);
    cr_var_node #(.M(M), .MASK(COL), .W(W)) u_vn (
      .ch(ch[n]), .c2v(c2v_vn[n]), .v2c(v2c_vn[n]), .hard(hard[n])
    );
    for (genvar j = 0; j < M; j++) begin : g_e
      assign c2v_vn[n][j] = c2v_q[j][n];
      assign v2c_cn[j][n] = v2c_vn[n][j];
    end
  end

  // Position of received bit t in the column order.
  function automatic int unsigned rx_col(input int unsigned t);
    return (t < KX) ? KX + t : t - KX;
  endfunction

  logic [W-1:0] llr_sat;
  assign llr_sat   = (llr_data == {1'b1, {(W-1){1'b0}}}) ? W'(-int'(LMAX)) : llr_data;
  assign llr_ready = (state == S_LOAD);

  logic done_now;
  assign done_now = (state == S_ITER) && ((syn == '0) || (iter == IW'(MAX_ITER)));

  always_ff @(posedge clk) begin
    if (llr_ready && llr_valid) ch_q[rx_col(32'(tcnt))] <= llr_sat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_LOAD;
      tcnt          <= '0;
      iter          <= '0;
      dec_valid     <= 1'b0;
      dec_info      <= '0;
      dec_converged <= 1'b0;
      dec_iters     <= '0;
      for (int j = 0; j < M; j++) c2v_q[j] <= '0;
    end else begin
      dec_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (llr_valid) begin
          if (tcnt == TW'(NT - 1)) begin
            tcnt  <= '0;
            iter  <= '0;
            state <= S_ITER;
            for (int j = 0; j < M; j++) c2v_q[j] <= '0;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_ITER: begin
          if (done_now) begin
            dec_valid     <= 1'b1;
            dec_info      <= hard[K-1:0];
            dec_converged <= (syn == '0);
            dec_iters     <= iter;
            state         <= S_LOAD;
          end else begin
            for (int j = 0; j < M; j++) c2v_q[j] <= c2v_nx[j];
            iter <= iter + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
