// cr_conv_encoder -- rate-1 feed-forward convolutional encoder (the "shift
// registers" of the CR-LDPC encoder).
//
// Each enabled cycle takes one input bit u_j and produces one parity bit
//   p_j = g_0 u_j ^ g_1 u_{j-1} ^ ... ^ g_r u_{j-r}
// with the generator taps g_t. The register holds the last GLEN-1 inputs; the
// parity output is combinational from the register and din (same cycle).
// 'clr' empties the register so that every block starts from the zero state:
// the code is recursive in the sense that the same encoding restarts for
// each block of information.
//
// Follows the document: one input, one output, defined by a single generator
// polynomial, built of a shift register and XOR taps. The generator
// convention (MSB = g_0) and the synchronous clear are this design's choices.
module cr_conv_encoder #(
  parameter int unsigned GLEN = cr_ldpc_pkg::GLEN_DEF,            // r+1 taps
  parameter logic [GLEN-1:0] G = GLEN'(cr_ldpc_pkg::G_DEF)        // MSB = g_0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,     // synchronous: forget the past inputs
  input  logic en,      // shift din in this cycle
  input  logic din,     // u_j
  output logic parity   // p_j, valid in the same cycle as din
);

  // sr[GLEN-1-t] holds u_{j-t} for t = 1..GLEN-1 (GLEN must be at least 3)
  logic [GLEN-2:0] sr;
  logic [GLEN-1:0] taps;   // taps[GLEN-1-t] = u_{j-t}, aligned with G

  assign taps   = {din, sr};
  assign parity = ^(taps & G);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sr <= '0;
    else if (clr) sr <= '0;
    else if (en)  sr <= {din, sr[GLEN-2:1]};
  end

endmodule
