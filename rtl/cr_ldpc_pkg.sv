// cr_ldpc_pkg -- shared constants and helper functions of the CR-LDPC codec.
//
// The CR-LDPC code sends k information bits as k+L_i parity bits followed by
// the k information bits. The parity is the output of a rate-1 feed-forward
// convolutional encoder with generator g = [g_0 g_1 ... g_r], fed with the k
// information bits followed by L_i zero bits. The defaults are the
// configuration with a printed generator: k = 24, g = 6111 (octal), with
// L_i = 4 zero bits.
//
// Generator convention: the generator is held as a GLEN-bit vector whose most
// significant bit is g_0 (the D^0 coefficient), so an octal literal written
// the way the generator is printed (13 -> 1011 -> 1 + D^2 + D^3) maps
// directly: g_t = G[GLEN-1-t].
//
// Parity-check matrix used by the decoder (this design's reading of the
// generator matrix G_e = [I | G_c]): with u the k+L_i encoder inputs and p the
// k+L_i parity bits, p_j = XOR_{t=0..r} g_t u_{j-t}, so H = [G_c^T | I] with
// KX = k+L_i rows and 2*KX columns. Column n < KX is input bit u_n (n >= k
// are the inserted zeros), column KX+j is parity bit p_j.
package cr_ldpc_pkg;

  localparam int unsigned K_DEF    = 24;            // information bits per block
  localparam int unsigned LI_DEF   = 4;             // inserted zero bits L_i
  localparam int unsigned GLEN_DEF = 12;            // generator length r+1
  localparam logic [GLEN_DEF-1:0] G_DEF = 12'o6111; // g_0 is the MSB

  // Decoder number formats (not given by the code definition; chosen here).
  localparam int unsigned LLR_W_DEF    = 6;   // channel LLR and message width
  localparam int unsigned MAX_ITER_DEF = 20;  // iteration limit

  // Largest positive value of a signed w-bit message (symmetric range).
  function automatic int llr_max(input int unsigned w);
    return (1 << (w - 1)) - 1;
  endfunction

  // Generator tap g_t of a generator held MSB-first in a 64-bit vector.
  function automatic logic gen_tap(input logic [63:0] g, input int unsigned glen,
                                   input int t);
    if (t < 0 || t >= int'(glen)) return 1'b0;
    return g[glen - 1 - t];
  endfunction

  // Entry (j, n) of H = [G_c^T | I] for KX = k+L_i rows.
  function automatic logic h_bit(input logic [63:0] g, input int unsigned glen,
                                 input int unsigned kx, input int j, input int n);
    if (n < int'(kx)) return gen_tap(g, glen, j - n);
    return (n - int'(kx)) == j;
  endfunction

endpackage
