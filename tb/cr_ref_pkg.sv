// cr_ref_pkg -- reference models shared by the CR-LDPC testbenches.
//
// Written independently of the RTL: the generator is given as a list of the
// delays t with g_t = 1 (read off the polynomial, e.g. 6111 octal =
// 1 + D + D^5 + D^8 + D^11), and the code word is built by direct convolution
// over the information bits followed by the inserted zero bits.
package cr_ref_pkg;

  typedef int int_q[$];
  typedef bit bit_q[$];

  // 6111 (octal) = 110 001 001 001 -> taps at delays 0, 1, 5, 8, 11
  function automatic int_q taps_6111();
    int_q t = '{0, 1, 5, 8, 11};
    return t;
  endfunction

  // Parity bit p_j of the inputs seen so far (u[0..j]).
  function automatic bit conv_bit(bit_q u, int j, int_q taps);
    bit p = 0;
    foreach (taps[i]) if (j - taps[i] >= 0) p ^= u[j - taps[i]];
    return p;
  endfunction

  // Whole code word: K+LI parity bits, then the K information bits.
  function automatic bit_q encode(bit_q info, int li, int_q taps);
    bit_q u = info;
    bit_q c;
    for (int i = 0; i < li; i++) u.push_back(1'b0);
    for (int j = 0; j < u.size(); j++) c.push_back(conv_bit(u, j, taps));
    foreach (info[i]) c.push_back(info[i]);
    return c;
  endfunction

  // Approximately Gaussian sample (sum of 12 uniforms), scaled by 1000.
  function automatic int gauss_milli();
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(1000, 0));
    return s - 6000;
  endfunction

endpackage
