# CR-LDPC: a short LDPC code with a shift-register encoder

This is RTL for a short-block LDPC codec built around one idea. The parity bits
come from a plain feed-forward convolutional encoder, not from a dense
generator-matrix multiply. The decoder runs belief propagation on a
parity-check matrix read straight off that encoder's generator polynomial.
The encoder is a handful of flip-flops and XOR gates and emits one parity bit
per clock. The decoder's matrix is sparse and banded, which suits a fully
parallel decoder. The scheme is called CR-LDPC ("convolutional-recursive"
LDPC): the same convolutional encoding restarts for every block.

The default configuration is k = 24 information bits, generator g = 6111 (octal), and
L_i = 4 inserted zero bits. It sends 52 code bits per block (rate 24/52).

## The code

Let the generator be `g = [g_0 g_1 ... g_r]`. The leftmost bit of its octal
form is `g_0`, the D^0 coefficient, so `6111` = `110 001 001 001`, which is
`1 + D + D^5 + D^8 + D^11`. One block is encoded like this:

1. The k information bits `u_0 .. u_{k-1}` are fed serially into a rate-1
   convolutional encoder. The encoder starts from the all-zero state.
2. Then L_i zero bits are fed into it. They are not transmitted. They extend
   the parity sequence from k to k+L_i bits. They also give the decoder
   L_i bits that it knows with certainty.
3. The encoder produces `p_j = g_0 u_j ^ g_1 u_{j-1} ^ ... ^ g_r u_{j-r}` for
   j = 0 .. k+L_i-1. Inputs before the start of the block count as 0. The
   output is truncated after k+L_i bits, with no tail flush.
4. The code word is the parity followed by the information:
   `p_0 .. p_{k+L_i-1}, u_0 .. u_{k-1}`. That is 2k+L_i bits, so the rate is
   k/(2k+L_i). For example, k=24 with L_i=0 gives rate 1/2, and k=12 with
   L_i=12 gives rate 1/3.

### Parity-check matrix

Let KX = k+L_i, and let `x = [u_0 .. u_{k-1}, 0 .. 0, p_0 .. p_{KX-1}]` be the
*extended* word, which includes the inserted zeros. Every parity equation above
is then one row of

    H = [ G_c^T | I ]        (KX rows, 2*KX columns)

Here `G_c^T` is the lower-triangular Toeplitz matrix with `G_c^T[j][i] = g_{j-i}`.
Row j checks `p_j` against the inputs `u_{j-r} .. u_j`. Each row has
weight popcount(g)+1 = 6 for 6111, or less in the first r rows. The decoder
works on this KX x 2KX matrix, not on the (2k+L_i)-column matrix of the
transmitted bits. The L_i zero columns are re-inserted as bits whose value is
known for sure. They take part in message passing as very reliable variable
nodes. The package `cr_ldpc_pkg` computes H at elaboration time from the
generator (`h_bit`). Changing `G`, `K` or `LI` rebuilds the encoder, the
matrix and the decoder's wiring together.

## Encoder (`cr_ldpc_encoder`)

It has three parts: a shift register, a memory and a multiplexer.

* `cr_conv_encoder` is a (GLEN-1)-stage shift register with XOR taps where
  `g_t = 1`. Its parity output is combinational from the register and the
  incoming bit. `clr` returns it to the zero state.
* `cr_info_memory` is a K x 1-bit buffer with write and read pointers. It holds
  the information bits while the parity goes out.
* `cr_enc_control` sequences the three phases. DATA accepts K bits (`in_ready`
  is high) and sends their parity. ZERO shifts in L_i zeros and sends their
  parity; it is skipped when L_i = 0. INFO switches the output multiplexer to
  the memory. On the last information bit it clears the register and the
  memory for the next block.

Timing:
* All code outputs are registered. The first code bit appears one cycle after
  the first information bit is accepted.
* With a continuous input, a block takes exactly 2k+L_i cycles, and the code
  stream has no gaps.
* The encoder accepts input only in the DATA phase. Gaps in `in_valid` simply
  stretch that phase.
* The code output has no back-pressure.
* `code_sof`, `code_eof` and `code_info` mark the first bit, the last bit and
  the information bits of a block.

## Decoder (`cr_ldpc_decoder`)

The decoder is fully parallel. It has one `cr_check_node` per row of H and one
`cr_var_node` per column. Generate loops connect them wherever H has a one.
Each node is given its row or column of H as a constant `MASK` parameter, so
the edges that do not exist are optimised away. The only iteration state is one
W-bit check-to-variable message register per edge, plus the loaded channel LLRs.

* **Loading.** The decoder takes 2k+L_i signed LLRs through `llr_valid` /
  `llr_ready` / `llr_data`, in transmission order: parity first, then
  information. A positive LLR means bit 0. An input of -2^(W-1) is clamped to
  -(2^(W-1)-1), so that all messages stay in a symmetric range. The L_i zero
  columns are not loaded. They are tied to the largest positive LLR.
* **Iterating (flooding schedule).** Each clock cycle does one complete
  iteration, and the new check messages are registered:
  * Each variable node sums its channel LLR and its incoming check messages. It
    sends each check the extrinsic value, saturated to W bits.
  * Each check node applies offset min-sum. It finds the overall sign, the
    smallest magnitude, the second-smallest magnitude and the position of the
    smallest. For each edge, the output magnitude is the smallest of the
    *other* magnitudes minus `OFFSET`, floored at zero.
* **Stopping.** Before each update, the hard decisions (sign of the variable
  sums) are checked against every row of H. Decoding ends as soon as the
  syndrome is zero (`dec_converged = 1`), or after `MAX_ITER` iterations
  (`dec_converged = 0`). Clean words finish with zero iterations.
* **Result.** `dec_valid` pulses once, with `dec_info[i] = u_i` and the
  iteration count `dec_iters`. It arrives `dec_iters + 2` cycles after the
  last LLR was accepted. The next block can be loaded in the cycle after that.

At the defaults this means 28 check units and 56 variable units. There are
143 message registers of 6 bits (one per edge). Synthesis gives about 4,800 word-level cells
for the whole codec.

## Top level (`cr_ldpc_top`)

The top level holds the encoder and the decoder side by side. They share `K`,
`LI`, `GLEN` and `G`, so they always agree on the code. Modulation, the channel
and soft demapping sit between the encoder's `enc_code_*` stream and the
decoder's `dec_llr_*` stream. They are outside the design.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 24 | information bits per block |
| `LI` | 4 | inserted zero bits L_i (0 allowed) |
| `GLEN` | 12 | generator length r+1 (at least 3) |
| `G` | `12'o6111` | generator, MSB = g_0 |
| `W` | 6 | LLR / message width (decoder) |
| `MAX_ITER` | 20 | iteration limit (decoder) |
| `OFFSET` | 1 | min-sum offset in LSBs (decoder) |

The defaults for K, G and L_i are those of the published configuration with a
printed generator. The same generator is also used with L_i = 0 to get
rate 1/2. The rate-1/3 configuration (k = 12, L_i = 12, a 24 x 48 decoding
matrix) can be built by setting `K=12, LI=12`, but its generator polynomial is
not known. A generator length of at least about k/2 is recommended for a good
degree distribution and girth.

## Departures and design choices

* **Decoding algorithm.** The code was characterised with the sum-product
  algorithm. This decoder uses offset min-sum with 6-bit fixed-point messages,
  which is the usual hardware approximation. Its error rates will be somewhat
  worse than floating-point sum-product figures, and no bit-exact BER
  comparison has been made.
* **Parity-check matrix.** H = [G_c^T | I] is derived here from the encoder
  equations: truncated convolution, zero initial state, parity placed before
  the information. It agrees with the published matrix sizes, which are
  KX x 2KX. It is not checked entry by entry against a published matrix.
* **Identity parity part.** The parity part of H is an identity. It is not the
  dual-diagonal "accumulate" staircase of WiMAX-style repeat-accumulate
  matrices. That follows from the feed-forward (non-feedback) generator: the
  encoder has no accumulator, so each parity bit depends only on the inputs.
* **Choices made here.** The iteration limit, message width, offset,
  flooding schedule, early termination on a zero syndrome, handshakes,
  registered encoder output, block markers and asynchronous active-low reset
  are all choices of this design.
* **No overlap between blocks.** The encoder does not accept the next block
  while it is still sending the stored information. The decoder does not
  accept LLRs while it iterates. Double-buffering either one would raise
  throughput.

## Verification

Each module has a self-checking testbench in `tb/`. Reference models in
`tb/cr_ref_pkg.sv` build code words by direct convolution from the list of
generator taps, independently of the RTL.

| testbench | what it checks |
|---|---|
| `tb_cr_conv_encoder` | parity against direct convolution for 6111 and for 1+D^2+D^3; impulse response; clear between blocks |
| `tb_cr_info_memory` | write/read order, rewind |
| `tb_cr_enc_control` | phase sequence, zero insertion, multiplexer selection, markers, 2k+L_i cycle blocks, for L_i = 4 and 0 |
| `tb_cr_ldpc_encoder` | whole code words against the reference, 1-cycle latency, block time, input gaps, L_i = 4 and 0 |
| `tb_cr_check_node` / `tb_cr_var_node` | node arithmetic against integer references |
| `tb_cr_ldpc_decoder` | clean words (0 iterations), weak errors corrected, Gaussian noise, non-code words stop at the iteration limit, input saturation, latency = iterations + 2, L_i = 4 and 0 |
| `tb_cr_ldpc_top` | encoder → noisy LLRs → decoder at the default parameters; counts zero insertion, multiplexer switch, decoding without iterations, correction, early stop, iteration limit and saturation, and fails if any never happens |
| `tb_cr_ldpc_ber` | bit-error-rate run over a BPSK/QPSK AWGN channel for the k = 24, g = 6111 configurations with L_i = 4 and L_i = 0 |

A typical `tb_cr_ldpc_ber` run gives these results. There are 250 blocks per
point, so rates below about 1e-4 read as zero. "Raw" is the hard-decision error
rate of the received information bits.

| Eb/N0 | L_i = 4: coded / raw | L_i = 0: coded / raw |
|---|---|---|
| 2 dB | 2.4e-2 / 1.2e-1 | 3.0e-2 / 1.2e-1 |
| 4 dB | 0 / 6.1e-2 | 2.2e-3 / 5.5e-2 |
| 6 dB | 0 / 2.6e-2 | 5.0e-4 / 2.4e-2 |

Inserting the four known zeros clearly helps, despite the rate loss, and the
mean iteration count falls below 2 from 4 dB upward. These numbers are too few
for error-floor claims.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

    verilator --binary --timing --assert -y rtl -y tb --top-module tb_cr_ldpc_top \
        rtl/cr_ldpc_pkg.sv tb/cr_ref_pkg.sv tb/tb_cr_ldpc_top.sv
    ./obj_dir/Vtb_cr_ldpc_top

The two packages are named explicitly, ahead of the testbench. `-y` finds the
modules. Every testbench finishes within a few seconds.
