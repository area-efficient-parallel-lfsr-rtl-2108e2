# Parallel CRC generator built on a state-space transformed LFSR

A CRC is the remainder of the message polynomial, times s^n, divided by a
generator polynomial G(s) of degree n. The classic circuit is a serial LFSR
that takes one message bit per clock. This design takes **v message bits
per clock**, with v = n by default (32 bits per clock for CRC-32). It
produces the same remainder as the serial register.

Running v serial steps at once is a linear map over GF(2). The usual
look-ahead circuit builds it from the matrices A^v and Bv. Those matrices
are dense, so they need many XOR gates. This design applies a change of
basis to the register contents, X = T·X^T, with a transformation matrix T
chosen so that the three matrices the circuit needs are sparse. The
register then holds the *transformed* state X^T. One extra XOR network
outside the loop turns it back into the CRC.

The structure, the matrices and the transformation vectors follow the
state-space parallel LFSR published by R. Mahajan, K. Devi and D. Bagai,
"Area efficient parallel LFSR for cyclic redundancy check" (2020). That
work builds on the improved state-space transformation of Hu, Sha and Wang
(2017). This design chose the port handshake, the optional input register,
the bit ordering at the ports, and how the XOR networks are written.

## The state-space formulation

The state is X = [X_0 … X_{n-1}]. Element X_0 is the coefficient of
s^(n-1), the bit that is fed back, and X_{n-1} is the coefficient of s^0.
One serial step with input bit u is

    X(t+1) = A·X(t) + B·u(t)

Here A holds the generator coefficients g_{n-1} … g_0 in its first column
and ones on its superdiagonal. B = (g_{n-1} … g_0)^T. This is the ordinary
MSB-first Galois CRC register. Applying v bits u(tv) … u(tv+v-1) in one
clock gives

    X(t+v) = A^v·X(t) + Bv·U,   Bv = [A^(v-1)B … AB B]

Column j of Bv multiplies the j-th bit in time. The transformed system,
with X = T·X^T, is

    X^T(t+1) = AvT·X^T(t) + BvT·U,   AvT = T^-1·A^v·T,   BvT = T^-1·Bv
    X(t)     = T·X^T(t)

T is built from a vector V = [1, v_1, …, v_{n-1}]. It is upper-triangular
Toeplitz: row i holds v_{j-i} in column j ≥ i. Because T is unit upper
triangular, it is always invertible. T^-1 is Toeplitz again: its elements
are the power-series inverse of V, truncated to n terms. For the CRC-32
vector the inverse comes out equal to V, so T^-1 = T. The reason is
V = 1 + s^22 + s^27 + s^30, and every cross term of V² is past s^31.

The vector is written in hex with its leading 1 as the most significant
bit. For example, 0x80000212 means v_22 = v_27 = v_30 = 1. The vector is
chosen offline by a tree search that minimises TN, the total number of ones
in AvT, BvT and T. That search is a design-time program, not part of the
hardware; its results enter the RTL as a parameter.

All matrices are computed while the design elaborates, by constant
functions in `plfsr_pkg`. Only fixed XOR networks reach the netlist.

## Datapath

```
             v            n                       n
 in_data ──/──► [BvT] ──/──► [input reg]* ──► (+) ──► [D] ──┬──► [T] ──/──► crc
                                               ▲            │
                                               └── [AvT] ◄──┘   X^T(t)
                                            * IN_PIPE = 1 only
```

| module      | role                                                                  |
|-------------|-----------------------------------------------------------------------|
| `bvt_unit`  | input coupling, n×v matrix BvT                                        |
| `avt_unit`  | feedback coupling, n×n matrix AvT, the only logic inside the loop     |
| `state_reg` | the XOR adder and the n-bit register D, plus start-of-message control |
| `t_unit`    | output transform X = T·X^T, outside the loop                          |
| `parallel_lfsr` | top level: connects the four units, adds the handshake and the optional input register |
| `plfsr_pkg` | matrix types and the functions that compute A, Bv, T, T^-1, AvT and BvT |

Each output bit of a matrix unit is the XOR of the input bits that one
matrix row selects. The RTL writes each row as an XOR reduction. Finding
terms that several rows have in common is left to the synthesis tool; see
"Gate cost".

### The input register (`IN_PIPE`)

With `IN_PIPE = 1`, the default, the term BvT·U is registered, together with
its valid, first and last flags, before it is added into D. The feedback
loop then contains only AvT and one XOR, and the data path has 2n
flip-flops. The published cost figures assume 2n delay elements for the
proposed circuit (24, 32 and 64 for n = 12, 16 and 32). Their critical-path
figures also fit a loop without BvT in it: the tree depth of the heaviest
AvT row plus one gives 4, 4, 3, 4, 4, 5 XOR levels for the six codes
below, against the published 4, 5, 3, 4, 4, 5. If BvT were inside the loop,
the depths would be 4, 5, 4, 5, 4, 6.

The published block diagram itself shows only the register D. Set
`IN_PIPE = 0` to get exactly that circuit. Results are identical; only the
latency changes.

## Interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock |
| `rst_n`     | in  | 1 | asynchronous active-low reset; clears all state |
| `in_valid`  | in  | 1 | a block is applied this clock |
| `in_first`  | in  | 1 | with `in_valid`: first block of a message; the state restarts from zero |
| `in_last`   | in  | 1 | with `in_valid`: last block of a message |
| `in_data`   | in  | V | message block; `in_data[V-1]` is the earliest bit |
| `crc`       | out | N | CRC; `crc[N-1]` is the coefficient of s^(n-1) |
| `crc_valid` | out | 1 | one-clock flag: `crc` holds the CRC of the message just finished |

- **Throughput:** one V-bit block per clock. A message of m bits (m must be
  a multiple of V) enters in m/V clocks.
- **Stalls:** `in_valid` may go low between blocks of a message. The state
  holds.
- **Back-to-back messages:** a new message may start on the clock after
  the previous message's last block.
- **Latency:** `crc_valid` rises `1 + IN_PIPE` clocks after the clock that
  applied the last block.
- **Hold:** after that, `crc` keeps its value until the next message's
  first block reaches D.
- **Assertion:** a block without `in_first` must continue an open message.
  `in_valid` should be low during reset.

The CRC is the plain remainder M(s)·s^n mod G(s). The initial state is
zero, the message is taken most significant bit first, and there is no
final inversion. Standards that preset the register or reflect bits, such
as Ethernet's CRC-32, need those steps added around this block. Because
the CRC is linear, presetting the register to P gives the same result as
XORing P into the first n message bits.

## Parameters and configurations

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 32 | generator degree n (2 to 64) |
| `V`       | `N` | bits per clock v (1 to 64) |
| `POLY`    | `32'h04C1_1DB7` | g_{n-1} … g_0; bit k is the coefficient of s^k, and s^n is implied |
| `TVEC`    | `32'h8000_0212` | transformation vector; the top bit must be 1 |
| `IN_PIPE` | 1 | register BvT·U ahead of D |

The published configurations all use v = n:

| code               | N  | POLY         | TVEC         | ones AvT / BvT / T | TN  |
|--------------------|----|--------------|--------------|--------------------|-----|
| CRC-12             | 12 | `0x80F`      | `0xA01`      | 29 / 25 / 23       | 77  |
| CRC-16             | 16 | `0x8005`     | `0xC001`     | 35 / 33 / 32       | 100 |
| CRC-CCITT (SDLC)   | 16 | `0x1021`     | `0x8408`     | 88 / 45 / 31       | 164 |
| CRC-16 reverse     | 16 | `0x4003`     | `0xC002`     | 154 / 73 / 33      | 260 |
| SDLC reverse       | 16 | `0x0811`     | `0x8810`     | 84 / 38 / 33       | 155 |
| CRC-32 (default)   | 32 | `0x04C11DB7` | `0x80000212` | 414 / 425 / 49     | 888 |

The matrices the package computes have exactly these ones counts, which
are the published ones. That agreement is what fixes the orientation of A,
the order of the input bits and the reading of the hex vectors.

Any other polynomial works too. Any vector with a leading 1 gives a
correct circuit; only its cost changes.

## Gate cost

The ones counts are exact. The XOR count depends on how terms shared
between rows are reused. Writing each row as a separate XOR tree needs
(ones in the row − 1) gates per row. The published counts assume
aggressive sharing of terms that several rows have in common, but do not
give a procedure that reproduces them. This RTL leaves that sharing to
synthesis. The table compares, per matrix (AvT / BvT / T):

| code        | no sharing      | published, shared | generic yosys `synth` |
|-------------|-----------------|-------------------|-----------------------|
| CRC-12      | 17 / 13 / 11    | 13 / 11 / 11      | 16 / 13 / 11          |
| CRC-16      | 19 / 17 / 16    | 16 / 15 / 16      | 18 / 17 / 16          |
| CRC-CCITT   | 72 / 29 / 15    | 26 / 17 / 15      | 59 / 26 / 15          |
| CRC-16 rev. | 138 / 57 / 17   | 29 / 15 / 17      | 51 / 29 / 17          |
| SDLC rev.   | 68 / 22 / 17    | 34 / 15 / 17      | 57 / 20 / 17          |
| CRC-32      | 382 / 393 / 17  | 107 / 99 / 17     | 269 / 267 / 17        |

For T, the published counts equal the no-sharing counts. For AvT and BvT,
a plain synthesis run gets well short of the published figures. Reaching
them would take a dedicated common-subexpression pass over the constant
matrices, for example a greedy pairwise-term extraction, generated into
explicit XOR networks. That is not part of this RTL. Function and timing
do not depend on it. A cheaper scheme, building each row from an
already-built row when their difference is smaller than the row itself,
brings the 16-bit codes near the published counts. For CRC-32 it still
needs 322 / 336 gates, and it chains rows, which lengthens the loop
path.

## Verification

Every testbench checks against a bit-serial CRC register: the conventional
one-bit-per-clock circuit, written independently of the RTL in
`tb/plfsr_ref_pkg.sv`.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_bvt_unit`      | ones(BvT) = 425 for CRC-32. For 300 random blocks, T·(BvT·U) equals the serial state reached from zero. |
| `tb_avt_unit`      | ones(AvT) = 414. For 300 random states, T·(AvT·x) = A^v·(T·x), with A^v computed as v serial zero-input steps. |
| `tb_t_unit`        | ones(T) = 49, the last column equals the vector, and random products match a diagonal-by-diagonal product. |
| `tb_state_reg`     | 1000 random cycles of update, start of message and hold against a cycle model. |
| `tb_parallel_lfsr` | The default build (CRC-32, 32 bits per clock) end to end. 400 random messages of 1 to 12 blocks, with stalls, back-to-back starts, single-block messages and idle hold. Also checks the exact `crc_valid` timing, one clock per block, and that every situation occurred. |
| `tb_crc_table`     | The six published configurations, each with and without the input register, 60 random messages each. Also checks the package's ones counts and TN against the published values, and prints the unshared XOR counts. |

All of them pass.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/plfsr_pkg.sv tb/plfsr_ref_pkg.sv tb/tb_parallel_lfsr.sv \
    --top-module tb_parallel_lfsr -o sim
./obj_dir/sim
```

Replace `tb_parallel_lfsr` with any testbench name above. Each prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog that counts a
failure if the run hangs.

## Departures and open points

- **XOR sharing.** Term sharing between rows is left to synthesis (see
  "Gate cost"), so gate counts are above the published figures. The
  matrices are the published ones.
- **Input register.** The default `IN_PIPE = 1` follows the published
  delay-element and critical-path figures rather than the block diagram,
  which shows no input register. `IN_PIPE = 0` gives the diagram's circuit.
- **Loop matrix.** The published transformed state equation writes the
  loop matrix as T^-1·A·T. The look-ahead equation it is derived from, and the published
  ones counts, require T^-1·A^v·T, which is what is built.
- **Register numbering.** The state numbering follows the A matrix. The
  published serial-register drawing numbers the stages the other way
  round; this affects only naming.
- **Invented parts.** The handshake, reset style, zero initial state and
  port bit order are this design's own choices.
- **Message length.** Messages must be a whole number of V-bit blocks.
  Padding or a narrower last block is not supported.
- **Vector search.** The search for the vector V is not implemented. The
  published vectors are used as parameters.
