# Unified HQC.KEM accelerator (HQC-128 / HQC-192 / HQC-256)

HQC is a code-based key-encapsulation mechanism: a public key is a pair
(h, s = x + h·y) in the ring R = F2[x]/(x^p − 1), a message is protected by a
concatenated Reed–Solomon / Reed–Muller code, and the Fujisaki–Okamoto style
re-encryption check in decapsulation turns the public-key encryption into a
CCA-secure KEM. This RTL puts key generation, encapsulation and
decapsulation for all three parameter sets into one accelerator. One set of
functional units and five memories serve every operation. A controller
steps through a fixed schedule, and the parameter set only changes the
lengths it loads from a small constant table.

| set | p | w | w_r = w_e | RS code | RM code (m copies) | 128-bit words per polynomial |
|---|---|---|---|---|---|---|
| HQC-128 | 17669 | 66 | 75 | [46,16,31] | [384,8,192] (m = 3) | 139 |
| HQC-192 | 35851 | 100 | 114 | [56,24,33] | [640,8,320] (m = 5) | 281 |
| HQC-256 | 57637 | 131 | 149 | [90,32,59] | [640,8,320] (m = 5) | 451 |

The organisation follows a published unified HQC design. That design's
main ideas are kept here:
- a shift-and-add multiplier processing several sparse indices at once;
- a single RS encoder and decoder sized for the largest code;
- an RM decoder built on a fast Hadamard transform;
- SHAKE256 for every hash and pseudo-random stream;
- a constant-time fixed-weight sampler fed by a pipelined modular reducer;
- five memories with a step-driven crossbar.

Where this RTL departs from that design, it is said below.

## Top level: `hqc_kem`

```
 host port ──► 5 memories ◄──► crossbar (selected by schedule step) ◄──► units
                DENSE  ACC  SPARSE  CW  IO                   SHAKE256 + feeder
                                                             dense / sparse sampler
                                                             poly_mult, poly_adder
                                                             rsrm_encoder / rsrm_decoder
                                                             mem_compare
```

Ports:
- **Control:** `start`, `op` (0 key generation, 1 encapsulation,
  2 decapsulation), `sec` (`HQC128`, `HQC192`, `HQC256`), `busy`, `done`.
- **Result flag:** `reject` says whether the last decapsulation took the
  implicit-rejection path.
- **Host memory port:** `host_mem`, `host_addr`, `host_we`, `host_wdata`,
  `host_rdata`. It is usable while idle; read data comes one cycle after
  the address. Seeds go in through this port, and keys and ciphertexts come
  out through it. The accelerator has no random source of its own.

Memory map (128-bit words; byte strings are little-endian, 16 bytes per word):

| memory | read ports | contents |
|---|---|---|
| 0 DENSE | 4 | h @0, s @512, u @1024, re-encrypted u′ @1536 |
| 1 ACC | 1 | multiplier accumulators @0 and @512 |
| 2 SPARSE | 1 | index lists y @0, x @32, r_b @64, e @96, r_a @128 |
| 3 CW | 2 | codeword / v (and v′) @0, received v @512, decoder input @1024 |
| 4 IO | 1 | φ @0, γ @4, σ @8, m @10, salt @12, θ @14, K @18, m′ @22 |

Dense polynomials put coefficient i in bit i mod 128 of word i / 128.
Sparse polynomials are lists of 16-bit positions, eight per word. Seeds φ
and γ are 40 bytes, σ and m are k_e bytes (16/24/32), the salt is 16 bytes,
and θ and K are 64 bytes.

### The schedule

The controller (`S_IDLE → S_ISSUE → S_WAIT → … → S_FIN`) keeps a step
counter. A function maps (operation, step, parameter set) to a step record:
which unit runs, which memory regions it reads and writes, and its lengths.
The crossbar is a multiplexer driven by that record. In every step exactly
one unit owns the memory ports it uses, so there is no arbitration logic.

- **Key generation:**
  - h ← CSPRNG(φ);
  - y, then x ← CSPRNG(γ), with y drawn first so that decapsulation can
    reproduce it without discarding any stream output;
  - ACC = h·y, then s = ACC + x.
- **Encapsulation:**
  - θ ← SHAKE(m ‖ φ[0:32] ‖ salt ‖ 0x03);
  - h ← CSPRNG(φ);
  - codeword = RS-RM(m);
  - r_b, e, r_a ← CSPRNG(θ);
  - h·r_b and s·r_b;
  - v = codeword + (s·r_b + e), truncated to n_e·m·128 bits;
  - u = h·r_b + r_a;
  - K ← SHAKE(m ‖ u ‖ v ‖ 0x04).
- **Decapsulation:**
  - y ← CSPRNG(γ);
  - m′ = decode(v + u·y);
  - re-encrypt m′ into (u′, v′);
  - compare u′ with u and v′ with v;
  - K ← SHAKE((σ if they differ or decoding failed, else m′) ‖ u ‖ v ‖ 0x04).

Every CSPRNG call appends the domain byte 0x02. K and θ are the first 512
output bits.

The steps run one after the other. The reference design overlaps some of
them: it encodes m while h is expanded, and samples while multiplying. That
only costs latency; the cycle counts are given below.

## Sparse × dense multiplication (`poly_mult`)

This unit needs the most explanation. The product of a dense h with a
sparse r is the XOR of w rotations of h. Rotating h left by s positions mod
x^p − 1 is the same as reading h as a cyclic bit stream that starts at bit
x0 = (p − s) mod p. Because p is not a multiple of 128, the stream wraps
inside a word. The unit therefore does not build a 128-bit barrel shifter.
Instead, each of its L lanes:
- reads its dense-port words from word x0 / 128 upwards, wrapping at the
  last word;
- keeps them in a 640-bit window;
- extracts 128 aligned bits per cycle.

At the wrap point the window is re-seeded so that bit p − 1 is followed by
bit 0. All L lanes start together. Each output word is the XOR of the L
rotated words and the accumulator word from the previous group. The last
word is masked to p − 128·(words − 1) bits.

A group of L indices costs ceil(p/128) + 7 cycles, so one product takes
ceil(w/L)·(ceil(p/128) + 7) + 2 cycles. If w is not a multiple of L, the
lanes of the last group that have no index are switched off. L = 4 is this
design's choice; the source design leaves the number of lanes open.
Changing L changes only the number of DENSE read ports.

## Reed–Solomon decoding chain

- **`rs_syndrome`:** Horner evaluation at α^1..α^58, one symbol per cycle,
  highest degree first.
- **`rs_epibma`:** an inversionless Berlekamp–Massey solver. It is the
  reformulated (riBM) array with 3·t_max + 1 = 88 processing elements.
  Elements are preset from the syndromes, zero beyond 2t, and the array runs
  2t cycles. The error locator Λ and a scaled evaluator Ω_h are read
  directly from the final registers. The source design uses an enhanced
  parallel variant with 2·t_max + 1 elements that finishes one cycle earlier;
  that variant's equations were not available, so this is a replacement
  with the same role and a larger area.
- **`rs_ecsee`:** Chien search over positions 0..n_e − 1 with Λ split into
  even and odd powers. The odd half doubles as Λ′. With the riBM evaluator,
  the error value is Y = Ω_h(X⁻¹)·X^−(2t+1) / Λ_odd(X⁻¹), and a running
  register supplies the X power. The inverse comes from a table computed at
  elaboration. Decoding fails when the number of roots differs from deg Λ.
- **`rs_decoder`:** buffers the word, chains the three stages and corrects
  in place. Latency is 2t + n_e + 3 cycles after the last symbol.
- **`rs_encoder`:** one 58-stage LFSR. The feedback is tapped at stage
  2t − 1 of the selected code, and the generator coefficients are
  g(x) = ∏(x − α^j), j = 1..2t, expanded at elaboration. The HQC-128
  constant term is 89.
- **GF(2^8):** the field polynomial is x^8 + x^4 + x^3 + x^2 + 1 with α = x.

## Reed–Muller and the concatenated code

- **`rm_encoder`:** RM(1,7) built from four 32-bit words. Word 0 carries
  message bits 0–4 and 7, and the other three words reuse it with bits 5
  and 6 folded in.
- **`rm_decoder`:** adds the m copies in 128 signed counters, then runs a
  7-stage fast Hadamard transform, one stage per cycle. It corrects for the
  counter offset and finds the entry of largest magnitude with a pipelined
  comparator tree. The output symbol is that entry's index, plus its sign
  as bit 7.
- **`rsrm_encoder`:** streams the message through both encoders byte by
  byte and writes block i to words i·m … i·m + m − 1.
- **`rsrm_decoder`:** decodes all n_e RM blocks first (n_e·(m + 17)
  cycles), because the RS decoder needs the whole word. It then runs the RS
  decoder and writes m′ and a failure flag.

## SHAKE256 and the samplers

- **`shake256`** (with `keccak_round`): one Keccak-f[1600] round per cycle.
  It absorbs one 64-bit lane per cycle with byte-exact lengths, pads
  0x1F…0x80, and squeezes 64-bit lanes.
- **`hash_feeder`:** concatenates up to four memory byte strings and the
  domain byte into the absorb stream, one byte per cycle. This is simple but
  slow for the session-key hash, which absorbs u and v (about 4.5k bytes
  for HQC-128 and 14.4k for HQC-256). A word-wide packer is the obvious
  next speed-up.
- **`dense_sampler`:** packs pairs of lanes into words and masks the last
  word to p bits. It also stores θ and K.
- **`sparse_sampler`:** implements the constant-time fixed-weight algorithm
  of the HQC specification:
  - it takes exactly w 32-bit values r_i, the lower half of each lane first;
  - it forms i + (r_i mod (p − i)) using `mod_pipe`, a 32-stage
    shift-and-subtract reducer with one iteration per stage;
  - it then scans downwards, replacing any position that appears again
    later by i.

  Its timing does not depend on the values: w + 32 cycles to reduce, w − 1
  to fix up, and ceil(w/8) writes.
- **`poly_adder`:**
  - adds dense polynomials word by word (or copies them);
  - flips single bits for a sparse addend, one index every 3 cycles,
    because two indices may hit the same word.
- **`mem_compare`:** always reads every word, so its timing does not depend
  on where a difference is.

## Measured latency

Cycles from `start` to `done` at L = 4, from the end-to-end testbench:

| set | key generation | encapsulation | decapsulation |
|---|---|---|---|
| HQC-128 | 4 080 | 14 332 | 18 527 |
| HQC-192 | 9 926 | 33 434 | 43 193 |
| HQC-256 | 19 103 | 60 877 | 79 958 |

The reference design's FPGA figures at 143 MHz convert to roughly
5.6k / 11.7k / 18.3k cycles for HQC-128 and 25.9k / 54.1k / 82.1k cycles
for HQC-256. This implementation is faster in key generation and slower in
encapsulation. There are two reasons: its steps are not overlapped, and
the hash feeder moves one byte per cycle.

## How far to trust it

What the testbenches establish:
- The KEM is self-consistent: decapsulating a genuine ciphertext returns
  the encapsulated key, and a one-bit change in v is rejected with a
  different key.
- The ring arithmetic (s = h·y + x, u = h·r_b + r_a) matches an independent
  bit-level model.
- Every unit matches an independent model or known-answer values:
  - SHAKE256 against standard test vectors;
  - the RS code against its roots;
  - the RM code against its generator.

What has not been done: the outputs have not been compared with the HQC
reference implementation's known-answer tests. Byte orders, the exact
HASH-G input (m ‖ first 32 bytes of φ ‖ salt) and the y-before-x and
r_b, e, r_a sampling orders are those of the source design. The sampling
orders deliberately differ from the older specification order. Treat
interoperability with other HQC implementations as unverified.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=… failures=…` and has a
watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_hqc_kem -y rtl -y tb rtl/hqc_pkg.sv tb/tb_hqc_kem.sv
./obj_dir/Vtb_hqc_kem
```

`tb_hqc_kem` runs the top at its default size. For each of the three sets
it runs key generation, encapsulation and two decapsulations, about 425k
cycles in total, and finishes in seconds. It also checks every cycle count.

The unit testbenches are:

| testbench | unit |
|---|---|
| `tb_poly_mult`, `tb_poly_adder` | polynomial arithmetic |
| `tb_rs_encoder`, `tb_rs_syndrome`, `tb_rs_epibma`, `tb_rs_ecsee`, `tb_rs_decoder` | Reed–Solomon |
| `tb_rm_encoder`, `tb_rm_decoder` | Reed–Muller |
| `tb_rsrm_encoder`, `tb_rsrm_decoder` | concatenated code |
| `tb_shake256` | hashing |
| `tb_sparse_sampler`, `tb_dense_sampler`, `tb_mod_pipe` | sampling |
| `tb_mem_compare`, `tb_hqc_sram`, `tb_hqc_param_rom` | support blocks |

## Parameters

- `hqc_kem.L` and `poly_mult.L`: parallel sparse indices, default 4.
- `AW = 11`: word-address width shared by the units.
- `hqc_sram`: `DEPTH`, `NR` (read ports) and `W` (128).

The per-set constants live in `hqc_pkg::get_params`; add a set there to
support another one. Field tables and generator polynomials are computed
from formulas at elaboration, so no data files are needed.
