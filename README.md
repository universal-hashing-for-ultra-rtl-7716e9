# WH: a bit-serial universal hash for ultra-low-power message authentication

Sensor nodes, RFID tags and similar self-powered devices have a budget of a few
microwatts. That rules out public-key signatures and most block-cipher MACs, but
they still need to prove that a message is authentic. A Wegman–Carter MAC does
this job with a *universal hash*: both sides share a randomly chosen hash
function (selected by a key). The sender hashes the message and encrypts only the
short hash. The collision bound of the hash family is proven, so no safety margin
is needed, and the hash is the only part that touches every message bit.

This RTL implements **WH** ("weighted NH-polynomial with reduction"), a hash
family built so that its hardware is as small as possible:

    WH_K(M) = sum_{i=1..n/2} (m_{2i-1} + k_{2i-1}) (m_{2i} + k_{2i}) x^((n/2-i)w)   mod p

Message words `m_i` and key words `k_i` are `w`-bit elements of GF(2^w) = GF(2)[x]/p(x).
Addition is XOR and multiplication is carry-less multiplication modulo an
irreducible polynomial `p` of degree `w`. For distinct equal-length messages, WH
is universal: the collision probability is exactly 2^-w over the choice of key.

On top of the core, the unit can split the 64-bit security level over `t`
narrower passes (the **Toeplitz construction**). This shrinks the circuit, and
with it the leakage power, without lowering security.

## Why the weight x^((n/2-i)w) matters: one register does everything

The multiplier is bit-serial and works most-significant-bit first. For each block pair
`a = m1 ^ k1`, `b = m2 ^ k2` it runs W cycles of

    acc <- acc * x + a * b_j    (mod p),      j = W-1, W-2, ..., 0

After the W cycles of a pair, the old accumulator has been multiplied by x^W and
the new product `a*b mod p` has been added. That is Horner's rule for the sum
above: the weight x^((n/2-i)w) of pair `i` is exactly what the remaining
`n/2-i` pairs multiply into it. So the running hash stays in the multiplier's own
accumulator. There is no separate product register, no multiplexer and no final
adder. This is the whole difference from a plain "multiply, reduce, then add"
construction, and it is where the area saving comes from.

Each cycle costs:

* `gf_xtime`: shift the accumulator up by one and, if the bit shifted out was 1,
  XOR in the low terms of `p`. With a five-term polynomial this is a few XOR gates.
  Reduction is therefore interleaved with the multiplication at almost no cost.
* W AND gates to select `a` when `b_j = 1`, and W XOR gates to add it in.
* A W-bit shift register that presents the bits of `b` in turn.

The two key additions are W XOR gates each.

## Toeplitz splitting (WH-64, WH-32, WH-16)

Leakage power is proportional to circuit size, and the circuit scales with the
block width. To keep 2^-64 security with a narrower datapath, the message is
hashed `t` times with blocks of `w = 64/t` bits, and the `t` results are
concatenated:

    WH^T_K(M) = ( WH_{K[1..n]}(M), WH_{K[3..n+2]}(M), ..., WH_{K[2t-1..n+2t-2]}(M) )

Pass `j` uses the same key stream, moved on by two words. Key material grows
only from `n` to `n + 2(t-1)` words. The concatenation is universal with
collision probability 2^-(wt).

| configuration | T | block W | tag | cycles to hash 128 bits | pair operations |
|---|---|---|---|---|---|
| WH-64 | 1 | 64 | 64 | 64 | 1 |
| WH-32 | 2 | 32 | 64 | 128 | 4 |
| WH-16 (default) | 4 | 16 | 64 | 256 | 16 |

A message of L bits takes `T * L / 2` cycles when pairs are fed back to back.
The narrow versions are `T` times slower per clock. They can be clocked `T` times
faster for the same runtime: dynamic power then stays the same and leakage drops by `T`.

`wh_toeplitz` holds one WH core and a tag register. The passes run one after
another. The circuit that stores the message, replays it `T` times and produces
the shifted key windows is **not** part of this RTL. It connects to the
block-pair input port. For pass `j` (1..T) and pair `i` (1..n/2) it must present

    m1 = m_{2i-1}   k1 = k_{2i+2j-3}   m2 = m_{2i}   k2 = k_{2i+2j-2}

with `in_first` on `i = 1` and `in_last` on `i = n/2`. Padding a message to a
multiple of two words is also its job.

## Control: an LFSR that counts to W

A pair takes W cycles, so the control needs a modulo-W counter. A binary
counter's incrementer would be the slowest and most glitch-prone path in a
datapath that is otherwise only a few gates deep. `lfsr_counter` instead uses
an LFSR of `log2(W)` flip-flops: 6 for WH-64, 5 for WH-32 and 4 for WH-16.

A maximal-length LFSR has only 2^R - 1 states. The feedback is therefore also
XORed with the NOR of the low R-1 bits (a de Bruijn counter). This inserts the
all-zero state, so the counter goes through exactly W states and returns to
its start state by itself. The terminal state, which flags the last cycle of a
pair, is computed at elaboration by stepping the LFSR W-1 times.

The core's control is only this counter, a busy flag and a "last pair" flag.

## Interface and timing (`wh_toeplitz`, `wh_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all state to 0) |
| `in_valid` / `in_ready` | in / out | 1 | a block pair is taken when both are high |
| `in_first`, `in_last` | in | 1 | first / last pair of a pass (both high for a one-pair message) |
| `m1`, `k1` | in | W | odd message and key word. **Must be held until the pair is finished** |
| `m2`, `k2` | in | W | even message and key word. Sampled only when the pair is taken |
| `hash`, `hash_valid` | out | W, 1 | partial hash, with a one-cycle pulse. `hash` stays until the next pass starts |
| `tag`, `tag_valid` | out | 64, 1 | concatenated result, with a pulse one cycle after the T-th `hash_valid` (top level only) |

* `in_ready` is high whenever no pair is being multiplied. A pair is taken at
  most every W cycles, and back-to-back pairs run without a gap.
* In the cycle a pair is taken, the top bit of `b` comes straight from the input
  and the other bits go into the shift register. The pair then finishes in
  W cycles rather than W+1.
* The multiplicand `a = m1 ^ k1` is read in every one of the W cycles and is not
  stored, which saves W flip-flops. The source must keep `m1`/`k1` stable from
  the accepting cycle until `in_ready` returns. An assertion in `wh_core`
  reports any violation.
* `hash_valid` rises W cycles after the last pair of a pass is taken.
  `tag_valid` follows one cycle after the T-th partial hash.
* `tag` carries the first pass in its most significant W bits.

## Parameters and the reduction polynomial

| module | parameter | default | meaning |
|---|---|---|---|
| `wh_toeplitz` | `T` | 4 | Toeplitz passes (1, 2 or 4) |
| | `WT` | 64 | tag width (`wh_pkg::WORD_BITS`) |
| | `W` | `WT/T` | block width |
| | `POLY` | `wh_pkg::default_poly(W)` | low terms of p(x) |
| `wh_core`, `wh_datapath`, `gf_xtime` | `W`, `POLY` | 64, x^64+x^4+x^3+x+1 | |
| `lfsr_counter` | `W`, `R`, `K` | 64, 6, 5 | states, flip-flops, feedback tap of x^R+x^K+1 |
| `tag_concat` | `W`, `T` | 16, 4 | |

The construction leaves `p` open. It only needs to be irreducible of degree `w`,
and low weight keeps the reduction small. No irreducible trinomial exists for a
degree divisible by 8, so these pentanomials are used (all checked irreducible):

| W | p(x) | `POLY` |
|---|---|---|
| 64 | x^64 + x^4 + x^3 + x + 1 | `64'h1B` |
| 32 | x^32 + x^7 + x^3 + x^2 + 1 | `32'h8D` |
| 16 | x^16 + x^5 + x^3 + x + 1 | `16'h2B` |

Bit `i` of every word is the coefficient of x^i. A different irreducible `p`
can be passed through `POLY`. The hash values change, but the security does not.

## Files

| file | contents |
|---|---|
| `rtl/wh_pkg.sv` | shared constants: word size, default polynomials, LFSR taps |
| `rtl/gf_xtime.sv` | multiply by x modulo p (the reduction unit) |
| `rtl/wh_datapath.sv` | key XORs, serial-operand shift register, accumulator |
| `rtl/lfsr_counter.sv` | W-state LFSR cycle counter |
| `rtl/wh_core.sv` | datapath + control + handshake: one WH hash of block size W |
| `rtl/tag_concat.sv` | concatenation of the T partial hashes |
| `rtl/wh_toeplitz.sv` | top level: WH^T with a 64-bit tag |
| `tb/wh_ref_pkg.sv` | reference arithmetic: full carry-less product, long division, WH sum with explicit powers of x |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_wh_variants` |
| `tb/wh_core_check.sv`, `tb/wh_toeplitz_check.sv` | reusable stimulus/checkers; the second also plays the message/key source |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends a hung run with a failure. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_wh_toeplitz rtl/wh_pkg.sv tb/wh_ref_pkg.sv tb/tb_wh_toeplitz.sv
    ./obj_dir/Vtb_wh_toeplitz

Replace `tb_wh_toeplitz` with `tb_wh_core`, `tb_wh_datapath`, `tb_gf_xtime`,
`tb_lfsr_counter`, `tb_tag_concat` or `tb_wh_variants` to run the others. Each
finishes in well under a second.

What the tests establish:

* **`tb_wh_toeplitz`**: default configuration (WH-16), end to end. It uses a fixed 128-bit
  message and 256-bit key whose tag (`64'hdb2f74ebc4ba709d`) was worked out
  separately. It checks the tag, and that the tag appears exactly `T*64 + 1` cycles after
  the first pair is taken. It then runs random messages of 2–16 words with random source
  stalls, and a one-pair message, checking every partial hash and tag against the
  reference. It counts back-to-back pairs, stalls, key-window shifts, modular
  reductions, message restarts over a non-zero accumulator and single-pair
  messages, and fails if any of them never happened.
* **`tb_wh_variants`**: the same for WH-64 (`T = 1`) and WH-32 (`T = 2`), with their own fixed tags.
* **`tb_wh_core`**: WH cores of width 64, 32, 16 and 8 on random messages, some all-ones.
  It checks the W-cycle pair rate, the W-cycle latency and that there is one `hash_valid` per message.
* **`tb_wh_datapath`**, **`tb_gf_xtime`**, **`tb_lfsr_counter`** and **`tb_tag_concat`** test each unit on its own.
  This includes the LFSR visiting W distinct states and the concatenation order.

## Size

After generic synthesis (Yosys, coarse cells), the default WH-16 unit has 106
flip-flops:

* 16 accumulator
* 16 shift register
* 4 counter
* 3 control
* 67 for the 64-bit tag and its count

A single WH-64 core has 137. The datapath has no adder and no carry chain; per
bit it is one AND and a two-input XOR, plus the reduction XORs on the few
polynomial taps.

## Where this RTL makes its own choices

* The reduction polynomials, the LFSR feedback taps and the de Bruijn way of
  extending the LFSR to W states.
* The valid/ready handshake with `in_first`/`in_last` framing, the clearing of
  the accumulator on the first pair, and asynchronous reset.
* Reading the top bit of `b` directly in the accepting cycle, so that a pair
  takes exactly W cycles.
* Most-significant-bit-first multiplication. This is what interleaved reduction
  and accumulating in one register require. An LSB-first (right-shift)
  multiplier, as is common for integer designs, cannot do it.
* The tag register and its bit order (first pass in the top bits).
* Default `T = 4` (WH-16), the smallest configuration. `T = 1` and `T = 2` are
  parameter settings.

## Not included

* The message/key source with Toeplitz key windows. It is assumed to sit outside the unit.
  `wh_toeplitz_check` in the testbench shows what it must do.
* The related constructions NH (integer multiply-add, the reference point), PH
  (polynomial, double-length output) and PR (polynomial with reduction but a
  separate accumulator). WH supersedes them and they are not built here.
* Power and energy figures. These depend on a standard-cell library and on
  gate-level power analysis, and the RTL says nothing about them beyond the
  cycle counts above.
