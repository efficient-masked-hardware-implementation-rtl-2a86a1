# Grain-128AEADv2 with pipeline-like pre-computation, unmasked and first-order masked

Grain-128AEADv2 is a stream cipher with built-in authentication. It keeps a 128-bit LFSR and a
128-bit NFSR, derives one keystream bit per round from a pre-output function `y`, and uses the
odd pre-output bits to drive a MAC: a 64-bit shift register R and a 64-bit accumulator A.

A fast hardware version computes many rounds per clock. Its clock period is then set by one
long path: the NFSR feedback `g` and the pre-output `y` both have to be evaluated on bits that
were written in the same clock, before the next NFSR bits exist. This RTL breaks that path
without changing the cipher:

* Most of the terms of `g` and `y` use only bits that are already in the registers one clock
  ahead.
* Those terms are computed a clock early, from the state at an offset of P positions (the state
  is about to shift by P), and kept in a register.
* In the next clock only the few remaining terms are added. The cipher's output sequence is
  unchanged bit for bit.

The same idea carries over to a first-order masked version. There every nonlinear term is a
domain-oriented masking (DOM) AND gadget with a register inside it. `g` and `y` become
three-stage pipelines whose first stage again looks ahead, this time by two clocks.

The top, `grain_top`, carries both designs side by side, each behind its own 32-bit
LWC-API-style interface:

| design | rounds per clock | message bits per clock | init latency | fresh random bits per clock |
|---|---|---|---|---|
| unmasked, `P_PLAIN = 32` | 32 | 16 | 17 clocks (1 + 512/32) | 0 |
| masked, `P_MASKED = 8` | 8 | 4 | 66 clocks (2 + 512/8) | 160 |

These are the configurations with the best throughput per area among those that were
evaluated. With a 0.49 ns and a 0.48 ns clock on a 65 nm process they correspond to 32.65 Gbps
and 8.33 Gbps.

## The cipher, as the RTL implements it

Rounds are numbered t = 0, 1, ... One round shifts both registers down by one bit. The new
LFSR bit is `f(S)`, with taps s0, s7, s38, s70, s81, s96. The new NFSR bit is `s0 + g(B)`.

The pre-output is:

    y = b12 s8 + s13 s20 + b95 s42 + s60 s79 + b12 b95 s94 + s93
        + b2 + b15 + b36 + b45 + b64 + b73 + b89

The phases:

* **Load.** The NFSR gets the key. The LFSR gets the 96-bit IV, then 31 ones, then a 0 in s127.
* **Rounds 0..319.** `y` is XORed into the feedback of both registers.
* **Rounds 320..383.** `y` is still fed back. In addition, the NFSR gets key bit k_{t-320} and
  the LFSR gets key bit k_{t-256}.
* **Rounds 384..447.** `y` goes into A. Nothing is fed back any more.
* **Rounds 448..511.** `y` goes into R.
* **Data.**
  * Each pair of rounds gives an even bit z and an odd bit z'.
  * A message bit m is encrypted as c = m ^ z.
  * If m = 1, the current R is XORed into A.
  * R then shifts by one, taking in z'.
  * After the last message bit, one extra bit 1 (the padding) goes through the authenticator.
    Its ciphertext bit is discarded.
* **Tag.** The tag is A.

Associated data goes through the authenticator like plaintext, but produces no ciphertext.

## Pre-computation in the unmasked core

Files: `grain_nfsr`, `grain_preout`, `grain_lfsr`, `grain_pkg`.

`grain_pkg` stores `s0 + g` and `y` as tables of monomials. Lane k of a P-wide datapath computes
round t+k, so it evaluates each monomial with all indices raised by k. The pre-computation
register of lane k evaluates its "stage-1" monomials with indices raised by P + k. In the next
clock, after the P-bit shift, that value is exactly what lane k needs.

Which monomials can go into stage 1 depends on P:

* **P <= 16.** A fixed split.
  * Stage 1 of `s0 + g`: s0, b0, b26, b56, b91, b96, b3b67, b11b13, b17b18, b27b59.
  * Stage 1 of `y`: everything except b12s8 and s13s20.
* **P = 32.** A monomial whose largest index is more than 128 − 2P would read bits that do not
  exist yet one clock ahead. Every such monomial moves to stage 2. For `s0 + g` this leaves
  s0, b0, b26, b56, b11b13, b17b18, b27b59, b40b48 and b22b24b25 in stage 1. For `y` it
  leaves b12s8, s13s20, b2, b15, b36, b45 and b64.

The stage-1 register is filled once before round 0 from the unshifted state, with indices raised
by k only. This is the "prime" clock. The core therefore needs one clock more than a plain
implementation.

## The authenticator and its pipeline step

File: `grain_auth`.

With W = P/2 message bits per clock (W = 1 at P = 1, see below), A needs R as it will look after each of the next W one-bit
shifts. Those are the bits of the 64 + W bit window {z', R}. The accumulator update is:

    A ^= XOR_k ( m_k ? window[k +: 64] : 0 )

R then shifts by W.

For P >= 16 the window and the message bits are registered first, and A is updated from that
register one clock later. This keeps the z' bits, which come straight from `y`, off the
A-update path. As a result A lags by one clock. The core's `tag_valid` waits for the last
update, which the `pend` output shows.

## The masked core

Files: `dom_and`, `masked_g`, `masked_y`, `masked_core`.

Key, state and authenticator exist as two shares whose XOR is the real value. The IV is public
and is loaded into share 0; share 1 of the LFSR starts at zero. The linear LFSR feedback is
applied to each share separately.

### The DOM gadget (`dom_and`)

For x = ax ^ bx and y = ay ^ by, the gadget forms four products:

* the inner products ax·ay and bx·by;
* the cross products ax·by ^ z and bx·ay ^ z, each blinded with a fresh random bit z.

All four are registered. The output shares are:

    qa = ax·ay ^ (ax·by ^ z)
    qb = bx·by ^ (bx·ay ^ z)

Each share therefore mixes only its own domain with a blinded term from the other domain. The
register stops glitches from combining the shares.

### Three stages for G

`masked_g` computes G = s0 + g:

* **Stage 1.** Per share, the linear part is computed and registered. DOM gadgets compute
  b3b67, b11b13, b17b18, b27b59, b40b48, b61b65, b68b84, and the partial products b22b24,
  b70b78, m = b88b92 and n = b93b95. The lone third factors b25 and b82 are registered next to
  them.
* **Stage 2.** The linear part and all degree-2 results are added and registered. A second
  gadget layer computes (b22b24)·b25, (b70b78)·b82 and m·n.
* **Stage 3.** The stage-2 sum and the three second-layer products are added
  combinationally. This gives the two shares of the new NFSR bits.

`masked_y` has the same shape:

* **Stage 1.** Gadgets compute b12s8, s13s20, b95s42, s60s79 and b12b95. The linear terms and
  s94 are registered next to them.
* **Stage 2.** A second gadget computes (b12b95)·s94.

A round's feedback is ready two clocks after its stage 1 starts, so stage 1 must look two clocks
ahead. Lane k of stage 1 reads the state at offset `fill·P + k`:

* `fill = 0` and `fill = 1` in the two fill clocks before round 0, when the registers hold.
* `fill = 2` from then on.

The highest index read is 95 + 3P − 1, so the scheme stops at P = 8. The next power of two
already reads past bit 127.

### Randomness

Each lane uses 20 fresh bits per clock. `rnd` of `masked_core` (`rdi_data` of the wrapper) is
laid out as follows, with gadget j of lane k taking bit `j·P + k` of its slice:

| bits | gadgets, in order of j |
|---|---|
| `[14P-1:0]` (G) | b3b67, b11b13, b17b18, b27b59, b40b48, b61b65, b68b84, b22b24, b70b78, b88b92, b93b95, (b22b24)b25, (b70b78)b82, mn |
| `[20P-1:14P]` (Y) | b12s8, s13s20, b95s42, s60s79, b12b95, (b12b95)s94 |

The randomness comes from an external generator through a valid/ready pair. In a clock
without fresh bits, the whole core holds: state, pipeline registers and authenticator.

### Outputs and authenticator

The ciphertext is `m ^ z0 ^ z1`. The authenticator is linear in its state for a public message
bit, so each share of A and R is updated on its own. The two tag shares are combined only at
the output.

## Control and stalls

File: `grain_ctrl`.

A counter-based sequencer runs these phases:

| phase | clocks |
|---|---|
| idle | |
| prime / fill | 1 (unmasked) or 2 (masked) |
| init (rounds 0..319) | 320/P |
| key (rounds 320..383) | 64/P |
| A (rounds 384..447) | 64/P |
| R (rounds 448..511) | 64/P |
| data | one clock per chunk |
| done | |

It produces two enables:

* `adv` shifts the registers. It is off during the fill clocks.
* `stage` loads the pipeline registers.

When no input chunk is ready in the data phase, or (masked) no randomness is available, both
enables drop together. The registers and the pre-computed values stay consistent.

P must divide 64, so the unmasked core takes P = 1, 2, 4, 8, 16 or 32 and the masked core
P = 1, 2, 4 or 8.

At P = 1 a message bit needs two rounds, one for z and one for z'. The data phase then
alternates between two kinds of clock:

* A clock that advances the registers without taking input. The core keeps that round's bit
  as z.
* A clock that takes the one-bit chunk. It encrypts with the kept z and feeds the new bit into
  R as z'.

This gives one message bit every two clocks. A and R use a chunk width of W = 1 at P = 1, and
W = P/2 otherwise.

## The 32-bit interface

File: `grain_lwc`.

`grain_lwc` wraps either core (`MASKED` = 0 or 1). Its ports follow the LWC hardware API:

* `key` (32 bits), with `key_valid`, `key_ready` and `key_update`;
* `bdi_data` (32 bits), with `bdi_valid`, `bdi_ready`, `bdi_type`, `bdi_valid_bytes` (4 bits)
  and `bdi_size` (3 bits);
* `bdo_data` (32 bits), with `bdo_valid` and `bdo_ready`;
* `rdi_data`, `rdi_valid` and `rdi_ready` for the masked core. `rdi_data` is 20·P bits wide,
  but at least 32 bits, so that one key word can be split at a time.

Four ports are additions of this design:

* `bdi_eoi` marks the last input word.
* `bdo_valid_bytes` marks the valid bytes of an output word.
* `bdo_type` is CT or TAG.
* `bdo_last` marks the last tag word.

Byte and bit order:

* The first byte of a word is in bits 31:24.
* Inside a byte the stream runs from bit 0 upward, so stream bit 8j+i is bit i of byte j. Key
  word n carries k_{32n} .. k_{32n+31}. The IV and the tag use the same mapping.

A session:

1. **Key (optional).** With `key_update` high, four key words. The masked wrapper splits each
   word into shares using 32 bits of `rdi_data`.
2. **Nonce.** Three NPUB words (type 1101). The core starts initialising on the third word.
3. **Data.** AD words (type 0001), then PT words (type 0100). The last word has `bdi_eoi`
   high. AD and PT may end on any byte.
4. **Output.** CT words (type 0101) as the ciphertext fills them, then two TAG words (type
   1000).

AD and PT bytes are gathered in a 64-bit buffer and handed to the core in chunks of W bits.
The last chunk holds the remaining bits plus the padding bit, so it may consist of the padding
bit alone. Initialisation overlaps with the filling of the buffer.

Limits:

* Only encryption is implemented.
* The AD length encoding of the Grain-128AEADv2 specification is not generated. The host
  sends it as the first AD bytes.
* Compatibility with published test vectors was not checked. The byte order above is this
  design's choice.

## Files

| file | contents |
|---|---|
| `rtl/grain_pkg.sv` | term tables, stage-1 split, phase and segment-type enums, helper functions |
| `rtl/grain_lfsr.sv` | LFSR, P rounds per clock, with an external feedback input |
| `rtl/grain_nfsr.sv` | NFSR with the stage-1 register of `s0 + g` |
| `rtl/grain_preout.sv` | pre-output `y` with its stage-1 register |
| `rtl/grain_auth.sv` | R and A, W bits per chunk, pipeline step for P >= 16 |
| `rtl/grain_ctrl.sv` | phase and round sequencer |
| `rtl/grain_core.sv` | unmasked core (key storage, key re-introduction, data path) |
| `rtl/dom_and.sv` | first-order DOM AND, N lanes |
| `rtl/masked_g.sv`, `rtl/masked_y.sv` | masked three-stage G and Y |
| `rtl/masked_core.sv` | masked core |
| `rtl/grain_lwc.sv` | 32-bit interface around either core |
| `rtl/grain_top.sv` | both designs side by side, ports prefixed `p_` and `m_` |
| `tb/grain_ref_pkg.sv` | bit-serial reference model (one round per call, straight from the equations above) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its own. It also has a
watchdog that counts a failure if the simulation hangs. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_grain_top \
        rtl/grain_pkg.sv rtl/*.sv tb/grain_ref_pkg.sv tb/tb_grain_top.sv
    ./obj_dir/Vtb_grain_top

Replace the top module and the last file for any other testbench.

What the testbenches cover:

* **`tb_grain_top`** runs both designs at their default sizes.
  * Inputs: new and reused keys, random IVs, and AD and PT of random byte lengths, including
    empty ones.
  * Stimulus: random gaps on the input, random backpressure on the output, and random gaps in
    the randomness.
  * Checks: every ciphertext byte and tag against the reference model.
  * Mechanism counts: fill clocks, key re-introduction, accumulator pipeline step, data,
    randomness and output stalls, partial and padding-only final chunks, partial output
    words, empty messages and key reuse. Each must occur at least once, or the test counts a
    failure.
* **`tb_grain_core`** and **`tb_masked_core`** check every ciphertext bit, the tag and the
  initialisation latency. They run every supported parallel level side by side: P = 32, 16,
  8, 4, 2 and 1 (unmasked) and P = 8, 4, 2 and 1 (masked). This covers both stage-1 splits
  and the alternating data phase of P = 1.
* **The unit testbenches** compare each block with an independent bit-level model:
  * `tb_masked_g` and `tb_masked_y` recombine the shares.
  * `tb_dom_and` checks the gadget's two output shares exactly.

## Where this design makes its own choices

* **DOM output shares.** Each output share is its own inner product plus its reshared cross
  product. Adding the two inner products into one share and the two cross products into the
  other would cancel the fresh bit. That would leave the shares unmasked.
* **Cubic terms of g.** b22b24b25 and b70b78b82 use a first-layer gadget for the first two
  factors and a second-layer gadget with the registered third factor. Their random bits are
  extra.
* **Unmasked inner-domain registers.** Inner-domain products are registered as well, so every
  gadget is exactly one pipeline stage.
* **Masked authenticator.** The authenticator is shared even though the message bits are not
  secret, because A and R are derived from the key.
* **Framing, ordering, types and stalls.** Interface framing, byte order, segment-type codes,
  key sharing in the wrapper, and stall behaviour are not given by the cipher and were chosen
  here.
* **Sequencing at P = 1.** Only the rate of one message bit per two clocks is given. The
  alternating data phase that achieves it was chosen here.
* **Reset.** Control state has an asynchronous active-low reset. Datapath registers are always
  loaded before they are read and have no reset.
* **Not built.** Decryption with tag verification, and any
  side-channel leakage evaluation.

## Known warnings

Verilator's lint reports only style warnings:

* Unused signals. Examples are the authenticator's pipeline register when the accumulator
  pipeline is off, and debug-only outputs such as `sreg`.
* The asynchronous reset is also used in the `disable iff` of assertions.
* The unmasked instance in the top leaves its `rdi_ready` output unconnected, because it uses
  no randomness.
