# K2 stream cipher keystream generator, 64 bits per clock

K2 is a word-oriented stream cipher with a 128-bit key and a 128-bit IV. Its state is two
feedback shift registers of 32-bit words and a small nonlinear "mixing" stage with four 32-bit
registers. The feedback of one register is chosen clock by clock from bits of the other
register (dynamic feedback control). Every clock, the cipher gives out a 64-bit keystream word.
The keystream is XORed with plaintext to encrypt, and with ciphertext to decrypt.

This RTL implements the whole cipher: key schedule, state loading, the 24 initialisation
clocks and continuous keystream output. It follows the FPGA micro-architectures published by
Nakano, Fukushima, Kiyomoto and Miyake ("Fast Implementation of Stream Cipher K2 on FPGA"). Those
architectures keep one keystream word per clock and raise the clock rate by cutting the long
paths of the nonlinear function and the key schedule. The reported Virtex-5 results were:

| nonlinear function variant | clock  | throughput  | slices |
|----------------------------|--------|-------------|--------|
| 1: direct form, S-box table | 232 MHz | 14848 Mbit/s | 646 |
| 2: L0/R0 pipeline registers | 228 MHz | 14592 Mbit/s | 740 |
| 3: parallel register pairs (default) | 237 MHz | 15168 Mbit/s | 777 |

Each throughput figure is 64 bits times the clock rate. All three variants are here, chosen by
the `NLF_IMPL` parameter of `k2_top`. They produce the same keystream. The clock rates and
slice counts are vendor-tool results and have not been reproduced with this RTL.

## The cipher state and its feedback

* **FSR-A** (`k2_fsr_a`): five 32-bit stages. Stage *i* holds A<sub>t+i</sub>. On a step, the
  stages shift towards stage 0 and the new stage 4 is
  A<sub>t+5</sub> = α0·A<sub>t</sub> ⊕ A<sub>t+3</sub>.
* **FSR-B** (`k2_fsr_b`): eleven 32-bit stages. Stage *i* holds B<sub>t+i</sub>. The new stage 10 is
  B<sub>t+11</sub> = m0·B<sub>t</sub> ⊕ B<sub>t+1</sub> ⊕ B<sub>t+6</sub> ⊕ m8·B<sub>t+8</sub>.
* **Dynamic feedback controller** (`k2_dfc`): this block sets the two coefficients from FSR-A
  stage 2. With cl1 = A<sub>t+2</sub>[30] and cl2 = A<sub>t+2</sub>[31], m0 is α1 if cl1 = 1
  and α2 otherwise, and m8 is α3 if cl2 = 1 and 1 otherwise. The block also does the two
  multiplications and hands the products to FSR-B.

**Multiplying a word by α.** A word Y = (Y3, Y2, Y1, Y0) is a polynomial in α with byte
coefficients. Each α<sub>k</sub> is a root of a degree-4 polynomial over its own GF(2<sup>8</sup>):

| α | GF(2<sup>8</sup>) polynomial | α<sup>4</sup> = c3·α<sup>3</sup> + c2·α<sup>2</sup> + c1·α + c0, with c = g<sup>e</sup> |
|---|---|---|
| α0 | x<sup>8</sup>+x<sup>7</sup>+x<sup>6</sup>+x+1 | e = 24, 3, 12, 71 |
| α1 | x<sup>8</sup>+x<sup>5</sup>+x<sup>3</sup>+x<sup>2</sup>+1 | e = 230, 156, 93, 29 |
| α2 | x<sup>8</sup>+x<sup>6</sup>+x<sup>3</sup>+x<sup>2</sup>+1 | e = 34, 16, 199, 248 |
| α3 | x<sup>8</sup>+x<sup>6</sup>+x<sup>5</sup>+x<sup>2</sup>+1 | e = 157, 253, 56, 16 |

Here g = 0x02 is the generator of that GF(2<sup>8</sup>). The product α·Y is the word shifted up by
one byte, with Y3 times each coefficient XORed into the byte positions:
(Y2 ⊕ Y3·c3, Y1 ⊕ Y3·c2, Y0 ⊕ Y3·c1, Y3·c0). `k2_pkg` computes the coefficient bytes at
elaboration time, so the multipliers are XOR networks with constants.

## The nonlinear function and its three micro-architectures

This part needs the most care. The four registers R1, R2, L1, L2 produce the keystream of the
current state. '+' is addition modulo 2<sup>32</sup>, and ⊕ is XOR:

    zL = (B[t] + R2) ^ R1 ^ A[t+4]          zH = (B[t+10] + L2) ^ L1 ^ A[t]
    R1' = Sub(L2 + B[t+9])   R2' = Sub(R1)   L1' = Sub(R2 + B[t+4])   L2' = Sub(L1)

`Sub` (`k2_sub`) applies the AES S-box to each byte (`k2_sbox`). It then applies the AES MixColumn
matrix, with the least significant byte as the first element of the column. The S-box is a
256-entry table. The table is computed at elaboration from the inverse-plus-affine definition,
so it is a ROM and not inversion logic.

**Variant 1** (`k2_nlf_impl1`) writes these equations directly. Its longest paths run from
FSR-B through an adder and a Sub into L1 or R1.

**Variant 2** (`k2_nlf_impl2`) cuts these paths with registers L0 and R0 between the adders
and the Sub blocks. One clock of latency would change the cipher, so the sums are computed one
clock early instead. This works because of one identity: the word in FSR-B stage 5 at time t is
in stage 4 at t+1, and the word in stage 10 is in stage 9. Likewise, the next R2 and L2 are
already on the outputs of the R2/L2 Sub blocks. So when the cipher steps:

    L0 <= Sub(R1) + B[t+5]      (= R2 + B[t+4] of the next clock)
    R0 <= Sub(L1) + B[t+10]     (= L2 + B[t+9] of the next clock)

When the cipher holds (a stall), the sums of the current state are registered instead. These
are R2 + B[t+4] and L2 + B[t+9]. Four selectors, all driven by the step signal, make this
choice: b04/b05, b09/b10, R2/Sub(R1) and L2/Sub(L1). On a step, L1' = Sub(L0) and
R1' = Sub(R0).

**Variant 3** (`k2_nlf_impl3`, the default) computes both candidate sums in parallel every
clock:

    L0 <= R2 + B[t+4]    L00 <= Sub(R1) + B[t+5]    R0 <= L2 + B[t+9]    R00 <= Sub(L1) + B[t+10]

A flag remembers whether the previous clock stepped. Two selectors after the registers choose
L00/R00 (it stepped) or L0/R0 (it held) as the Sub input. This moves the selectors off the adder
path and needs two selectors instead of four.

**Priming.** The look-ahead registers of variants 2 and 3 hold the sums of the state that was
current one clock earlier. Right after the state is loaded, that earlier state is stale. So
one clock without a step must follow every load. The controller always inserts this clock (the
PRIME state) for all variants. Both pipelined modules have a `primed` output and an assertion
that forbids a step before it. In variant 1 the clock has no effect.

## Set-up: key schedule, loading, initialisation

**Key schedule** (`k2_keysched`). The key words IK0..IK3 (IK0 = `key[127:96]`) are expanded to
K0..K11:

    K[i] = K[i-4] ^ Sub(rotl8(K[i-1])) ^ Rcon[i/4-1]     for i = 4, 8
    K[i] = K[i-4] ^ K[i-1]                              otherwise

Rcon[0] = 0x01000000 and Rcon[1] = 0x02000000. Unlike AES, this Sub includes the MixColumn.
The block produces one word per clock through a single shared Sub. For i = 4 and 8, the Sub
result is registered first and the word is finished on the next clock. This register is the
flip-flop that splits what was the longest path of a single-cycle key schedule. The expansion
takes 10 clocks.

**Loading** (`k2_ctrl` asserts `sched_start` for one clock):

    FSR-A stages 0..4  = K4, K3, K2, K1, K0
    FSR-B stages 0..10 = K10, K11, IV0, IV1, K8, K9, IV2, IV3, K7, K5, K6
    R1 = R2 = L1 = L2 = 0

Here IV0 = `iv[127:96]`. The IV is latched at `start`.

**Initialisation**: 24 steps with z<sup>L</sup> XORed into the FSR-A feedback and z<sup>H</sup>
into the FSR-B feedback. After that the cipher runs freely, and the first word out is the
keystream of the state left by the 24th initialisation step.

## Interface and timing (`k2_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse; `key` and `iv` are sampled with it |
| `key`, `iv` | in | 128 | {IK0,IK1,IK2,IK3}, {IV0,IV1,IV2,IV3} |
| `busy` | out | 1 | set-up in progress |
| `keystream_valid` | out | 1 | a keystream word is on `keystream` |
| `keystream_ready` | in | 1 | the consumer takes the word; low stalls the cipher |
| `keystream` | out | 64 | {z<sup>H</sup>, z<sup>L</sup>} |

Sequence counted from the clock edge that samples `start`:

| edges | state | what happens |
|---|---|---|
| 1-10 | KEYSCHED | K4..K11 produced, `done` at edge 10 |
| 11 | KEYSCHED | controller sees `done` |
| 12 | LOAD | FSRs loaded, R/L cleared |
| 13 | PRIME | look-ahead registers filled |
| 14-37 | INIT | 24 initialisation steps |
| from 37 | RUN | `keystream_valid` = 1 |

The first word is valid after edge 37. From then on, each clock with `keystream_ready` high
takes a word and steps the cipher. A clock with it low holds the whole state. A `start` in any
state aborts what is going on and begins a new set-up. The controller (`k2_ctrl`) is a six-state
FSM: IDLE, KEYSCHED, LOAD, PRIME, INIT and RUN.

## Files

| file | contents |
|---|---|
| `rtl/k2_pkg.sv` | field arithmetic, α coefficients, MixColumn, the `nlf_taps_t` struct |
| `rtl/k2_sbox.sv`, `rtl/k2_sub.sv` | S-box table; Sub step |
| `rtl/k2_fsr_a.sv`, `rtl/k2_fsr_b.sv`, `rtl/k2_dfc.sv` | shift registers and dynamic feedback control |
| `rtl/k2_nlf_impl1.sv` … `k2_nlf_impl3.sv` | the three nonlinear-function variants |
| `rtl/k2_keysched.sv` | key expansion |
| `rtl/k2_ctrl.sv` | set-up and run sequencer |
| `rtl/k2_top.sv` | the complete generator |
| `tb/k2_ref_pkg.sv` | software-style reference model of K2 used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_k2_top_variants` |

## How far it is verified

Every module has a self-checking testbench. Each testbench prints `TB_RESULT checks=N failures=M`
and has a watchdog.

* The S-box is checked exhaustively, and against known AES entries (00→63, 01→7c, 53→ed, 10→ca,
  ff→16). Sub is checked against the standard MixColumn column db 13 53 45 → 8e 4d a1 bc.
* The shift registers, the feedback controller, the key schedule and the three nonlinear
  functions are checked clock by clock against the equations, with random stalls.
* `tb_k2_top` runs the default design end to end. It covers the all-zero key/IV and random
  key/IVs. It checks the 37-clock set-up latency, a 64-word back-to-back burst (one word per
  clock), stalls, re-keying while running, and a restart during initialisation.
  `tb_k2_top_variants` runs all three variants side by side on the same stimulus.

The reference model (`tb/k2_ref_pkg.sv`) is written independently of the RTL. Field products
are reduced carry-less products, the S-box inverse is found by search, the affine map is
applied row by row, and the cipher state is an absolute-time history. **However, the model
follows the same reading of the K2 definition as the RTL.** The testbenches contain no
published K2 known-answer vectors. Anyone who has the official test vectors should run them
first, by adding them to `tb_k2_top`. These are the places where a different reading
would change the keystream:

* the byte order inside a word (Y3 and c3 the most significant byte);
* the word order of `key`, `iv` and the keystream (IK0, IV0 and z<sup>H</sup> in the top bits);
* the position of the Rcon byte (the most significant byte);
* which state gives the first keystream word (the state after the 24th initialisation step).

## Choices made in this RTL

* The reset, the valid/ready handshake, stalling, restart-on-`start`, and the PRIME clock are
  this design's own choices. The source architecture describes only a "start schedule" load
  signal and a "doing" step signal, and those map onto `sched_start` and `doing` here.
* The key schedule's split register sits right after the Sub output. The source says only that
  a flip-flop divides that path.
* The FSR-B look-ahead uses the direction given by the cipher equations: stage 5 moves to
  stage 4. A prose description of the same trick, stage 4 moving to stage 5, reads the other way
  round, but only this direction gives the correct cipher.
* Variant 4 of the source design is variant 3 built with vendor-generated adder/register cores.
  It is not separate RTL here, because the default `NLF_IMPL = 3` is the same circuit.
* The source also considered duplicating the nonlinear function two or four times and rejected
  it, because each keystream word depends on the previous state. This is not built.
* The cipher's usage limit (re-key at least every 2<sup>58</sup> clocks) is not enforced.

## Simulating with Verilator

All modules import `k2_pkg`, and the testbenches import `k2_ref_pkg`. To build and run the
end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/k2_pkg.sv tb/k2_ref_pkg.sv \
        tb/tb_k2_top.sv --top-module tb_k2_top -Mdir obj_top -o sim
    ./obj_top/sim

Other tests build the same way, swapping in `tb/tb_<module>.sv` and its top module. The
simulator finds the RTL files through `-Irtl` (one module per file, named after the module).
Lint with `verilator --lint-only -Wall -Irtl rtl/k2_pkg.sv rtl/k2_top.sv`.

## Changing it

* To pick a variant, set `k2_top #(.NLF_IMPL(1|2|3))`. All variants have the same ports and
  timing.
* The number of initialisation clocks is `k2_pkg::INIT_CLOCKS`. The set-up latency is
  13 + `INIT_CLOCKS` clocks.
* A different nonlinear-function variant can be added if it keeps the `k2_nlf_impl*` ports. It
  gets `nlf_taps_t` (A<sub>t</sub>, A<sub>t+4</sub>, B<sub>t</sub>, B<sub>t+4</sub>,
  B<sub>t+5</sub>, B<sub>t+9</sub>, B<sub>t+10</sub>), `clear` and `step`. It must give z<sup>H</sup>
  and z<sup>L</sup> of the current state combinationally. It may rely on the one non-step clock
  after every `clear`.
