# PUF-authenticated test access for crypto cores

Scan chains make a chip easy to test, and they also make it easy to attack. A
tester who can shift out the scan chains of an AES core in the middle of an
encryption can read its round state and recover the key. This design keeps each
crypto core behind an IEEE 1500 style test wrapper whose scan path stays locked.
A tester unlocks it only by proving that it holds the chip's
**challenge-response database**. The manufacturer records that database from the
chip's own physically unclonable function (PUF) before a fuse disables read-out.

The proof works as a fresh puzzle every time, not as a stored password:

1. The tester sends **SYN**. The chip draws a random, non-zero 32-bit value **Δ**
   and sends it back.
2. The tester searches its database for two challenges `C_i`, `C_j` whose
   recorded responses satisfy `R_i XOR R_j = Δ`. It sends `C_i`, then `C_j`
   together with the identifier `ID` of the core it wants to test.
3. The chip evaluates its PUF on both challenges and compares `R_i XOR R_j` with
   Δ. On a match it unlocks the scan chains of core `ID` only. Either way it
   answers **ACK** with the result.

The chip stores no secret key: the only "secret" is its silicon, which the PUF
reads out. Δ is new in every session, so an eavesdropper who recorded a
successful exchange cannot replay it: the recorded pair only fits the old Δ.
The PRNG that draws Δ is reseeded after every authentication.

The scheme follows the published paper *PUF-based Secure Test Wrapper Design for
Cryptographic SoC Testing*. The RTL, its interface and timing, and every detail
that paper leaves open are this design's own. They are listed under
[Departures and interpretations](#departures-and-interpretations).

## Block structure

```
                         puf_stw_soc
  test server  ┌──────────────────────────────────────────────┐
  SYN ────────►│ sift                                         │
  Δ ◄──────────│  prng_lfsr (32-bit, Δ) ─────────┐            │
  C, enroll ──►│  puf_ecc ─┬─ chal_lfsr (64-bit) │            │
  resp ◄───────│           ├─ arbiter_puf        ▼            │
  ACK ◄────────│           └─ majority_ecm   delta_compare    │
               │  resp_mem (R_i, R_j) ──────► (XOR, ==Δ) ─┐   │
               │  sift_ctrl (protocol sequencer)          │   │
               │                                    match │   │
  ID ─────────►│ unlock_decoder (ID register, decode, AND)◄┘  │
               │   unlock[0..N_IP-1]                          │
               │ secure_test_wrapper × N_IP ──► crypto cores  │
               └──────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `puf_stw_soc` | Top: SIFT, decoder and one wrapper per core |
| `sift` | "Secure infrastructure for test": everything that authenticates |
| `sift_ctrl` | Protocol state machine (enrollment, SYN…ACK) |
| `prng_lfsr` | 32-bit LFSR producing Δ; reseedable |
| `puf_ecc` | Turns one 64-bit challenge into a corrected 32-bit response |
| `chal_lfsr` | 64-bit LFSR that derives the per-bit PUF challenges |
| `arbiter_puf` | **Behavioural model** of an arbiter PUF (not synthesizable logic in any meaningful sense) |
| `majority_ecm` | 11-reading majority vote |
| `resp_mem` | The two response registers R_i, R_j |
| `delta_compare` | `R_i XOR R_j == Δ` |
| `unlock_decoder` | Registers `ID`, decodes it, gates it with the comparator result |
| `secure_test_wrapper` | WIR, bypass, input/output boundary registers, WSO mux, scan gating |
| `stw_pkg` | Sizes, LFSR polynomials, wrapper instruction codes, sequencer states |

The crypto cores and the read-out fuse are outside the RTL. Their signals are
ports of the top: the core-side wrapper signals, and `fuse_blown_i`.

## From one challenge to a 32-bit response

This is the least obvious part. An arbiter PUF races two signals through 64
switch stages, one per challenge bit. An arbiter at the end says which signal
won, so each evaluation gives **one bit**, and a noisy one. The comparator,
however, needs 32-bit responses, because they are XORed against a 32-bit Δ.
`puf_ecc` bridges the two:

* The received challenge `C` is loaded into the 64-bit LFSR `chal_lfsr` as
  `C XOR MASK0`. The LFSR's successive states are the challenges for response
  bits 31, 30, … 0, so the LFSR steps once per bit.
* Each bit is read **11 times** with the same challenge. The `majority_ecm` vote
  gives the bit, which is correct as long as at most 5 of the 11 readings are
  wrong.
* Timing with the one-cycle PUF model: 11 readings issued back to back, one
  cycle to drain the last answer, one cycle to vote. That is 13 cycles per bit.
  `done_o` rises `RESP_W*(VOTES+2)` = 416 clock edges after the start edge.

`MASK0` exists because an LFSR cannot start from zero. Without it, challenge 0
would be unusable, and an enrollment that simply counts `C = 0, 1, 2, …` would
hit that value first. Only `C = MASK0` maps to zero, and it is replaced by the
LFSR's start value 1.

Majority voting removes most but not all noise. With the PUF model's default
noise, about 1 % of corrected response bits still differ between two
evaluations, so roughly one 32-bit response in four differs from its enrolled
value in at least one bit. An authentication that uses such a response fails,
and the tester simply starts a new session. The comparison is exact and has no
error tolerance.

## The protocol at the pins

All transfers are synchronous to `clk`. `rst_n` is an asynchronous, active-low
reset.

| Step | Tester drives | Chip answers |
|---|---|---|
| Enrollment query (fuse intact, no session open) | `chal_valid_i=1`, `enroll_i=1`, `chal_i=C` for one cycle | `resp_valid_o` pulses with `resp_o=R` 417 edges later |
| Start session | `syn_i=1` for one cycle | `delta_valid_o` pulses next cycle; `delta_o` holds Δ |
| First challenge | `chal_valid_i=1`, `chal_i=C_i` when `ready_o=1` | evaluates; `ready_o` low meanwhile |
| Second challenge | `chal_valid_i=1`, `chal_i=C_j`, `id_i=ID` when `ready_o=1` | evaluates |
| Result | — | `ack_o` pulses 418 edges after the `C_j` edge; `ack_pass_o` holds the result |

* After a pass, `unlock_o[ID]` is 1, and it stays 1 until the next SYN or reset.
  A SYN clears both response registers and with them the comparator result.
* A SYN while the chip waits for a challenge restarts the session with a new Δ.
  Challenges that arrive while the chip is evaluating are ignored, which is why
  `ready_o` exists.
* Once `fuse_blown_i` is 1, enrollment queries are ignored and `resp_o` is
  forced to zero.

### How large must the tester's database be?

For a random 32-bit Δ, the tester needs *some* pair in its database whose
responses XOR to Δ. With `x` enrolled pairs there are `x(x-1)/2` pairs, each
matching with probability 2^-32, so `x ≈ 92,700` gives on average one pair per
Δ. The full-size testbench enrolls 2^17 = 131,072 pairs, about two candidates
per Δ. Three of the Deltas it drew still had no pair, and the tester asked for a
new Δ each time. The chip itself accepts any 64-bit challenge (2^64 of them), so
only the tester's storage limits the database.

## Δ generator

`prng_lfsr` is a Fibonacci LFSR with polynomial x^32+x^22+x^2+x+1. Each SYN steps
it once. The new state is copied into a separate Δ register, which keeps Δ fixed
for the session even after the reseed. A maximal-length LFSR never holds zero,
so Δ is never 0. After each authentication the state is XORed with `R_j`, a PUF
response that never leaves the chip, so the tester cannot predict the sequence
of future Deltas. If that XOR gives zero, the LFSR restarts from 1.

## Test wrapper

Each `secure_test_wrapper` contains a 3-bit wrapper instruction register (WIR),
a bypass bit, an input boundary register (IWBR) and an output boundary register
(OWBR). It is controlled by the IEEE 1500 serial signals `select_wir`,
`shift_wr`, `capture_wr` and `update_wr`. Data enters at the MSB of a register
and leaves from bit 0.

| Instruction | Serial path |
|---|---|
| `WS_BYPASS` (reset) | WSI → bypass → WSO |
| `WS_INTEST` | WSI → IWBR → OWBR → WSO; IWBR drives the core inputs, OWBR captures the outputs |
| `WS_INTEST_SCAN` | WSI → IWBR → chain 0 → … → chain N-1 → OWBR → WSO |

Under `WS_INTEST_SCAN` three signals pass through gates controlled by the
wrapper's unlock bit: the core scan-enable, the data entering every chain, and
the data leaving the last chain. While the core is locked, its chains neither
shift nor receive data, and the OWBR shifts in zeros instead of chain contents.
The core's state cannot leak, whatever instruction is loaded. Boundary-register
and bypass access stay available, as in a normal wrapper.

## The arbiter PUF model

`arbiter_puf` models silicon, not logic. It uses the usual additive delay model
in fixed point, with 1024 units = one standard deviation of a stage's delay
difference:

* a straight stage gives `d = d + s0[k]`;
* a crossed stage gives `d = s1[k] - d`;
* the response is `d + noise > 0`.

The 128 stage delays are computed at elaboration from `SEED`, so each seed is one
"chip". Every reading adds noise with standard deviation `NOISE_MILLI/1000`
stage units. With the default 500, about 2 % of single readings flip. The
testbench measures a response bias near 50 % and a disagreement near 50 %
between two seeds. Replace this module with the real PUF macro when targeting
silicon; its interface is one reading per `eval_i`, answered one cycle later.

Like a real arbiter PUF, the model barely reacts to its low-numbered stages.
Challenges that differ only in their low bits therefore give correlated
responses. Enrolling the challenges 0, 1, 2, ... 4095 in order made many response
bits 1 for over 90 % of the entries. The source's manufacturer picks *random*
challenges ("FOR C_i = 0 to x" in its flow chart counts database entries), and
with random challenges every bit is balanced (`tb_enroll_sweep`). A server using
this design should do the same.

## Parameters

| Parameter (top) | Default | Origin |
|---|---|---|
| `DELTA_W` (Δ and response width) | 32 | published scheme |
| `CHAL_W` (PUF challenge, arbiter stages) | 64 | published scheme |
| `VOTES` (readings per bit) | 11 | published scheme |
| `PRNG_TAPS`, `CHAL_TAPS` | x^32+x^22+x^2+x+1, x^64+x^63+x^61+x^60+1 | this design |
| `N_IP` (cores), `ID_W` | 4, 2 | this design |
| `N_IN`, `N_OUT`, `N_CHAINS` (per wrapper) | 8, 8, 2 | placeholders for the real core |
| `PUF_SEED`, `NOISE_MILLI` | 0x12345678, 500 | PUF model only |

`puf_ecc` also has `MASK0` = 0x9E3779B97F4A7C15. If you shrink `DELTA_W`, pass a
matching maximal-length `PRNG_TAPS` (for example `8'hB8` for 8 bits, as the
testbenches do).

## Departures and interpretations

* **"Hamming distance"**: the source calls Δ the Hamming distance between the
  two responses, yet its protocol checks `R_i XOR R_j = Δ` on a 32-bit Δ. This
  design compares the XOR with Δ bit for bit, not a count of differing bits.
* **The 64-bit LFSR** is only named in the source. Its use here, deriving one PUF
  challenge per response bit from the received challenge, is an
  interpretation. So is reading the "11-bit majority voting" as 11 readings of
  each bit.
* **Reseed source** (`R_j`), the separate Δ register, and the rule that an
  unlock lasts until the next SYN are this design's choices.
* **Server link**: parallel signals with valid pulses, `ready_o` and a pass
  flag. The source only names the messages SYN, Δ, C_i, C_j‖ID, ACK.
* **Wrapper**: the source draws the wrapper parts and gates on the scan chains.
  The instruction set, register sizes, chaining of the chains into one serial
  path, and the use of the system clock as the wrapper clock are this design's.
* **Not included**: the crypto cores (the source evaluates an AES core), the
  fuse element, and the tester. The source reports area in NAND2 gate
  equivalents for a 130 nm library, about 12.8 % over a standard wrapper. That
  figure is not reproduced here.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stw_pkg.sv \
    tb/tb_puf_stw_soc.sv --top-module tb_puf_stw_soc
./obj_dir/Vtb_puf_stw_soc
```

| Testbench | What it shows |
|---|---|
| `tb_prng_lfsr`, `tb_chal_lfsr` | Every state against a reference LFSR; Δ never 0 or repeated; reseed and zero fallback |
| `tb_majority_ecm` | All 2048 vote patterns |
| `tb_arbiter_puf` | Latency, repeatability, uniformity, uniqueness, noise present but bounded |
| `tb_puf_ecc` | Up to 5 injected wrong readings per bit corrected; 6 not; same challenge for all readings of a bit; exact latency |
| `tb_resp_mem`, `tb_delta_compare`, `tb_unlock_decoder` | Random stimulus against reference models |
| `tb_sift_ctrl` | Each control output through enrollment, fuse, pass, fail and restart |
| `tb_sift` | 8-bit Δ: enrollment, fuse, correct, wrong and replayed pairs, ACK latency |
| `tb_secure_test_wrapper` | Bypass, WIR, boundary test, unlocked scan read-out, locked scan shows nothing |
| `tb_puf_stw_soc` | End to end at 8-bit Δ: every core unlocked in turn and scanned; wrong pair, replay, restart, bypass and ECC corrections each counted |
| `tb_puf_stw_soc_full` | Same flow at all default sizes with a 131,072-entry database (about 45 s) |
| `tb_enroll_sweep` | Full size: 4096 random challenges enrolled, exact 417-edge latency, per-bit balance, distinct responses, re-read error, fuse blocks read-out |
