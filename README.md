# PUF-based secure split test (PUF-SST) in SystemVerilog

A fabless company has to send its chips to a foundry and a test house it does
not trust. Either of them can sell dies that failed test, or build more dies
than were ordered. Secure split test answers this by splitting the test
between two parties. The test house still applies the patterns. But what it
reads back from the chip is scrambled and compacted, so only the design house
can say whether a die passed. The chip also stays functionally locked until
the design house, having seen a pass, releases the key for that one die.

This design is the variant in which the chip's secrets come from an
**arbiter physical unclonable function (PUF)**, not from a stored random
number. A PUF gives each die its own response to a challenge, set by
manufacturing variation. Every piece of secret material is either derived
from the PUF or encrypted with the design house's RSA public key before it
leaves the chip. The same flow covers the structural (scan) test and a
functional test.

```
             challenge                       +-------------------+
  PRNG ----------+---------> arbiter PUF --->| ECC (3x majority) |---+--> RSA #1 --> {challenge,response} ciphertexts
  (LFSR)         |   FKEY -->  (model)       +-------------------+   |
     |           +--mux                                              +--> scrambler seed / PUF identifier
     |                                                                        |                    |
     +--> random number --+--> RSA #2 --> ciphertext                          v                    v
                          +--> flip (secret mask) --> OTP --+        scan lock: LFSR control,   XOR_F lock:
                                                            |        scrambler, XOR gates,      func_out = func_in
                                         end-user KEY ------+------> MISR --> signature          ^ id ^ (KEY ^ OTP)
```

## The four phases and who knows what

There are three parties. The **test house** drives the tester. The **design
house** holds the RSA private key and the database of PUF answers. The **end
user** gets a working chip. The on-chip sequencer (`sst_controller`) runs one
tester command at a time.

| Command | What the chip does | What leaves the chip |
|---|---|---|
| `CMD_ENROLL` (with `crp_count`) | For each pair: step the PRNG, apply its state as a 32-bit challenge to the PUF three times, take the per-bit majority and RSA-encrypt `{challenge, response}`. Then one more pair, whose answer is kept on chip as the **scrambler seed** for the structural test. | `crp_count + 1` ciphertexts, tagged `ENC_CRP`. The last one is the seed pair. |
| `CMD_SCAN_TEST` (with `test_len`) | Seeds the scan lock with the stored seed, then scrambles, masks and compacts `test_len` scan slices. | Scrambled slices and a 10-bit signature. |
| `CMD_FUNC_TEST` (with `fkey`, `test_len`) | Evaluates the PUF on the functional key `fkey`. The 16-bit answer (the **identifier**) opens the functional lock and also seeds the scan lock. The functional test responses are scrambled and compacted. When that is done, **key generation** runs: the PRNG steps, its low 16 bits pass through the flipping circuit and are burnt into the OTP, and the raw number is RSA-encrypted. | Signature, and one ciphertext tagged `ENC_PRN`. |
| `CMD_UNLOCK` (with `fkey`) | Evaluates the PUF on `fkey` and loads the identifier. An end user's chip does this after power-up. | – |

The design house decrypts the enrolment ciphertexts and so learns the
challenge/response pairs. That includes the seed pair, so it can rebuild the
scrambler control and predict the signature of a good die, and compare it with
the signature the test house reports. It picks `fkey` among the enrolled
challenges: the one whose response is the chip's lock pattern (next section).
It decrypts the random number, applies the flip mask, which only it knows, and
obtains the end-user `KEY`. It releases `fkey` and `KEY` only for dies that
passed.

## The functional lock

The `RESP_W` (16) protected nets of the core are built inverted at a secret
**lock pattern**. The XOR_F mask has one 3-input XOR gate per net:

```
func_out = func_in ^ identifier ^ (KEY ^ OTP)
```

The core therefore works only when `identifier ^ KEY ^ OTP == lock pattern`.

* **On the tester**, before key generation, the OTP is blank (all zeros) and
  `KEY = 0`. The core then works exactly when the PUF answer to `fkey` is the
  lock pattern. This is what lets the test house run a functional test once
  it has been given `fkey`.
* **After key generation**, the OTP holds `flip(PRN)`. With `KEY = 0` the chip
  is locked again. It works only with `KEY = flip(PRN)`, which only the design
  house can compute.
* **After a reset**, the identifier register is cleared, so the chip is locked
  until `CMD_UNLOCK` has been run with the right `fkey`. The OTP keeps its
  contents.

The OTP can be programmed only once (`sst_otp` seals itself after the first
write). A second functional test therefore cannot overwrite the key.

## The scan locking block

`sst_scan_lock` sits on the ten scan-chain outputs. It has four parts:

1. **Control-word expansion.** `start` loads the 16-bit seed into a Galois
   LFSR (x^16+x^14+x^13+x^11+1). A zero seed is replaced by 1. During SETUP
   the LFSR runs for `KS_W = 45 + N_XOR` clocks, and its output bit is
   shifted into a `KS_W`-bit control register. `ready` rises `KS_W` clocks
   after the start edge: 55 clocks in the default configuration.
2. **Scrambler** (`sst_scrambler`). This is an odd-even transposition network
   of 10 stages with 45 2x2 exchange switches. Stage *s* pairs lines (i, i+1)
   for i = s%2, s%2+2, and so on. Control bit *k* drives the *k*-th switch,
   counting stage by stage and then from the lowest pair. With as many
   stages as lines, every one of the 10! orderings can be set.
3. **XOR gates.** Output line *j* < `N_XOR` is inverted when control bit
   `45 + j` is set.
4. **Compactor** (`sst_compactor`). This is a MISR with x^10+x^7+1:
   `sig = (sig >> 1) ^ (sig[0] ? 0x240 : 0) ^ slice`.

During RUN, every accepted slice (`shift_en` while `ready`) advances the LFSR
and the control register by one step. Consecutive slices therefore see
different orderings and inversions. `done` rises at the clock that takes slice
`test_len` and stays high until the next start. The tester may pause
`shift_en` at any time.

Measured with `tb_sst_xor_sweep` over 2000 random slices, the share of bits
that differ between the raw scan data and the locked output grows with the
number of XOR gates:

| XOR gates | 0 | 2 | 4 | 6 | 8 | 10 |
|---|---|---|---|---|---|---|
| % bits changed | 41.8 | 44.0 | 45.5 | 46.8 | 47.8 | 50.0 |

A guessed seed that differs from the right one in a single bit gives a 50%
distance at 10 gates. Narrower scramblers with every line behind an XOR gate
give 50.8% with 2 lines and 50.8% with 4 lines. In this design the
scrambler already moves bits around with no XOR gate at all. In the reference scheme's own evaluation, a lock with
no XOR gates changes nothing (0%), and each gate adds about 10%.

## Cryptography and randomness

* **RSA** (`sst_rsa_encrypt`). It computes c = m^e mod n by left-to-right
  square-and-multiply over all 64 exponent bits. Each product is a 64-cycle
  shift-and-add modular multiplication (`sst_modmul`). The latency is exactly
  `(W + popcount(e)) * (W + 2) + 1` clocks from `start` to `done`: 4357 for
  e = 65537. Enrolment is limited by it, at one pair every 4365 clocks. The
  key is n = 4294967291 × 4294967279, e = 65537 (private d =
  9331878932546167513, used only by the testbenches). Decryption on the
  design-house side is the same operation with d, and the testbench runs it
  on this engine as well. **This 64-bit modulus
  demonstrates the datapath and is not secure.** Set `RSA_W` and the key
  parameters for a real key. The latency grows as W².
* **PRNG** (`sst_lfsr`). This is a 32-bit Galois LFSR, x^32+x^22+x^2+x+1,
  reset to 1. It supplies the enrolment challenges and the random number.
* **Arbiter PUF** (`sst_arbiter_puf`). It is a **behavioural model**, not
  logic. A real arbiter PUF races two edges through a chain of
  challenge-controlled multiplexers. The model uses the usual additive delay
  model: 16 chains of 32 stages, with each stage's delay difference hashed
  from `DEVICE_SEED`, which stands for the die. A small noise term is added at
  each evaluation (`NOISE`). The response appears one clock after `eval`.
  `tb_sst_puf_metrics` measures eight model dies over 256 response bits each.
  Uniqueness (mean pairwise Hamming distance) is 49.6%, uniformity 49.4%,
  bit-aliasing 49.4% and reliability 99.7%. These are figures of the model,
  not of silicon.
* **ECC** (`sst_puf_ecc`). A repetition code: three evaluations and a
  majority vote per bit. It corrects one flip per bit. A bit whose delay
  difference is almost zero can still come out differently from one
  evaluation to the next. The end-to-end testbench therefore, acting as the
  design house, takes as FKEY an enrolled pair whose answer repeated over
  four evaluations. With real silicon, enrolment would be repeated for the
  same purpose.
* **Ring oscillator TRNG** (`sst_ro_trng`). This is a separate block, also a
  **behavioural model**. It is the secret source of the older memory-based
  split test, where a true random number is burnt into the OTP. Five rings
  of 3, 5, 7, 9 and 11 inverters run at unrelated rates. Every 16 clocks the
  XOR of their outputs is sampled, and 16 samples make a word. Each ring is
  a phase accumulator. Its per-clock jitter comes from a noise LFSR, because
  a loop of inverters and its jitter cannot be written as logic. The PUF-SST
  top does not use it, since the PUF and the PRNG take its place. Over 4096
  bits its testbench measures 50.1% ones, 50.2% agreement between neighbours
  and 48.1% difference between two differently seeded generators.

## Where this design departs from, or adds to, the reference scheme

* The scheme asks for a challenge/response pair every clock during
  enrolment. Here each pair waits for its RSA encryption: about 4.4k clocks
  per pair at 64 bits. A faster design would buffer pairs or pack several
  into one RSA block.
* The seed pair for the structural-test scrambler is sent encrypted along
  with the enrolment pairs. Without it, the design house could not predict
  the signature.
* The scheme does not give the scrambler structure, the widths, the
  compactor type, the ECC code, the key sizes or where the XOR-gate control
  bits come from. The choices above are this design's own.
* The XOR gates take pseudo-random control bits that change with every
  slice. They are not fixed inverters.
* How the end-user KEY enters the lock is read here as `KEY ^ OTP` on the
  XOR gates' third input.
* A 16-bit lock pattern would need about 2^16 enrolled pairs before one
  answer matches a pattern fixed in advance. The end-to-end testbench instead
  builds its stand-in core with the pattern of an enrolled pair.
* The protected core (the ISCAS'89 s38417 benchmark with ten scan chains)
  and the electronic chip ID (ECID) are outside `puf_sst_top`. The core
  connects through `scan_out`/`shift_en` and `func_in`/`func_out`. The
  tester reads the ECID from its own fuses.
* `sst_arbiter_puf`, `sst_ro_trng` and `sst_otp` are models of physical
  parts (a delay race, jittery ring oscillators, and antifuses that keep
  their contents through reset). The OTP's contents
  are given their blank value by variable initialisation.

## Top-level interface (`puf_sst_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cmd_valid`, `cmd` | in | 1, 3 | command (`sst_pkg::sst_cmd_e`), accepted while `busy` is low |
| `crp_count`, `test_len` | in | 16 | enrolment pairs, scan slices per test |
| `fkey` | in | 32 | functional key = PUF challenge |
| `key` | in | 16 | end-user KEY |
| `busy` | out | 1 | sequencer running |
| `enc_valid`, `enc_kind`, `enc_data` | out | 1, 1, 64 | ciphertext strobe, tag (`ENC_CRP`/`ENC_PRN`), value |
| `shift_en`, `scan_out` | in | 1, 10 | one scan slice from the core's chains |
| `scan_ready`, `scan_done` | out | 1 | slices accepted / test complete |
| `scrambled`, `scrambled_valid` | out | 10, 1 | locked slice as seen by the tester |
| `signature` | out | 10 | MISR signature, final when `scan_done` |
| `func_in`, `func_out` | in/out | 16 | locked nets of the core |
| `otp_programmed` | out | 1 | key word has been burnt |

There is no backpressure on `enc_data`. It is valid for the single cycle of
`enc_valid`.

Main parameters. The ten scan chains (`N_CHAINS`) and the ten XOR gates
(`N_XOR`) are the reference configuration. `N_XOR` may range from 0 to
`N_CHAINS`, and `N_CHAINS` may be any width: the scheme also evaluates 2 and
4. All other defaults are this design's own: `CHAL_W` 32, `RESP_W` 16,
`RSA_W` 64, `SCR_STAGES` 10, `ECC_REP` 3 (odd), `PUF_NOISE` 64,
`FLIP_MASK` 16'h5A3C, the RSA key, the polynomials and `DEVICE_SEED`. The
pair `{challenge, response}` must stay below the modulus
(`CHAL_W + RESP_W < RSA_W`).

## Files

`rtl/`: `sst_pkg` (commands, tags, scrambler sizing), `puf_sst_top`,
`sst_controller`, `sst_lfsr`, `sst_arbiter_puf` (model), `sst_puf_ecc`,
`sst_rsa_encrypt`, `sst_modmul`, `sst_flip`, `sst_otp` (model),
`sst_xor_lock`, `sst_scan_lock`, `sst_scrambler`, `sst_compactor`,
`sst_ro_trng` (model, not instantiated in the top).

`tb/`: one self-checking testbench per block, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. There are also `tb_puf_sst_top` (the
end-to-end run at default parameters) and `tb_sst_xor_sweep` (the XOR-gate
sweep above) and `tb_sst_puf_metrics` (PUF quality figures). The
end-to-end run enrols 40 pairs. It tests a good and a faulty die and checks both signatures against the design house's prediction.
It runs the functional test and key generation. It then checks the lock with
right and wrong keys, before and after a reset. It counts every mechanism
and fails if any of them never happened. It takes well under a second.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sst_pkg.sv tb/tb_puf_sst_top.sv \
          --top-module tb_puf_sst_top -Mdir obj && obj/Vtb_puf_sst_top
```

Swap in any other `tb_*` name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/sst_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are benign: the assertions sample the asynchronous
reset, some pins are left open on purpose, and the OTP model relies on
declaration initialisers.
