# AES-128 with a key grown from a ring-oscillator PUF

A cipher engine is only as secret as its key, and a key kept in on-chip memory
can be read out. This design keeps no key. It derives the key, when asked,
from a *physical unclonable function* (PUF): 128 pairs of nominally identical
ring oscillators. Fabrication makes every oscillator slightly faster or slower
than its twin. Each pair is raced, and the winner gives one key bit. The
resulting 128-bit key is repeatable on one chip, differs from chip to chip, and
never leaves the chip. It feeds a conventional AES-128 engine. The engine
encrypts and decrypts 128-bit blocks, one round per clock cycle.

```
             challenge
   +--------------------------------+
   |                                |
 256 x ring_oscillator ---> puf_keygen (128 x puf_bit) --key--> aes_core
  (behavioural model)          |   puf_bit = 2 x ro_counter         |  key_expansion
                               |             + puf_comparator       |  shift_rows, sub_bytes
                               +---------- key_done (load) -------->|  mix_columns (gf_mul)
                                                                    |  add_round_key
```

## How one key bit is made

Each key bit comes from a `puf_bit` cell. The cell watches two ring
oscillators, A and B, that one shared `challenge` signal enables.

**Ring oscillator (`ring_oscillator`, behavioural).** On silicon this is an
enable gate plus a chain of inverters fed back on itself. It runs freely while
its challenge input is high. The model toggles its output every
`STAGES * STAGE_DELAY_PS` picoseconds while enabled, starting from 0, and
returns to 0 when disabled. `puf_pkg::ro_stage_delay_ps(seed, index)` stands in
for fabrication spread. It hashes a die seed and the oscillator's index into a
stage delay of 100 ps ± 10 ps. At the defaults (5 stages), each oscillator
therefore runs at roughly 0.9 to 1.1 GHz. Changing `DIE_SEED` on the top models
a different chip. Because this model is an analog loop described with delays,
it is not synthesizable. Synthesis reports its toggle as a combinational loop,
which is the oscillator itself.

**Counters (`ro_counter`).** Each oscillator clocks its own counter, which
counts rising edges. When the counter reaches its limit `2^COUNT_W - 1` (1023
by default), it stops and raises `full`. Its clear is asynchronous. The
controller raises it only while the oscillators are stopped, so no oscillator
edge can coincide with the clear's release.

**Comparator (`puf_comparator`).** The two `full` flags come from two
unrelated oscillator clock domains. Each passes through a two-flop synchronizer
into the system clock domain. The bit is decided at the first system clock edge
on which either synchronized flag is seen:

* counter A full → bit 0;
* otherwise (counter B full) → bit 1;
* both seen at the same edge → counter A counts as first → bit 0.

The decision is held until the next challenge clears it. `decided` rises three
clock edges after the first flag.

**Resolution.** Two oscillators whose stage delays differ by Δ ps reach the
limit `STAGES * (2^(COUNT_W+1) - 3) * Δ` ps apart. At the defaults that is
about 10 ns per picosecond of difference, i.e. one 100 MHz clock period. A pair
whose flags arrive within about one clock period of each other is decided by
where the clock edge happens to fall. On silicon such a bit is unstable. A wider
counter separates the pair further but makes the race longer. No
error-correction or bit-selection (helper data) scheme is included: nothing
here corrects an unstable bit.

## Key generation sequence (`puf_keygen`)

A pulse on `gen_key` starts one challenge for all 128 cells at once:

1. **CLEAR** (`CLEAR_CYCLES` = 4 cycles): the comparators are cleared, and the
   counters' clear rises. This is an edge, so counters that powered up with
   arbitrary values are cleared too.
2. **RUN**: `challenge` (a register, so that it cannot glitch) goes high, and
   all 256 oscillators run. The state is left when every cell reports
   `decided`.
3. **DONE**: `challenge` falls, and the 128 bits are stored as the key. Bit *i*
   comes from the cell that races oscillator 2*i* (A) against 2*i*+1 (B).
   `key_valid` goes high, and `key_done` pulses for one cycle.

At the defaults, the slowest winning counter fills after about 1.1 µs. Key
generation therefore takes about 120 cycles at 100 MHz. The key expansion adds
11 more cycles.

## The AES-128 engine (`aes_core`)

**State layout.** The 16-byte state is a `logic [127:0]` vector, filled column
by column. Bits 127:120 hold s(0,0), the next byte holds s(1,0), then s(2,0),
s(3,0), then s(0,1), and so on. This is the ordinary AES byte order, so
plaintext, key and ciphertext are written as the usual hex strings
(FIPS-197 vectors work unchanged).

**Round flow.** Encryption starts with AddRoundKey using round key 0. Rounds 1
to 9 then apply SubBytes, ShiftRows, MixColumns and AddRoundKey. Round 10
leaves out MixColumns. Decryption starts with AddRoundKey using round key 10.
Each round then applies InvShiftRows, InvSubBytes, AddRoundKey with the round
keys in reverse order, and InvMixColumns. The last round leaves out
InvMixColumns.

**Shared datapath.** One combinational round datapath serves both directions.
It is built as `shift_rows → sub_bytes → [add_round_key] → mix_columns →
[add_round_key]`. SubBytes works on each byte alone and ShiftRows only moves
bytes, so the two steps commute. Doing the shift first is therefore exact for
encryption as well. Decryption takes its round key before the inverse mix.
Encryption takes it after the mix. Two XOR instances provide the two key
positions, so no multiplexer loop forms.

**Galois-field products through L/E tables (`gf_mul`, `mix_columns`).**
MixColumns multiplies every column by the matrix with rows 02 03 01 01,
01 02 03 01, 01 01 02 03 and 03 01 01 02. The inverse uses 0E 0B 0D 09 in the
same rotating pattern. Every one of the 64 byte products is computed with
logarithm tables rather than shift-and-XOR:

* `L[a]` is the power to which the generator 03 must be raised to give a.
* `E[i] = 03^i`.
* `a·b = E[(L[a] + L[b])]`, subtracting FF when the sum is above FF.
* The result is 00 when either operand is 00.

`E[FF] = E[00] = 01`, so a sum of exactly FF needs no correction. Both tables
are computed at elaboration time by constant functions in `aes_pkg`. They are
not typed in.

**S-boxes (`aes_sbox`, `sub_bytes`).** The forward S-box is generated from the
same tables: the multiplicative inverse `E[FF - L[a]]`, then the AES affine
transform (XOR of four rotations and the constant 63). The inverse S-box is the
forward table turned round. Each of the 16 bytes has its own lookup.

**Key expansion (`key_expansion`).** After `key_load`, the standard AES-128
schedule produces one round key per cycle: rotate the last word, substitute it
through four S-boxes, XOR in the round constant, then chain the XORs across the
four words. The round constant starts at 01 and is doubled each round. All 11
round keys stay in registers, because decryption needs them last-first.

**Timing.**

| event | cycles |
|---|---|
| `key_load` → `key_ready` | 11 |
| `start` → `dout_valid` (either direction) | 11 |
| earliest next `start` | the cycle after `dout_valid` |

A `start` is accepted only while `busy` is low and `key_ready` is high. An
assertion flags a start before the key is ready.

## Top level (`puf_aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock; active-low asynchronous reset |
| `gen_key` | in | 1 | generate the PUF key (once after power-up) |
| `key_ready` | out | 1 | key generated and expanded; blocks accepted |
| `start`, `decrypt` | in | 1 | start one block; 1 = decrypt, 0 = encrypt |
| `din` | in | 128 | plaintext or ciphertext |
| `busy` | out | 1 | a block is in progress |
| `dout`, `dout_valid` | out | 128, 1 | result; strobe for one cycle, `dout` holds |

Parameters: `COUNT_W` (10), `RO_STAGES` (5), `DIE_SEED` (1). The key width (128)
and the round count (10) are fixed by AES-128. When the generator finishes, its
key goes straight into the key expansion. The top has no port that reads the
key out.

## What follows the original description, and what is added

Taken from the original description:

* the four encryption steps and their order;
* the ten rounds and the last round without MixColumns;
* the decryption order;
* the MixColumns matrix and the L/E-table multiplication with its "subtract FF"
  rule;
* ShiftRows' left and right rotations;
* the 1-bit PUF made of two N-stage oscillators, two counters and a comparator,
  with the challenge acting as oscillator enable;
* the rule "first counter full → 0, otherwise 1";
* one PUF bit per key bit, making 128 bits.

Choices of this design, where the description gives nothing:

* the stage count (5) and the counter width (10 bits);
* the delay model;
* the synchronizers and the tie rule;
* the key generator's controller;
* the round-per-cycle schedule and the handshakes;
* the reset style;
* generating the S-boxes and L/E tables instead of listing them;
* the standard AES inverse-MixColumns matrix and key schedule, which the
  description names but does not spell out;
* the zero-operand case of the log/antilog multiplier.

Two steps are described in more than one order. The decryption round is built
as InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns, the order of the
round diagram and the order that actually inverts encryption. The prose list of
decryption steps orders them differently. The encryption steps follow the order
AddRoundKey, SubBytes, ShiftRows, MixColumns.

Not built:

* 192- and 256-bit keys (12 and 14 rounds), which are mentioned only as other
  AES variants;
* padding of short plaintexts;
* handling of messages longer than one block (no block-cipher mode);
* any PUF reliability measures (repeated challenges, majority voting, error
  correction);
* on silicon, the oscillators would be placed macros, and the PUF's quality
  would depend on their layout, which RTL cannot express.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`tb/aes_ref_pkg.sv` is an independent AES model. It uses shift-and-add
multiplication, searches for S-box inverses, and uses a 4x4 array state. The
RTL's outputs are compared with it.

| testbench | what it shows |
|---|---|
| `tb_gf_mul` | all 65 536 products against shift-and-add |
| `tb_sub_bytes`, `tb_shift_rows`, `tb_mix_columns`, `tb_add_round_key` | each step and its inverse on random states; known S-box entries; ShiftRows byte map; the worked MixColumns example 87 6E 46 A6 → 47 37 94 ED (and three more columns) |
| `tb_key_expansion` | FIPS-197 round key 10 and random keys; 11-cycle latency |
| `tb_aes_core` | FIPS-197 appendix B and C.1 vectors, random encrypt/decrypt against the model, round trips, 11-cycle latency |
| `tb_ring_oscillator` | rest when disabled, period and first-edge time, stop |
| `tb_ro_counter` | counting, saturation at the limit, asynchronous clear |
| `tb_puf_comparator` | A first, B first, tie, decision held, 3-edge latency |
| `tb_puf_bit` | faster A → 0, faster B → 1, repeatable over challenges |
| `tb_puf_keygen` | two simulated dies of 16 cells: predicted bits, same key on repeat, different keys across dies, sequencing |
| `tb_puf_aes_top` | the whole design at default parameters: a 128-bit PUF key (bits predicted from oscillator delays where the race is not too close), 8 blocks encrypted against the model and decrypted back; counts key generations, 0 and 1 bits, encryptions and decryptions |

The PUF testbenches predict each key bit from the two oscillators' delays.
They do not predict pairs whose counters fill within two clock periods of each
other; at the defaults that is about 9 of 128.

Running one, for example the end-to-end test (about a second):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv rtl/puf_pkg.sv tb/aes_ref_pkg.sv tb/tb_puf_aes_top.sv \
    --top-module tb_puf_aes_top -o sim && ./obj_dir/sim
```

The designs were checked with two-state simulation and random initial values.
Every register that is read has a reset. The asynchronous resets and clears in
the testbenches are given an explicit edge after time 0.

## Changing it

* **Another chip:** set `DIE_SEED` on `puf_aes_top`. The key changes; the
  engine does not.
* **Race length and resolution:** `COUNT_W`. Each extra bit doubles both the
  key-generation time and the separation between close oscillators.
* **Oscillator model:** `RO_STAGES`, and `RO_NOMINAL_PS` / `RO_SPREAD_PS` in
  `puf_pkg`. For a real target, replace `ring_oscillator` with the placed
  oscillator macro. It has the same two ports.
* The AES blocks are independent combinational units plus `key_expansion` and
  the round controller in `aes_core`. They can be pipelined (one `aes_core`
  round datapath per stage) without touching the step modules.
