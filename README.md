# Majority-logic fault detection for an EG-LDPC protected memory

Memories protected by a one-step majority-logic decodable code can correct
several upsets per word with very simple hardware. The price is latency. A
serial majority-logic decoder rotates the word through one XOR matrix and
decides one bit per clock, so a 15-bit word costs 15 cycles on every read,
even though almost every read is error free.

This design removes that cost. The decoder's own check sums act as a fault
detector. The word is first checked for three iterations. If none of the
twelve check sums seen in those iterations is set, the word is released
after 3 cycles. Only a word that shows an error goes on through the full
correction pass. A second decoder makes the opposite trade: it spends area
on 15 copies of the XOR matrix and majority gate, and detects and corrects a
word in a single cycle.

The code is the (15,7) Euclidean-Geometry LDPC code, a cyclic code with
minimum distance 5. It carries 7 information bits and 8 parity bits. Both
decoders correct any error of up to 2 bits and detect any error of up to
4 bits.

```
 data_in[6:0] ──► eg_encoder ──►(^ fault_mask)──► mldd_memory ──┬──► mldd_serial   ──┐
                                                 16 x 15 bits   └──► mldd_parallel ──┴─► data_out[6:0]
                                                                    (par_mode picks)
```

## The code and its bit numbering

Every 15-bit vector in the RTL uses this layout:

| bits  | content |
|-------|---------|
| 6..0  | information bits, copied unchanged (systematic code) |
| 7..14 | parity bits s1..s8 (s1 = bit 7) |

The parity bits are the remainder of a cyclic encoding with
g(x) = 1 + x^4 + x^6 + x^7 + x^8. Bit j of the vector is the coefficient of
x^(14-j). This reverse order is what makes the layout above come out:
information in the low bits, parity in the high bits. As an example,
information `1100110` encodes to `001101111100110`.

Decoding uses J = 4 check sums that are *orthogonal on bit 0*. All four
contain bit 0, and no other bit appears in more than one of them:

| check | bits XORed      |
|-------|-----------------|
| B1    | 11, 3, 2, 0     |
| B2    | 13, 9, 1, 0     |
| B3    | 14, 12, 8, 0    |
| B4    | 7, 6, 4, 0      |

A drawing of the decoder labels its register stages c0..c14 in the opposite
direction (c_i = bit 14-i). In that labelling the checks read
c3^c11^c12^c14, c1^c5^c13^c14, c0^c2^c6^c14 and c7^c8^c10^c14.

The code is cyclic, so every rotation of a codeword is a codeword. Every
rotation of these four checks is therefore a parity check as well. Both
decoders depend on this. The constants live in `rtl/mldd_pkg.sv`
(`CHECK_POS`, `GEN_POLY`).

**Why the majority needs 3 of 4.** Suppose bit 0 is wrong. It flips all four
check sums. A second error can reset at most one of them, because the sums
share no other bit. So a wrong bit 0 with up to one further error gives at
least 3 ones. Now suppose bit 0 is right and two other bits are wrong. Those
errors set at most 2 sums. The majority gate therefore fires on 3 or 4 ones
and ignores a 2-2 tie. Correcting on a tie would flip good bits whenever two
errors sit elsewhere.

## The serial detector/decoder (`mldd_serial`)

Its parts are:

- `cyclic_shift_register`: holds the word.
- `xor_matrix`: forms B1..B4 from the register.
- `majority_gate`: decides on bit 0.
- A correction XOR in the register's feedback.
- `mldd_control`: the controller.
- `mldd_output_buffer`: releases the result.

**One iteration takes one clock.** In each iteration:

1. The check sums of the current register contents are formed.
2. The register rotates one place towards bit 0.
3. Bit 0 re-enters at bit 14. It is inverted if the majority gate fired.

After 15 rotations every bit has passed position 0 once and been corrected
there.

**The detection register.** `mldd_control` counts iterations in `iter`. In
iterations 0, 1 and 2 it records whether any check sum was 1. This gives a
3-bit detection register `det`. When `iter` reaches 3, one of two things
happens:

- **`det == 000`: early finish.** The word is released at once. No check
  sum was set, so the majority gate never fired and the word is unchanged.
- **Anything else: full decode.** Decoding carries on until
  `iter == N + 3 = 18`. Corrections made in the first three iterations are
  kept, so no work is repeated.

**Why 18 and not 15.** Stopping at 18 iterations instead of 15 means both
exits leave the register rotated by exactly 3 places. So one fixed rewiring
in `mldd_output_buffer` restores the bit order: y[j] = q[(j-3) mod 15]. The
last three iterations only re-check bits that are already correct.

**Output gating.** The buffer drives zeros until `finish`. The reference
design uses tri-state buffers here. Two-valued logic cannot express that, so
a zero-when-disabled gate takes their place, and `done` serves as the valid
flag.

**Serial decoder timing**, counted from the edge that samples `start`:

| word            | `done` high after | `iter` | `err` |
|-----------------|-------------------|--------|-------|
| error free      | 3 edges           | 3      | 0     |
| contains errors | 18 edges          | 18     | 1     |

A `start` pulse is ignored while `busy` is high.

**What three iterations can see.** Three iterations evaluate 12 check sums.
For this code those 12 checks span the whole 8-dimensional space of parity
checks. So the early check misses nothing that a full syndrome would catch.
An exhaustive sweep over all 32767 non-zero error patterns confirms it: the
only patterns that pass the three iterations unflagged are the 127 that are
themselves codewords. No parity check can detect those. The smallest has
weight 5, so every error of up to 4 bits is caught. A word hit by 5 or more
upsets can still turn into another valid word and be released silently.

## The parallel detector/decoder (`mldd_parallel`)

This decoder lays out in space the 15 rotations the serial decoder makes in
time. Copy p of the word is rotated p places, so its bit 0 is code bit p.
Each copy gets its own `xor_matrix` and `majority_gate`, which decide on bit
p. All 15 bits are corrected together.

The 60 check sums cover every parity check of the code. The error flag is
their OR, which detects any pattern that is not a codeword in one iteration.

The result is registered. `done`, `code_out` and `err` appear one edge after
`start`. A new word can be accepted every cycle.

Size is the difference from the serial decoder. After generic synthesis the
parallel decoder has about 275 word-level cells and the serial one about 68.

## The memory system (`mldd_memory_system`, the top)

**Write path.** Every write encodes `data_in` into `mldd_memory`. The memory
has 16 words of 15 bits and clocked read and write. On the way in the
codeword is XORed with `fault_mask`. This lets a test place upsets in chosen
bits. Keep it at zero in normal use.

**Read path.** A read with `rd_en` takes one edge in the memory. The word
then goes to the decoder chosen by `par_mode`, which is sampled with the
read.

| read mode       | `rd_valid` after the read edge | `dec_iters` |
|-----------------|--------------------------------|-------------|
| serial, clean   | 4 edges                        | 3           |
| serial, errors  | 19 edges                       | 18          |
| parallel        | 1 edge                         | 1           |

With each result come:

- `data_out`: bits 6..0 of the decoded word.
- `code_out`: the decoded codeword.
- `err_detected`: the word had an error.
- `dec_iters`: how many iterations the decoder used.

**Flow control.** `rd_ready` is low while a serial decode is running or about
to start. A read asserted then waits. Parallel reads can follow each other
every cycle.

**Reset** (`rst_n`, synchronous, active low) clears the control state. It
leaves the memory contents as they are.

## Where this RTL interprets or departs from the reference design

- **Bit order.** The reference gives the check equations on a labelled
  register but no bit order for its buses. The order above is the one under
  which its published vectors are codewords and its published shift
  sequence is this register's rotation. The encoder example is one of those
  vectors, and so is the shift sequence
  `001101111100110 → 000110111110011 → 100011011111001 → 110001101111100`.
- **Generator polynomial.** The encoder's generator polynomial is not given
  in the reference. g(x) above is the one whose dual contains every rotation
  of the given checks, and it reproduces the published encoder output.
- **Majority rule.** The reference flow diagram can be read as correcting on
  a 2-2 tie. This RTL uses a strict majority, for the reason given above.
- **Iteration bounds.** The reference flow diagram writes "i ≤ 3" for loading
  a 3-bit detection register and "i = N+3" for the end. They are read as:
  load in iterations 0–2, test at i = 3, end at 18.
- **Tri-state buffers.** The output tri-state buffers are replaced by a gate
  that drives zeros.
- **This design's own additions:**
  - Cycle-level timing.
  - The read handshake (`rd_ready`/`rd_valid`).
  - The registered output of the parallel decoder.
  - The `fault_mask` input.
  - Offering both decoders at run time behind `par_mode`. The reference
    builds and compares them separately.
- **Not included:**
  - The plain serial decoder without detection, which takes 15 cycles on
    every read. This design is compared against it but does not contain it.
  - A lower-area pipelined detector, mentioned only in passing.
  - A second detection step after the full decode to catch miscorrection of
    5 or more errors, listed as further work.
  - The power and timing figures of the reference FPGA implementation. They
    are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/mldd_pkg.sv` | code constants: N, K, J, check positions, generator, detection depth |
| `rtl/eg_encoder.sv` | systematic (15,7) encoder |
| `rtl/mldd_memory.sv` | 16 x 15 codeword memory |
| `rtl/xor_matrix.sv` | four orthogonal check sums |
| `rtl/majority_gate.sv` | 3-of-4 majority |
| `rtl/cyclic_shift_register.sv` | rotating register with correction gate |
| `rtl/mldd_control.sv` | iteration counter, detection register, finish |
| `rtl/mldd_output_buffer.sv` | finish-gated, re-aligning output |
| `rtl/mldd_serial.sv` | serial MLDD |
| `rtl/mldd_parallel.sv` | parallel MLDD |
| `rtl/mldd_memory_system.sv` | top: encoder, memory, both decoders |
| `tb/mldd_ref_pkg.sv` | reference model: written-out parity equations, nearest-codeword search |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mldd_error_sweep.sv` | all 32767 error patterns through the top, both modes |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mldd_memory_system \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mldd_pkg.sv tb/mldd_ref_pkg.sv \
    tb/tb_mldd_memory_system.sv
./obj_dir/Vtb_mldd_memory_system
```

Replace the top-module name and the last file to run any other testbench.

What each testbench checks:

- **`tb_mldd_memory_system`** runs the top at its default size. It fills the
  memory with words carrying 0–4 faults, then issues random reads in both
  modes. A scoreboard checks data, error flag, iterations and exact latency.
  The run must hit each of these at least once: early finish, full decode,
  parallel correction, detection-only, read stall, mode switch,
  back-to-back parallel reads and a write during a decode.
- **`tb_mldd_serial`** tries all 128 clean codewords, every single and double
  error on random codewords, and all 1940 patterns of 1–4 errors.
- **`tb_mldd_parallel`** tries all 128 codewords with every error of up to
  two bits, and all patterns of 3–4 errors.
- **`tb_mldd_error_sweep`** is the exhaustive sweep described above.

All of them finish within seconds.
