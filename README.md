# Majority-logic fault detector/decoder for a (15,7,5) EG-LDPC protected memory

Soft errors flip bits in memory arrays, so stored words are protected with an
error-correcting code. One-step majority logic (ML) decoding of Euclidean
geometry LDPC (EG-LDPC) codes is attractive for memories because the decoder
is only a shift register, a few XOR gates and a majority gate. Its drawback is
speed. A serial ML decoder needs one clock cycle per code bit, N cycles for an
N-bit word, even when the word has no error, which is almost always the case.

The **majority logic detector/decoder (MLDD)** reuses the decoder's own check
sums as an error detector. During the first three decoding cycles a small
control unit watches the check sums. If all of them stay 0, the word is
declared error-free and leaves after 5 cycles instead of N + 2. Only a word
with a check sum at 1 is decoded to the end, which takes N + 5 cycles. For the
(15,7,5) code used here, three cycles are enough to flag every pattern of 1 to
4 flipped bits. The full decoding corrects any 2 flipped bits.

This repository holds synthesizable SystemVerilog for the whole read/write
path: encoder, memory array, and MLDD. Each block has a self-checking
testbench.

```
data_in(7) -> eg_ldpc_encoder -> ecc_memory (16 x 15) -> mldd_decoder -> data_out(7), word_out(15)
                                     ^ upset port (bit flips)
```

## The code

The code is the (15,7,5) one-step majority-logic decodable EG-LDPC code. It has
15 bits, 7 of them data, and minimum distance 5. It is cyclic: every rotation
of a codeword is a codeword. That is what lets one fixed set of check sums
decode every bit as the word rotates past them.

**Bit numbering.** Bit k of every 15-bit vector in the RTL is code bit `c_k`.
The code is systematic:

- `c0..c6` are the data bits `i0..i6`.
- `c7..c14` are parity bits.

**Encoder** (`eg_ldpc_encoder`, combinational). Each parity bit is the XOR of
the data bits with a 1 in its column of the generator matrix G = [I : X]:

```
c7  = i0^i1^i3          c11 = i0^i1^i3^i4^i5
c8  = i1^i2^i4          c12 = i1^i2^i4^i5^i6
c9  = i2^i3^i5          c13 = i0^i1^i2^i5^i6
c10 = i3^i4^i6          c14 = i0^i2^i6
```

The generator rows are in `mldd_pkg::GEN_ROW`. One of these rows is the word
with only `i4` set: `c0..c14 = 000010001011100`. It is used as a reference
case in the system testbench.

**Check sums** (`mld_xor_matrix`, combinational). These are four parity
checks. Each one contains the bit under decoding, `C14`. No other register tap
appears in more than one of them, so the checks are *orthogonal* on `C14`:

```
B1 = C3 ^ C11 ^ C12 ^ C14        B3 = C0 ^ C2 ^ C6  ^ C14
B2 = C1 ^ C5  ^ C13 ^ C14        B4 = C7 ^ C8 ^ C10 ^ C14
```

For a codeword all four are 0, on every rotation.

**How majority decoding works.** Suppose `C14` is wrong and at most one other
bit is wrong. Then at least 3 of the 4 checks are 1, because the other error
can spoil at most one check. Suppose instead `C14` is right and at most two
other bits are wrong. Then at most 2 checks are 1. So "more ones than zeros"
(3 or 4 of 4) decides whether `C14` is wrong. This holds whenever the word has
at most 2 errors.

## The decoder datapath

`mldd_decoder` is built from these parts:

| part | module | what it does |
|---|---|---|
| cyclic shift register | `mld_cyclic_shift_register` | 15 taps `C0..C14`, loaded in parallel. Each step: `C(k+1) <= C(k)`, and `C0 <= C14 ^ maj`. |
| XOR matrix | `mld_xor_matrix` | check sums `B1..B4` of the current taps |
| majority gate | `majority_sorting_network` (default) or `majority_gate_2level` | `maj = 1` when at least 3 of `B1..B4` are 1 |
| correcting XOR | inside the shift register | inverts the bit under decoding on its way back to `C0` |
| control unit | `mldd_control_unit` | early error detection and sequencing |
| output buffers | `mldd_output_buffer` | release the register contents on `finish` |

Each rotation decodes the bit that sits in `C14`, and then moves it to `C0`.
After 15 rotations every bit has been decoded once.

### Two majority gates

- **`majority_gate_2level`** is the conventional gate: an OR of the four
  3-input AND terms.
- **`majority_sorting_network`** is the "modified MLDD" version. Five
  `sort_comparator` elements sort the four check sums. For single bits, max is
  an OR gate and min is an AND gate. The comparators act on lines (1,2) and
  (3,4), then (1,3) and (2,4), then (2,3), so the ones collect on the upper
  lines. The third line from the top is 1 exactly when at least three inputs
  are 1, so that line is the majority output.

The parameter `MAJ_SORT` of `mldd_decoder` and `mldd_memory_system` selects
the gate. The default is 1, the sorting network. Both gates give identical
results, and the decoder testbench runs both side by side.

## Early detection and timing

This is the part of the design that takes the most care.

### Control unit

The control unit (`mldd_control_unit`) is built from these parts:

- **OR1** ORs the four check sums of the current cycle.
- **Two detection registers** in series hold OR1 of the previous two cycles.
- **OR2** combines OR1 of the current cycle with both registers. In the third
  detection cycle it therefore tells whether any check sum was 1 in any of the
  three cycles. The third value goes straight into OR2 without being
  registered.
- **A counter** counts rotations.
- **An FSM** with states `IDLE`, `DETECT`, `DECODE` and `DONE`. It clears the
  counter and the detection registers when a word is loaded.

### Cycle schedule

In this table, the cycle in which `start` loads the word is cycle 1:

| cycle | error-free word | word with error(s) |
|---|---|---|
| 1 | load (input cycle) | load |
| 2, 3, 4 | `DETECT`: rotate and watch checks; OR2 evaluated in cycle 4 | same; OR2 = 1 in cycle 4 |
| 5 | `DONE`: `finish`, word on `y` | `DECODE` continues |
| 5 .. 19 | | `DECODE`: 15 more rotations with correction |
| 20 = N + 5 | | `DONE`: `finish`, corrected word on `y` |

So the latency is 5 cycles without an error and N + 5 = 20 cycles with one.
A plain serial ML decoder takes N + 2 = 17 cycles in both cases. An error-free
read therefore saves 12 cycles.

### Why a faulty word makes 18 rotations, not 15

The majority gate and the correcting XOR are active in the detection cycles
too. They cannot change an error-free word, because all its check sums are 0.
For a faulty word, decoding simply continues after detection for another
N = 15 rotations, with no restart. That gives 3 + 15 = 18 rotations. The bits
that passed `C14` during detection are decided a second time, which does no
harm within the 2-error correction range.

The gain is in the output wiring. Whether the word leaves after 3 rotations or
after 18, it has moved by 3 positions (18 mod 15 = 3). The output buffers can
therefore be fixed wires, with no multiplexer between two alignments:

```
y[k] = C((k + 3) mod 15)
```

### Output buffers

The output stage (`mldd_output_buffer`) drives the word only while `finish` is
high. In a tristate version the output would float at other times. Here it is
modelled with two-state logic: `y = 0` and `y_valid = 0` while released.

### Three detection cycles are enough

In the first three cycles the checks see the word in three rotations. That is
12 check sums, covering every bit position. Detection does not depend on the
data, only on the error pattern: as long as every check sum is 0 nothing is
corrected, and the first check sum at 1 already flags the error. So testing
each pattern once is a proof.

`tb_mldd_decoder` does that for all 1,940 patterns of 1 to 4 flipped bits, and
every one is flagged by cycle 4. Five or more flips can go unnoticed or be
miscorrected, as with any distance-5 code.

The same argument holds for correction. The code is linear, so the check sums
of the codeword part are always 0. Each majority decision therefore depends
only on the error pattern still in the register. Correcting every 1- and 2-bit
pattern on a few codewords covers every codeword.

## The memory system (top: `mldd_memory_system`)

### Write

With `write` high, `encode(data_in)` is stored at `addr` at the clock edge.

### Read

1. `read` is accepted only while `ready` is high. A request while not ready is
   dropped.
2. The memory has a synchronous read port. Its word arrives one cycle later and
   is loaded into the decoder in that same cycle, so the memory access takes the
   place of the decoder's input cycle.
3. The result comes out in the single cycle `valid` is high:
   - `data_out` carries the 7 data bits;
   - `word_out` carries the full corrected codeword;
   - `error_detected` is high when the word had to be decoded.

`valid` follows the read cycle by 5 clock cycles for a clean word and by 20
for a faulty one. `ready` returns in the cycle after `valid`.

### Upset port

`seu_en`, `seu_addr` and `seu_mask` XOR a mask into one stored word. This
models soft errors, so that faulty reads can be produced in simulation. A write
to the same address in the same cycle takes priority.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `ADDR_W` | 4 | memory depth is `2**ADDR_W` words of 15 bits |
| `MAJ_SORT` | 1 | 1: sorting network majority gate; 0: two-level gate |

These are fixed in `mldd_pkg`: `N = 15`, `K = 7`, `NUM_CHECKS = 4` and
`DET_CYCLES = 3`. The check sums and generator rows are specific to this code.
Another EG-LDPC code needs new tables, a new majority threshold, and possibly
more detection cycles.

## Where this design makes its own choices

These points are not fixed by the published description of the method. They
are decided here as follows:

- **Generator rows `i0` and `i2`.** Two rows of the published generator
  matrix, and the published encoder drawing, do not agree with the decoder's
  check sums. This design uses the generator rows that keep all four check
  sums at 0 on every rotation. The other five rows are as published. This is
  the only choice under which the published decoder can decode what the
  encoder writes.
- **Latency with an error.** A faulty word takes N + 5 cycles. The rotation
  continues through the detection cycles, and the output uses a fixed offset of
  3.
- **One counter.** The counter that spans the three detection cycles also
  counts the full decoding to its end.
- **`finish` after full decoding.** `finish` is raised after a full decoding
  as well, not only for error-free words, so the corrected word reaches the
  output.
- **No tristates.** The output tristates are replaced by an enable plus a
  `y_valid` strobe.
- **Memory.** The memory depth is 16 words. It uses one address for reads and
  writes, a one-cycle synchronous read, and no reset of the array.
- **Upset port.** The upset port is a test feature.
- **Reset.** Asynchronous active-low reset (`rst_n`) on all control and
  datapath registers.
- **Handshake.** A `ready` / `start` handshake, with an assertion that `start`
  only comes while ready.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=<n> failures=<n>`, and each has a cycle watchdog.
Reference values come from `tb/tb_mldd_ref_pkg.sv`. It builds the code
independently of the RTL tables, as the multiples of the generator polynomial
g(x) = 1 + x^4 + x^6 + x^7 + x^8, and spells out the four check sums by tap
number.

| testbench | what it covers |
|---|---|
| `tb_eg_ldpc_encoder` | all 128 data words: systematic bits, reference codeword, check sums on all 15 rotations, minimum distance 5, published rows i1, i3..i6 |
| `tb_mld_xor_matrix` | all 2^15 tap values |
| `tb_majority_gate_2level`, `tb_majority_sorting_network`, `tb_sort_comparator` | exhaustive |
| `tb_mld_cyclic_shift_register` | random load/shift/correct against a model |
| `tb_mldd_output_buffer` | enable and the 3-position realignment |
| `tb_ecc_memory` | write, read latency, upsets, write/upset collisions |
| `tb_mldd_control_unit` | `finish` in cycle 5 after 3 shifts when clean; in cycle 20 after 18 shifts when a check sum is 1 in any detection cycle |
| `tb_mldd_decoder` | both majority gates; all 128 codewords clean (cycle 5); every 1- and 2-bit pattern on 4 codewords corrected (cycle 20); all 1,820 3- and 4-bit patterns detected |
| `tb_mldd_memory_system` | top at default parameters, end to end |

`tb_mldd_memory_system` counts each mechanism and fails if one never happens:

- early forwarding of clean words;
- 1-bit and 2-bit correction;
- 3/4-bit detection;
- a read refused while busy;
- upset injection.

It also checks the latency of every read. It reproduces the reference case:
the word with only `i4` set at address 1, read back error-free in 5 cycles.

### Running a testbench

To run a testbench with Verilator 5, for example the top-level one, let Verilator
find modules and packages by file name in the two source folders:

```
verilator --binary --timing --assert -y rtl -y tb tb/tb_mldd_memory_system.sv \
    --top-module tb_mldd_memory_system -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` for other blocks. All testbenches
finish in well under a second.

## Files

- `rtl/mldd_pkg.sv`: code constants, types, generator rows, check masks.
- `rtl/eg_ldpc_encoder.sv`, `rtl/ecc_memory.sv`, `rtl/mldd_memory_system.sv`:
  the write and read path.
- `rtl/mldd_decoder.sv` and its parts:
  - `rtl/mld_cyclic_shift_register.sv`
  - `rtl/mld_xor_matrix.sv`
  - `rtl/majority_gate_2level.sv`
  - `rtl/majority_sorting_network.sv`
  - `rtl/sort_comparator.sv`
  - `rtl/mldd_control_unit.sv`
  - `rtl/mldd_output_buffer.sv`
- `tb/tb_*.sv`: testbenches and the reference package.
