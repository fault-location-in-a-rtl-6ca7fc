# Fault location in a RAM unit built from one-bit chips

A memory unit made of many one-bit RAM chips can fail in two ways. A chip
can be faulty inside. Or one of the cables that join all chips can have a
stuck line: the data cable D, the chip-select cable CS or the address
cable A. A naive memory test cannot tell these apart. One stuck address
line looks like a fault in every chip of a row, and a chip whose output is
stuck looks like a stuck data line.

This design locates the faulty part, down to the single line or the single
chip. It rests on two ideas.

1. **Test in an order where no earlier test can be spoiled by what a later
   test looks for.** The cable tests are built so that faulty chips cannot
   fool them. Each cable is then tested and repaired before anything that
   depends on it. The resulting order is D, then CS, then A, then the chips.
2. **Make the cable tests insensitive to faulty chips.** The CS and A tests
   store words of a first-order Reed-Muller code and decode what they read
   back. A few wrong bits from faulty chips are corrected. Only a cable
   fault changes the decoded value.

The RTL contains a model of the RAM unit, with inputs that inject faults,
and a hardware tester that runs the whole diagnosis against it.

## Organisation of the RAM unit

- The unit is an array of `Q` rows × `W` columns of chips. `W` is a power
  of two.
- Each chip stores 2^(2P) bits in a square 2^P × 2^P array.
- An address is 2P bits wide. The upper P bits select a row line of the
  chip and the lower P bits a column line.
- The CS lines s_0..s_(Q-1) are active low. A decoder drives them from the
  row number, so that one chip row is selected at a time.
- All W chips of the selected row take part in each access, so a location
  holds one W-bit word.
- The outputs of the chips in one column share one data line. The join is
  a wired AND, and a chip that is not being read drives 1.

`rtl/ram_unit.sv` and `rtl/ram_chip.sv` model this unit. Faults are injected
with these inputs; all zero means a fault-free unit.

| Fault | Effect |
|---|---|
| D line stuck at 0/1 | forces the value written and the value read |
| CS line stuck at 1 | that row can never be selected, so it reads all ones |
| A line stuck at 0/1 | per chip row; two addresses map to one location |
| chip fault | one per chip (kinds below) |

The chip fault kinds are:

- stuck cell;
- row line or column line stuck at 0, which means always selected;
- row line or column line stuck at 1, which means never selected;
- a row decoder that selects two lines;
- an "extended" cell, stuck only while its whole row and column hold its
  value;
- an adjacent-pattern cell, stuck only while its four neighbours hold its
  value.

Where several cells are selected, the values read combine as a wired AND.

## The cable tests

All three tests use one access per cycle. A read returns its data in the
next cycle.

### D test (`d_test`)

The test uses address 0 of every row u:

1. Write the word u and read all Q words back.
2. Write the complement of u and read the words back again.

A data line that reads 0 in all 2Q words is stuck at 0, and one that reads
1 in all of them is stuck at 1. Each row holds a different word and its
complement, so a single faulty chip cannot keep a column constant. Length:
2Q writes and 2Q reads. `done` comes 6Q+1 cycles after `start`.

### CS test (`cs_test`)

1. Store the code word of u in row u, at address 0.
2. Read all rows back and decode them.

If row u decodes to something other than u, its CS line is faulty. For
example, a row that cannot be selected reads all ones. That is the
complement of the code word for 0, which the code tells apart from every
real row number. Up to t chip errors per word are corrected. `done` comes
3Q+1 cycles after `start`.

### A test (`a_test`, run once per chip row)

1. For i = 1..2P, store the code word of i at the address that has only
   bit i-1 set.
2. Store the all-zero word at address 0.
3. Read back in the same order and decode.

If address line i-1 is stuck, its address and address 0 reach the same
location. The zero word then overwrites word i, so entry i decodes to 0.
`done` comes 3(2P+1)+1 cycles after `start`.

### The code (`rm_encoder`, `rm_decoder`)

The tests use a first-order Reed-Muller code of length W with log2(W)+1
information bits.

- Information bit r (r < log2 W) contributes the generator row whose bit b
  is `~b[r]`.
- The top information bit is the all-ones row.
- For W = 8 the generator rows are 0x55, 0x33, 0x0F and 0xFF.

The decoder is a correlation decoder. It picks the linear code word closest
to the received word, or its complement. Ties go to the smaller index and
to the uncomplemented word.

The number of faulty chips a row may contain is the code's correction
capability t:

- W = 8: one chip.
- W = 16 or 32: the code is longer and corrects more.

The unit may have chip faults in at most Q-1 rows. The number of rows Q
must not exceed W, which an `initial` assertion checks.

## The chip tests (`chip_test`, `pattern_gen`, `controlled_register`)

Once the cables are sound, every chip row gets three tests. Each test
writes a pattern over the whole row and then verifies it. The XOR of each
word read with the word expected marks the failing chips. Every pattern
bit is written to all W chips.

- **Decoder test.** Runs 2^P patterns, i = 0..2^P-1. Pattern i has ones at
  (i,i) and zeros everywhere else. It catches stuck row/column lines and
  decoder faults.
- **Extended-fault test.** Runs 2^P patterns, j = 0..2^P-1. Pattern j has
  ones on the shifted diagonal (r, r+j mod 2^P) and zeros elsewhere. The
  2^P patterns are then run again with ones and zeros swapped. This
  catches stuck cells and cells that stick only when their row and column
  hold their value.
  - The generator starts at address (2^P-j, 0).
  - It then emits groups: one element of value 1 followed by 2^P elements
    of value 0.
  - This places each 1 exactly on the diagonal. The wrap of the address
    counter is part of the scheme.
- **Adjacent-pattern test.** Runs 32 patterns. A 3×3 tiling repeats over
  the array, with cells labelled
  ```
  A B C
  D E F
  G H I
  ```
  - Each pattern assigns a value to each of the nine letters.
  - The 32 assignments are chosen so that every cell sees all 2^5 value
    combinations of itself and its four neighbours.
  - The table is `API_ASSIGN` in `rtl/ram_diag_pkg.sv`.

The adjacent-pattern bits come from a **controlled register**. It is a
9-bit register `{I,H,G,F,E,D,C,B,A}` with a (P+1)-bit counter, and its
output is bit 0. On each write:

- Inside a row of cells, the low three bits rotate right, giving
  A B C A B C …
- When the counter overflows after 2^P writes, the whole register rotates
  right by three. The next row of cells then continues with D E F, and the
  row after that with G H I.

This follows the tiling exactly when P is even: 2^P - 1 is then a multiple
of 3, so every row of cells starts on the first letter of its block row.
For odd P the rows start on another letter and the output does not follow
the tiling; the testbenches check coverage for even P only.

One pattern takes 2N+3 cycles, where N = 2^(2P). One row takes
2(3·2^P + 32)·N accesses: 224·N writes plus 224·N reads for P = 6. `done`
comes (3·2^P+32)(2N+3)+1 cycles after `start`.

## The sequencer (`diag_ctrl`) and the top (`ram_diag_top`)

`diag_ctrl` runs the tests in this order:

1. D test.
2. CS test.
3. A test on every row.
4. Chip tests on every row.

After a cable test that found faulty lines, it raises `repair_req` and
waits for a one-cycle `resume`. The person or machine repairing the unit
clears the fault in between. `stage` shows the current test. The results
are held until the next `start`:

- `d_sa0`, `d_sa1`
- `cs_fault`
- `a_fault[row]`
- `chip_bad[row]`
- per-test masks `chip_dc`, `chip_e` and `chip_api`
- the access count `chip_accesses`

`ram_diag_top` connects `diag_ctrl` to a `ram_unit`. It brings out the
fault-injection inputs (`inj_*`) and all results.

At the default size (Q = 4, W = 8, P = 6: a 16 KB unit of 4096-bit chips),
one diagnosis takes about 7.34 million clock cycles. Nearly all of them
are chip-test accesses (4 × 2 × 224 × 4096).

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `Q` | 4 | chip rows (`M = clog2(Q)` row-address bits) |
| `W` | 8 | chip columns = word width, power of 2 |
| `P` | 6 | chip array is 2^P × 2^P (N = 4096) |

`ram_diag_pkg::MAX_P` (8) bounds `P` for the chip-fault descriptor.

## Where this design departs from the original scheme

- **Hardware tester.** The scheme was meant to run as a program on a small
  processor. Here it is a hardware sequencer, and the repair step is a
  `repair_req`/`resume` handshake.
- **Repair stops.** The original flow repairs the lines after each cable
  test. The sequencer stops for repair only when that test found a faulty
  line.
- **First-order codes only.** The scheme allows higher-order Reed-Muller
  codes for units with more chip rows than the word has bits. Only
  first-order codes are built, so Q must not exceed W.
- **Fault-injection inputs.** All fault-injection inputs, and the fault
  models inside the chip, are this design's additions for demonstration.
- **Controlled-register counter.** The counter has P+1 bits, so it
  overflows once per row of cells. The scheme states 2p+1 bits, but with
  that width the register would never reach the D E F and G H I rows.
- **Full loop bounds.** The chip tests run all 2^P decoder patterns, all
  2^P extended-fault patterns per polarity and all 32 assignments. In
  places, the loop conditions of the original read as one iteration short.
- **A test values.** The A test stores the values 1..2P, one per address
  line.
- **Code for the A test.** The A test uses the same Reed-Muller code as the
  CS test. The original's example uses an extended Hamming (8,4) code,
  which has the same length and correction capability.
- **Not built.** The derivation of the test order from a "which test
  invalidates which" graph is not built as hardware. Only its result, the
  fixed order, is. The support circuitry that drives the chips' control
  lines is not modelled beyond `cs_n`/`we`.
- **Own choices.** Read latency, start/done pulses and the bit order of the
  data cable (bit W-1 is line d_1) are this design's choices.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module ram_diag_top_tb rtl/ram_diag_pkg.sv tb/ram_diag_top_tb.sv
./obj_dir/Vram_diag_top_tb
```

Substitute any testbench name.

| Testbench | Covers |
|---|---|
| `line_decoder_tb` | one-hot decoding |
| `ram_chip_tb` | reference model for every chip fault kind |
| `ram_unit_tb` | cable faults, wired AND, row select |
| `rm_codec_tb` | the W = 8 code table, every single-bit error corrected |
| `controlled_register_tb` | register output against the 3×3 tiling, P = 2, 4, 6 |
| `pattern_gen_tb` | every DC/E/API pattern against a reference, P = 2 and 4; the published 4×4 decoder and extended-fault patterns |
| `d_test_tb`, `cs_test_tb`, `a_test_tb` | the cable tests with faulty chips present, including cycle counts |
| `chip_test_tb` | 4×4-bit chips; every assignment covers all 32 neighbourhood patterns |
| `diag_ctrl_tb` | test order and repair stops |
| `ram_diag_top_tb` | end to end at Q = 4, W = 8, P = 4 |
| `ram_diag_top_q8_tb` | end to end at Q = 8, W = 8, P = 5, all three cable faults at once plus seven faulty chips |
| `ram_diag_top_full_tb` | one full diagnosis at the default size |

`ram_diag_top_tb` counts each mechanism and fails if one never happened:

- repair stop after each cable test;
- D stuck-at-0 and stuck-at-1;
- CS fault;
- A stuck-at-0 and stuck-at-1;
- code correction in the CS and A tests;
- chips caught by each of the three chip tests.

`ram_diag_top_full_tb` runs one complete diagnosis at the default size. It
injects one address fault and three faulty chips, and takes about two
minutes.
