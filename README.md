# IP-DAEC: correcting limited-magnitude errors in a multilevel-cell memory

A multilevel cell (MLC) stores several bits as one of 2^b physical levels
(resistance of a phase-change cell, memristance of a memristor). Levels sit
close together, so drift and wear move a stored level up or down by a few
steps: a *limited-magnitude* error. With 3-bit cells a single such error can
flip up to three bits of the same cell. A plain SEC Hamming code cannot
correct that, and a symbol-level Reed-Solomon code is slow and large.

IP-DAEC corrects any error that moves **one cell by up to 3 levels in either
direction**. It combines two cheap binary codes:

* a **SEC-DAEC** code (single error correction, double adjacent error
  correction) over the *two lowest bits* of every data cell. Its syndrome
  names the faulty cell and repairs those two bits;
* **interleaved parity (IP)** over the *upper bits* of every data cell. Its
  syndrome gives the error pattern on the upper bits, and it is applied to
  the cell the SEC-DAEC code located.

This repository holds synthesizable SystemVerilog for the scheme's main
configuration: 32 data bits in 3-bit cells, with 13 cells per stored word.
It has the encoder, the decoder, an MLC word array with a fault-injection
port, and a top level that wires them into a protected memory. The scheme
was published by S. Liu, P. Reviriego and F. Lombardi in "Codes for Limited
Magnitude Error Correction in Multilevel Cell Memories" (IEEE Trans. Circuits
and Systems I, 2020). This RTL is an independent implementation of it.

## Why the two low bits are enough

Levels map to bits in plain binary: level 5 is `101`. The XOR between a level
and the level 1, 2 or 3 steps away always has a 1 in bit 0 or bit 1:

| shift | examples (old -> new)         | XOR pattern | low two bits hit |
|-------|-------------------------------|-------------|------------------|
| 1     | 001->010, 011->100, 110->111  | 011, 111, 001 | bit 0 (and maybe bit 1) |
| 2     | 010->100, 001->011            | 110, 010    | bit 1            |
| 3     | 100->111, 011->110            | 011, 101    | bit 0            |

Shift 1 changes bit 0 (adding 1 always toggles the LSB). Shift 2 leaves bit 0
alone and changes bit 1. Shift 3 changes bit 0. So a faulty cell always shows
an error on bit 0, on bit 1 or on both. Those are a single-bit error or a
double adjacent error inside the cell's 2-bit slice. A SEC-DAEC code over the
slices can therefore find the cell. A shift of 4 only flips bit 2 of a 3-bit
cell. That case is detected (IP syndrome non-zero, SEC-DAEC syndrome zero),
but the cell cannot be located.

## The stored word

Cell 0 is the least significant. Within a cell, bit 0 is the lowest bit.
Data bits are numbered from 0 (`d[0]`).

```
cell 12   cell 11   cell 10            cell 9                cell 0
p6 p5 p4  p3 p2 p1  pIP d[31] d[30]    d[29] d[28] d[27] ... d[2] d[1] d[0]
\_ SEC-DAEC parity_/ \______________ 11 data cells _________________________/
```

* The **IP bit** is the XOR of the upper bits of data cells 0..9:
  `pIP = d[2] ^ d[5] ^ ... ^ d[29]`. It sits in the upper bit of cell 10. An
  error there shows up as an IP syndrome in the located cell, exactly as for a
  data upper bit, so it needs no special handling.
* The **SEC-DAEC code** is a (28,22) code. Its 22 protected bits are the two
  low bits of cells 0..10, taken in order: `u[2c]` is the lowest bit of cell c
  and `u[2c+1]` the one above it. So u = d[0], d[1], d[3], d[4], ..., d[27],
  d[28], d[30], d[31].
* The six **SEC-DAEC parity bits** share two cells, three per cell. Bit
  position inside a parity cell does not matter, because the code is built so
  that no error confined to a parity cell can be mistaken for a data-cell
  error (next section). With a conventional code, parity could only go in the
  two low bits of a cell, and the word would need 14 cells.

Overhead: 7 check bits (1 IP + 6 SEC-DAEC) in 2 extra cells, so 13 cells
carry 32 data bits.

## The SEC-DAEC code

`H = [I6 | P]`. Rows are syndrome bits s1..s6. Columns 1..6 are p1..p6 and
columns 7..28 are u[0]..u[21]:

```
s1: 100000 0011110100011101010101
s2: 010000 0101011001100000111110
s3: 001000 1010100011010110110001
s4: 000100 0100010110011110100111
s5: 000010 1010001101011111001110
s6: 000001 1101101010111011010001
```

The matrix is held in `rtl/ipdaec_pkg.sv` as `H_DATA` (the P part only). It
is not a general SEC-DAEC code. It only needs to tell apart the errors a
single faulty cell can produce:

1. the 22 single-bit syndromes (columns 7..28) and the 11 in-cell
   double-adjacent syndromes (XOR of columns 7+2c and 8+2c) are 33 distinct,
   non-zero values. Double errors that straddle two cells are not
   considered, which is why 6 check bits are enough;
2. the syndrome of any error confined to one parity cell (any non-empty
   subset of {p1,p2,p3} or of {p4,p5,p6}) is none of those 33 values. Such an
   error can therefore never flip a data bit.

`tb_error_locator` checks both properties over all 64 syndromes.
`tb_ipdaec_decoder` confirms that every shift of ±1..±3 levels on each of the
13 cells is corrected.

The parity equations, each a single XOR tree, are `p[r] = ^(u & H_DATA[r])`.
Rows of P hold 11 to 13 ones. In the decoder each syndrome bit also takes the
read parity bit, giving 12 to 14 inputs.

## Decoding

All decoder steps are combinational. The two syndromes are formed in
parallel:

```
          +-- ip_syndrome ------- s_ip (1 bit) ---------------+
cells --->|                                                   v
          +-- secdaec_syndrome -- s_sd (6 bits) --> error_locator --> error_corrector --> data, correct_data, status
```

**Locate.** `error_locator` compares `s_sd` in parallel with the three
syndromes of each data cell c: column 2c (bit 0 wrong), column 2c+1 (bit 1
wrong), and their XOR (both wrong). The result is a one-hot `hit` vector and,
per cell, the 2-bit pattern `pat[c] = {bit1, bit0}`. It also raises `par_err`
when the syndrome's ones all lie inside one parity cell's bits.

**Correct.** `error_corrector` XORs every data cell with
`{s_ip, pat[c]}` gated by `hit[c]`. At most one cell is hit, so no
multiplexer is needed. The low bits take the SEC-DAEC pattern and the upper
bit takes the IP syndrome.

**Decide.** `correct_data` and `status` follow this table:

| SEC-DAEC syndrome               | IP syndrome | data out     | correct_data | status            |
|---------------------------------|-------------|--------------|--------------|-------------------|
| zero                            | zero        | as read      | 1            | `DEC_CLEAN`       |
| locates a data cell             | any         | corrected    | 1            | `DEC_CORRECTED`   |
| inside one parity cell          | zero        | as read      | 1            | `DEC_PARITY_CELL` |
| zero                            | non-zero    | as read      | 0            | `DEC_UNCORR`      |
| inside a parity cell            | non-zero    | as read      | 0            | `DEC_UNCORR`      |
| matches no single-cell error    | any         | as read      | 0            | `DEC_UNCORR`      |

The first, second and fourth rows are the published scheme's decision flow.
The parity-cell rows and the unmatched row are this design's own handling of
cases the scheme leaves open. The published scheme assumes a non-zero
SEC-DAEC syndrome is always a correctable single-cell error.

Worked example: write `0xFFFFFFFB`. Cell 0 stores `011`. A +1 shift makes
it `100`. The SEC-DAEC syndrome locates cell 0 with pattern `11`, and the IP
syndrome is 1. Cell 0 is XORed with `111` and becomes `011` again. The read
returns `0xFFFFFFFB` with `correct_data = 1`. Both decoder and end-to-end
testbenches replay this case.

## Top level: `ipdaec_mlc_memory`

```
wr_data --> ipdaec_encoder --> mlc_memory (DEPTH x 13 cells) --> ipdaec_decoder --> rd_data, correct_data, rd_status
                                   ^ inj_* (level shift of one cell)
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the read register |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, 4, 32 | write: data is encoded and stored at the clock edge |
| `rd_en`, `rd_addr` | in | 1, 4 | read request |
| `rd_valid` | out | 1 | high one clock after `rd_en` |
| `rd_data` | out | 32 | decoded data, valid with `rd_valid` |
| `correct_data` | out | 1 | 1: `rd_data` is the stored data (clean or corrected) |
| `rd_status` | out | 2 | `dec_status_t` (table above) |
| `inj_en`, `inj_addr`, `inj_cell`, `inj_delta` | in | 1, 4, 4, 4 | move cell `inj_cell` (0..12) of a word by `inj_delta` levels (signed, -8..7) |

Timing: a write takes effect at the clock edge where `wr_en` is high. Reads
have a latency of one clock, can be issued every clock, and return the
decoded word in the cycle `rd_valid` is high. The decoder is combinational
after the read register, so its delay adds to that cycle's path. A read and
a write to the same address in the same cycle return the old word. An
injection and a write to the same word in the same cycle: the write wins. A
shift that would leave the range 0..7 stops at 0 or 7.

`DEPTH` (default 16) is the only parameter of the top. Word width and cell
size are fixed by the package (see Limits).

## Files

| file | content |
|------|---------|
| `rtl/ipdaec_pkg.sv` | sizes, `H_DATA`, cell layout, `dec_status_t` |
| `rtl/ip_encoder.sv` | interleaved parity `p[i] = XOR d[i + j*T]`, generic in K and T |
| `rtl/ip_syndrome.sv` | read parity XOR recomputed parity |
| `rtl/secdaec_encoder.sv` | SEC-DAEC parity from H |
| `rtl/secdaec_syndrome.sv` | SEC-DAEC syndrome |
| `rtl/error_locator.sv` | 33 parallel syndrome comparisons, parity-cell detection |
| `rtl/error_corrector.sv` | XOR correction, `correct_data`, status |
| `rtl/ipdaec_encoder.sv` | IP and SEC-DAEC encoders plus word layout |
| `rtl/ipdaec_decoder.sv` | the four decoder blocks plus layout |
| `rtl/mlc_memory.sv` | word array of 3-bit levels with injection port |
| `rtl/ipdaec_mlc_memory.sv` | top level |
| `tb/ipdaec_ref_pkg.sv` | reference encoder, written separately from the RTL |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Departures and own choices

Taken from the published scheme: the split of each cell into SEC-DAEC-covered
low bits and IP-covered upper bits, the IP equations, the (28,22) parity-check
matrix with three parity bits per cell, the 13-cell word layout, the
decoder's four blocks and its correct/uncorrectable decision.

This design's own choices:

* column order of H: p1..p6, then the cells' low bits in cell order, with
  the lowest bit first within a cell;
* handling of parity-cell errors and of unmatched syndromes (table above),
  and the `status` output;
* the memory model: one level per cell stored as its bit pattern, 16 words,
  one-cycle synchronous read, level saturation, and the injection port. The
  real storage medium (PCM, memristor) and its sense/program circuits are not
  modelled;
* no pipeline registers in the encoder or decoder.

## Limits

* **Only the 32-bit / 3-bit-cell configuration is built.** The scheme also
  applies to 8-, 16- and 64-bit words and 4- and 5-bit cells. Its published
  parity budgets are 5-9 check bits per word. Each of those configurations
  needs its own parity-check matrix and word layout, and none is provided
  here. `ip_encoder`/`ip_syndrome` are generic. The encoder, decoder and
  locator are written over the package constants, so a new configuration
  means a new `H_DATA`, new sizes in `ipdaec_pkg`, and a check of the layout
  loops in `ipdaec_encoder`/`ipdaec_decoder`.
* Only one faulty cell per word is handled. Errors in two cells may be
  miscorrected; the decoder flags them only when the SEC-DAEC syndrome
  matches no single-cell error.
* A shift of 4 or more levels in a data cell is detected, not corrected
  (`correct_data = 0`). With 3-bit cells only a shift of exactly 4 flips the
  upper bit alone.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. A watchdog stops a run that hangs. With Verilator 5,
from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ipdaec_pkg.sv tb/ipdaec_ref_pkg.sv tb/tb_ipdaec_mlc_memory.sv \
  --top-module tb_ipdaec_mlc_memory
./obj_dir/Vtb_ipdaec_mlc_memory
```

Replace the testbench name for the others. Every run takes well under a
second.

What the testbenches check:

* `tb_ip_encoder`, `tb_ip_syndrome`: the parity equations for t=3 over 8 bits
  (data `10010111` gives parity `111`; flipping the three lowest data bits
  gives syndrome `111`), for the default t=1 over 10 bits, and random bursts.
* `tb_secdaec_encoder`, `tb_secdaec_syndrome`: against the matrix above, for
  one-hot and random inputs, single, parity and in-cell double errors.
* `tb_error_locator`: all 64 syndromes; exactly 33 locate a cell.
* `tb_error_corrector`: every row of the decision table.
* `tb_ipdaec_encoder`: stored word against the reference layout.
* `tb_ipdaec_decoder`: 400 words × 13 cells × shifts ±1..±4, plus the worked
  example.
* `tb_mlc_memory`: read latency, saturation, write/injection collision.
* `tb_ipdaec_mlc_memory`: end to end at default size, 4000 write / inject /
  read operations with a latency check. It counts and requires at least one
  each of: clean read, correction of bit 0 only, bit 1 only, both, an upper
  bit, a parity-cell error, a detected uncorrectable error, a saturated
  shift, and back-to-back reads.

The RTL also carries assertions: at most one located cell, no unmatched
syndrome reported as correct, and injections naming an existing cell.
