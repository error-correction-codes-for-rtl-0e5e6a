# SEU- and SEFI-tolerant 64-bit memory with a byte-erasure-correcting Hsiao code

Commercial memory chips flown in space suffer two kinds of radiation damage.
A single event upset (SEU) flips one stored bit. A single event functional
interrupt (SEFI), or a latch-up, breaks a chip's control logic. The only cure
is to switch the chip's supply off and on, and that wipes everything the chip
held. This design keeps a 64-bit processor memory correct through both.

Each 64-bit word is stored as a 72-bit codeword spread over **nine byte-wide
chips**: eight data bytes and one check byte. The code is an ordinary (72,64)
Hsiao SEC-DED code, so it corrects any single bit error and detects any
double error, and it uses no more chips or check bits than usual. The one
change is the **order of the columns** of its parity-check matrix. They are
arranged so that the columns belonging to each chip form an invertible 8x8
matrix. When a chip is known to be bad, its byte is an *erasure*: its
position is known and its value is not. The other eight bytes are then
enough to rebuild it. A chip that has been power-cycled therefore costs no
data, provided every word is rewritten before a second chip fails.

## Blocks

| Module | Role |
|---|---|
| `hsiao_pkg` | The code: the H matrix, its per-chip inverses (computed at elaboration), shared types |
| `secded_encoder` | Computes the check byte c9 = P·d |
| `secded_decoder` | Syndrome; SEC/DED in normal mode; byte rebuild in erasure mode |
| `secded_codec` | Encoder on the write path, decoder on the read path |
| `scrubber` | Periodic and recovery scrub passes; holds the erasure location |
| `power_controller` | One per chip: power-cycles the chip on an over-current alarm |
| `ecc_memory_system` | Top level: the codec, the scrubber and nine power controllers |

The processor, the nine memory chips and the analog supply-current sensors
are outside the RTL. Their signals are ports of `ecc_memory_system`.

## The code and why the column order matters

H = [P | I8] has 72 columns of 8 bits. P uses all 56 weight-3 columns and
eight weight-5 columns. Every column has odd weight, so:

* a single error at bit n gives syndrome S = h_n, which is unique;
* a double error gives a nonzero syndrome of even weight, which no single
  error can produce.

Split H into nine 8x8 blocks, H = [H1 … H9], with one block per chip and
H9 = I. For a codeword, Σ Hj·cj = 0. If byte i is erased and the rest are
intact, then Hi·ci = Σ over j≠i of Hj·cj. So ci can be recovered exactly when
Hi is invertible over GF(2). The decoder uses an equivalent form. With ci'
the byte as read and S the syndrome of the word as read, S = Hi·(ci' ⊕ ci),
hence **ci = ci' ⊕ Hi⁻¹·S**. That costs one 8x8 GF(2) matrix-vector product,
and a 9-way selection of which inverse to use.

The column order was found with a column-exchange search. Start from a Hsiao
matrix. For bytes 1 to 7 in turn, swap one of the byte's columns with a
column of a later byte until the byte's 8x8 block has full rank. Then fix
byte 8 the same way, without breaking the earlier blocks. H9 stays the
identity, so the code remains systematic. The exact column values in
`hsiao_pkg.sv` come from one run of that search with a fixed seed. Any order
that passes the rank test works equally well. It need not match other
published orders, so stored data are not interchangeable between two
different orders. The weight-5 columns are the complements of the eight
cyclic shifts of `00000111`, which gives every row of P the same weight (26).
`tb_hsiao_pkg` checks all these properties.

Bit numbering: codeword bit n is data bit n for n < 64 and check bit n−64
above that. Byte b (0…8 in the RTL, 1…9 in the text above) is bits
8b…8b+7. Byte b is stored in chip b, and chip 8 holds the check byte.

## Decoder modes

* **Normal** (`erase_en_i = 0`). S = 0: clean. S equals a column: flip that
  bit (`status.single`). S nonzero and of even weight: `status.double_err`, no
  correction. S of odd weight but matching no column (three or more errors):
  `status.other`.
* **Erasure** (`erase_en_i = 1`, `erase_idx_i` = chip). The erased byte is
  rebuilt with Hi⁻¹·S. `status.erased` is set when it changed. In this mode
  all eight check bits are used up by the rebuild. An extra bit error in
  another chip therefore cannot be detected or corrected, and it corrupts the
  rebuilt byte. This is why words must be scrubbed before a chip fails.

The decoder returns the corrected data and also the whole corrected codeword
(check byte included). The scrubber writes that codeword back as it is.

## System operation (`ecc_memory_system`)

**Normal accesses.** The processor raises `proc_req_i` with `proc_we_i`,
`proc_addr_i` and `proc_wdata_i`. The request is taken in a cycle where
`proc_gnt_o` is high. The chips are synchronous: they return read data in the
cycle after the strobe. A read therefore delivers `proc_rdata_o`,
`proc_rstatus_o` and `proc_rsyndrome_o` with `proc_rvalid_o`, one cycle after
the grant. The codec is combinational. Writes are whole 64-bit words.

**Scrubbing.** Every `SCRUB_PERIOD` cycles the scrubber makes one pass over
all 2^ADDR_W words. Each word takes two cycles:

1. The read slot: a request that the processor can pre-empt.
2. The write-back slot: the corrected codeword is written to the same
   address.

The write-back slot is never given away. A processor request that lands in
it waits one cycle, so no processor write can slip between a scrub read and
its write-back. Without processor traffic, a pass over the default 2^29
words takes 2^30 cycles, which is 2.0 s at 533 MHz. A word found
uncorrectable (a double error) is not written back. It is counted in
`scrub_stats_o.uncorrectable`.

**Chip failure and recovery.** This happens in four steps:

1. A chip's supply-current comparator (`chip_overcurrent_i[i]`,
   asynchronous) rises. Its power controller synchronises it, switches
   `chip_power_en_o[i]` off and pulses `pcse`.
2. The scrubber immediately hands chip i to the codec as the erasure. From
   then on every read, by the processor or by the scrubber, rebuilds that
   chip's byte.
3. After `OFF_CYCLES` the supply is switched on again. After `SETTLE_CYCLES`
   more, the controller pulses `restored`.
4. The scrubber then starts a **recovery pass** from address 0. This
   restarts any periodic pass that was running. The pass writes every
   corrected word back, which refills the wiped chip. When it ends,
   `erase_en_o` drops.

If a second chip fails while an erasure is active, the data of the words not
yet rewritten are lost. The scrubber sets the sticky flag `multi_erasure_o`
and keeps the first erasure. The second chip is not rebuilt automatically.
After such an event the memory must be rewritten by software.

With the default off time and settle time, a chip is back in use about
1.2 ms after its fault, and it is fully rebuilt about 2 s later.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 29 | 2^29 codewords = 4 GB of data in nine 512Mx8 chips |
| `SCRUB_PERIOD` | 319 800 000 000 | 10 minutes at 533 MHz. Use 1 918 800 000 000 for 1 h and 138 153 600 000 000 for 72 h |
| `OFF_CYCLES` | 533 000 | Supply off time, 1 ms at 533 MHz |
| `SETTLE_CYCLES` | 106 600 | Power-up wait, 200 µs at 533 MHz |

The code size (64 data bits, 8 check bits, 9 chips) is fixed by the package.

## Where this RTL makes its own choices

These points are engineering choices of this implementation, not part of the
scheme itself:

* **Chip interface.** The chips are modelled as synchronous byte-wide RAMs
  with one cycle of read latency. A real build puts a DDR-II controller
  (refresh, banks, bursts) between `ecc_memory_system` and the chips. That
  controller is not included.
* **Recovery after a soft SEFI.** A chip whose control registers merely need
  reloading would be handled in that DDR-II controller, which is not
  included. Only the power-cycle path is built.
* **Arbitration.** The processor has priority over scrub reads. A processor
  that never stops requesting would therefore starve the scrubber. The
  2-second recovery figure assumes an idle bus.
* **Fixed values.** The off time, the settle time, the two-flop synchroniser
  and the re-trigger of a power cycle on an over-current during settling are
  chosen values.
* **Words that cannot be corrected.** Uncorrectable words are left as they
  are, not rewritten.
* **The H matrix column values** (see above).
* Reset is synchronous and active low throughout.

The Reed–Solomon (11,8) alternative that this scheme is usually compared
with is not implemented.

## Simulation

Every testbench in `tb/` checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M`. Build one with plain Verilator, putting the
package first:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/hsiao_pkg.sv tb/tb_ecc_memory_system.sv --top-module tb_ecc_memory_system
./obj_dir/Vtb_ecc_memory_system
```

| Testbench | What it shows |
|---|---|
| `tb_hsiao_pkg` | Hsiao rules, 56+8 column weights, balanced rows, every chip block invertible, HINV·Hb = I |
| `tb_secded_encoder` | Check bits against a row-wise reference; zero syndrome |
| `tb_secded_decoder` | All single errors, random double and triple errors, erasure of each byte |
| `tb_secded_codec` | Encode, damage, decode round trips |
| `tb_power_controller` | Detection latency of 3 edges; off time of exactly `OFF_CYCLES`; settle time; pulses; re-fault during settle |
| `tb_scrubber` | Period start; 2 cycles per word; correction and uncorrectable counts; recovery pass clears the erasure; second-chip flag; contention |
| `tb_ecc_memory_system` | The whole system at 64 words. Counts and requires every mechanism: single correction, double detection, processor stall, periodic scrub with corrections, power cycle, erasure reads, recovery pass, multiple erasure |
| `tb_sefi_recovery` | Memory of 2^20 words is filled, then the check chip and a data chip are power-cycled in turn. Each recovery pass takes exactly 2 cycles per word (2.01 s when scaled to 2^29 words at 533 MHz), and every word reads back clean afterwards |
| `tb_ecc_memory_system_full` | The whole system at default parameters (2^29 words). Accesses over the full range, upsets, a power cycle with the real 1 ms / 200 µs times, erasure reads before and during recovery |

`tb/mem_chip_model.sv` is the behavioural chip. It uses sparse storage, and
loss of power wipes it. Words not rewritten after a power cycle read back as
pseudo-random bytes, and `flip_bit()` injects upsets.

The full-size testbench starts the 2^30-cycle recovery pass but does not wait
for it to finish. The largest complete recovery pass simulated is the one in
`tb_sefi_recovery`, at 2^20 words. At the simulator's speed, a full 2^30-cycle
pass would take about 20 minutes.
