# NAND flash controller for SD/MMC cards, with a parallel systolic BCH ECC

An SD or MMC card is a small host-bus interface in front of raw NAND flash.
NAND flash is cheap but unreliable: bits flip at random, blocks wear out, and
it can only be programmed a page at a time and erased a block at a time. The
controller has to hide all of that while keeping up with the host bus.
MMC in 8-bit mode at 52 MHz carries up to 52 MB/s.

This RTL implements the hardware side of such a controller. It rests on four ideas:

* **A w-bit parallel BCH code built as a systolic array.** Every 512-byte
  sector gets 52 parity bits that correct up to 4 bit errors. The encoder and
  the syndrome generator process a whole byte per clock. They use one regular
  array of identical 2-AND/2-XOR cells, derived from the serial division
  circuit by unrolling it w times.
* **Dual-channel flash access.** Two x8 NAND chips are driven in lockstep,
  and each data strobe moves one byte on each chip. The flash side therefore
  delivers one byte per controller clock, although each chip strobes only every
  second clock.
* **Multi-buffering.** A ring of sector buffers lets the host side fill or
  drain one sector while the flash side works on another.
* **Code banking.** The microcontroller's firmware lives in the flash, not in
  a big on-chip ROM. A hardware loader copies a common image and then one
  "bank" at a time into small program RAMs. A mask boot ROM starts the
  process. Firmware can be upgraded from the host simply by rewriting the flash
  area that holds it. A small reader also extracts the flash parameter table
  (capacity, block count, pages per block) from a sector, so that one firmware
  can adapt to different flash parts.

The SD/MMC bus decoder and the microcontroller (MCU) are not included. Their
sides of the design are ports of the top module, `nand_flash_controller`.
Bad-block management and wear leveling are firmware on that MCU, and are not
part of this RTL either.

```
 host bytes ──► buffer_manager ◄──► buffer_ram (4 x 512 B, dual port)
 (SD/MMC side)       ▲  │ corrections (read-modify-write)
                     │  ▼
               flash_sequencer ──► 2 x NAND (x8), lockstep, even/odd bytes
                     │  ▲
                     ▼  │ parity / error masks
                  bch_ecc (encoder, syndromes, BM + Chien decoder)

 MCU program bus ◄── code_bank: boot_rom, common code_ram, bank code_ram, code_loader
 sector stream   ──► flash_param_parser
```

## The BCH array (the hard part)

### The code

The code is a binary BCH code over GF(2^13) with the primitive polynomial
x^13 + x^4 + x^3 + x + 1. Its generator is the product of the minimal
polynomials of α, α³, α⁵ and α⁷:

    G(x) = m1(x) m3(x) m5(x) m7(x) = 0x1_4523_043A_B86AB   (degree 52)
    m1 = 0x201B  m3 = 0x26B1  m5 = 0x2993  m7 = 0x274F

The code corrects t = 4 errors. The codeword is 4096 data bits plus 52 parity
bits, which is a shortened code: the full length is 8191. Nothing in the RTL
stores these numbers. `bch_pkg` computes the minimal polynomials and G(x) with
constant functions during elaboration, from `GF_M`, `BCH_T` and `PRIM_POLY`.
Changing those three constants gives another code with no other edits.

### From serial division to a w-bit array

Systematic encoding takes the remainder of x^52·m(x) divided by G(x). The
usual serial circuit is a 52-bit LFSR. It takes one message bit per clock:
the feedback bit `f = R[51] ^ d` is shifted in, and it is XORed into every
register whose G coefficient is 1. Write that step out per register and
every register bit follows the same rule:

    R'[j] = (a_j & R[top]) ^ (a_j & d) ^ R[j-1]        (R[-1] = 0)

where a_j is coefficient j of G(x). Each term is one **basic cell**
(`bch_cell`): two ANDs and two XORs, with inputs `a`, `r_top`, `d` and
`r_prev`. Because a_j is a constant, synthesis removes the ANDs, and a cell
with a_j = 0 becomes a wire. The array is still kept regular in the source,
as a grid of identical cells.

To take w = 8 bits per clock, `bch_parallel_array` stacks W layers of 52
cells. Layer l computes the register state after message bit l from the state
after bit l-1. Only the last layer feeds the registers, so one clock performs
eight serial steps. That is Reg(i+w) = G^w·Reg(i) + Σ G^j·g·D(i+j) worked
out structurally, not as a precomputed XOR matrix. Within a word, `din[W-1]`
is the earliest bit, which is the highest power of x. The critical path is W
cells deep. This is the systolic, folded form: same cells, local wiring, and
a choice of W made only by how many layers are stacked.

### Where the same array is reused

* `bch_encoder`: one array with G(x) as the coefficients. Its 52-bit
  remainder is the parity.
* `bch_syndrome`: four small arrays, one per minimal polynomial. Each leaves
  `x^d·r(x) mod m_j(x)`, where d = 13 because the array shifts by the
  polynomial degree. The syndromes follow as S_i = r(α^i) = Σ_k b_k·α^{i(k−d)},
  computed by constant GF(2^13) multiplications from those 13-bit
  remainders. The even syndromes are squares of lower ones
  (S_2i = S_i²), but all eight are produced directly for simplicity.
  `error` is high when any syndrome is nonzero.
* `bch_decoder` is not systolic. It runs the inversion-free Berlekamp–Massey
  algorithm for 2t = 8 clocks, then a Chien search that tests W = 8 bit
  positions per clock over the 519-byte word, in the order the bytes were
  received. It emits one (byte index, XOR mask) pair per byte with errors. A
  word is flagged uncorrectable when the number of roots found differs from the
  degree of the locator polynomial. Latency is 1 + 8 + 519 clocks, or 1 clock
  for a clean sector.
* `bch_ecc` bundles the three. The parity is carried as 7 bytes (52 bits
  followed by 4 zero bits), so the codeword on flash is 512 + 7 bytes. The
  sequencer pads it with one 0xFF byte to 520 bytes, so that the two channels
  hold 260 bytes each.

## Flash side: dual channel and page operations

`flash_sequencer` performs one operation at a time on both chips at once:
read (00h–addr–30h), program (80h–addr–data–10h, then status 70h), erase
(60h–row–D0h, then status) or reset (FFh). Each address is 2 column bytes
plus 2 row bytes. These codes are those of common 1 Gbit x8 large-page parts.

* **Channels.** Command and address cycles go to both chips. In the data
  phase, even bytes of the 520-byte sector go to channel 0 and odd bytes to
  channel 1.
* **Strobes.** WE# and RE# are low for one clock and high for one clock, so a
  pair of bytes moves every two clocks. All pins come from registers.
  CLE/ALE are held one clock past the WE# rising edge.
* **Sectors per operation.** A read or program moves `nsec + 1` sectors (1 to
  8) of one page pair, at consecutive columns. This costs one array access
  (tR or tPROG) per page instead of per sector. Each sector is its own
  codeword. The encoder is restarted and the parity appended after every
  512 data bytes. On reads, the sequencer waits before every sector until the
  decoder has finished the previous one and a buffer is free.
* **Status.** Program and erase end with a status read. The result is one
  fail bit per chip.

## Buffers and error correction in place

`buffer_manager` treats the `NBUF` buffers as a ring with three sector
counters:

* P: sectors completely written;
* C: sectors released to the reader;
* K: sectors completely read.

The writer may proceed while P−K < NBUF, and the reader while C−K > 0.
Writing to flash (mode 0) releases a sector as soon as it is full. Reading
from flash (mode 1) releases it only after the decoder's `done`. Before that,
each (index, mask) from the decoder is applied as a read-modify-write on the
host port. Corrections have priority over host reads, and masks aimed at
parity bytes are dropped. The host therefore never sees uncorrected data, and
it sees the `ecc_*` status with every sector.

## Code banking and the parameter table

Program address map (16-bit MCU code space):

| address       | after reset | after `boot_mode_clr` |
|---------------|-------------|-----------------------|
| 0x0000–0x7FFF | boot ROM (4 KB) | common RAM (8 KB) |
| 0x8000–0xFFFF | bank RAM (8 KB) | bank RAM (8 KB) |

The boot code starts `code_loader` for the common image and for bank #k.

* **Where the images sit.** The common image is read from page pair 0x40,
  and bank k from page pair 0x80 + 2k. Each image is 16 sectors.
* **How they are read.** Loading uses the normal read path, including ECC
  correction. An uncorrectable sector sets `load_error`.
* **Bus ownership.** While loading, the loader owns the sequencer and the
  buffer's read stream.

`flash_param_parser` watches a sector stream for the tag `"FPRM"`
(0x4650524D). It then reads records of one id byte and a 4-byte
little-endian value until id 0xFF. The ids are:

* 1: total capacity;
* 2: total blocks;
* 3: pages per block.

## How far to trust it, and where it departs from the original design

What follows the original paper:

* the t-error-correcting w-bit parallel BCH encoder and syndrome generator,
  built as a systolic array of 2-AND/2-XOR cells;
* t = 4;
* the block structure: buffer RAM and manager, sequencer, ECC, boot ROM,
  common and bank RAM, code loader;
* dual-channel access with multi-buffering;
* a parameter table framed by a start tag and an end flag.

Choices made here because the paper leaves them open:

* the field size m = 13, the primitive polynomial, and w = 8;
* the 512-byte sector codeword and its byte layout;
* the whole decoder: Berlekamp–Massey plus Chien search;
* the buffer count and ring rules;
* the NAND command set and bus timing: a two-clock strobe, intended for
  about 50 MHz;
* the lockstep even/odd byte split and the multi-sector page operations;
* the code-space map, the flash locations of the firmware images, and the
  parameter-table encoding.

Not built:

* the SD/MMC protocol engine;
* the MCU;
* the firmware (bad-block replacement, wear leveling, address mapping);
* cache program and read, and chip interleaving.

With the two-clock strobe, a whole-page read streams 4096 bytes in about
4160 clocks plus tR. At an assumed 50 MHz that is roughly 37 MB/s for reads
and 14 MB/s for programs, given a typical 200 µs tPROG. The published card
figures of about 42 MB/s read and 20 MB/s write would need a faster clock
and a program that overlaps transfer with tPROG.

The testbenches check every block against values computed independently:

* bit-serial reference division for the parity;
* direct evaluation of r(α^i) for the syndromes;
* syndromes of chosen error patterns, up to 5 errors, for the decoder;
* reference models for the memories and buffers.

Each testbench has a watchdog. `tb_nand_flash_controller` runs the complete
controller at its default parameters, with two behavioural NAND chips
(`tb/nand_model.sv`). It checks data integrity, correction and the
uncorrectable report, and it counts that every mechanism happened. Those
mechanisms are host stalls, host/flash overlap, dual-channel strobes, ECC
waits, both code loads, the boot-mode switch, the parameter table, erase,
and a reported program failure.

`tb_multiblock_rate` measures sequential multi-block throughput. It writes
and then reads 32 sectors, one eight-sector page operation at a time. The
chip models take tR = 25 µs and tPROG = 200 µs, and the controller clock is
50 MHz. The measured rates are 14.3 MB/s for writing and 36.7 MB/s for
reading, in line with the estimate above.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `bch_pkg` | `GF_M`, `BCH_T`, `BCH_W`, `PRIM_POLY` | 13, 4, 8, 0x201B | field, correction power, bits per clock, field polynomial |
| `bch_pkg` | `SECTOR_BYTES` | 512 | data bytes per codeword |
| top | `NBUF` | 4 | sector buffers |
| top | `BOOT_BYTES`, `COMMON_BYTES`, `BANK_BYTES` | 4096, 8192, 8192 | code memories |
| top | `BOOT_INIT` | "" | `$readmemh` file for the boot ROM (empty: zeros) |
| `flash_sequencer` | `TWB_CLKS` | 5 | clocks from the confirm command to sampling R/B# |

## Simulating

Any testbench runs with plain Verilator 5. The two packages come first, and
the remaining modules are found through `-y`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bch_pkg.sv rtl/nfc_pkg.sv tb/tb_nand_flash_controller.sv \
    --top-module tb_nand_flash_controller
./obj_dir/Vtb_nand_flash_controller
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The
end-to-end one takes a few seconds. `tb/boot_rom_test.hex` is the small ROM
image that `tb_boot_rom` loads.
