# Two-port video SRAM with majority logic and data-bit reordering

A two-port SRAM of 8-transistor cells reads through one single-ended read
bitline per column. That bitline is precharged high before every cycle and
discharges only when the selected cell holds a **0**. Reading a **1** costs
next to nothing, so a memory that stores mostly 1s spends less read power.

This design gets there in two steps:

1. **Majority logic.** Before a word is written, each group of bits is
   inverted if 0s are not in the minority. One extra flag bit per group
   records the inversion. On a read, the flag undoes the inversion.
2. **Data-bit reordering.** Neighbouring video pixels are strongly correlated
   in their upper bits. The bits of equal significance from M adjacent pixels
   are therefore gathered into one *digit group*, so each group the majority
   logic sees is lopsided: mostly 0s or mostly 1s. A lopsided group almost
   always ends up stored as nearly all 1s.

The memory is transparent to its user. Pixels go in and the same pixels come
out. Only the stored form, and so the read-bitline activity, changes.

The default configuration is a 72-kbit memory of 1024 words. Each word holds
M = 8 luma pixels of 8 bits (64 data bits) plus 8 flag bits, one per digit
group. The flags add 12.5% to the array.

## Data path

```
 write:  wpix ─► bit_reorder ─► write_circuit ─┬─ data groups ─┐
        (8 px)   (transpose)    (majority_logic │               ├─► tp_sram_array (1024 x 72)
                                 per group, XOR)└─ 8 flags ─────┘        │
 read:   rpix ◄─ bit_restore ◄─ read_circuit (XOR with flag) ◄───────────┘ rdata (= rbl_o)
```

| module | role |
|---|---|
| `mlr_pkg` | default sizes (M, PIX_BITS, WORDS) and the stored-word width function |
| `bit_reorder` | transposes M pixels × PIX_BITS bits into PIX_BITS digit groups of M bits |
| `majority_logic` | one group: invert if the number of 0s ≥ M/2 |
| `write_circuit` | one `majority_logic` per group, conditional inversion, flag bits |
| `tp_sram_array` | WORDS × (M·PIX_BITS + PIX_BITS) memory with one write port and one read port |
| `read_circuit` | XORs every stored group with its flag |
| `bit_restore` | inverse transpose, back to pixels |
| `mlr_sram_top` | the whole memory |

## Digit groups and the stored word

Pixel `p` occupies `wpix[p*8 +: 8]`. Digit group `d` (d = 0 is the LSB group)
collects bit `d` of every pixel, and pixel `p` supplies bit `p` of the group:

```
group[d][p] = pixel[p][d]          stored word: [71:64] flags, flag d for group d
                                                [63:0]  groups, group d in [d*8 +: 8]
```

The transpose is the design's idea. The placement of the groups and flags
inside the 72-bit word is this implementation's choice. It does not affect
power or function.

## The majority decision

A group of M bits is inverted, and its flag set to 1, when it holds at least
M/2 zeros. **A tie inverts.** With M = 8, a group with four 1s is stored
inverted. It still holds four 1s, but its flag is then a 1 rather than a 0.
After the write circuit, every stored group has at least as many 1s as 0s.

Choosing "1" to mean "inverted" is deliberate. Video data is mostly 0 in its
upper digit groups, so those groups are usually inverted, and their flag
bits are then 1s as well.

In silicon, the decision is made by a precharged circuit. Each 0 pulls down
one node (JL) and each 1 pulls down the complementary node. A sense
amplifier compares the two nodes, and a dummy pull-down on one side settles
a tie toward inversion. This RTL computes the same decision as a count of
0s and a compare (`2*zeros >= M`). Any synthesizable implementation gives
that function. The analog circuit is not modelled.

For random data with M = 8, a plain memory discharges 4 of 8 bitlines per
group on average. With the majority logic it discharges 837/256 = 3.27 of 9,
counting the flag. That is an 18% saving even without any correlation in the
data.

## Timing and interface (`mlr_sram_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock; asynchronous active-low reset of the read register and `rvalid` |
| `we`, `waddr`, `wpix` | in | 1, 10, 64 | write 8 pixels at the rising edge |
| `re`, `raddr` | in | 1, 10 | read request at the rising edge |
| `rpix`, `rvalid` | out | 64, 1 | read pixels, valid in the cycle after `re`; `rpix` holds until the next read |
| `rbl_o` | out | 72 | stored word of the last read, as it sits on the read bitlines |

- One write and one read can be issued in every cycle, at full throughput.
- The reorder and majority logic are combinational ahead of the array's
  clocked write. The XOR and inverse transpose are combinational after the
  array's registered read output.
- A read and a write to the same address in the same cycle return the
  **old** word.
- The array contents are not reset, as in any SRAM. After reset the read
  register holds all 1s (precharged bitlines), so `rpix` reads as 0.
- Every 0 in `rbl_o` is one read-bitline discharge. Counting them gives the
  read-power figure of merit directly. This output exists for measurement.

The latency, the `rvalid` flag, the same-address behaviour and `rbl_o` are
choices made for this RTL.

## Parameters

| parameter | default | note |
|---|---|---|
| `M` | 8 | pixels per digit group. Smaller M saves slightly more power but costs flag area: overhead is 1/M (25% at 4, 12.5% at 8, 6.25% at 16). |
| `PIX_BITS` | 8 | luma bits per pixel; also the number of digit groups and flags per word |
| `WORDS` | 1024 | 1024 × 72 = 72 kbit (64 kbit data + 8 kbit flags). The 1024 × 72 organisation is inferred from the capacity. |

All submodules take the same parameters, so any M and PIX_BITS work
throughout. An odd M is supported: a group is inverted when `2*zeros >= M`.

## What is not in the RTL

The following are circuit-level parts, represented only by their logical
effect:

- the 8T cell and its layout;
- the precharged, hierarchical read bitlines and their sensing;
- write drivers on write bitlines that have no precharge;
- the JL/JL_N majority sense amplifier with its dummy pull-down.

The array is a plain memory array. Its read register stands for the precharged
read port. Timing figures of the silicon (a 4% read-speed overhead, no write
overhead) and power figures (21 µW for the majority circuit) have no RTL
counterpart.

Chroma is not handled specially. The scheme targets 8-bit luma, and any
64-bit payload is stored and returned correctly, only with less saving.

## Verification

Every testbench is self-checking. Each ends with
`TB_RESULT checks=N failures=F` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_bit_reorder`, `tb_bit_restore` | every single-bit position and 300 random pixel sets against a byte-wise reference |
| `tb_majority_logic` | all 256 groups at M = 8 and all 128 at M = 7; the 837/256 random-data discharge count |
| `tb_write_circuit` | flag and stored bits per group; no stored group has 1s in the minority; ties invert |
| `tb_read_circuit` | groups inverted by a reference with random flags are restored |
| `tb_tp_sram_array` | full fill, then 4000 cycles of simultaneous random reads and writes against a reference array; same-address old-data reads; hold while `re` is low |
| `tb_mlr_sram_top` | end to end at default size (see below) |
| `tb_m_sweep` | M = 4, 8, 16 on the same 4096-pixel image: data integrity, a saving at every M, flag overhead 1/M |

`tb_mlr_sram_top` runs the top with its default parameters. It does the
following:

- It fills all 1024 words with a synthetic smooth luma image and reads it
  back. Then it does the same with random pixels.
- It runs 3000 cycles of mixed simultaneous reads and writes.
- It checks `rpix` against a pixel reference and `rbl_o` against a stored
  form computed independently in the testbench.
- It counts each mechanism and fails if one never occurred: inversion,
  non-inversion, ties, read+write in one cycle, same-address access, and
  read hold.

Measured results from `tb_mlr_sram_top`:

- Random pixels: 0.82 of the plain memory's read-bitline discharges. Theory
  gives 0.817.
- Synthetic smooth image: about 0.39 of the plain discharges.
- Write-bitline toggles for the smooth image stay within 2% of a plain
  memory's, despite the extra flag bits.

The synthetic image is a stand-in. The savings it shows say nothing about
real video sequences, where the scheme is expected to save roughly 45–53% of
read-bitline power.

Each testbench also has a deliberately broken copy of its module (for
example, ties not inverting, or the read side using the wrong flag) that it
detects.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mlr_pkg.sv tb/tb_mlr_sram_top.sv --top-module tb_mlr_sram_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. Each runs in well under a second.
`mlr_pkg.sv` must come first, since the modules take their defaults from it.
The array's assertions check that addresses stay below `WORDS`.
