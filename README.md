# Multimode block interleaver for 802.16e / OFDM WLAN

An OFDM transmitter interleaves the coded bits of each block so that bits
that are neighbours after the channel encoder land on sub-carriers far
apart and alternate between the more and the less reliable bits of a
constellation point. A burst of channel errors then looks like scattered
single errors to the decoder. IEEE 802.16e defines the write address of
input `k` with two nested permutations full of `floor` and modulo
operations. Computing those directly in hardware needs dividers. The block
size depends on the modulation and the code rate, and there are 17
combinations.

This design removes every division. Inside a block the address sequence
splits into rows of 16. Each row starts at a known value and then steps by
one of at most three increments. So the address generator needs only an
accumulator, a 10-bit adder and a tree of multiplexers that holds
constant increments. A small controller and two tiny phase counters pick
the increment. The interleaver itself is a pair of RAM banks used as a
ping-pong buffer. One bank is written at the permuted addresses while the
other bank, filled during the previous block, is read out in order.

The adder is a carry select adder, which the design uses instead of a carry
save adder to save area and power.

## The permutation and why rows make it easy

Let `Ncbps` be the block size, `d = 16` the number of columns and `s` half
the bits per sub-carrier, at least 1: `s = 1` for BPSK and QPSK, 2 for
16-QAM and 3 for 64-QAM. The standard's two steps are:

```
mk = (Ncbps/16) * (k mod 16) + floor(k/16)
jk = s*floor(mk/s) + (mk + Ncbps - floor(16*mk/Ncbps)) mod s
```

Write `n = Ncbps/16`, `q = k mod 16` (the column) and `r = floor(k/16)`
(the row). Then `mk = n*q + r`. Because `r < n`, `floor(16*mk/Ncbps)` is
just `q`. In every supported mode `n` is a multiple of `s`. So

```
jk = n*q + r - (r mod s) + ((r - q) mod s)
```

and the step from column `q` to column `q+1` of the same row is:

| s | phase p = (r - q) mod s | increment |
|---|-------------------------|-----------|
| 1 | (always 0)              | n         |
| 2 | 0                       | n + 1     |
| 2 | 1                       | n - 1     |
| 3 | 0                       | n + 2     |
| 3 | 1 or 2                  | n - 1     |

Every row starts at address `r` (column 0 gives `jk = r`). A block has `n`
rows. Example, 64-QAM with `Ncbps = 288` (`n = 18`): the addresses are
0, 20, 37, 54, 74, … (steps 20, 17, 17, …), and the second row runs
1, 18, 38, 55, … (steps 17, 20, 17, …).

The phase `p` moves down by one each column. Moving to the next row moves
it up by one, after column 15 has already taken it down by 15. That is how
the two phase counters are driven:

* **T flip-flop** (16-QAM): toggles every column and holds for one clock
  at the end of a row.
* **mod-3 counter** (64-QAM): counts down every column and counts up once
  at the end of a row.

Both counters are cleared at the start of a block. This only works because
both steps of a row end land on the same phase as the formula. The
address-generator testbench checks every address of every mode against
the formula, with division and all.

## Address generator (`addr_gen`)

```
 mod_type, id ──► preset_logic ──► cfg_mod/cfg_id ──► incr_mux ──► inc[6:0]
                      │  │                               ▲   ▲
                      │  └── tff_t ──► t_ff ── tff_q ────┘   │
                      │  └── m3_up ───► mod3_counter ─ m3_q ─┘
                      │
                      └── acc_load / acc_preset / ph_clr
                                   ▼
        accumulator ◄── carry_select_adder(acc, {000, inc}) ◄── acc
             │
             └──► wr_addr            read_counter(0 .. Ncbps-1) ──► rd_addr
                                     blk_last ──► sel toggles
```

* **`incr_mux`**: three levels of multiplexers.
  * Level 1: four 2:1 muxes hold the 16-QAM pairs `(n+1, n-1)` and are
    steered by the T flip-flop. Four 3:1 muxes hold the 64-QAM triples
    `(n+2, n-1, n-1)` and are steered by the mod-3 counter.
  * Level 2: the 3-bit ID steers an 8:1 mux of QPSK increments and a 4:1
    mux for each of the two QAM groups.
  * Level 3: `mod_type` picks BPSK (constant 3), QPSK, 16-QAM or 64-QAM.

  The constants are computed in the package from the table of `n` values
  (see below), not typed in.
* **`carry_select_adder`**: 10 bits split into 4-bit sections. The lowest
  section is a ripple-carry adder. Each higher section computes its sum for
  carry-in 0 and for carry-in 1, and a mux picks one when the real carry
  arrives. `BLOCK` sets the section width.
* **`accumulator`**: holds the write address. Each clock it takes the
  adder sum, or the next row's start value `r+1` at a row end, or 0 after
  the last row.
* **`preset_logic`**: the controller. It has a 4-bit column counter, a
  6-bit row counter and two states:
  * `S_CLR`: the accumulator holds 0, the first address of a block.
  * `S_ITER`: every other address of the block.

  It registers `mod_type`/`id` and decodes them into `n`. When the inputs
  change it raises `restart`, and the sequence starts again at address 0.
* **`read_counter`**: counts 0 … `Ncbps-1` and wraps. It stays in step
  with the write side, so both finish a block on the same clock. An
  assertion in `addr_gen` checks this. `sel` toggles on that clock.

## Mode table

| mod_type | modulation | s | ID → Ncbps (n = Ncbps/16) |
|----------|------------|---|---------------------------|
| 00 | BPSK   | 1 | any → 48 (3) |
| 01 | QPSK   | 1 | 000..111 → 96, 144, 192, 288, 384, 432, 480, 576 (6, 9, 12, 18, 24, 27, 30, 36) |
| 10 | 16-QAM | 2 | x00..x11 → 192, 288, 384, 576 (12, 18, 24, 36) |
| 11 | 64-QAM | 3 | x00..x11 → 288, 384, 432, 576 (18, 24, 27, 36) |

For 16-QAM and 64-QAM, ID bit 2 is ignored. The table lives in
`ilv_pkg.sv` (`QPSK_N`, `QAM16_N`, `QAM64_N`, `BPSK_N`). A new mode is one
entry there, as long as `n` is a multiple of `s` and `16*n` fits in the
memory depth.

## Interleaver memory (`ilv_memory`, `ilv_ram`)

Two single-port RAM banks of 576 × 8 bits share the data input. `sel`
drives the write enable of RAM-1 directly, and through an inverter the
write enable of RAM-2. Two 2:1 muxes route the write address to the bank
being written and the read address to the other bank. With `sel = 0`
(after clear), RAM-2 is written and RAM-1 is read. A third mux passes the
data of the bank being read to the output.

The RAMs have a synchronous read, like FPGA block RAM. So the output mux
is steered by `sel` delayed by one clock. Without that delay, the last
word of each block would be taken from the wrong bank, and
`tb_ilv_memory` would fail on it.

## Interface and timing (`interleaver_top`)

| port | width | |
|------|-------|-|
| `clk` | 1 | clock, rising edge |
| `clr` | 1 | synchronous clear, active high |
| `mod_type` | 2 | 00 BPSK, 01 QPSK, 10 16-QAM, 11 64-QAM |
| `id` | 3 | depth select (table above) |
| `data` | 8 | input symbol, one per clock |
| `data_out` | 8 | interleaved symbol, one per clock |

That is 23 pins. There is no handshake: one symbol goes in and one comes
out on every clock.

* The first clock with `clr` low is input `k = 0` of block 0.
* Block `b` is written during clocks `b*Ncbps … (b+1)*Ncbps-1`.
* Output position `j` of block `b` (the input `k` whose `jk = j`) appears
  on `data_out` after the clock edge that ends clock `(b+1)*Ncbps + j`.
  That is one block period plus one clock of RAM latency.
* The output during the first block period after `clr` is whatever the
  RAM held, and is not valid.

Changing `mod_type` or `id` without `clr` takes effect one clock later. It
restarts the write and read sequences at 0. `sel` keeps its value, and the
block that was being written is dropped. The output is not valid for the
block period after a change.

## How far to trust it; departures from the published design

The source of this design describes the structure (mux tree, T flip-flop,
mod-3 counter, adder, accumulator, preset logic, read counter, the two-bank
memory) and tabulates the first 32 addresses of four modes. The RTL
reproduces all four tables exactly, and the formula for every mode.
Where the published material is unclear, this design chooses:

* **Increment constants.** Most constants printed in the published block
  diagram do not match the permutation formula or the published address
  tables. Only three of the four 64-QAM groups match (20/17/17, 26/23/23,
  29/26/26). All constants here come from the formula: QPSK 6, 9, 12, 18,
  24, 27, 30, 36; 16-QAM 13/11, 19/17, 25/23, 37/35; 64-QAM 576
  38/35/35; BPSK 3.
* **Address width.** 10 bits, because the largest block has 576 words. The
  published memory diagram draws 9-bit address buses.
* **Data width.** 8 bits, as in the published simulation, where it gives
  exactly the 23 I/O pins of the published FPGA result. Change `DATA_W` for
  1-bit or soft-bit interleaving.
* **Row handling.** How the phase counters are stepped at a row end, the
  6-bit row counter and the two-state controller are this design's own.
  The source only says that the preset logic tracks the 16 addresses of an
  iteration with a 4-bit counter and reloads the accumulator.
* **Delayed output select, mode-change restart, clear priority and
  synchronous-read RAMs** are this design's choices.
* **Not built.** The carry save adder version, which was only a reference
  for comparison, and the surrounding PHY (randomizer, RS/convolutional
  encoder, mapper, IFFT, receiver chain). The deinterleaver is not included
  either.
* **Size.** Coarse synthesis of this RTL has 40 flip-flop bits. The
  published FPGA result reports 29 slice flip-flops. The register list
  behind that number is not known, so the difference stays open.

## Simulating

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. The reference permutation
(`tb/ilv_ref_pkg.sv`) evaluates the formula with real division, separately
from the RTL tables. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ilv_pkg.sv tb/ilv_ref_pkg.sv tb/tb_interleaver_top.sv \
    --top-module tb_interleaver_top -o sim && ./obj_dir/sim
```

Replace `tb_interleaver_top` with any other `tb_<module>`.

`tb_interleaver_top` runs at the default sizes. It streams three blocks in
each of the 17 modes, then switches modes in the middle of a block. It
checks every output symbol and reports how often each mechanism was used:
each modulation, bank swaps in both directions, row presets, every
increment phase, read-counter wraps and restarts. It fails if any
mechanism was never used. It runs in about a second.

`tb_addr_gen` checks every write address, read address, `blk_last` and
`sel` of every mode, and the 32-address tables.

## Files

`rtl/ilv_pkg.sv` (mode type, `n` table, helper functions), `t_ff`,
`mod3_counter`, `incr_mux`, `carry_select_adder`, `accumulator`,
`preset_logic`, `read_counter`, `addr_gen`, `ilv_ram`, `ilv_memory`,
`interleaver_top`. Each has `tb/tb_<name>.sv`.
