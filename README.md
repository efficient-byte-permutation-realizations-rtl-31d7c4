# Byte permutation units for folded AES datapaths

A small AES core does not work on the whole 128-bit state at once. It is
*folded*: its SubBytes, MixColumns and AddRoundKey logic handles Q bytes per
clock (Q = 1, 2, 4 or 8) and the 16 bytes of the state pass through it in
16/Q beats. Most round steps act on single bytes or columns and fold easily.
ShiftRows is the exception: it moves bytes across the whole state, so a byte
that enters early may have to leave late, and the other way round. Some
storage is unavoidable. The question is how little storage, and how simple a
control, will do.

This library contains two families of ShiftRows / InvShiftRows units, called
byte permutation units (BPUs), that use the least storage possible:

* a **memory-based** unit: Q dual-port memories that hold exactly one state
  (16 bytes). The state is never moved. Each round reads it back in permuted
  order and writes the results into the very locations it read from.
* **register-based** units for 1, 2, 4 and 8 ports. These are short delay
  lines. A byte that must wait longer than the line allows is written back
  from the end of the line into an earlier register. A byte that must leave
  early is taken out of the middle of the line. Each unit needs only 12 byte
  registers (8 for the eight-port unit), fewer than the 16 bytes of a state.

All units do both directions: left shift (ShiftRows, for encryption) and
right shift (InvShiftRows, for decryption).

## Byte numbering

Byte n of a state sits in row `n mod 4` and column `n div 4`, as in the AES
standard. ShiftRows rotates row r left by r columns. Output byte p of
ShiftRows is therefore input byte

    src_left(p)  = (p mod 4) + 4 * ((p div 4 + p mod 4) mod 4)
                 = 0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11
    src_right(p) = (p mod 4) + 4 * ((p div 4 - p mod 4) mod 4)
                 = 0, 13, 10, 7, 4, 1, 14, 11, 8, 5, 2, 15, 12, 9, 6, 3

A Q-byte interface carries bytes `Q*b .. Q*b+Q-1` on beat b. Element `i` of a
`byte_t [Q-1:0]` port is byte `Q*b+i`. So with Q = 4, lane i is state row i,
and with Q = 2, lane 0 holds rows 0 and 2 while lane 1 holds rows 1 and 3.
No byte ever has to change lane, except in the eight-port unit.

## Memory-based unit (`bpu_mem`)

### Storage layout

There are Q memories of 16/Q bytes. Byte h of a state always lives in
memory `ma = h mod Q`. Each memory's ports therefore connect straight to one
byte lane of the datapath, with no multiplexer between them. Only the row
changes from round to round. The row of memory `ma` for access `j`
(0 .. 16/Q-1) of round `k` is

    ShiftRows:    ra = ( j + 4*j*(k+1) + (4/Q)*(k+1)*ma ) mod 16/Q
    InvShiftRows: ra = ( j - 4*j*(k+1) - (4/Q)*(k+1)*ma ) mod 16/Q

In round k, access j reads row `ra` of every memory. The Q bytes it returns
are bytes `src(Q*j) .. src(Q*j+Q-1)` of the current state. The processed
results, new bytes `Q*j .. Q*j+Q-1`, go back to the same rows. Every row is
read once and written once per round, so one state's worth of memory is
enough, with no second buffer to swap with.

The layout comes back to where it started every four rounds. Only
`(k+1) mod 4` matters, and 16/Q is a power of two, so `bpu_mem_addr_gen` is a
few bits of adders and constant multiplies with no divider. (For Q = 4,
memory 0's row is always j: row 0 of the state is never rotated.)

Example with Q = 4, showing the byte index held in each row:

    after load           after round 0        after round 1        after round 2
    ma0:  0  4  8 12     ma0:  0  4  8 12     ma0:  0  4  8 12     ma0:  0  4  8 12
    ma1:  1  5  9 13     ma1: 13  1  5  9     ma1:  9 13  1  5     ma1:  5  9 13  1
    ma2:  2  6 10 14     ma2: 10 14  2  6     ma2:  2  6 10 14     ma2: 10 14  2  6
    ma3:  3  7 11 15     ma3:  7 11 15  3     ma3: 11 15  3  7     ma3: 15  3  7 11

### Using it

| step | port settings | effect |
|---|---|---|
| load | `wr_init=1`, `wr_j = 0..16/Q-1` | natural layout, row = j |
| round k | read with `rd_k=k`, `rd_j=j`; later write with `wr_k=k`, `wr_j=j` | `rd_bytes` is the permuted state, one cycle after `rd_en` |
| unload | read with `rd_k` = last round written | state in natural order |

The read and write ports are independent, so a round can write back access
j while it reads access j+1. The unit does **not** guard against one hazard.
Round k+1 must not read a row before round k has written it, and with a
one-cycle datapath the first read of a round hits the row that the previous
round's last write goes to. The controller that counts j and k has to leave
enough cycles between rounds; the testbench leaves one. The memories read
synchronously, one cycle after the request. A read of the row that is being
written returns the old byte.

Q may be 1, 2 or 4. The addressing scheme does not cover Q = 8.

## Register-based units (`bpu_reg_1port`, `_2port`, `_4port`, `_8port`)

### Why 12 registers are enough

With one byte per beat and latency L, output byte p leaves at `L + p`, and
its source byte arrived at beat `src(p)`. Byte 15 must leave as output 3,
twelve places early, so L = 12 is the least possible latency. Other bytes
must then wait up to 24 beats, for example byte 1, which becomes output 13.
A plain 24-stage delay would waste registers. Instead, whenever a byte leaves
early (*bypass*), a slot in the line frees up, and a byte that must wait
longer is written from the last register into that slot (*backward
allocation*). Bypass and backward allocation balance, so a free slot is
always there when needed.

### Structures

| unit | bytes/beat | registers | latency | structure |
|---|---|---|---|---|
| 1-port | 1 | 12 | 12 | line of 12 in three sections of 4. Heads of the sections load from the line or from the last register (c0, c1, c2). 4:1 output mux c3 picks the input, the end of section 1, 2 or 3. |
| 2-port | 2 | 12 | 6 | lane 0 (rows 0, 2): line of 6 with the third register loadable from the last (c0) and output from register 2 or 6 (c1 = 0 / 2). Lane 1 (rows 1, 3): three sections of 2 with feedback (c2, c3, c4) and 4:1 output c5. |
| 4-port | 4 | 12 | 3 | row 0: 3 plain registers. Rows 1 and 3: 3 registers, each loadable from the last (c0-c2, c6-c8), 4:1 output (c3, c9). Row 2: 3 registers, the middle one loadable from the last (c4), output from the first or last (c5). |
| 8-port | 8 | 8 | 1 | one register per lane. Lanes 0 and 4 are plain. The others can hold their byte for a second beat (even c) and output either the input or the register (odd c), so each lane either delays its two bytes by one beat or swaps them. Fixed crossings swap lanes 1/5 and 3/7 at the output. |

The 4-port unit has 14 multiplexers in 8-bit 2:1 equivalents (a 4:1 counts
as three). Setting its parameter `LEFT_ONLY = 1` builds an encryption-only
version with 10.

### Control schedules

Each unit's multiplexer settings are a fixed table over `t`, where t = 0 is
the beat on which a state's first bytes are at the input. The tables appear
in each module as bit strings (read left to right, t = 0, 1, 2, ...), one
per select signal and direction. The 4-port and 8-port units share rows
between lanes, because rows 1 and 3 trade schedules when the direction
flips, and rows 0 and 2 behave the same either way. Every table was checked
by simulating the structure over all 16 positions in both directions.

States may follow each other with no gap. A state's table reaches beyond its
16/Q input beats into the next state's first beats, but there the next state
only shifts its bytes along the line. `bpu_reg_ctrl` therefore looks up every
select in the table of the state *at the output*, whose t runs from `LAT` to
`LAT + 16/Q - 1`. It also keeps the direction of each state, so consecutive
states may go in opposite directions.

### Interface and timing (all register units)

| port | meaning |
|---|---|
| `en` | advance everything by one beat; `en = 0` freezes registers and schedule |
| `first_o` | high on beat 0 of the input state period; a state must start on such a beat |
| `in_valid` | the current input beat belongs to a real state (delayed to `out_valid`) |
| `dir` | `SHIFT_LEFT` / `SHIFT_RIGHT`, sampled on beat 0 |
| `in_byte(s)` | bytes `Q*b ..` of the state on beat b |
| `out_byte(s)`, `out_valid`, `out_first` | permuted bytes `Q*p ..` on output beat p, LAT enabled beats after input beat p |

The beat counter runs freely while `en` is high. A source that has no state
to send just keeps `in_valid` low for a whole state period. Reset is
asynchronous and active low, and clears all registers.

## Top level (`bpu_top`)

`bpu_top` puts one of each unit side by side: `bpu_mem` with Q = 4
(parameter `MEM_Q`) and the four register units, each with its own
prefixed ports (`mem_*`, `reg1_*`, `reg2_*`, `reg4_*`, `reg8_*`). A real
core would pick one unit that matches its folding factor. The rest of the
folded round (SubBytes, MixColumns, AddRoundKey, key schedule, and the
controller that counts j and k) is not included. Its connections are the
ports.

## What is this design's own choice

The storage organisation, the address equations, the register structures,
the select positions and the schedules are those of the published units. The
following are additions or choices made here:

* `en`, `in_valid`/`out_valid`, `first_o`/`out_first` and the reset;
* per-state direction, sampled on the first beat;
* the schedule lookup by output-side t, which makes back-to-back states and
  direction changes work;
* the `init` inputs of the memory unit (the load layout, k = -1) and its
  one-cycle synchronous-read memories with read-before-write behaviour;
* a 4-bit round index (enough for the 14 rounds of AES-256);
* in the left-shift-only 4-port unit (`LEFT_ONLY = 1`), the hold multiplexer
  of the last row-1 register stays, because the left-shift schedule needs
  it. Only the two other row-1 register multiplexers are removed, and the
  row-1 output multiplexer shrinks to 2:1, leaving 10 multiplexers.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. The expected values come from the
`src_left/src_right` formulas above (`tb/tb_aes_ref_pkg.sv`), not from the
units' tables.

| testbench | what it does |
|---|---|
| `tb_bpu_reg_{1,2,4,8}port` | 200 random states back to back, random directions, invalid states, random stalls. Checks every byte and the exact latency. The 4-port bench also runs the `LEFT_ONLY` build with a random `dir` input, which the build must ignore. |
| `tb_bpu_mem` | units with Q = 4, 2, 1. Random states are loaded, run through 1-14 rounds (each round reads, checks the permuted order, and writes back transformed bytes while reading the next access), then unloaded. |
| `tb_bpu_mem_addr_gen` | compares the generated rows with an independent model of where each byte is, for Q = 1, 2, 4, both directions, 12 rounds. For Q = 4 and a left shift it also compares the layout after each of the first four rounds with a hand-written table of the memory contents; after the fourth round the layout is the initial one again. |
| `tb_bpu_dpram` | random simultaneous reads and writes against a model array. |
| `tb_bpu_top` | all units at once at default parameters. Also counts backward allocations, bypasses, direction changes, invalid states, stalls, simultaneous memory read/write and four-round wraps, and fails if any never occurs. |

To run one with Verilator 5:

    verilator --binary -Wno-fatal -y rtl -y tb \
        rtl/aes_bpu_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_bpu_top.sv \
        --top-module tb_bpu_top
    ./obj_dir/Vtb_bpu_top

Replace `tb_bpu_top` with any testbench name. The register-unit testbenches
use `tb/tb_bpu_reg_agent.sv` and the memory ones `tb/tb_bpu_mem_agent.sv`,
which `-y tb` finds. Verilator reports ascending-range warnings for the
schedule constants. These are deliberate, so that the bit strings read in
time order.

## Files

| file | content |
|---|---|
| `rtl/aes_bpu_pkg.sv` | `byte_t`, `shift_dir_e` |
| `rtl/bpu_mem.sv`, `rtl/bpu_mem_addr_gen.sv`, `rtl/bpu_dpram.sv` | memory-based unit, row address generator, dual-port memory |
| `rtl/bpu_reg_ctrl.sv` | beat counter, output-side t, direction and valid tracking |
| `rtl/bpu_reg_{1,2,4,8}port.sv` | register-based units |
| `rtl/bpu_top.sv` | all units side by side |
| `tb/` | testbenches, agents and the reference package |
