# CORSAIR: a long-integer coprocessor for an 8-bit smart card

Public-key cryptography (RSA, Diffie-Hellman, Fiat-Shamir and Guillou-Quisquater
zero-knowledge protocols) comes down to modular exponentiation of 512-bit and
larger integers. An 8-bit smart-card CPU doing this in software needs minutes.
CORSAIR adds a small arithmetic cell next to the CPU. The cell executes one
primitive on large integers held in the card's 256-byte RAM:

    B <- y * X + A        (X, A, B: byte strings up to 255 bytes; y: 24 or 32 bits)

It is fast for two reasons:

* It has its **own bus to the RAM**. It makes one memory access in every bus cycle,
  while the CPU keeps running from ROM and EEPROM.
* It does **one 8x8 multiply with two 8-bit additions in every bus cycle**.
  Because (2^8-1)^2 + 2(2^8-1) = 2^16-1, `x*y + a + b` of bytes always fits in
  16 bits. The high byte can be carried straight into the next step.

A modular multiplication alternates two kinds of step. A multiplication step
multiplies by a 24-bit y. A reduction step adds a 32-bit multiple of the modulus,
which is held in two's complement so that subtracting becomes adding. Both steps
have the form above. With one multiply per clock, a 512-bit exponentiation
needs about 8 million cycles, about 1.3 s at 6 MHz.

This repository holds synthesizable SystemVerilog for the cell, its RAM and the
arbiter that shares the RAM with the CPU. It also holds self-checking testbenches
for every module.

## How one operation is scheduled

Large integers are stored most significant byte first. Their least significant
byte is at the highest address, and the three operand pointers `Arp`, `Xrp` and
`Bwp` count down. The cell therefore walks each integer from its least
significant byte, as in hand multiplication.

Multiplying by a 3-byte y means adding three partial products, each shifted one
byte further than the last. The cell does not compute them one after another.
It interleaves them: for each byte `xi` of X, it spends one bus cycle per byte
of y (three cycles in 24-bit mode, four in 32-bit mode). Each cycle makes one
memory access and one multiply-accumulate:

| bus cycle | memory access                      | multiply-accumulate                         | latch moves                                         |
|-----------|------------------------------------|---------------------------------------------|-----------------------------------------------------|
| 0         | read next A byte into `ait`        | `tmp = xi*y[0] + ai + latchd`               | `bi = lo(tmp)`, `latchd <- latchb`, `latchb <- latcha` (32-bit: `<- latche`, `latche <- latcha`), `latcha <- hi(tmp)` |
| 1         | read next X byte into `xit`        | `tmp = xi*y[1] + latcha + latchd`           | `latchd <- latchb`, `latchb <- lo(tmp)` (32-bit: `latchb <- latche`, `latche <- lo(tmp)`), `latcha <- hi(tmp)` |
| 2         | write `bi` at `Bwp--`              | `tmp = xi*y[2] + latcha + latchd`           | same as cycle 1                                      |
| 3 (32-bit only) | none (bus free)              | `tmp = xi*y[3] + latcha + latchd`           | same as cycle 1                                      |

On the last cycle of the iteration, `xi <- xit` and `ai <- ait`.

Two kinds of latch are involved:

* `latcha` carries the high byte from one cycle to the next.
* `latchd`, `latchb` and, in 32-bit mode, `latche` form a short queue. It holds
  the partial sums for the byte positions after the current one.

At the end of iteration k, the queue holds positions k+1 to k+N-1, `latcha`
holds position k+N, and one finished result byte `bi` (position k) has come
out. The datapath header (`rtl/corsair_datapath.sv`) derives this invariant.
The testbenches check it against schoolbook multiplication.

The reads are one iteration ahead of their use. Cycles 0 and 1 fetch the bytes
for the next iteration into `ait`/`xit`. So a short prologue runs before the
loop:

    start cycle | y loads (N cycles, Yrp++) | A prefetch | X prefetch | cnt x N loop cycles

An operation takes `1 + N + 2 + cnt*N` clock cycles. With y taken from the
captured bytes (see below), the y load takes one cycle instead of N. `cnt` is
the number of result bytes produced.

In 24-bit mode every bus cycle of the loop carries both an access and a
multiply, so the cell uses the RAM bus fully. In 32-bit mode the fourth cycle
has no access, and the arbiter gives that cycle to the CPU.

### Ending without padding: read limits

Producing all bytes of `y*X + A` takes more iterations than X has bytes: the
last N iterations flush the queue. `read_A_lim` and `read_X_lim` give how many
bytes of A and of X are really read, counting the prefetch. After that the
operand is zero and the bus cycle stays free. A read can also be switched off
altogether with a command bit. The operands therefore need no zero padding in
memory.

### Shifts, captured bytes and y reuse

* **Write skip.** `write_B_lim` (0 to 4) drops the writes of the first result
  bytes without moving `Bwp`. The result is shifted right by up to four bytes.
* **Captured bytes.** The first four result bytes of every operation are shifted
  into `b[3:0]`. The CPU can read them.
* **y reuse.** The next operation can take its y from `b[3:0]` instead of
  memory (command bit `y_from_b`). A reduction can use the low bytes of one
  result as the multiplier of the next step without going through the CPU.

### Special cases

Command bits select the inputs and the output:

* B = A (block move): X read disabled.
* B = 0 (memory clear): A and X reads disabled.
* Byte shifts: write skip, or an offset between the pointers.
* B = A xor X, byte by byte: XOR mode.
* Computing into `b[3:0]` only: writes disabled.

## Programming model

The CPU sees the cell as 8-bit internal registers (`rtl/corsair_pkg.sv`):

| addr | register      | write (to the shadow copy)                | read                         |
|------|---------------|-------------------------------------------|------------------------------|
| 0-3  | Arp, Xrp, Bwp, Yrp | pointer start values                 | live pointer values          |
| 4    | CNT           | loop count = result bytes                 | active value                 |
| 5    | ALIM          | read_A_lim                                | active value                 |
| 6    | XLIM          | read_X_lim                                | active value                 |
| 7    | BSKIP         | write_B_lim, 0-4 (larger values mean 4)   | active value                 |
| 8    | CMD           | bit0 start, 1 mode32, 2 read A, 3 read X, 4 write B, 5 xor, 6 y_from_b | active command (start bit reads 0) |
| 9    | STATUS        | -                                         | bit0 busy, bit1 pending, bit2 done |
| 10-13| B0-B3         | -                                         | captured bytes b[0..3], b[0] least significant |

**Double buffering.** The CPU writes go to a shadow copy. Writing CMD with the
start bit set makes the shadow copy *pending*. In the first cycle the cell is
idle, the registers written since the previous start move to the active copy
and the operation begins. The CPU can prepare the next step while the current
one runs. Consecutive operations are separated by a single idle cycle. The CPU
should wait until `pending` is clear before writing the next set; an assertion
flags a second start bit written while one is pending.

**Registers keep their values.** A register that was not rewritten keeps its
active value. Pointers therefore continue from where the previous operation left
them. In particular, `Yrp` counts up and is never reloaded while a long
multiplier is consumed three or four bytes at a time, most significant end
first, as in Horner's rule.

**Status.** `done` is set at the end of an operation and cleared by the next
start.

### Example: 512 x 512-bit product (`tb/tb_corsair_top_full.sv`)

The memory layout is X at 0..63, Y at 64..127 and the product R at 128..255.
That is exactly the 256-byte RAM.

1. One operation clears R. It has both reads disabled and `CNT = 128`.
2. Sixteen 32-bit operations compute `R <- R*2^32 + X*y_j`. Each uses `Arp = Bwp`
   placed four bytes further towards the least significant end each time. The
   four new low bytes are still zero, so the shift costs nothing and R is
   updated in place. `Yrp` is written once.

The whole product takes 6,384 clock cycles. Apart from the one start cycle per
operation, the cell is busy all the time.

### Example: modular exponentiation (`tb/tb_corsair_modexp.sv`)

The cell knows nothing about moduli. A modular multiplication R = A*Y mod M is
a sequence of the two step kinds described above. The CPU only works out one
32-bit quotient digit per step. This test uses a 256-bit modulus, the size of
one half of a 512-bit CRT signature. It goes through Y three bytes at a time,
most significant end first:

* **Multiplication step** (24-bit mode): `T = R*2^24 + A*y_j`. R is read
  starting at three bytes kept at zero just past its least significant byte
  (at the next higher addresses). The shift therefore costs no cycles.
* **Quotient.** The CPU reads the top 8 bytes of T and computes
  `q = floor(T_top / (M_top + 1))`, where `M_top` is the top 32 bits of M. This
  estimate never exceeds the true quotient and falls short of it by less than 2.
* **Reduction step** (32-bit mode, y = q): `R = T + q*Mc mod 2^264`. Here
  `Mc = 2^264 - M` is the modulus in two's complement, so adding `q*Mc`
  subtracts `q*M`. R stays below 2M and so fits in 33 bytes.

Block moves copy the operands into place, and a memory clear starts R at zero.
The CPU queues each multiplication step behind the running reduction. A final
reduction with q = 1 subtracts M once if needed.

A 256-bit modular multiplication costs about 3.1k cell cycles. A 512-bit one
costs 22 x (210 + 267) = 10.5k cycles. A full 512-bit exponentiation needs
about 768 multiplications, so about 8.1 million cycles, or 1.35 s at 6 MHz. A
512-bit CRT signature needs about 2.4 million cycles, or 0.4 s.

The memory layout of this test needs 208 bytes for 256-bit operands. With the
same layout, 512-bit operands would need about 334 bytes. A 512-bit general
exponentiation in a 256-byte RAM therefore needs a tighter reduction scheme
than the one shown here.

## Subsystem

`corsair_top` connects three blocks:

* **`corsair_cell`**: the control registers, the sequencer with its four
  pointers, and the datapath.
* **`corsair_ram`**: 256 x 8 bits. It has one port, reads asynchronously and
  writes on the clock edge. A complete access therefore fits in one bus cycle.
* **`corsair_ram_arbiter`**: the cell has absolute priority. A CPU request is
  served in any cycle the cell leaves free: the cell is idle, it is in the
  silent fourth cycle, or a read or write is skipped. Otherwise `cpu_ram_gnt`
  is low, and the CPU must hold its request. An assertion checks this.

The CPU, its ROM and its EEPROM are not part of this RTL. The top brings out the
CPU's register port (`sfr_*`) and its RAM port (`cpu_ram_req` struct,
`cpu_ram_gnt`, `cpu_ram_rdata`). The testbenches act as the CPU.

Timing conventions:

* One clock is one bus cycle.
* `rst_n` is an asynchronous, active-low reset. It clears every register except
  the RAM.
* `sfr_rdata` and `cpu_ram_rdata` are combinational.

## Files

| file | contents |
|------|----------|
| `rtl/corsair_pkg.sv` | shared types: memory request, command, operation parameters, datapath control word, register map |
| `rtl/corsair_mac.sv` | `x*y + a + b` in 16 bits |
| `rtl/corsair_ptr.sv` | auto-decrementing / auto-incrementing 8-bit pointer |
| `rtl/corsair_datapath.sv` | y registers, operand pipeline, accumulation latches, XOR path, b[3:0] |
| `rtl/corsair_seq.sv` | bus-cycle state machine, limits, skip, pointers, memory requests |
| `rtl/corsair_ctrl_regs.sv` | shadow/active control registers, start, status |
| `rtl/corsair_cell.sv` | the cell |
| `rtl/corsair_ram_arbiter.sv`, `rtl/corsair_ram.sv` | RAM sharing and RAM |
| `rtl/corsair_top.sv` | subsystem top |
| `tb/tb_corsair_ref_pkg.sv` | reference model of one operation (schoolbook arithmetic) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_corsair_top_full.sv` | the 512 x 512-bit product at default size |
| `tb/tb_corsair_modexp.sv` | X^E mod M, 256-bit M, 32-bit E, checked against a bit-serial reference |

The testbenches cover the following:

* **Unit tests.** Each drives its module alone:
  * the sequencer's bus schedule, checked cycle by cycle;
  * the datapath, with the control word driven by hand;
  * the register double buffering.
* **`tb_corsair_cell`** runs 160 random operations, with every command bit,
  limit and skip combination. It compares the memory, the captured bytes, the
  pointers and the exact cycle count with the reference model.
* **`tb_corsair_top`** runs random operations through the CPU ports while the
  CPU accesses the RAM. Some operations are queued behind a running one, and
  some continue with the previous pointers. It counts every mechanism and fails
  if one never occurred: 24-bit and 32-bit modes, XOR, read disables, write
  disable, limits, skip, y from b, queued start, continued pointers, Yrp
  chaining, CPU stall, and CPU served while the cell is busy.

## Simulating

Every testbench ends with the line `TB_RESULT checks=N failures=M` and has a
watchdog. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_corsair_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/corsair_pkg.sv tb/tb_corsair_ref_pkg.sv tb/tb_corsair_top.sv
    ./obj_dir/Vtb_corsair_top

Each simulation runs in well under a second, except `tb_corsair_modexp`, which
takes a few seconds. The RTL lints cleanly with
`verilator --lint-only -Wall`, apart from unused package constants and a note
that `rst_n` is also used by the assertions' `disable iff`.

## Design choices and how far to trust them

The following are taken directly from the described design:

* the primitive `B <- y*X + A`;
* the 8-bit datapath with one multiply and two additions per bus cycle;
* three auto-decrementing pointers and an auto-incrementing `Yrp`;
* the interleaved 3-cycle schedule of 24-bit mode, with the register names
  `xi`, `xit`, `ai`, `ait`, `bi`, `latcha`, `latchb` and `latchd`;
* the 32-bit mode with `latche` and a fourth bus cycle without memory access;
* read limits, a write skip of up to four bytes with `b[3:0]`, reuse of
  `b[3:0]` as y, and read/write disable bits;
* XOR;
* double-buffered control registers with a start bit;
* a dedicated RAM bus;
* a 256-byte RAM.

The following are this implementation's own choices. The source gave only the
behaviour, or nothing at all:

* **Phase-0 latch moves and the role of `latche`.** The exact queue moves of
  cycle 0 in the table above are this implementation's, chosen so that the
  arithmetic is exact. In 32-bit mode, `latche` serves as a third queue stage.
* **Prologue.** The order of the prologue, and the order in which y is read
  (the most significant byte at the lowest address, as for every integer).
* **Limit and skip semantics.** What exactly `read_A_lim`, `read_X_lim` and
  `write_B_lim` count, and the rule that `b[3:0]` captures the first four
  result bytes of every operation.
* **Start rule.** A start bit written while the cell is busy is remembered and
  starts the operation automatically. The alternative is for the CPU to
  restart the cell itself.
* **Registers keep their values.** Only rewritten registers are reloaded.
* **Encodings.** The register map, the command and status encodings, the
  8-bit pointers and the 8-bit count (at most 255 bytes per operation).
* **RAM timing.** The asynchronous-read RAM and the one-clock bus cycle.
* **RAM sharing.** Fixed priority to the cell, and the stall handshake for the
  CPU.
* **Clearing.** The latches are cleared at the start of each operation. No
  command carries a partial sum from one operation into the next.

The quotient estimation and the operand layout in the exponentiation test are
one workable scheme, not necessarily the one the card's software uses. The
cycle figures above follow from it; 800-bit CRT signatures (400-bit halves) in
256 bytes, and 512-bit general exponentiation in 256 bytes, would need a more
compact layout than the test's.

## Not included

* The host CPU (an 8051-class 8-bit microcontroller), its ROM and EEPROM, and
  the CPU program. The program includes the modular reduction algorithm, which
  computes the 32-bit quotient digits and sequences the cell operations.
* The frequency and voltage detectors a complete card needs for physical
  protection. They are analog and outside this RTL.
* The simpler earlier cell organisations: one multiply every three bus cycles,
  and a 24-bit-only cell without the second mode. The final cell here does
  everything they do.
