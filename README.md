# Drop-in ECC accelerator for MSP430-class sensor nodes

Elliptic curve cryptography over the binary field GF(2^163) (NIST B-163,
`sect163r2`) is far too slow in software on a 16-bit microcontroller, and a
classic ECC coprocessor brings its own operand memory, which costs more area
than the arithmetic. This design takes a third route: a small accelerator is
**dropped into the data-memory bus** between an unmodified CPU and its
unmodified data RAM. Field elements stay in the CPU's ordinary RAM. The CPU
writes three addresses and a command, and the accelerator performs one field
addition, squaring or multiplication directly on the RAM, using every bus
cycle the CPU leaves free. Inversion and the point multiplication stay in
software and are built from these three operations.

```
            cpu_req / cpu_rdata                      ram_req / ram_rdata
  CPU  <============================>  dropin_ecc  <=====================>  data_ram
 (not                                 +------------------------------+      111 x 16
 included)                            | dropin_arbiter  (CPU first,  |
                                      |   2 bus multiplexers)        |
                                      | dropin_regs     (SRCA SRCB   |
                                      |   DEST CMD STATUS)           |
                                      | dropin_ctrl     (sequencer)  |
                                      | dropin_datapath (OpA OpB     |
                                      |   Work, multiplier, squarer) |
                                      +------------------------------+
```

`dropin_system` (the top) is everything between the CPU's data-memory port
and the RAM. The CPU core and its program memory are not part of the RTL;
connect an MSP430-compatible core's data-memory port to `cpu_req`/`cpu_rdata`.

## Using it from software

Registers sit in the CPU's data address space (word addresses, default
window `REG_BASE = 0xF8`):

| offset | name   | access | meaning                                               |
|--------|--------|--------|-------------------------------------------------------|
| 0      | SRCA   | r/w    | word address of operand A                             |
| 1      | SRCB   | r/w    | word address of operand B                             |
| 2      | DEST   | r/w    | word address of the result                            |
| 3      | CMD    | w      | 1 = ADD (A+B), 2 = SQU (A²), 3 = MUL (A·B); starts it  |
| 4      | STATUS | r      | bit 0 = busy                                          |

A field element occupies 11 consecutive 16-bit words, least significant
word first; the 13 unused top bits must be zero (results always have them
zero). Results are reduced modulo f(x) = x^163 + x^7 + x^6 + x^3 + 1.

The intended software pattern is *wait at the start, not at the end*: before
issuing an operation, poll STATUS until busy is 0, then write the addresses
and the command, and go on with other work. The accelerator copies the three
addresses when it starts, so the next operation's addresses may be written
while the current one runs. A CMD write while busy is ignored. In-place
operations (DEST equal to a source) are safe: SQU and MUL read all of A
before writing, and ADD writes word i only after reading word i of both
operands.

## Sharing the RAM: hold instead of stall

This is the part that makes the concept work, and the part to understand
before changing anything.

* **The CPU is never delayed.** An MSP430 cannot wait for its data memory, so
  `dropin_arbiter` passes every CPU RAM access straight to the RAM in the same
  cycle. Accesses to the register window do not touch the RAM, so the
  accelerator may use the RAM in that cycle.
* **The accelerator asks one word at a time.** `dropin_ctrl` raises a single
  request (read or write) per cycle; `gnt` comes back in the same cycle. When
  the CPU uses the RAM, `gnt` is low and the controlpath simply repeats the
  same request next cycle: nothing advances, the operation is *held*, not
  aborted (`hold` output shows these cycles).
* **Read data is never lost.** The RAM is synchronous: data arrives one cycle
  after a granted read. The controlpath registers where that word must go
  (`rd_valid`, `rd_tgt`, `rd_idx`, `rd_top`) and the datapath always takes it
  in that cycle, whatever the bus does then. Because a CPU read issued in that
  same cycle only returns a cycle later, the two never collide on `rdata`.
  The CPU read-back multiplexer picks RAM or register data by where the
  CPU's previous read went.
* **Writes are held in registers.** The word to be written is always a slice
  of Work or the W-bit OpB register, so a held write needs no extra storage.

## The operations, cycle by cycle

N = 163, W = 16, NW = ceil(N/W) = 11 words, D = digit size.

**ADD** — per word i: read A[i] into OpB, read B[i] and XOR it into OpB,
write D[i]. Three bus cycles per word, the bus is busy every cycle.

**SQU** (with the squaring unit) — read the 11 words of A into OpA, one
cycle later compute Work = OpA² mod f in a single cycle (`gf2m_squarer`:
spread the bits, fold the upper 162 bits back with f − x^163), write the 11
words of Work.

**MUL** — read A into OpA and clear Work. Then feed B into the multiplier
**most significant word first**: each 16-bit word is loaded into OpB and
shifted out D bits per cycle into the digit-serial step of `gf2m_digit_mul`:

    Work <- (Work · x^D  +  OpA · digit)  mod f

The D bits that overflow past x^162 are folded back with f − x^163. After all
digits Work = A·B mod f and is written back. The top word of B holds only 3
valid bits; it is shifted so only ceil(3/D) digits are spent on it. The
next B word is requested in the cycle that consumes the last digit of the
current one and its first digit is taken straight from the arriving RAM
data, so on a free bus the multiplier never waits for operand B; if the CPU
takes that cycle, the multiplier pauses for the word.

Without the squaring unit (`HAS_SQUARER = 0`) SQU is executed as MUL with
B = A.

Busy cycles on a free bus (from the cycle after the CMD write until busy
drops), as checked by the testbenches:

| operation | formula                         | D=1 | D=2 (default) | D=4 |
|-----------|---------------------------------|-----|---------------|-----|
| ADD       | 3·NW                            | 33  | 33            | 33  |
| SQU       | 2·NW + 2 (squarer)              | 24  | 24            | 24  |
| MUL       | 2·NW + 1 + ceil(3/D) + 10·16/D  | 186 | 105           | 64  |

For comparison, the published measurements of this architecture (taken from
the CPU, so including the register writes and polling of the calling code)
are ADD 40, SQU 38 and MUL 208 / 128 / 80 cycles for d = 1 / 2 / 4. In
simulation the accelerator needs 4,866 busy cycles for one inversion (Itoh–
Tsujii chain, 162 SQU + 9 MUL) and about 850 per key bit of a Montgomery-
ladder point multiplication (6 MUL + 5 SQU + 3 ADD per bit), before any CPU
overhead.

## Parameters

| parameter     | default        | meaning                                                       |
|---------------|----------------|---------------------------------------------------------------|
| `N`           | 163            | field degree                                                  |
| `POLY`        | `'hC9`         | f(x) − x^N (bit i = coefficient of x^i); B-163 pentanomial    |
| `D`           | 2              | multiplier digit size; must divide 16 (1, 2, 4, 8)            |
| `HAS_SQUARER` | 1              | one-cycle squaring unit                                       |
| `REG_BASE`    | 8'hF8          | register window (8 words)                                     |
| `RAM_WORDS`   | 111            | data RAM size (222 bytes)                                     |

The bus width (16) and word-address width (8) are constants in
`dropin_pkg`. D = 2 with squarer is the default because it was identified as
the smallest configuration that meets a 30 ms point-multiplication budget at
8 MHz; D = 1 with or without squarer, D = 4 and D = 8 are the other
evaluated configurations. Another binary field only needs `N` and `POLY`
(for example N = 191, `POLY = 'h201` for x^191 + x^9 + 1), provided the
terms of `POLY` lie below x^(N−D) so that one fold suffices.

## Files

| file                         | content                                                   |
|------------------------------|-----------------------------------------------------------|
| `rtl/dropin_pkg.sv`          | bus request struct, command / register / control enums    |
| `rtl/dropin_system.sv`       | top: accelerator + data RAM                               |
| `rtl/dropin_ecc.sv`          | the accelerator                                           |
| `rtl/dropin_arbiter.sv`      | CPU-priority arbiter, RAM and read-back multiplexers      |
| `rtl/dropin_regs.sv`         | SRCA, SRCB, DEST, CMD, STATUS                             |
| `rtl/dropin_ctrl.sv`         | controlpath (sequencing, hold, prefetch)                  |
| `rtl/dropin_datapath.sv`     | OpA, OpB, Work, XOR adder                                 |
| `rtl/gf2m_digit_mul.sv`      | one digit-serial multiply-and-reduce step                 |
| `rtl/gf2m_squarer.sv`        | one-cycle squaring with reduction                         |
| `rtl/data_ram.sv`            | single-port synchronous 16-bit RAM                        |
| `tb/gf2m_ref_pkg.sv`         | independent reference arithmetic (bit-serial LSB-first)   |
| `tb/tb_*.sv`                 | one self-checking testbench per module, plus `tb_dropin_configs` |
| `tb/dropin_cfg_run.sv`       | end-to-end sequence for one configuration (used by `tb_dropin_configs`) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/dropin_pkg.sv tb/gf2m_ref_pkg.sv tb/tb_dropin_system.sv \
    --top-module tb_dropin_system -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `tb_dropin_system` runs the
default configuration end to end (about a second of wall time): single
operations with cycle counts; 60 random operations while the CPU side
hammers the RAM (checking the CPU's own reads, a command while busy,
address rewrites while busy, in-place operations); a full inversion; and a
160-bit Montgomery-ladder point multiplication on sect163r2 (López–Dahab
x-only formulas) whose x-coordinate is compared with an affine
double-and-add reference. It also counts that each mechanism — hold by the
CPU, a lost multiplier prefetch, and each command — really occurred.
`tb_dropin_ecc` does the same random test for D = 4 without squarer, and
`tb_dropin_configs` runs it for D = 1 without and with squarer, D = 4 and
D = 8 side by side (through the helper `tb/dropin_cfg_run.sv`), checking
the busy cycles of each (MUL: 186, 186, 64, 44).

## How far to trust it, and where it departs

Verified in simulation: all arithmetic against an independent reference,
the bus sequencing access by access (`tb_dropin_ctrl`, with random grant
withholding), the arbiter's priority rule, and the cycle counts above. Not
verified: gate-level timing, area, power, and operation with a real CPU core
or RAM macro.

Taken from the published architecture: the drop-in placement, the CPU
keeping priority with the accelerator put on hold, the register interface
(three addresses, command, status, polling), the datapath of two N-bit
registers and one W-bit register with an MSB-first digit-serial multiplier,
the optional one-cycle squarer, the XOR adder, and the bus access pattern of
each operation. This design's own choices: the register offsets and command
codes, the register window on the data bus, the word order of elements, the
one-cycle synchronous RAM timing with byte enables, asynchronous active-low
reset, the way read data is captured during a hold, the prefetch of the next
multiplier word, the top-word digit alignment, and the reduction circuits
(folding loops rather than a hand-drawn XOR network). The published design
needs exactly seven 1-bit registers for the hold mechanism; this one needs
the read-return flag and its target, beside the ordinary state. The RAM is a
plain synthesizable array standing for a single-port register-based RAM
macro.
