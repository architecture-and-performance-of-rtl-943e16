# CESR multi-port memory (MPM) system in SystemVerilog

The control system of the Cornell Electron Storage Ring is built around one
shared memory that many computers use at the same time. User programs on VAX
computers and the XBUS processors (XBPs, VME crates that talk to the
accelerator hardware) never talk to each other directly. They all read and
write a multi-port memory (MPM), a VMEbus crate holding:

* a **system controller** that makes the clock and reset, shares the bus
  among up to sixteen masters in round-robin order, and ends any bus cycle
  that has waited more than 1 µs;
* a **4 Mbyte memory** with single-bit error correction;
* a **semaphore board** with one test-and-set bit for each longword of memory;
* a **FIFO board** with sixteen 9-bit message queues, one per computer;
* one **interface slave board** per computer, cabled to a matching master
  board inside that computer.

The central rule is that **a master owns the MPM bus for exactly one read or
one write**. Nothing can lock the bus across a read-modify-write, and that is
why the hardware semaphores exist. Arbitration overlaps the current cycle, so
the next owner can start right after the current one ends.

This RTL builds all the MPM boards and both kinds of interface (VAX-to-MPM and
VME-to-MPM, master and slave board each) as synthesizable logic. Four VAXes
and six XBPs are wired to one backplane. The computers themselves are outside
the design: their bus sides are the top module's ports.

## Block map

```
             cesr_mpm_top
  VAX 0..3 ── vax_mpm_master ══cable══ vax_mpm_slave ──┐  BR/BG 0..3
  XBP 0..5 ── vme_mpm_master ══cable══ vme_mpm_slave ──┤  BR/BG 4..9
                                                        │
       sys_controller (reset_oneshot, rrs_arbiter,      │
                       bus_timer)  ── BG ──────────────►│
                                                mpm_backplane
                                     ┌──────────────┼──────────────┐
                                mpm_memory   semaphore_board   fifo_board
                                (ecc_secded)                  (16 × sync_fifo)
```

`mpm_pkg` holds the bus structs, the cable structs and the address map.
`mpm_bus_master` is the one-cycle bus engine shared by both slave boards.

## The MPM bus

The VMEbus is asynchronous and wired-OR. Here it is a synchronous,
point-to-point bus on the 16 MHz SYSCLK:

| step | who | what |
|---|---|---|
| 1 | master | raises its own `br[i]` and holds it |
| 2 | `rrs_arbiter` | raises one-hot `bg` (registered); picks the first request after the last owner |
| 3 | master | drives `mpm_req_t` (`as`, `write`, `addr`, `wdata`) until answered |
| 4 | slave or `bus_timer` | one-cycle `dtack` (with `rdata`) or `berr` |
| 5 | master | drops `as` and `br` together; the grant moves on one clock later |

A slave board answers once, then waits for `as` to fall before it accepts a
new cycle. The backplane always has at least one idle clock between owners.
An address that no board decodes is not answered. The timer then ends the
cycle with `berr` 16 clocks (1 µs) after AS.

Address map (byte addresses, longword aligned; the upper byte must be zero):

| range | board | access |
|---|---|---|
| `0x000000–0x3FFFFF` | memory | read/write longwords |
| `0x400000–0x7FFFFF` | semaphores | semaphore of memory address A is at A + `0x400000` |
| `0x800000` | FIFO board | write: multicast push; read: status word |
| `0x800000 + 4·(i+1)` | FIFO board | read: pop FIFO i |
| anything else | none | ends in the 1 µs timeout |

## Memory, semaphores, FIFOs

**Memory.** 1M words of 39 bits: 32 data bits and a (39,32) extended
Hamming code. A read corrects any single-bit error. A double-bit error ends
the read with BERR instead of DTACK. `flip_mask` (top: `ecc_flip_mask`) is
XORed into words as they are written, so errors can be injected. It must be
zero in normal use. The answer comes 6 clocks after AS.

**Semaphores.** Reading a semaphore returns its old state in bit 0
(1 = SET) and sets it, all in one bus cycle. Writing it (any data) clears it.
The software protocol is: read until you get 0, work on the critical section,
write to release. The semaphores do not block access to memory. After every
reset the board spends 32768 clocks (2 ms) clearing all 1M bits. It answers
nothing during that time (`sem_ready` low). The reset pulse is much longer
than that anyway.

**FIFOs.** A write to offset 0 pushes data bits 8:0 into every FIFO whose bit
is set in data bits 31:16 (bit 16+i selects FIFO i). One instruction can
therefore wake any set of processors. Reading offset 0 gives the sixteen
NOT-EMPTY flags in bits 15:0. Reading offset 4·(i+1) pops FIFO i. The word is
in bits 8:0, and bit 31 is set if the FIFO was empty. FIFO i belongs to the
computer whose slave board uses bus request i. A push into a full FIFO
(512 words) is lost.

## VME-to-MPM link (XBPs)

An XBP sees the MPM as the window `0x300000–0xFFFFFF` (13 Mbytes) of its own
VMEbus. MPM address = XBP address − `0x300000`. The two boards share one
32-bit multiplexed address/data path, used in one direction at a time, plus
handshake lines (`vme_m2s_t`, `vme_s2m_t`). Every signal is held until the
other side answers (four-phase):

1. The master puts the address and direction on the cable and raises `as`.
   The slave latches the address and raises `aack`.
2. **Read:** the slave asks for the MPM bus at once. It reads the longword
   into a latch and releases the bus, without waiting for the master. The
   MPM bus is therefore held only for the MPM's own access time. The master,
   on `aack`, turns the path round and raises `ds`. The slave puts the
   latched data on the cable with `dack`.
3. **Write:** on `aack` the master puts the data on the cable with `ds`. Only
   then does the slave ask for the bus. It writes and releases the bus, then
   raises `dack`.
4. The master ends the XBP's cycle with DTACK, or with BERR if the MPM cycle
   failed. It drops `as`/`ds`, and the slave drops its acknowledges.

The MPM SYSRESET travels back over the cable (`s2m.reset`). It resets the
master board and comes out as `xbp_reset`, so resetting the MPM resets every
XBP.

## VAX-to-MPM link: the register sets

This is the least obvious part. The VAX bus carries only 16 bits of data,
but every MPM access is 32 bits. A VAX process also needs the full MPM
address space, which does not fit in a 512-byte I/O block. So the slave board
holds **32 register sets**, one per VAX process. Each set has four 32-bit
registers. Each register is seen as an upper half (bits 31:16) and a lower
half (bits 15:0):

| VAX byte offset in the block | meaning |
|---|---|
| bits 8:4 | register set (0–31) |
| bits 3:2 | 0 status, 1 address, 2 data, 3 data with auto-increment |
| bit 1 | 0 = upper half, 1 = lower half |

So the block is 32 sets × 4 registers × 2 halves × 2 bytes = 512 bytes, at
`DEV_BASE` (default 764000 octal in the 18-bit I/O space). A VAX access sends
these 8 bits as the register number over a 16-bit multiplexed cable. The 16
data bits follow after the slave's acknowledge.

What each access does on the slave board:

| access | effect | MPM bus cycle |
|---|---|---|
| write address hi / lo | store that half | no |
| read address hi / lo | return that half | no |
| write data hi (or autoinc hi) | store the upper half in the data latch | no |
| write data lo (or autoinc lo) | store the lower half, then write the whole latch to the MPM at the set's address | **yes** |
| read data hi (or autoinc hi) | read the MPM longword at the set's address into the latch, return its upper half | **yes** |
| read data lo (or autoinc lo) | return the lower half from the latch | no |
| read status lo | bit 0 = the set's last MPM access ended in a bus error | no |
| write status | clear the error bit | no |

With the auto-increment register, the address register steps by 4 after the
MPM access. A vector can then be streamed with the address loaded once:

```
write  set.addr.hi, set.addr.lo       ; start address
loop:  read set.autoinc.hi -> hi      ; MPM read, address += 4
       read set.autoinc.lo -> lo      ; from the latch
```

Writes go upper half first, then lower half. Reads also go upper half first.
Because every set keeps its own address and latch, processes that share a
VAX do not disturb each other as long as each uses its own set.

## Reset

`reset_oneshot` holds SYSRESET while `power_good` is low or the reset switch
is pressed (the switch is synchronised with two flip-flops). It then keeps
SYSRESET high for 3.2 million clocks: 200 ms, the VMEbus minimum. SYSRESET
is also high from power-up (the register's initial value), so no board sees
an undefined reset before the first clock. SYSRESET
resets every MPM board and, through the cables, every XBP master board.
`vax_init` resets a VAX master board and comes from its own VAX. Memory
contents survive a reset. The semaphores do not: they are cleared.

## How far this follows the original system

Taken from the system's description: the board set and what each board does;
16 request lines with round-robin selection; one operation per ownership;
the 16 MHz clock and 1 µs timeout; 4 Mbytes with single-bit correction and
multi-bit detection; one test-and-set semaphore per longword at a constant
offset, set by reading and cleared by writing; 16 FIFOs of 9 × 512 with the
multicast write and the NOT-EMPTY status word; the 13 Mbyte XBP window; the
read latch that frees the MPM bus early; the reset path to the XBPs; 32 VAX
register sets of status/address/data/auto-increment data in 16-bit halves;
the upper-half read that starts the MPM read; four VAXes and six XBPs.

Choices made in this RTL, where the description gives no detail:

* the synchronous bus model and all handshake timing, including four-phase
  cable signalling and a BERR line on the VME cable;
* the address map, including the semaphore offset `0x400000` and the FIFO
  board's offsets, the pop ports and the empty marker;
* the SECDED code, BERR on an uncorrectable read, no write-back of corrected
  words and no DRAM refresh;
* the semaphore bit position and the clearing after reset;
* which VAX write half starts the MPM write (the lower), the status register
  contents, the auto-increment step of 4 and the device address;
* the use of VAX address bits 8:1 as the register number, with the set in
  8:4. This gives 32 sets in 512 bytes, which a 9-bit number in bits 9:1
  would not;
* the MPM address as the XBP address minus the window base;
* reset length (200 ms) and memory access time (4 clocks).

Not built: the crystal oscillator (the clock is an input), the VAX and XBP
computers, the XBUS drivers and crates, the GPIB driver, and the database and
request-packet software. The end-to-end test plays that software's part in
its request-packet exchange.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5, from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mpm_pkg.sv tb/tb_cesr_mpm_top.sv \
          --top-module tb_cesr_mpm_top -o sim && ./obj_dir/sim
```

Unit testbenches follow the same pattern (`tb/tb_<module>.sv`; `sync_fifo`
is tested by `tb_sync_fifo`). `tb_cesr_mpm_top` shortens the reset to 200
clocks. `tb_cesr_mpm_full` runs the same test with every parameter at its
default, including the 3.2 million clock reset, in well under a minute.
Both run the system the way its software uses it:

* all ten computers hammer their own memory areas at once;
* a VAX sends a request-packet number to the six XBPs with one multicast
  FIFO write;
* the XBPs claim the packet's START and DONE words under semaphores, while a
  second VAX polls DONE;
* an XBP addresses nothing and gets the 1 µs timeout;
* one 32-bit read on an idle system is timed from each side: 16 clocks
  (1.0 µs) for an XBP and 25 clocks (1.6 µs) for a VAX, whose read takes two
  16-bit accesses;
* single and double bit errors are injected;
* the reset switch is pressed.

The test counts how often bus contention, grant handover, the timeout, ECC
correction and detection, a busy semaphore, the multicast write,
auto-increment access and both resets happened. It fails any that never did.
Simulation has two states; anything read before it is written starts random.

## Changing it

`cesr_mpm_top` parameters: `NVAX`, `NXBP` (together at most 16), `VAX_SETS`,
`FIFO_DEPTH`, `TIMEOUT_CYCLES` (16 = 1 µs at 16 MHz), `RESET_CYCLES` and
`MEM_ACCESS`. The memory size and the address map are constants in
`mpm_pkg`. If you move the boards, keep the FIFO board inside the XBP window
(MPM addresses below `0xD00000`). The semaphore size follows `MEM_BYTES`.
