# Energy-proportional DRAM channel with fast-wake interfaces

A server's main memory burns a large share of its power while doing almost
nothing. DDR3 ranks idle most of the time, yet controllers rarely let them
power down, because waking a rank costs latency. Most of that latency is the
DRAM's delay-locked loop (DLL), which needs about 512 clocks to relock before
read data can be trusted. This RTL implements a memory channel whose ranks
drop into powerdown after 15 idle cycles and wake again with almost no
latency. It offers four ways of dealing with the DLL:

* **MemBlaze**: the DRAMs have no DLL at all. The controller learns each
  rank's read timing from a timing reference that the DRAM sends on its EDC
  pin after every access. The data block of the DRAM gets its own clock
  enable (DCKE), so it can wake in the shadow of the row activation.
* **MemCorrect**: the DLL stays. The controller reads right after wake-up
  anyway (speculatively). A small detector in the DRAM checks whether its
  clock was inside a safe window during the burst and reports on a "Correct"
  pin. If it was not, the read is repeated once the DLL has relocked.
* **MemDrowsy**: while the DLL relocks (Y = 512 cycles after wake-up), reads
  go at 1/Z of the data rate (Z = 2, 4 or 8). Each unit interval is repeated Z times,
  so sampling is safe without the DLL.
* **MemCorrect + MemDrowsy**: the first try is at full rate; a detected error
  is retried at once at the drowsy rate instead of waiting for the relock.

Two further pieces belong to the same line of work, an LPDDR2-based server
memory: a **load-reduced buffer** that lets one channel carry 8 LPDDR2 ranks
(rank multiplication), and **embedded ECC**, which keeps check bits in the
ordinary data space because x16 LPDDR2 parts do not fit a 72-bit ECC channel.

## Channel organisation

`emem_top` is one channel with two single-rank DIMMs (NR = 2). The default
timing is DDR3-1333 at a 667 MHz memory clock (1.5 ns per cycle):

| parameter | cycles | meaning |
|---|---|---|
| T_RCD | 10 | ACT to column command |
| T_CAS | 10 | read command to first data |
| T_CWL | 7 | write command to first data |
| T_RC | 34 | ACT to ACT, same rank |
| T_XP | 4 | command block powerdown exit (6 ns) |
| T_XPD | 7 | data block (DCKE) exit, about 10 ns |
| PD_THRESH | 15 | idle cycles before CKE drops |
| T_DLLK (Y) | 512 | DLL relock, drowsy period |
| Z | 2 | drowsy rate divisor, default (input `drowsy_zlog` = 1; 4 and 8 also work) |
| T_REFI | 5200 | refresh interval per rank (7.8 us) |
| T_RFC | 107 | refresh duration (160 ns) |

All constants live in `rtl/emem_pkg.sv`. A request is one 64-byte line: a
burst of 8 beats on a 64-bit DDR bus, so 128 bits per clock. The 28-bit line
address has the rank in its lowest bit, then the column (7 bits), bank (3)
and row.

The controller (`emem_ctrl`) serves requests strictly in order (FCFS), one at
a time, with a closed-page policy: every access is ACT followed T_RCD later
by a read or write with auto-precharge. Serving one request at a time is a
simplification. A real controller overlaps requests to different ranks.

## Power management of a rank

`rank_pwr_ctrl` keeps a rank's CKE high while the scheduler has work for it.
It drops CKE after 15 idle cycles. After CKE rises, commands are allowed
after T_XP cycles.

Every rank also gets a refresh (REF) every T_REFI = 5200 cycles (7.8 us),
taken between requests. A refresh wakes only the command block. The rank then
rests for T_RFC = 107 cycles.

In MemBlaze mode the data block has its own enable, DCKE. The scheduler
raises it in the cycle after ACT and holds it through the read or write and
the EDC burst that follows. The data block needs T_XPD = 7 cycles to wake,
fewer than T_RCD = 10, so its wake-up never shows in the latency. The
end-to-end test measures this directly: a read to a rank in powerdown takes
exactly T_XP + 1 = 5 cycles longer than to an awake rank (36 against 31
cycles, request to response), not T_XPD. Between accesses the data block
stays off even while the command block is on. In the other modes
DCKE = CKE.

## Read timing without a DLL (MemBlaze)

A DLL-less DRAM sends read data whose phase drifts with voltage and
temperature, and each rank drifts on its own. The controller therefore
recovers the timing per rank from the EDC pin:

1. After every read or write the DRAM (`dram_if_slice`, `edc_trs_tx`) sends
   a 32-bit burst on EDC, one bit per clock. The first 8 bits are a CRC-8 of
   the line (polynomial x^8+x^2+x+1, initial value 0, MSB first). The other
   24 bits are a 1010... toggling pattern, the timing reference (TRS).
2. The controller's front end (outside this RTL) samples the pin 8 times per
   bit. `trs_phase_tracker` finds the first transition within each bit time
   and moves the rank's sampling phase one step toward the bit centre (edge
   + 4) at each edge, like a bang-bang CDR loop.
3. `edc_rx_check` collects the code bits and compares them with a CRC of the
   data the controller actually received. It also checks that the toggle
   pattern came through unchanged.

Timing stays fresh only while the rank is used. `ping_sched` counts cycles
since the rank's last burst:

* After 3072 cycles it asks for a **ping**. This is a command without row
  activation or data, to which the DRAM answers with a 32-bit toggling burst.
  Pings are sent only when no request is waiting.
* After 4096 cycles the rank is **stale**. Its next access is preceded by a
  ping (a recalibration), and the data transfer waits for it.

A rank is stale after reset. The two limits are this design's own numbers:
the rule is that DRAMs specify a maximum time between rank accesses, but no
value is given.

## MemCorrect: checking the window

`memcorrect_det` sits in the DRAM. During a full-rate read burst it samples
the external clock with two delayed copies of the internal clock, an early
one and a late one. In the real part these come from digitally controlled
delay lines; `dcdl` is a behavioural model. If the early sample already sees
the clock high, or the late one still sees it low, the internal clock is
outside the safe window. The result is reported on the Correct pin in the
cycle after the burst. The flip-flops that take these two samples are analog
front-end cells, so `ck_early` and `ck_late` are ports of the top.

In MEMCORRECT mode the scheduler waits for the Correct result of every read.
On an error it waits until that rank's DLL has relocked (the `drowsy_rx`
timer has run out) and then repeats the read. Drowsy reads are never flagged,
because they are safe by construction.

## MemDrowsy: slowing the data down

`drowsy_rx` starts a Y = 512-cycle timer per rank when CKE rises. While the
timer runs, the rank is "drowsy". Reads to it carry a flag in the command,
and the DRAM's serializer (`drowsy_tx`) repeats each unit interval
2^zlog times. A burst then takes 4 << zlog clocks instead of 4. `drowsy_rx`
takes every Z-th unit interval and rebuilds the 64-byte line.

Z is not fixed. The input `drowsy_zlog` (log2 Z, 1 to 3) goes to the
controller and to every DRAM slice, much as a mode-register setting would.
It should only be changed while the channel is idle. The end-to-end test runs
MemDrowsy at Z = 2, 4 and 8, and the combined mode at Z = 4.

## Cycle-level behaviour of one read

For a read to an awake rank, with the command visible on `cmd` in cycle t:

| cycle | event |
|---|---|
| t | ACT (DCKE request in MemBlaze) |
| t+10 | RDA |
| t+20 .. t+23 | data on DQ (t+20 .. t+27 when drowsy with Z = 2) |
| t+20 .. t+51 | EDC burst (MemBlaze) |
| after the burst | CRC compared; Correct result (MemCorrect) |

A write puts its four data clocks on DQ at t+T_CWL .. t+T_CWL+3 after WRA.
The DRAM's EDC burst for the written line follows right after.

## LPDDR2 load-reduced buffer (`lrbuf`)

The buffer sits between a 64-bit channel and up to 8 LPDDR2 ranks:

* The controller sees 4 logical ranks.
* At ACT the top row bit selects one of two sub-ranks. The buffer stores the
  sub-rank per logical rank and bank, so reads and writes need no extra
  address bit.
* On the device side the CA bus is copied onto 4 lines and DQ onto 2 lines.
  Each line carries a one-hot chip select of the physical rank
  p = {sub-rank, logical rank}. CA line {p[1], p[2]} and DQ line p[2] serve
  rank p.
* A refresh has no row address, so it goes to both sub-ranks of its logical
  rank at once.
* Everything is retimed by one cycle in each direction.

The line layout is this design's choice.

## Embedded ECC (`ecc_embed`)

Each 128-bit word (eight 16-bit symbols, one per x16 device of two ranks) gets
32 check bits, two 16-bit symbols:

* P0 is the XOR of the eight symbols.
* P1 is the sum of alpha^i · d_i in GF(2^16), with polynomial 0x1100B.

Any error confined to one or two symbols is detected. The check bits of four
data lines share one line in the top fifth of the line address space, at
`ECC_BASE + addr/4`, slot `addr % 4`. The controller reads or writes that line
as a second access. The unit computes the addresses and the code; the second
access is left to the user. The code itself and the layout are this design's
own; the requirement is 2b check bits per word for double-symbol detection,
32 bits per 128.

## What is not in the RTL

* The DRAM array, the DLL and the analog front ends (CDR sampler, fast-wake
  bias circuits, clock trees, the buffer's PLL). The testbenches model what
  they need: a sparse-array DRAM core, an EDC channel with a drifting
  sub-bit delay, and samplers that see bad timing, with 50 % probability,
  during the relock time after a wake-up.
* Self-refresh and the power figures themselves. The design
  reports events (wake-ups, pings, retries, drowsy reads), not energy.
* Overlapped scheduling of several requests, and more than one channel. A
  system is several `emem_top` instances.

## Files and simulation

`rtl/` holds one module or package per file, with `emem_top` as the top.
`tb/` has a self-checking testbench per module, `tb_<module>.sv`.
`tb_emem_top` runs the whole channel at its default parameters:

* over 1000 random reads and writes in all four modes;
* short and long idle gaps that trigger pings and recalibration;
* a scoreboard for every read;
* protocol checks: no command to a sleeping command block, no data through
  a sleeping data block, no EDC or TRS mismatch;
* a count of every mechanism (powerdown, wake-up, DCKE off while CKE on,
  ping, recalibration, refresh with the data block asleep, CDR phase move,
  retry, relock wait, drowsy read at Z = 2, 4 and 8, mode switch, rank
  multiplication, ECC detection). A mechanism that never happened counts as
  a failure.

It runs in about a second. Every testbench ends by printing
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/emem_pkg.sv tb/tb_emem_top.sv --top-module tb_emem_top -Mdir obj
./obj/Vtb_emem_top
```

Replace `emem_top` by any other module name to run its testbench.

Lint notes: the request FIFO in `mem_sched` is a plain memory without reset.
Its entries are written before they are read, so only the pointers are reset.
`dcdl` contains delays and is for simulation only.
