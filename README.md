# FPGA period meter for judging Linux and Xenomai timing

A processor running Linux, with or without the Xenomai real-time extension,
toggles an output pin every 500 µs. How regular is the resulting 1 ms square
wave? Software cannot measure its own jitter well, so the measurement is done
next to the processor, in the programmable logic of the same chip (a Zynq-7000
on a Red Pitaya board). The logic runs at 125 MHz, so it can time each period
of the wave to 8 ns. It records 1024 periods and hands them to the processor
over the on-chip AXI bus.

This RTL covers the period meter and the two simpler register blocks that
lead up to it. All three are memory-mapped AXI4-Lite slaves:

| gateware | component | what the CPU sees |
|---|---|---|
| adder | `addition_ip` | write two operands, read their sum or difference |
| RAM acquisition | `ram_acq_ip` | start a long job, poll until it is done, read 1024 results one by one |
| period meter | `period_counter_ip` | same register map as the RAM acquisition, with the results being periods of `external_signal` |

On the board each gateware is a bitstream of its own, loaded at CPU address
`0x43C0_0000`. The top module `tp_fpga_top` puts all three side by side, each
with its own AXI port, so that a single simulation can drive them together.

## How the processor reaches a register

```
  PS AXI master ──> axil_intercon ──> axil_regif ──> register processes
  (0x43C0_0000)     window decode     AXI handshakes   (ID, operands, ...)
                    + local offset    -> strobes
```

* **`axil_intercon`** splits the CPU range from `BASE_ADDR` into `NSLAVES`
  windows of `2**SLOT_W` bytes (32 bytes, 8 registers by default). Each
  component gets only its offset inside its window. Addresses outside every
  window get a `DECERR` response, and reads there return 0. Request channels
  pass through a register stage; responses are combinational. The top uses
  one window per gateware.
* **`axil_regif`** turns AXI4-Lite into three signals a register block can
  use directly: a one-cycle `write_en`, a one-cycle `read_en`, and one
  register index `addr` shared by reads and writes (the byte address divided
  by 4). The register block loads its own read register on `read_en` and
  holds it otherwise. The AXI read data is just that register.
  Only one transaction runs at a time, and a write wins if a write and a read
  arrive together. `wstrb` is ignored, because every access is treated as a
  full word. Responses are always `OKAY`.

Latency, with `bready`/`rready` held high, counted from the cycle the request
goes valid to the cycle the response is taken: 3 cycles at a component port,
4 cycles through the intercon.

All registers are 32 bits wide. The CPU byte offset of register *k* is `4*k`.

### Adder (`addition_ip`)

| index | offset | name | access | content |
|---|---|---|---|---|
| 0 | 0x00 | ID | RO | `ID` parameter (1) |
| 1 | 0x04 | OP1 | RW | first operand |
| 2 | 0x08 | OP2 | RW | second operand |
| 3 | 0x0C | RESULT | RO | OP1 + OP2, or OP1 − OP2 if OPER[0] = 1, modulo 2³² |
| 4 | 0x10 | OPER | RW | bit 0: 0 = add, 1 = subtract |

The result is combinational from the operand registers.

### RAM acquisition and period meter (`acq_comm`)

| index | offset | name | access | content |
|---|---|---|---|---|
| 0 | 0x00 | ID | RO | `ID` parameter (1) |
| 1 | 0x04 | STATUS | RO | bit 0 = busy |
| 2 | 0x08 | START | RW | writing bit 0 = 1 makes a one-cycle start pulse. The bit clears itself, so it always reads 0 |
| 3 | 0x0C | DATA | RO | the word at the read pointer; the pointer then moves on by one |

The read pointer wraps from 1023 to 0 and is cleared by every start, so the
first DATA read after an acquisition always returns word 0. The CPU's
sequence is: check that ID reads 1, write 1 to START, poll STATUS until bit 0
is 0, then read DATA 1024 times. Only the low bit of START matters. A start
while busy is ignored. Read DATA with 32-bit accesses on the period meter:
a period of 1 ms or more is over 125 000 counts and does not fit in 16 bits.

## RAM acquisition: the ramp and its alignment

`pseudo_acq` stands in for a long job. On start it raises `busy`. Then, for
1024 cycles, it writes the value *k* to address *k* of the RAM, and at the
end it drops `busy`. The CPU should read back exactly 0, 1, …, 1023.

The obvious way to write this process registers the RAM data while the
address counter moves on in the same clock. Each word then lands one address
too high: the CPU reads 1023 first and 0…1022 after it. In `pseudo_acq` the
write enable, address and data all come from the same counter in the same
cycle. Clearing the read pointer on start in `acq_comm` fixes the read side.
`tb_ram_acq_ip` checks for the ramp, and the fault version used to test it
reproduces the shift.

## Period meter: what a stored number means

```
external_signal ─> debounce_edge ──edge──┬─> period_cpt ──cpt──> period_statem ──we/addr/data──> dp_ram
                                         └──────────────────────> period_statem        (read by acq_comm)
```

**Deglitching and edge detection (`debounce_edge`).** The raw input is
shifted into an 8-bit register (`LEN`) on every clock. All ones means a
steady high level. All zeros means a steady low level. Any mix keeps the
previous level. So any excursion shorter than 8 cycles (64 ns) is ignored,
and the register also acts as the input synchroniser. `edge` pulses for one
cycle when the register turns all ones while the stored level is still low.
Its latency is fixed, `LEN` cycles after the input is first sampled high, so
it does not change the intervals between edges. A glitch within the first 8
cycles of a new high level delays that edge (its interval reads longer and
the next one shorter). The design takes this cost in exchange for rejecting
glitches.

**Counting (`period_cpt`).** A 32-bit counter is cleared on every `edge`
cycle and counts up on every other cycle. At 8 ns per count it spans about
34 s before it wraps.

**Recording (`period_statem`).** Three states:

* `IDLE` waits for the start pulse and clears the write address.
* `WAIT_FIRST_EDGE` waits for one edge. This makes the first stored value a
  whole period and not the time since start.
* `ACQUIRE_TIME` writes the counter into the RAM at each edge, in the same
  cycle as the edge, so the write catches the count just before it is
  cleared. After the write to address 1023 it returns to `IDLE`. Otherwise
  it moves to the next address.

`busy` (STATUS bit 0) is high outside `IDLE`.

**Reading the numbers.** Two rising edges that are *P* clock cycles apart
are stored as **P − 1**. The period in µs is (value + 1) / 125. The
"−1" comes from the counter showing 0 in the cycle right after an edge. It
is one count (8 ns), well below the spread being measured (tens of µs to
tens of ms). One acquisition takes 1024 periods of the input plus the wait
for the first edge, about 1.5 s for a 1.4 ms signal. STATUS can be polled at
any time.

## Sizes

| parameter | default | where |
|---|---|---|
| clock | 125 MHz (8 ns) | supplied by the processing system |
| `BASE_ADDR` | `0x43C0_0000` | top, intercon |
| `SLOT_W` / `ADDR_W` | 5 (32-byte window, 3-bit register index) | intercon, components |
| `N` / `DEPTH` | 1024 words | RAM, acquisition length |
| `CPT_W` | 32 bits | period counter, RAM width |
| `DEBOUNCE_LEN` / `LEN` | 8 cycles | deglitcher |
| `ID` | 1 | all components |

The periods reported for the lab's test programs all fit. Their range runs
from 1251 µs (about 156 000 counts) to 40 ms (5 000 000 counts) on a loaded
Linux system, far below the 32-bit limit of 4.29 × 10⁹. Each acquisition
records 1024 of them in the 1024-word RAM.

## Choices made here, and departures from the lab's design

* OP1 and OP2 can be read back, and the OPER register selects subtraction.
  Both come from the lab's own extension exercises. OPER's index (4) and
  encoding are this design's choice.
* START accepts writes, but since its bit clears itself a read returns 0.
* The RAM ramp is aligned as described above, and a start clears the read
  pointer.
* The acquisition length `N` = 1024 matches the readout program's 1024 reads.
  The deglitcher length of 8 cycles is a choice.
* The intercon uses equal power-of-two windows and answers `DECERR` outside
  them. The component-side front end (`axil_regif`) is the simplest state
  machine that meets the AXI4-Lite rules.
* Reset is asynchronous and active high throughout (`rst`, the AXI reset of
  the fabric). The RAM contents are not reset.
* Everything runs on the single 125 MHz fabric clock. That clock comes from
  a PLL, so its absolute accuracy is that of the board's reference. Clocking
  the meter from a better external oscillator would need a clock-domain
  crossing to the bus clock, which is not part of this RTL.
* The ARM processing system, its interconnect, interrupt controller and PLL,
  and the software that toggles the pin, are outside the RTL. The testbenches
  replace them with an AXI4-Lite master model (`tb/axil_master_bfm.sv`) and
  generated waveforms.

## Files

`rtl/tp_fpga_pkg.sv` holds the AXI4-Lite request/response structs
(`axil_req_t`, `axil_rsp_t`), the response codes and the register indexes.
There is one module per file: `axil_regif`, `axil_intercon`, `addition_ip`,
`dp_ram`, `acq_comm`, `pseudo_acq`, `ram_acq_ip`, `debounce_edge`,
`period_cpt`, `period_statem`, `period_counter_ip`, `tp_fpga_top`.
`axil_regif` carries assertions for the AXI response-hold rules.

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_tp_fpga_top` drives all three gatewares at their default sizes, at the
  same time. It counts each mechanism (add, subtract, DECERR, RAM fill,
  ignored start, pointer wrap, period acquisition, first-edge wait, glitch
  rejection) and fails if any of them never happens.
* `tb_workload_periods` replays the lab's measured cases with real period
  lengths: Linux sleep unloaded (1377–1538 µs), Linux loaded (1385–2000 µs
  with 40 ms stalls) and a Xenomai timer under load (1256–1623 µs). It checks
  every stored value. To keep the run near half a minute it sets the top's
  `N` to 64.
* `tb_workload_full_acq` runs one complete acquisition at the default sizes:
  1024 periods of a Xenomai sleeping task on an unloaded system (1271–1476
  µs each). That is about 175 million clock cycles, roughly two minutes of
  Verilator time. `tb_tp_fpga_top` and `tb_period_counter_ip` also fill all
  1024 words, but with short periods.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_tp_fpga_top -y rtl -y tb +libext+.sv \
  rtl/tp_fpga_pkg.sv tb/tb_tp_fpga_top.sv
./obj_dir/Vtb_tp_fpga_top
```

Replace `tb_tp_fpga_top` with any other testbench name. The package must be
given first. The testbenches reset every register they read, so they run the
same with a two-state simulator and random initial values
(`+verilator+rand+reset+2`). To lint the synthesizable part:
`verilator --lint-only -Wall -y rtl rtl/tp_fpga_pkg.sv rtl/tp_fpga_top.sv`.
Verilator's remaining warnings are unused package constants, unused AXI
fields (`awprot`, `arprot`, `wstrb`, upper address bits), and `rst` being
used both as an asynchronous reset and in the assertions' `disable iff`.
