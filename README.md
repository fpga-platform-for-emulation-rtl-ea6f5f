# A dual-tile MPSoC emulation platform with predictable per-tile power management

This RTL builds a small multiprocessor system-on-chip in which each processor
tile seems to run at its own, software-controlled frequency. Underneath, every
tile is clocked from one constant system clock. The trick is to emulate
frequency scaling with fine-grained clock gating. If a tile is set to N/16 of
the maximum frequency, its processor receives exactly N of every 16 system
clock edges. Software on the tile then sees the cycle count of an N/16 clock,
while the system timer, the network and the memories keep counting wall time
at full speed.

The point of the design is predictability and composability:

- A frequency change takes effect at a wall-clock instant chosen in advance by
  software. It does not depend on when the command happened to cross the
  clock boundary.
- Remote transfers run in the network clock domain, through one DMA controller
  per connection. A transfer keeps its speed when the task that started it is
  swapped out or the tile is slowed down.

One platform instance (`mpsoc_top`) contains:

- two processing tiles, each with a power management unit (PMU), a local
  timer, 32 KB instruction memory, 32 KB data memory and a communication unit
  with one connection DMA controller (CDMAC);
- the monitor tile's hardware: trace links from every tile, start
  synchronization links back to the tiles, 32 KB monitor memory and a local
  timer;
- a 16 KB shared memory behind a network target port.

The processor cores, the network on chip and the monitor's processor and UART
are not part of the RTL. Their signals are top-level ports, and the
testbenches drive them with models.

## Frequency emulation in the PMU

The PMU (`pmu.sv`) has these parts:

- the system timer (`sys_timer.sv`);
- the frequency generator (`freq_gen.sv`, with `ce_gen.sv` and `clk_gate.sv`);
- three command FIFOs from the processor: Timer, Freq and Un-gate
  (`async_fifo.sv`, written on the tile clock and read on the system clock);
- a two-flop synchronizer (`sync2ff.sv`) that returns the timer value and the
  timer interrupt to the tile clock domain.

All FIFO words are 33 bits wide: 32 data bits plus the FSL control bit.

### Clock-enable generation

`ce_gen` runs an accumulator on the system clock. Each cycle it adds N. When
the sum reaches D = 16, it subtracts D and enables that cycle. This gives
exactly N enabled cycles in every 16, spread as evenly as possible. For
example, 3/8 (D = 8 in the testbench) enables cycles 2, 5 and 7 of each
period.

The enable is registered. `clk_gate` samples it on the falling edge of the
system clock and ANDs it with the clock. The tile clock therefore carries only
whole high phases of the system clock and cannot glitch. An enable that is
high in system cycle k produces a tile clock rising edge at the start of cycle
k+1.

### Predictable switching: the T2 and T1 times

The processor writes a command and carries on. How long the command takes to
cross the FIFO depends on the current tile frequency. The generator therefore
never acts on a command when it arrives, only at a time written into the
command:

| Command (FIFO) | Word | Effect |
|---|---|---|
| set frequency (Freq, ctrl = 0) | `[3:0]` = N, `[31:4]` = T2 / 16 | New N is held pending. It takes effect on the system cycle where the timer equals T2, and the accumulator restarts then. |
| gate (Freq, ctrl = 1) | data ignored | Gate register set. No tile clock edges from the next cycle on. |
| un-gate time (Un-gate) | T1, 32 bits | When the gate is set and the timer equals T1, the gate clears. |

Notes on these commands:

- T2 is aligned to 16 because the accumulator pattern repeats every 16 cycles.
  Switching only on a multiple of 16 keeps the ratio exact for the period
  before the switch. OS time slices should therefore also be multiples of 16
  cycles.
- Field value 0 encodes N = 16, which is full speed. So all sixteen steps
  from 1/16 to 16/16 are reachable. An operating system that uses eight
  steps writes N = 2, 4, …, 16.
- Only one switch and one un-gate can be pending. A newer frequency word
  replaces a pending one.
- After reset the tile runs at N = 16, ungated.

A typical slice change from software: compute the start time of the next
slice, T2 = t_next. Then send (N, T2) early enough that the word arrives
before the timer reaches T2. The idle task sends a gate command followed by
T1, the time it should wake up.

The "timer equals T" comparison is what removes the FIFO latency from the
timing. The cost is that a word which arrives after its time has already
passed waits a whole timer wrap (2^32 cycles) before it takes effect. The
software must send it early enough.

### System timer

The system timer is a 32-bit down counter on the system clock. It is the
wall-time reference of the tile.

- It is programmed through the Timer FIFO. A word with ctrl = 0 loads the
  count.
- A word with ctrl = 1 carries command bits: bit 0 = run, bit 1 = interrupt
  enable, bit 2 = clear the interrupt.
- While running, it decrements every cycle and wraps from 0 to 0xFFFFFFFF.
- On reaching 0 with the interrupt enabled, it sets a sticky interrupt flag.
- The tile reads the value and the flag through the two-flop synchronizer.
  This is a plain multi-bit synchronizer, so a value read while it is
  changing can be off by the bits that were toggling. Tile software treats it
  as accurate to about one count.

## Processing tile

`processing_tile.sv` is everything around a processor core. The core is
external, connects through the `cpu2tile_t` / `tile2cpu_t` structs, and must
be clocked by the tile's `tile_clk`.

There are two clock domains:

- **clk_sys** (maximum frequency; it is also the network clock): the PMU, the
  communication unit, and port B of the memories.
- **tile_clk** (scaled and gated): the core's local memory buses and the
  local timer.

The boundaries are the PMU and CDMAC FIFOs and the true dual-port memories
(`tdp_ram.sv`: one clock per port, read-first, one cycle of latency, byte
write enables).

Memory map of the core's data bus:

| Data bus address | Target |
|---|---|
| `0x0000_0000` + byte offset | data memory (port A); port B belongs to connection 0's DMA |
| `c × 0x1000_0000` + byte offset, c ≥ 1 | communication memory of connection c (only when `N_CONN` > 1) |
| peripheral bus, word address `[5:3]` = connection, `[2:0]` = register | CDMAC registers |

The instruction memory's port A is the instruction bus. Its port B (clk_sys)
loads the program (`iload_*`). The local timer counts tile clock cycles, which
are the cycles the program actually received, and can be cleared.

## Connection DMA controller and communication unit

Each outgoing connection has its own CDMAC (`cdmac.sv`). Because of this, two
applications never share a controller's queue. `comm_unit.sv` instantiates
`N_CONN` of them and decodes the register address.

Registers (word offsets):

| Offset | Name | Access |
|---|---|---|
| 0 | SRC | source address (byte) |
| 1 | DST | destination address (byte) |
| 2 | LEN | length in words (16 bits) |
| 3 | CMD | writing the operation code starts the transaction |
| 4 | STATUS | bit 0 busy, bit 1 read buffer holds data, bit 2 write buffer full |
| 5 | DATA | write: push to write buffer; read: pop read buffer |

Operation codes (`cdmac_op_e`):

- 0 = processor-controlled read (remote → read buffer);
- 1 = processor-controlled write (write buffer → remote);
- 2 = DMA read (remote → local memory);
- 3 = DMA write (local memory → remote).

Processor-controlled transactions move at most one burst (`BURST` = 32 words)
through the controller's data buffers. They suit small messages, because
there is no memory round trip. DMA transactions move up to 65535 words and are
cut into DTL transactions of at most 32 words.

Usage is blocking per connection:

1. Wait until STATUS.busy is 0.
2. Write SRC, DST and LEN.
3. Write CMD.
4. For a PCT write, push the data through DATA. For a PCT read, pop it once
   STATUS bit 1 is set.

The register writes of one transaction must not be interleaved with another
task's.

The tile side runs on tile_clk. Commands and data cross to the network side in
dual-clock FIFOs, and busy comes back as a toggle through a synchronizer. The
state machine runs on clk_sys, so a transfer finishes at the same speed
whatever the tile frequency is. States:

- IDLE
- CMD (issue a burst)
- WR (send write data)
- RD (receive read data)
- MRD / MWAIT (memory read for DMA writes)
- DONE

Timing:

- DMA reads write each received word into memory in the same cycle.
- DMA writes take two cycles per word: memory read, then send.

### The network port (DTL subset)

The network side uses a reduced memory-mapped DTL with three valid/accept
handshakes (`dtl_m2s_t` / `dtl_s2m_t` in `mpsoc_pkg.sv`):

- **Command:** `cmd_valid`/`cmd_accept`, byte address, read flag, and
  `cmd_block_size` = words − 1.
- **Write data:** `wr_valid`/`wr_accept`, with `wr_last` on the final word.
- **Read data:** `rd_valid`/`rd_accept`, with `rd_last` on the final word.

Assertions in the CDMAC check that the command and write data stay stable
while they wait for accept. The shared memory checks that `wr_last` comes
with the last word.

## Monitor tile

`monitor_tile.sv` collects trace data without stalling the tiles. Each tile
writes trace words into its own 64-word dual-clock FIFO. The write is
non-blocking: a word written into a full FIFO is dropped, and a drop flag pulses.

A trace packet is one header word followed by its payload. The header has
0xFFAA in bits [31:16] and the packet type in bits [15:0]. The packet types
used by the tile software:

| Type | ID | Payload words |
|---|---|---|
| Execution (scheduling) | 0x06 | 1 |
| Task progress | 0x07 | 3 |
| FIFO read | 0x02 | 3 |
| FIFO write | 0x03 | 3 |
| Execution time | 0x05 | 2 |

The hardware passes the words through unchanged. A 16-word FIFO per tile runs
the other way. The monitor uses it to release all tiles together after setup,
and each tile waits on it. The monitor's own processor (external) polls the
trace FIFOs, stores the data in the 32 KB monitor memory and sends it to a
host. It time-stamps the data with the monitor's local timer.

## Shared memory tile

`shared_mem_tile.sv` is a 16 KB memory behind a DTL target port. It serves one
transaction at a time. The first read word arrives two cycles after the
command is accepted, then one word per cycle. Writes take one word per cycle.

## Top level and parameters

`mpsoc_top.sv` generates the tiles and wires their trace and synchronization
links to the monitor tile. All other interfaces are ports: core, network
initiator per tile, shared memory target, monitor processor, and observation
signals. The observation signals are system time, active N, gate state,
switch pulse, busy flags and trace drops. The network between tile ports and
the memory port is left to the user. The testbench uses a TDM arbiter model
with 3-cycle slots.

| Parameter | Default | Meaning |
|---|---|---|
| `N_TILES` | 2 | processing tiles |
| `IMEM_AW`, `DMEM_AW` | 13 | 8192 words = 32 KB per tile |
| `SMEM_AW` | 12 | 4096 words = 16 KB shared memory |
| `MMEM_AW` | 13 | 32 KB monitor memory |
| `BURST` | 32 | words per DTL transaction (128 bytes) |
| `FREQ_D` (package) | 16 | frequency steps |

## Departures and limits

Parts the RTL does not contain:

- The processor cores, the network on chip with its network interfaces, the
  monitor's UART and the bus bridge on the monitor are not included. They
  are standard or generated components.
- Tiles have outgoing connections only. A path for remote tiles to write
  into a tile's memory is not built.
- The dual-tile + display configuration is not built.

Encodings and behaviour chosen here, where the source leaves them open:

- the "0 means 16" frequency encoding;
- the timer command bits and the sticky interrupt;
- the CDMAC register map, op codes and state names;
- the DTL subset and its timing;
- the memory map;
- the FIFO depths other than the 64-word trace FIFOs;
- memory latencies;
- reset values.

Known behaviour a user should know:

- An un-gate time or switch time that is already in the past waits for a
  full timer wrap.
- A write to a full command FIFO is dropped. Software must check the `*_full`
  flags.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- `tb_ce_gen` checks all N against a reference accumulator and the 3/8
  example.
- `tb_freq_gen` and `tb_pmu` check that switches and un-gating happen exactly
  at T2/T1 and that edge counts are N/16.
- `tb_slice_schedule` runs one PMU through a schedule of 1 ms slices at
  50 MHz. The slices use the eight steps 2/16 … 16/16, then an idle gated
  slice. It checks that every slice gives the tile exactly N · 50000 / 16
  clock edges and that each switch lands on its slice boundary.
- `tb_cdmac` and `tb_comm_unit` run all four transaction types against a DTL
  memory model with random stalls and check the burst cutting.

`tb_mpsoc_top` runs the whole platform at its default sizes. It uses the core
model `cpu_bfm.sv`, the network model `noc_model.sv` and the memory model
`dtl_mem_model.sv`. It counts these mechanisms and fails if any of them never
occurred:

- a frequency switch;
- gated cycles;
- DMA reads and writes;
- burst splitting;
- processor-controlled reads and writes;
- TDM slot waits;
- a timer interrupt;
- start synchronization;
- trace drops on overflow;
- trace packets received.

## Simulating

With Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/mpsoc_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -o sim
./obj_dir/sim
```

Replace `tb_mpsoc_top` with any other testbench name. The full platform run
takes well under a minute. Verilator reports one multiple-driver note on
`tdp_ram`. It is expected: the two ports of the dual-clock RAM write the same
array from two clock processes.
