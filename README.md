# Cascabel: an on-chip job dispatcher for TaPaSCo-style FPGA accelerators

In a host-centric accelerator system, each job on an FPGA processing element (PE)
costs a round trip over PCIe. The host writes the PE's parameter and control
registers. Later it takes the PE's completion interrupt, acknowledges it, and only then
starts the next job. Small jobs therefore spend most of their time waiting on
the bus and on the host's interrupt path.

Cascabel moves that loop onto the FPGA. The host writes *entries* into a
queue in on-chip RAM and goes on with its work. On the FPGA side a
dispatcher:

- takes entries from the queue in order;
- finds an idle PE of the right kernel for each Job;
- programs and starts that PE over its control bus;
- handles the PE's completion interrupt itself and returns the PE to the pool of idle PEs.

*Barrier* entries hold back later entries until every PE has finished.
This lets the host queue a whole chain of dependent jobs at once. A Barrier
can ask for a host interrupt, so the host can be told only once, when the
chain is done.

This repository holds synthesizable SystemVerilog for the dispatcher, a
counter PE, and a small control interconnect, joined into one system. It also has
self-checking testbenches for every block and for the whole system.

## How an entry travels

```
 host (host_clk)                       architecture (arch_clk)
 ───────────────                       ──────────────────────────────────────────────
 AXI4-Lite ──► job_queue ══(CDC)══► head ─┬─► selector ──► launcher ──► axil_decoder ──► PE 0..N-1
                                         │    ▲ idle-PE FIFO           ▲ ISR ack            │ irq
                                         │    │ per kernel             │                    │
                                         └─► barrier_unit  ◄─all_idle  irq_ctrl ◄───────────┘
                                                  │ irq flag                │
 host_irq ◄══════════(toggle sync)══════════════════════════════════════────┘
```

1. **Queue (host clock).** The host claims a slot, fills it, and commits it
   (see below). Committed slots are handed out in slot order.
2. **Head decode (architecture clock).** The entry at the head of the queue
   is a Job or a Barrier. Only one entry is worked on at a time, and nothing is
   reordered.
3. **Selector.** Each kernel has a FIFO of the IDs of its idle PEs. At reset
   each FIFO holds all PEs of its kernel, lowest ID first. A Job pops the
   head of its kernel's FIFO. If that FIFO is empty, the Job, and with it the
   whole queue, waits (`sel_stall`) until a PE of that kernel comes back.
4. **Launcher.** This is a single AXI4-Lite manager with a small state machine.
   For a Job with *n* parameters it writes 2*n* 32-bit words to the PE's
   parameter registers, low word first. It then writes 1 to the PE's control
   register.
5. **Interrupt controller.** A rising edge on a PE's interrupt wire marks
   that PE as pending. The launcher serves pending PEs, lowest first, before
   any new launch: it writes the PE's interrupt status register to clear the
   interrupt. In the same cycle the PE is pushed back into its kernel's FIFO.
6. **Barrier unit.** A Barrier at the head waits until every FIFO is full
   again, i.e. no PE is starting, running or waiting to be acknowledged.
   It then completes. If its interrupt flag is set, the completion becomes a
   one-cycle `host_irq` pulse in the host clock.

### Queue protocol: claiming, filling and committing a slot

The host side is meant for many host threads that write at once, so slot
ownership is settled by one atomic access:

| Address (bytes)         | Access | Meaning |
|-------------------------|--------|---------|
| `0 .. DEPTH*64-1`       | R/W    | slot memory; slot *s*, word *w* at `s*64 + 4*w` |
| `DEPTH*64 + 0x0` RESERVE | R     | returns a free slot index and claims it in the same access; `0xFFFF_FFFF` if the queue is full |
| `DEPTH*64 + 0x4` WPTR   | R      | reservation pointer (with wrap bit) |
| `DEPTH*64 + 0x8` RPTR   | R      | dispatcher read pointer, synchronised to the host clock |
| `DEPTH*64 + 0xC` FREE   | R      | number of unclaimed slots |

A thread reads RESERVE, writes words 2..15 of its slot (the parameters),
and writes word 0, the header, last. The header write marks the slot
ready. It counts only for a slot that has been claimed and not yet handed
over, and only if it is a full 32-bit write. A commit pointer
moves past a slot only when that slot and all slots before it are ready. So
entries enter the dispatcher in the order they were claimed, even when the
threads finish writing out of order. A thread that stalls between claim and
header write holds up every later entry. That is the cost of keeping order
without a lock.

The commit pointer crosses into the architecture clock, and the read pointer
crosses back, as Gray code through two-flop synchronisers. The dispatcher side
has an output register. A committed entry shows up at the head about four
architecture cycles after its header write, and a stalled queue holds
`DEPTH + 1` entries (one in the output register).

### Entry format (512 bits, little-endian words)

| Bits          | Field |
|---------------|-------|
| `[1:0]`       | type: 0 = Job, 1 = Barrier (others are dropped) |
| `[10:8]`      | Job: number of parameters, 0..4 (values above 4 are treated as 4) |
| `[15]`        | Barrier: interrupt the host on completion |
| `[31:16]`     | Job: Kernel ID |
| `[127:64]`    | parameter #1, then #2..#4 every 64 bits up to bit 319 |

A Job whose Kernel ID matches no kernel of the system is dropped. It also sets
the sticky `err_unknown_kernel` output.

### PE control interface

Every PE exposes this register file over AXI4-Lite, in a 4 KiB window at
`PE_BASE + p*0x1000`:

| Offset | Register |
|--------|----------|
| `0x00` | control: write bit 0 = start; read bit 0 busy, bit 1 done (clear on read), bit 2 idle, bit 3 ready |
| `0x04` | GIER, global interrupt enable |
| `0x08` | IER: bit 0 done, bit 1 ready |
| `0x0C` | ISR: writing 1 toggles (clears) a bit |
| `0x10` | return value (0x14 high word) |
| `0x20`, `0x30`, … | parameters #1, #2, … (low word, high word at +4) |

No host driver sits between the dispatcher and the PEs, so the
launcher also does the PE set-up that a host runtime would do. After reset it writes
GIER = 1 and IER = 1 to every PE in turn and then raises `init_done`.
Jobs wait in the queue until then.

The counter PE (`counter_pe`) is the benchmark PE. Once started it stays
busy for parameter #1 cycles (at least one), stores that count as its return value, and
raises its done interrupt. The return value is not read by the dispatcher.

## Timing

All figures are in architecture-clock cycles. They assume subordinates that accept at once and
answer in the next cycle.

- A launcher write takes 3 cycles, so a Job with *n* parameters keeps the
  launcher busy for 3·(2*n*+1) cycles. The acknowledge of an interrupt takes 3.
- The full system with 16 counter PEs and one-parameter, one-cycle Jobs
  sustains about 18 cycles per Job: 25 million Jobs/s at a 450 MHz PE clock.
  Here the single launcher port is the bottleneck. Launches and acknowledges share it.
- One Job followed by an interrupting Barrier reaches `host_irq` about 72–75 ns
  (250 MHz host, 450 MHz PEs) after its header write, plus the Job's run time.
  This holds whatever the run time is.

## Parameters and compositions

The dispatcher is built for one system composition, given by parameters:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `QUEUE_DEPTH` | 512 | queue slots (power of two) |
| `NUM_PES` | 16 | number of PEs |
| `NUM_KERNELS` | 1 | number of kernels, one idle-PE FIFO each |
| `KERNEL_IDS` | `{16'd1}` | Kernel ID of each kernel index (packed array) |
| `PE_KERNEL` | all 0 | kernel index of each PE (packed array, 8 bits per PE) |
| `PE_BASE` | 0 | base address of PE 0's window (dispatcher only) |

The defaults are the throughput benchmark system: 16 counter PEs of one
kernel. The testbenches also run:

- the three-kernel pipeline with 2 PEs per kernel, and with 8;
- 32 PEs of 16 kernels and 32 PEs of 4 kernels;
- 10 PEs of four kernels, split 3 + 3 + 2 + 2.

In the top, every PE is a counter PE whatever its kernel.

## Departures and own choices

The architecture follows the published design:

- a 512-bit queue of Jobs and Barriers in RAM with atomically updated pointers;
- per-kernel FIFOs of idle PE IDs, filled at reset;
- a launcher that writes parameters and then control;
- PE interrupts handled on chip, with a host interrupt only from Barriers that ask for it;
- the queue in the host clock and the rest in the PE clock.

These points are this design's own, because the published description does not fix them:

- **Queue access protocol.** The published design gives atomic pointer updates
  on read but no register map. The RESERVE / header-commit scheme, the
  in-order commit and the address map above are this design's.
- **Entry bit layout**, and the handling of unknown entry types and Kernel IDs.
- **Queue depth** of 512 slots. No depth is published. The published RAM budget
  (about 20 RAMB36 for queue and FIFOs) suggests a queue of the same order.
- **Idle-PE FIFOs in registers**, so they can be loaded at reset. The
  published design keeps them in block RAM.
- **PE set-up by the launcher** (GIER/IER after reset) and **interrupt
  acknowledge by the launcher** (ISR write). Both follow what a host runtime
  does. Acknowledges take priority over launches.
- **"All PEs finished"** for a Barrier means every idle-PE FIFO is full.
- **Control interconnect** (`axil_decoder`): one write and one read in flight,
  4 KiB windows, and DECERR outside them.
- **Bits inside control/IER/ISR** follow the common HLS convention.
- The queue accepts one host access at a time, with no bursts. The host port is AXI4-Lite.

What is not here: the host runtime and driver, the PCIe bridge, DMA and
memory controllers, the host interrupt controller, the status core that
describes the composition, and the array kernels of the pipeline example.
`host_req`/`host_rsp` and `host_irq` are where the platform attaches. Nothing
here reads PE return values. Jobs are limited to four parameters, as in the
published design.

## Files

`rtl/`:

- `cascabel_pkg.sv`: entry format, register offsets, AXI4-Lite request/response structs.
- `job_queue.sv`, `sync_2ff.sv`: the queue and the clock crossing.
- `selector.sv`, `idle_pe_fifo.sv`, `launcher.sv`, `irq_ctrl.sv`, `barrier_unit.sv`: the dispatcher parts.
- `cascabel.sv`: the dispatcher.
- `axil_decoder.sv`, `counter_pe.sv`: the architecture side.
- `tapasco_cascabel_soc.sv`: the top.

`tb/`:

- one `tb_<module>.sv` per block;
- `tb_soc_full.sv`: throughput at the default size;
- `tb_soc_latency.sv`: single-job latency for 1, 16, 8192 and 2^22-cycle jobs, default size;
- `tb_soc_configs.sv` with the helper `soc_config_run.sv`: the compositions listed above;
- `tb_tapasco_cascabel_soc.sv`: the barrier-ordered pipeline schedule. It also covers a full queue, out-of-order commits and an unknown Kernel ID.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/cascabel_pkg.sv tb/tb_soc_full.sv --top-module tb_soc_full -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Swap in any other testbench name. `+verilator+rand+reset+2` starts every
unreset flop at a random value. The design and the testbenches are meant to
pass that way. All testbenches finish in seconds. The latency run, which includes
a 4-million-cycle job, takes about 6 s.
