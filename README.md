# mc2RT: cache-coherent load-value tracing for multicores

To replay a parallel program exactly, a debugger on a host needs every value each
core reads from memory. Sending each load value off-chip, tagged with its core
number and a time stamp, takes roughly 10 to 16 bits per executed instruction.
With eight cores that is more than a narrow trace port can carry.

mc2RT (multicore cache-coherent read trace) sends much less. It relies on the
data caches the cores already have:

* Every L1 data-cache block gets **one extra bit, T**. T=1 means the debugger
  already knows what the block holds.
* A read of a block with T=1 is a **trace hit**: nothing is sent, and the core
  increments a counter, **THCnt**.
* A read of a block with T=0 is a **trace miss**: the core sends the **whole
  block** once, with THCnt and a time stamp. Then it sets T and clears THCnt.
* When a block moves from one cache to another over the coherence protocol, the
  receiving cache **inherits the sender's T bit**. A block that one core has
  already reported is not sent again when other cores share it.

The host keeps a software copy of every cache and replays the same policy. So
the trace only needs to say how many reads hit and what arrives on each miss.

This repository has synthesizable SystemVerilog for the on-chip part:
* the traced, MOESI-coherent L1 data caches;
* the per-core trace unit with THCnt and the previous-time-stamp register (PCC);
* the per-core trace buffers;
* the global time-ordered merge;
* the message encoder and the trace port.

The default configuration has 8 cores, each with a 32 KB, 4-way L1D, 32-byte
blocks and a 4-cycle hit. The T bits cost 1,024 bits per core.

## The trace-bit rules

All rules are in `rtl/l1d_trace_cache.sv`. Each access goes through a hit latency
of `HIT_LAT` cycles and then one of these cases:

| access | cache state | what happens | T bit afterwards |
|---|---|---|---|
| read | hit, T=1, THCnt not full | trace hit: THCnt+1, nothing sent | 1 |
| read | hit, T=0 (or THCnt full) | trace miss: message with the whole block | set to 1 |
| read | miss, another L1 holds the block | coherent read (`BUS_RD`); the block arrives in **S** with the supplier's T. Then the read is classified as above | inherited |
| read | miss, no L1 holds it | coherent read; the block comes from memory in **E** with T=0. So this read is always a trace miss | 0, then 1 |
| write | hit in E or M | silent, becomes M | unchanged |
| write | hit in S or O | coherent invalidate (`BUS_UPGR`), becomes M | unchanged |
| write | miss | read-and-invalidate (`BUS_RDX`), becomes M | inherited from a supplying L1, else 0 |

Three points are easy to get wrong:

* **A read hit can be a trace miss.** This happens when the block came in through
  a write miss from memory, or was inherited with T=0. The cache holds it, but
  the debugger has never seen its contents.
* **Inheriting T=1 on a read miss produces no message.** The debugger's copy of
  the supplying cache already has the block. It applies the same supply rule and
  copies the block across itself.
* **THCnt never wraps.** When it is all ones (`THCNT_W` bits), the cache treats
  the next read as a trace miss, even if T=1. This sends the block again and
  restarts the count.

Snoops change states at the clock edge: M→O and E→S on a coherent read, and →I on
an invalidate or read-and-invalidate. A lookup that meets a snoop of the same
block waits one cycle, so the two are ordered. An upgrade can lose its copy to
another writer before it is granted. In that case it becomes a read-and-invalidate.

## Coherence bus and who supplies a block

`rtl/coherence_bus.sv` runs one transaction at a time:

1. A round-robin arbiter picks a waiting cache.
2. In the next cycle the bus sends the request to all other caches, which answer
   combinationally. In that same cycle the requester is granted and hands over
   its victim block, if the victim is dirty (M or O).
3. The victim is written to memory. Then the block is read from memory, unless
   another cache supplies it.

Any other cache that holds the block supplies it, an owner (M or O) first. The T
bit comes with the data. Only a block that no L1 holds comes from memory, with
T=0. The memory port is block-wide: request/ready, then one response per request,
and writes are acknowledged too. It stands for the shared L2 and main memory.

## What goes over the trace port

A trace miss produces one message, in this bit order (bit 0 is sent first):

| field | size | meaning |
|---|---|---|
| dCC | 8, 16, ... 40 bits | cycles since this core's previous message (since reset for the first) |
| Pi | clog2(N) bits (none for N=1) | core number |
| THCnt | 8, 16, ... 40 bits | trace hits on this core since its previous message |
| CB | 256 bits | the whole cache block, byte 0 first |

dCC and THCnt use a variable-length code. Each 8-bit chunk holds 7 value bits
(the lowest group first) in bits 6:0 and a connect bit in bit 7. The connect bit
is 1 when another chunk follows. The shortest message is 8+3+8+256 = 275 bits
with 8 cores, and the longest is 339 bits.

Messages are packed back to back, with no gaps, into a `TP_W`-bit port
(default 8 bits per clock). `trace_flush` sends the last partial word padded with
zeros. The stream is self-delimiting, because the host knows N and the block size.

With `TIMED = 0`, messages leave out dCC (the untimed trace). Each message is
then 8 to 40 bits shorter. Because the stream is already in global time order,
the host can still interleave the cores correctly, but it loses the cycle
timing.

To replay, the host runs these steps for each core:

1. Keep software copies of all caches and apply the same MOESI, LRU and supply
   rules to every replayed load and store.
2. Take the next message for the core and let THCnt loads hit in the cache
   copies.
3. Give the following load that message's CB: store it in the core's cache copy
   and read the value from it.
4. Take that core's next message and repeat from step 2.

The time stamps, summed per core, place the cores' loads in one global order.

## Trace path and ordering

Each core's trace unit (`mc2rt_core_tracer`) writes its messages into a private
FIFO (`trace_fifo`, 4 deep). This keeps the core's own order. The message record
in the FIFO holds the absolute cycle of the trace miss.

`trace_arbiter` is the control of the global trace buffer. It always forwards the
oldest head of all cores, so the stream is in global time order. The messages
keep their dCC field in the default timed trace.

`trace_msg_encoder` turns the record into the bit string, and `trace_port`
serialises it. If a core's FIFO is full, a trace miss on that core waits, and the
core stalls. Trace hits never wait. No trace data is ever dropped.

## Modules

| file | role |
|---|---|
| `rtl/mc2rt_pkg.sv` | constants (32-bit addresses and words, 32-byte blocks, 32-bit CC/THCnt), MOESI and bus enums, bus/snoop/message structs |
| `rtl/l1d_trace_cache.sv` | traced MOESI L1D; core port, trace-event port, bus and snoop ports |
| `rtl/mc2rt_core_tracer.sv` | THCnt, PCC; builds {CC, dCC, Pi, THCnt, CB} on a trace miss |
| `rtl/trace_fifo.sv` | per-core trace buffer |
| `rtl/trace_arbiter.sv` | oldest-first merge of the per-core buffers |
| `rtl/trace_msg_encoder.sv` | variable-length message encoding (combinational) |
| `rtl/trace_port.sv` | bit packer and `TP_W`-bit output |
| `rtl/coherence_bus.sv` | snooping MOESI bus with the T-bit carry and the memory port |
| `rtl/mc2rt_top.sv` | N cores' caches and trace units, bus, merge, encoder, port; global cycle counter |

Core port timing: `req_ready` is high while the cache is idle, and one access is
in flight per core. `resp_valid` pulses once when the access is done:
* a hit answers `HIT_LAT` cycles after the request was taken;
* a miss adds the bus transaction.

Top-level parameters:

| parameter | default | origin |
|---|---|---|
| `N_CORES` | 8 | largest evaluated system (1, 2, 4, 8 cores) |
| `CACHE_BYTES` | 32768 | CS32 configuration; 16384 gives CS16 |
| `WAYS` | 4 | evaluated L1D (LRU) |
| `HIT_LAT` | 4 | evaluated L1D hit latency |
| `THCNT_W` | 32 | design choice |
| `FIFO_DEPTH` | 4 | design choice |
| `TP_W` | 8 | design choice, above the reported peak mc2RT need (about 6.6 bits per cycle, 8 cores, 16 KB caches) |
| `TIMED` | 1 | timed trace (with dCC); 0 gives the untimed trace |

## Choices made here, not in the original scheme

* The exact message layout: 7 value bits plus a connect bit per chunk, the field
  order dCC, Pi, THCnt, CB, and the bit order.
* How many bits the counters have, the saturating THCnt, the buffer depth and the
  port width.
* When a core's trace buffer is full, the core stalls rather than losing trace
  data.
* The supply rules: any sharer may supply a block, not only an owner. A block
  comes from memory, with T=0 and in state E, only when no L1 holds it.
* The bus works one transaction at a time with round-robin arbitration. The
  victim write-back rides on the miss transaction.
* The time stamp is taken when the cache classifies the read, not when the load
  instruction retires. The cores are outside this design.
* Each access is one 32-bit word, without byte enables. Multi-word operands are
  several accesses.
* A single memory port stands for the shared L2 (N×128 KB, 12 cycles) and for
  main memory.

Not included: the cores, the L1 instruction caches, the L2 and DRAM, the debug
interconnect of other trace sources, and the host debugger.

## Simulating

Every testbench checks itself and ends with one line,
`TB_RESULT checks=N failures=M`. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mc2rt_pkg.sv tb/mc2rt_tb_pkg.sv tb/tb_mc2rt_top.sv --top-module tb_mc2rt_top
./obj_dir/Vtb_mc2rt_top
```

`tb/mem_model.sv` is a behavioural memory with a fixed latency. Blocks that have
never been written hold a fixed function of their address (`mc2rt_tb_pkg::init_block`).

Testbenches for single blocks:
* `tb_trace_fifo`, `tb_trace_arbiter`, `tb_trace_port`: checked against
  reference models.
* `tb_trace_msg_encoder`: random messages, decoded again by an independent
  decoder.
* `tb_mc2rt_core_tracer`: checks dCC, THCnt and saturation.
* `tb_l1d_trace_cache`: every row of the table above, plus snoops, eviction,
  stalls and the lost-upgrade case.
* `tb_coherence_bus`: the supply rules and T inheritance.

The end-to-end test is `mc2rt_sys_tb`, used by two wrappers:

* **How it drives the design.** Random load/store programs run in phases. In each
  phase every read value is known exactly, so each read is checked against a
  reference memory.
* **How it checks the trace.** Independently of the design, the test predicts
  every message: dCC, THCnt and block contents. At the end it decodes the whole
  trace-port stream bit by bit, compares each message with the prediction, and
  checks the global time order.
* **Coverage.** It also counts each mechanism and fails if one never happened:
  trace hits and misses, memory and cache-to-cache fills, inherited T=1,
  upgrades, read-and-invalidates, write-backs, multi-chunk dCC, full trace
  buffers and THCnt saturation.

The two wrappers:
* `tb_mc2rt_top` runs 4 cores, 1 KB caches, a 4-bit THCnt and a 2-bit port, so
  that everything happens within a short run.
* `tb_mc2rt_untimed` is the same reduced run with `TIMED = 0`.
* `tb_mc2rt_full` runs the top with every default: 8 cores and 32 KB caches. It
  uses a 100-cycle memory and blocks spaced to collide in a few sets.

A typical reduced run:
* 1,677 reads, of which 22% are trace misses. The test's small caches and random
  addresses miss far more often than real programs, whose trace miss rates are
  around 0.5–2%.
* Each message is about 280 bits on the wire.

## How far to trust it

* **Simulated.** Every block passes its own testbench. For each one, a
  deliberately broken copy was shown to fail that testbench. The full system
  passes end to end at reduced and at default sizes.
* **Not checked.** No formal proof of the coherence protocol. No timing closure.
  No run of real program traces.
* **Synthesis.** The caches are written as plain arrays with combinational read
  ports (the tag, state and T arrays, and the data array for snoops and trace
  messages). A real implementation would map them to SRAM macros, with the
  lookups pipelined over the 4-cycle hit latency.
