# BOSR: built-off self-repair for channel-based 3D DRAM

A stack of DRAM dies on a logic die (Wide I/O, HBM and similar) can gain new
faults when the dies are thinned and bonded, after each die was already tested
and repaired on its wafer. This design repairs those faults from the logic
die. Each DRAM channel has its own controller, and each controller tests its
channel with a built-in self-test (BIST). Spare words are not put on the DRAM
dies. They sit in a few SRAM modules on the logic die, and one allocator
shares them among all channels. A channel with many faults can therefore use
more spares than a channel with few. After the test, each channel looks every
address up in its own remap table (LUT), and the channels do this in
parallel. A remapped address is served from its spare SRAM word, and any
other address goes to the DRAM.

The main configuration has eight channels, four spare SRAM modules, and 8-bit
addresses and data words.

```
             system interface (per channel: req / rsp)            MODE
                  |            |                 |                  |
         +--------v---+  +-----v------+    +-----v------+           |
         | channel    |  | channel    | .. | channel    |  x8       |
         | ctrl 0     |  | ctrl 1     |    | ctrl 7     |<----------+
         | BIST, BIRA |  |            |    |            |           |
         | TQ, CMDQ   |  |            |    |            |           |
         +--+------+--+  +--+------+--+    +--+------+--+           |
            |      |        |      |          |      |              |
         DRAM ch0  |     DRAM ch1  |       DRAM ch7  |              |
                   |               |                 |              |
         spare requests (test) / remapped accesses (normal)         |
                   v               v                 v              |
         +-------------------------------------------------------+  |
         | allocator: request arbiter, round-robin assignment,   |<-+
         | per-SRAM arbiters, SRAM CMDQ 1..4, read-data return   |
         +----------+-------------+-------------+-------------+--+
                    |             |             |             |
                 SRAM 1        SRAM 2        SRAM 3        SRAM 4
```

## Operating modes

The `mode` input selects the mode (`bosr_pkg::MODE_TEST` or `MODE_NORMAL`).
The system first holds test mode until `all_test_done` rises, and then
switches to normal mode. `repairable` tells whether every fault found a
spare.

### Test mode: find, analyse, allocate

Every channel controller works on its own channel at the same time as the
others.

1. **BIST** (`bosr_bist`) runs March C- over every word:
   `up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)`, where
   0 and 1 mean 8'h00 and 8'hFF. It has one read in flight at a time. When a
   read returns the wrong data, it raises `fault_valid` with the address, and
   then waits until the BIRA is finished with that fault.
2. **BIRA** (`bosr_bira`) takes each fault through three steps:
   - The *address comparator* searches the LUT. A word that fails again in a
     later March element is already remapped, so nothing more happens.
   - Otherwise the *allocation step* sends a spare request to the allocator.
   - The *response analyser* writes {faulty address, SRAM ID, spare word
     address} into the next free LUT entry.

   Repair works on whole words: one LUT entry covers one faulty word.
3. **Allocator** (`bosr_allocator`) answers one request per cycle.
   - A round-robin arbiter chooses among the channels that ask at the same
     time.
   - The *round-robin assignment* takes the spare from the next SRAM module in
     rotation that still has a free word. Within a module, words are handed
     out in order. As a result, spares are spread evenly over the four
     modules.
   - When all spares are used, the request is refused (`alloc_fail`).

A channel becomes `irreparable` when a spare request is refused or its LUT is
full. The flag stays set until reset. An irreparable channel ends its March
test early, and in normal mode it accepts no transactions.

### Normal mode: look up, dispatch, return

Each channel controller (`bosr_channel_ctrl`) handles its transactions as
follows.

- A transaction enters the channel's Transaction Queue.
- The address at the head of the queue is looked up in the LUT. The lookup
  is combinational and compares all entries in parallel.
- **Miss:** the transaction goes to the DRAM CMDQ. The DRAM scheduler
  (`bosr_dram_sched`) sends it to the channel.
- **Hit:** the transaction goes to the allocator with the SRAM ID and the
  spare address. There, a round-robin arbiter for each SRAM module picks one
  channel per cycle, and the winner's command goes into that module's SRAM
  CMDQ. Each queue issues one command per cycle to its SRAM. The read data
  is routed back to the channel by a channel tag stored with the command.

The four SRAM modules work in parallel.

**Ordering.** Reads complete in request order on each channel, because of two
rules:

- A remapped read waits until no DRAM read of that channel is queued or in
  flight.
- A DRAM access waits while a remapped read of that channel is pending.

So the two paths never answer in the same cycle and never overtake each
other. Writes to the two paths cannot conflict, since an address is served
either from DRAM or from its spare, never both.

### DRAM scheduler

`bosr_dram_sched` combines three parts:

- **Arbitrator:** gives the channel bus to the BIST in test mode and to the
  DRAM CMDQ in normal mode.
- **DRAM state:** counts reads in flight. Reads are held back at
  `MAX_RD_OUT` = 4, while writes still go through.
- **Burst handler:** routes returning data to the BIST in test mode, or to
  the requester in normal mode.

The DRAM channel is assumed to take one command per cycle and to return read
data in order after a fixed latency. The mode must only change while no read
is in flight.

## Interfaces and timing

All blocks use one clock, `clk`, and a synchronous active-high reset, `rst`.
All handshakes are valid/ready.

| top port | width | meaning |
|---|---|---|
| `mode` | 1 | test / normal |
| `req_valid[c]`, `req_ready[c]`, `req_cmd[c]` | 1, 1, `mem_cmd_t` {we, addr[7:0], wdata[7:0]} | transaction for channel c |
| `rsp_valid[c]`, `rsp_rdata[c]` | 1, 8 | read data, in request order |
| `test_done[c]`, `irreparable[c]` | 1 each | per-channel status |
| `all_test_done`, `repairable` | 1 each | stack status |
| `spares_used` | 6 | spare words handed out since reset |
| `dram_valid[c]`, `dram_cmd[c]` | 1, `mem_cmd_t` | command to DRAM channel c |
| `dram_rvalid[c]`, `dram_rdata[c]` | 1, 8 | read data from DRAM channel c |

Timing, where N is the number of words tested and L is the DRAM read
latency:

- **Test time without faults:** 5·N·(L+2) cycles, plus one cycle at the
  start. With N = 256 and L = 2 that is 5121 cycles.
- **Cost of each fault report:** 2 cycles, plus the cycles the BIRA is
  busy. The BIRA is busy for 1 cycle for an address it already holds. For a
  new spare it is busy for 2 cycles, or longer while other channels' requests
  win the arbitration.
- **Normal mode:** a DRAM read returns 2 + L cycles after the transaction is
  accepted, at the earliest. A remapped read returns after 3 cycles at the
  earliest. The end-to-end testbench checks both numbers.

## Parameters

Channel count, SRAM module count and word widths follow the original
description. The rest are this design's own choices.

| parameter | default | origin |
|---|---|---|
| `NUM_CH` | 8 | original description |
| `NUM_SRAM` | 4 | original description |
| `ADDR_W`, `DATA_W` (package) | 8, 8 | original description |
| `SRAM_DEPTH` (spare words per module) | 8 | chosen: 32 spares against 64 LUT entries, so sharing matters |
| `LUT_DEPTH` (entries per channel) | 8 | chosen |
| `QUEUE_DEPTH` (TQ, DRAM CMDQ, SRAM CMDQ) | 4 | chosen |
| `MAX_RD_OUT` (channel controller) | 4 | chosen |
| `TEST_WORDS` | 256 = 2^ADDR_W | whole channel |

## Where this design fills gaps

The original description names these blocks and their connections, but says
little about how each one works. The following are choices made here:

- the March C- algorithm and its data backgrounds;
- repair of whole words;
- the FIFO queues;
- the valid/ready handshakes;
- the ordering rule in normal mode;
- reads in flight as the only DRAM state tracked;
- refusing traffic on an irreparable channel.

There is no DRAM timing model: no banks, rows, refresh or bursts longer than
one word. No physical stacking interconnect (TSVs, interposer) is modelled.

## Files

| file | content |
|---|---|
| `rtl/bosr_pkg.sv` | sizes, `mode_e`, `mem_cmd_t` |
| `rtl/bosr_top.sv` | logic die: 8 channel controllers, allocator, 4 SRAM modules |
| `rtl/bosr_channel_ctrl.sv` | channel controller |
| `rtl/bosr_bist.sv` | March C- BIST |
| `rtl/bosr_bira.sv` | redundancy analysis and LUT |
| `rtl/bosr_dram_sched.sv` | arbitrator, DRAM state, burst handler |
| `rtl/bosr_allocator.sv` | spare allocation and SRAM access routing |
| `rtl/bosr_rr_arb.sv` | round-robin arbiter |
| `rtl/bosr_fifo.sv` | FIFO for all queues |
| `rtl/bosr_sram.sv` | spare SRAM module |
| `tb/bosr_dram_model.sv` | behavioural DRAM channel with injectable stuck-at bits (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks the block against values it works out on its own, and
ends by printing `TB_RESULT checks=N failures=M`. The checks per testbench:

- **`tb_bosr_bist`:** exact test time, the exact number of reports for each
  kind of stuck-at fault, stall timing, and early quit.
- **`tb_bosr_bira`:** repeated faults reuse their LUT entry, lookups are
  correct, and both the full-LUT and the refused-spare cases mark the
  channel irreparable.
- **`tb_bosr_allocator`:** round-robin spare order, no spare handed out
  twice, refusal once all spares are used, and correct routing of
  concurrent remapped accesses.
- **`tb_bosr_channel_ctrl`:** a faulty channel behaves like a fault-free
  memory after repair, and an overloaded channel ends irreparable.
- **`tb_bosr_top`:** runs the full default configuration, with eight faulty
  DRAM channel models. In phase 1, 24 faults are repaired and random traffic
  on all channels is checked against a shadow memory. In phase 2, 40 faults
  meet 32 spares and the stack must be reported irreparable. It counts each
  mechanism and fails if any of them never occurs: repeated faults, request
  conflicts, BIST stalls, refusals, both data paths, SRAM contention, mode
  switch, and use of all four modules. It runs in a few seconds.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bosr_pkg.sv tb/tb_bosr_top.sv --top-module tb_bosr_top -Mdir obj -o sim
./obj/sim
```

To lint the design: `verilator --lint-only -Wall -Irtl -y rtl rtl/bosr_pkg.sv rtl/bosr_top.sv`.
