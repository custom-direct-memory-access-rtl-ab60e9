# A request-queue DMA with an adder processing element

This design moves blocks of 32-bit words between a processor's data memory and
a set of processing elements (accelerators). Each element has an input FIFO
and an output FIFO. The processor does not copy data itself. It writes a short
request into a fixed place in the shared data memory and sets a go bit. The DMA
engine (`mem_cpy`) picks the request up, puts it into an internal queue, feeds
the element the words it asks for, and copies the element's results back into
memory. A second memory port lets the processor keep running while this
happens.

An adder core is included as the processing element. It makes the data path
visible and testable: you give it four words, which form two 64-bit numbers,
and it returns their 64-bit sum as two words.

The processor itself (a small RISC-V core) is not included. Its memory ports
are brought out at the top level, and a testbench plays its part.

## System structure

`dma_system` (top) contains:

| instance | module | role |
|---|---|---|
| `memory` | `dpram` 2048 x 32 | instruction memory. Both ports go out to the processor. |
| `memory2` | `dpram` 2048 x 32 | data memory. Port 1 belongs to the processor, port 2 to the DMA. |
| `odbem` | `mem_cpy` | the DMA engine, with its request queue in a `sync_ram` of 64 x 51 bits |
| `adder1` | `adder_core` | processing element 0: `fifo` -> `adder_ctrl` + `adder` -> `fifo` |

The DMA has `N_PE` = 8 element ports. Element 0 is the adder core. Ports 1..7
are brought out as `ext_*` signals so that more elements can be attached
outside the top:

- The input data bus `ext_fi_data` is shared by all of them.
- The write strobes `ext_fi_wr`, the read strobes `ext_fo_rd`, the flags and
  the output data are one per element. Index `i` is element `i+1`.

All memories use word addresses. Reads are registered, so data comes one clock
after the address. `reset_i` is active low and synchronous. Hold it low for a
few clocks, then raise it.

## Programming the DMA

The control block is five words at `CTRL_ADDR` (default 1024) in the data
memory. The layout is in `rtl/dma_pkg.sv`:

| word | contents |
|---|---|
| +0 | bit 31 = go, bits 4:0 = element index |
| +1 | source word address |
| +2 | bits 6:0 = words to send (0..127), bits 22:16 = words to receive back (0..127) |
| +3 | destination word address for the received words |
| +4 | written by the DMA: the number of requests completed since reset |

To post a request:

1. Write words +1..+3.
2. Write word +0 with go set. This write must come last.
3. Go reads as 1 until the DMA has accepted the request. Once go reads 0, the
   block can be reused for the next request, even if earlier requests are still
   running.
4. To learn that a request is complete, poll word +4 until it reaches the
   count you expect, or watch `dma_done`.

Requests run strictly in the order they were posted. The queue holds up to 64
requests. While it is full, go stays set until an entry frees up.

A request to element 0 that sums one pair of numbers has `send = 4` and
`receive = 2`. Put the words at `src` in this order: a[31:0], a[63:32],
b[31:0], b[63:32]. The sum lands at `dst` as sum[31:0], then sum[63:32]. One
request may carry several pairs, for example `send = 16`, `receive = 8` for
four sums.

## Inside the DMA: poller and executor

`mem_cpy` has one port into the data memory. Two state machines share it.

**Poller.** It reads the command word over and over. When go is set and the
queue has room, it reads words +1..+3 and packs the request into one 51-bit
queue entry. The fields are: element 5 bits, source 16, destination 16, send
count 7, receive count 7. The poller then writes word +0 back with go cleared.
It pushes the entry in the same cycle.

**Executor.** It pops the oldest entry and runs it in three phases:

- *Send.* For each word, it reads memory in one cycle and writes the word into
  the element's input FIFO in the next. If the FIFO is full, it waits.
- *Receive.* It takes words from the element's output FIFO and writes them to
  `dst`, `dst+1`, and so on. It writes one word per cycle while words are
  available.
- *Finish.* It writes the new completed count to word +4 and pulses
  `done_pulse`.

**Who gets the port.** The executor has priority. The poller may use the port
only in cycles where the executor is idle, is popping the queue, or is waiting
in the receive phase for a result that has not arrived yet. So a long transfer
slows down how fast requests are accepted, but never stops acceptance
completely.

**Draining during the send phase.** This rule is easy to miss. The adder core
stops taking input when its output FIFO holds a result that nobody has read.
If the DMA insisted on sending every word before reading any result, a request
with more than a few sums would deadlock. To avoid that, the executor reads a
waiting result whenever the input FIFO is full during the send phase. The
results still go to `dst` in order. The data memory keeps its read register
through write cycles, so the word that was fetched for sending survives the
interleaved result write.

**Bad element index.** An index of `N_PE` or more sends into nothing and
receives zeros. The processor therefore always sees the request complete.

Assertions in `mem_cpy` check three rules: no write into a full input FIFO, no
pop from an empty output FIFO, and at most one element strobed at a time.

## The adder core

`adder_core` contains:

- an input FIFO (32 x 4);
- the controller `adder_ctrl`, a five-state machine;
- a 64-bit `adder` with a registered output;
- an output FIFO (32 x 4).

The controller works like this:

- **s0** waits until `start` is high, the input FIFO is full, and the adder is
  not signalling done. In the system, `start` is tied high.
- **s1** checks the word count. With four words it starts the adder and goes
  to s2. Otherwise it goes to s3.
- **s3** pops one word into the operand register for the current count, then
  returns to s1.
- **s2** waits for the adder's done. On done it goes to s4. Otherwise it goes
  back to s1.
- **s4** writes the sum into the output FIFO as two words, low word first,
  waiting while the FIFO is full. Then it returns to s0.

Because the core only starts when its input FIFO is *full*, it always works on
exactly four words. A request to the adder should therefore send a multiple of
four words.

Timing at the core's ports: the first result word appears at `fo_out` 12 clocks
after the fourth input word is written. The second word follows one clock
later. `fo_enable` is high while a result word is being written into the
output FIFO.

Example: write 20, 30, 40, 50. The results are 60 (20+40) and 80 (30+50).

## End-to-end timing

Here is one request that sums one pair on an idle system. It runs from the
processor's write that sets go to the DMA's `dma_done`, and takes 36 or 37
clocks. The one-clock spread depends on where the poller is in its loop when go
is written.

| step | clocks |
|---|---|
| poller sees go | up to 3 |
| reads the rest of the block and clears go | 7 |
| queue push and pop | 3 |
| four words sent | 9 |
| adder core | 12 |
| two results written, status written | 3 |

Throughput for long requests to the adder is limited by the core, not by the
DMA. The core takes about 13 clocks per sum once its four words have arrived.

## Where this departs from the original design

The sizes and names come from the original system:

- 2048 x 32 memories with 11-bit addresses;
- 32 x 4 FIFOs;
- the 64 x 51-bit RAM inside the DMA;
- the five controller states and their transitions;
- the names `clk_i`, `reset_i`, `Data_In`, `F_Full`, `FIn1`, `fo_enable` and
  the like.

These parts are this design's own choices:

- The DMA's insides were not available. The control-block layout, the queue,
  the two state machines, the result copy-back and the draining rule above are
  all new.
- The FIFO flags `F_First`, `F_Last` and `F_SLast` are read as "one word
  stored", "one slot free" and "two slots free".
- The FIFO output is show-ahead.
- The adder is 64 bits wide. Its operands are packed as `{w1,w0}` and
  `{w3,w2}`, and its result comes out low word first.
- The adder core has a `fo_read` pin so its results can be popped.
- The adder core is on element port 0. The original test program addressed
  element 1.
- There are eight element ports. The number was not fixed.
- The default control address is 1024.
- The standalone default of `dpram` is 64 words. The system uses 2048.

Not included:

- The processor core.
- External ports through which elements outside the chip would be reached.
  The `ext_*` element ports take their place.

## Files

`rtl/` holds one module per file. Each file opens with a comment on its
interface and timing.

- `dma_pkg.sv`: control-block offsets, the queue-entry struct, and the adder
  controller's state type.
- `fifo.sv`, `adder.sv`, `adder_ctrl.sv`, `adder_core.sv`: the processing
  element.
- `dpram.sv`, `sync_ram.sv`: the memories.
- `mem_cpy.sv`: the DMA.
- `dma_system.sv`: the top.

`tb/` holds one self-checking testbench per module. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches are:

- `fifo_tb`: the 5, 9, 25, 550 sequence, then random traffic against a queue
  model.
- `adder_tb`, `adder_ctrl_tb`, `adder_core_tb`: the 20/30/40/50 example, random
  sums, the 12-clock latency, and a full output FIFO.
- `dpram_tb`, `sync_ram_tb`: random traffic against an array model, including
  same-address collisions.
- `mem_cpy_tb`: models of the memory and the elements. It covers a full queue
  (64 waiting requests), input-FIFO stalls, draining during the send phase,
  and bad indices.
- `dma_system_tb`: the whole system at its default parameters. It covers:
  - the original example request;
  - adder requests of one to four sums, with the 36..37-clock latency checked;
  - requests posted back to back so that several wait in the queue;
  - send-only and receive-only requests;
  - requests to an external element modelled in the testbench;
  - a bad index;
  - the processor and the DMA using the data memory in the same cycle;
  - instruction-memory traffic.

  It counts how often each of these happens, and counts a failure for any that
  never happened.

## Simulating

With Verilator 5, for example for the whole system:

```
verilator --binary --timing --assert -Irtl \
  rtl/dma_pkg.sv rtl/fifo.sv rtl/adder.sv rtl/adder_ctrl.sv rtl/adder_core.sv \
  rtl/dpram.sv rtl/sync_ram.sv rtl/mem_cpy.sv rtl/dma_system.sv \
  tb/dma_system_tb.sv --top-module dma_system_tb -Mdir obj_dma -o sim
./obj_dma/sim +verilator+rand+reset+2
```

For a single block, list `dma_pkg.sv`, the block, the modules it instantiates,
and its testbench. `+verilator+rand+reset+2` starts uninitialised state at
random values. Every register that is read is reset, so the results do not
depend on it.

Every testbench finishes in well under a second.

## Changing it

- Adding an element: connect it to one of the `ext_*` slots, or instantiate it
  in `dma_system` on a free index. Nothing in `mem_cpy` depends on what the
  element computes. It needs only a FIFO-style full/write input and an
  empty/pop show-ahead output.
- The control address, queue depth and element count are parameters of
  `dma_system`.
- Word counts per request are limited to 127 by the 7-bit fields of the queue
  entry. Widening them means widening the `dma_req_t` struct and the RAM width.
