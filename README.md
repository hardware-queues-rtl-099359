# Hardware queues for streaming systems

When every module in a system talks to the others only through FIFO
queues, each module can simply stall until its inputs have data and its
outputs have room. The system then keeps working no matter how many cycles
a wire or a block takes, so you can pipeline it freely. This RTL provides
the pieces for such a system:

* a stream handshake;
* a family of queue implementations that trade area against
  clock-to-output delay;
* a small process (a "join") that follows the firing rule;
* the register structures that pipeline a stream over a long wire or
  through deep logic, plus the queue change that makes them safe.

All of it is plain, synthesizable SystemVerilog. Every queue takes a width
and a depth as parameters. The defaults are 16 words of 16 bits.

## The stream handshake

A stream carries three signals:

* `D`: the data word.
* `V` (valid): driven by the producer.
* `B` (back-pressure): driven by the consumer.

A word moves from producer to consumer at a rising clock edge where
`V = 1` and `B = 0`. Either side may stall: the producer lowers `V`, the
consumer raises `B`. Every module here uses the port names `i_d, i_v, i_b`
for its input stream and `o_d, o_v, o_b` for its output stream. So `i_b`
is an output of a queue and `o_b` is an input.

A *process* fires in a cycle when every input it needs is valid and every
output it will write is not back-pressured. Such a process is a slave: its
`V` and `B` outputs depend combinationally on its inputs. If you connect
two slaves directly, you can create a combinational loop or a deadlock.
The fix is to put a queue (a master) between any two processes: a queue's
`o_v` and `i_b` come from its own state. `stream_join` is an example
process. It takes one word from each of two streams and emits the pair
`{a, b}`:

```
fire = a_v & b_v & !o_b;   o_v = fire;   a_b = b_b = !fire
```

## The queue family

| module | storage | `o_d` from | `o_v` from | `i_b` from | capacity | latency |
|---|---|---|---|---|---|---|
| `q_enreg` | one register | flip-flop | flip-flop | `o_v & o_b` (combinational) | 1 | 1 |
| `q_systolic` | `DEPTH` × `q_enreg` | flip-flop | flip-flop | ripples through every full stage | `DEPTH` | `DEPTH` |
| `q_srl` | shift register | read mux at `addr` | state decode | address compare | `DEPTH` | 1 |
| `q_srl_d` | output register + shift register | flip-flop | state decode | address compare | `DEPTH` | 1 |
| `q_srl_dv` | same | flip-flop | flip-flop | address compare | `DEPTH` | 1 |
| `q_srl_dvb` | same | flip-flop | flip-flop | flip-flop (`addr_next` compare) | `DEPTH` | 1 |
| `q_srl_dvbf` | same | flip-flop | flip-flop | flip-flop (per-state pre-computation) | `DEPTH` | 1 |
| `q_circ` | memory + head/tail pointers | memory read | counter compare | counter compare | `DEPTH` | 1 |

Every queue moves one word per cycle at full load. There is one exception:
a one-word circular buffer cannot take a word while its only word is
leaving, so it runs at half rate. All queues have the same ports, so you
can swap one for another.

### Enabled register queue (`q_enreg`)

This queue is one data register and one valid bit, and the valid bit is
the whole state. The stage loads every cycle unless it is full and the
consumer is back-pressuring:

```
en = !(o_v & o_b);   i_b = !en
```

It costs one flip-flop per data bit. Its outputs come straight from
flip-flops. The cost is that back-pressure passes straight through it
combinationally. `q_systolic` chains `DEPTH` of these stages.

### Shift-register queue (`q_srl`)

A new word always enters position 0 of a shift register, which pushes the
older words up one position. The oldest word is read at position `addr`,
where

```
addr = number of stored words - 1
```

The controller has one state bit (empty / non-empty) and the address
register. Each cycle it picks one of four actions:

* consume: shift in;
* produce: let the head word go;
* consume + produce;
* idle.

| state | condition | action | next `addr` |
|---|---|---|---|
| empty | `i_v` | consume | 0, becomes non-empty |
| non-empty, full | `!o_b` | produce | `addr - 1` |
| non-empty, not full | `i_v & o_b` | consume | `addr + 1` |
| | `i_v & !o_b` | consume + produce | `addr` |
| | `!i_v & !o_b` | produce | `addr - 1`, or empty if `addr == 0` |

Flow control:

* `o_v` = non-empty.
* `i_b` = full, that is `addr == DEPTH-1`.
* `o_d` = `shift[addr]`.

`DEPTH` must be at least 2. A word and a free slot are needed at the same
time for full rate.

The shift register is `srl_store`. It is built the way an FPGA builds
one: each bit column is a stack of 16-deep, 1-bit cells (`srl16`), each
with its own read address. `WIDTH` cells side by side give the width.
`ceil(DEPTH/16)` cells in cascade give the depth: each cell's last bit
feeds the next cell's input, and the upper address bits pick the cell.

This queue is small. Its weakness is timing. `o_d` goes through a read
multiplexer whose select changes every cycle. The full compare widens, and
the address fans out further, as `DEPTH` grows.

### Moving the head word into a register (`q_srl_d`)

`q_srl_d` adds a data output register in front of the shift register, so
`o_d` becomes a clock-to-output delay. The register counts as one slot, so
the shift register holds `DEPTH-1` words. The controller now has three
states:

* **Empty**.
* **One**: only the output register holds a word.
* **More**: the output register holds the head word, and the shift
  register holds `addr + 1` more, so `addr = stored words - 2`.

| state | condition | action |
|---|---|---|
| Empty | `i_v` | consume into the output register → One |
| One | `i_v & o_b` | consume into the shift register, `addr = 0` → More |
| | `i_v & !o_b` | consume + produce: the new word **bypasses** the shift register into the output register |
| | `!i_v & !o_b` | produce → Empty |
| More, full | `!o_b` | produce: output register ← `shift[addr]`, `addr - 1` (→ One if `addr == 0`) |
| More, not full | `i_v & o_b` | consume, `addr + 1` |
| | `i_v & !o_b` | consume + produce: shift in, output register ← `shift[addr]` |
| | `!i_v & !o_b` | produce, `addr - 1` (→ One if `addr == 0`) |

In the consume + produce case in More, the output register reads
`shift[addr]` before the shift. After the shift, the same `addr` points
to the next-oldest word, so the address does not change.

Flow control:

* `o_v = state != Empty`.
* `i_b = (state == More) & (addr == DEPTH-2)`.

The next-state logic is shared by all four variants in `srld_ctrl`.

### Pre-computing the flags (`q_srl_dv`, `q_srl_dvb`, `q_srl_dvbf`)

The remaining variants each move one more output onto a flip-flop. None of
them changes what the queue does.

* **`q_srl_dv`** loads a valid register with `state_next != Empty`.
* **`q_srl_dvb`** also loads a back-pressure register with
  `(state_next == More) & (addr_next == DEPTH-2)`. The compare now sits
  after the address-update logic, which makes a long loop: address
  register → full compare → controller → next address → compare.
* **`q_srl_dvbf`** breaks that loop. It works out the next fullness from
  the current state, the current address and the chosen action:

  | action | `full_next` |
  |---|---|
  | consume only, in More | `addr == DEPTH-3` |
  | consume only, in One | `DEPTH == 2` |
  | idle | `full` (unchanged) |
  | produce, consume + produce, or from Empty | 0 |

  The compare with `DEPTH-3` uses the current address, so it runs in
  parallel with the controller. The registered flag then serves both as
  `i_b` and as the controller's own full input. The zero test
  (`addr == 0`) is left as a plain compare.

### Circular buffer (`q_circ`)

`q_circ` is a `DEPTH`-word memory with a write (tail) pointer and a read
(head) pointer. Both wrap at `DEPTH`, so the depth need not be a power of
two. An occupancy counter separates full from empty:

* `o_v = count != 0`;
* `i_b = count == DEPTH`.

The head word is read asynchronously.

## Pipelining a stream

Since each process waits on its queues, you can add registers to a stream
without touching the processes on either end. There are two kinds.

**Relaying.** Put a whole queue on the wire. A depth-2 shift-register
queue (`q_srl` with `DEPTH = 2`) relays the stream at full rate and adds
one cycle. Depth 1 would halve the rate. You can cascade relays for longer
distances. An enabled register queue (`q_enreg`) in front of a process
gives the synthesis tool a register that it can retime into the producer's
logic. Retiming itself is a synthesis step: the RTL only places the
register.

**Raw pipeline registers** (`stream_pipe`). This module puts `N_FWD`
registers on `D` and `V` and `N_BWD` registers on `B`:

* For a long wire, use `N_FWD = N_BWD = N`.
* For deep logic, use `N_FWD = N` and `N_BWD = 0`: the forward registers
  are meant to be retimed back into the producer.

Raw registers make back-pressure stale. The producer learns that the queue
is filling `N_BWD` cycles late, and `N_FWD` cycles' worth of words are
already in flight. So the queue must raise `B` while there are still
`N_FWD + N_BWD` empty slots. That is 2N for a wire and N for logic.
`q_srl` has a `RESERVE` parameter for this:

```
i_b = (DEPTH - stored words) <= RESERVE
```

Why this is enough: at the first cycle `i_b` is high, at least `RESERVE`
slots are empty. At most `N_FWD + N_BWD` words can still arrive after
that: the ones already in the forward registers, plus the ones the
producer commits before it sees `B`.

Two rules keep the reserved queue and the pipeline consistent:

* The first forward register stores a word only if it committed at the
  producer's end (`i_v & !i_b`, where `i_b` is the delayed back-pressure).
  So a producer that holds `V` while stalled is never counted twice.
* The queue takes every word that reaches it. With `RESERVE > 0`,
  `q_srl` consumes any arriving `i_v` unless it is truly full. An
  assertion flags a word that arrives when there is no room.

## The example system (`hwq_top`)

`hwq_top` connects the parts into independent channels, side by side.
Each channel has its own producer-side ports (`<ch>_i_*`) and
consumer-side ports (`<ch>_o_*`).

| channel | path |
|---|---|
| `r` | `N_RELAY` × depth-2 relay queue → `q_srl_dvbf` (interconnect relaying) |
| `p` | `stream_pipe` (`N_PIPE`, `N_PIPE`) → `q_srl` with `RESERVE = 2·N_PIPE` (interconnect pipelining) |
| `l` | `q_enreg` → `q_srl_d` (logic relaying) |
| `g` | `stream_pipe` (`N_PIPE`, 0) → `q_srl` with `RESERVE = N_PIPE` (logic pipelining) |
| `s` | `q_systolic` |
| `x`, `y` → `j` | `x` through `q_srl_dv`, `y` through `q_srl_dvb`, `stream_join` pairs them word by word, `q_circ` (`2·WIDTH` bits) buffers the pairs |

The tuple channel shows why queues matter for correctness: the two words
of a pair can arrive at different times, and each waits in its own queue
until its partner is there.

Parameters: `WIDTH = 16`, `DEPTH = 16`, `N_PIPE = 2`, `N_RELAY = 2`. Reset
`rst_n` is asynchronous and active low everywhere. It clears control
state only. Shift-register and memory contents are not reset.

## Files

* `rtl/hwq_pkg.sv`: state and action enumerations.
* Storage: `rtl/srl16.sv`, `rtl/srl_store.sv`.
* Queues: `rtl/q_enreg.sv`, `rtl/q_systolic.sv`, `rtl/q_srl.sv`,
  `rtl/srld_ctrl.sv`, `rtl/q_srl_d.sv`, `rtl/q_srl_dv.sv`,
  `rtl/q_srl_dvb.sv`, `rtl/q_srl_dvbf.sv`, `rtl/q_circ.sv`.
* Streams: `rtl/stream_pipe.sv`, `rtl/stream_join.sv`.
* System: `rtl/hwq_top.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. It prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_stream_src.sv`, `tb/tb_stream_sink.sv`: producer and consumer
  models used by `tb_hwq_top`.
* `tb/tb_bursty.sv`: a bursty producer and a steady consumer joined by a
  queue.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hwq_pkg.sv tb/tb_hwq_top.sv \
          --top-module tb_hwq_top -Mdir obj_top && ./obj_top/Vtb_hwq_top
```

Replace `tb_hwq_top` with any other testbench. Each one finishes in well
under a second.

What the testbenches establish:

* **Queue testbenches.** Each runs several depths (2, 3, 5, 8, 16 and 18
  for the shift-register queues; 2 checks the one-word shift register, 5
  a depth that is not a power of two, and 18 two cascaded cells). They
  drive random traffic at several load mixes against a reference queue.
  Every cycle they check:
  * `o_v` and `i_b` against the stored count;
  * every output word.

  They also check:
  * the fill count;
  * one word per cycle at full load;
  * latency through an empty queue: 1 cycle, or `DEPTH` for the systolic
    queue.
* **`tb_stream_pipe`**: every committed word appears exactly `N_FWD`
  cycles later, and back-pressure arrives exactly `N_BWD` cycles later.
* **`tb_hwq_top`**: runs the system at its default parameters through
  several load phases, checking:
  * every word on every channel;
  * one word per cycle on all channels at full load;
  * the first word's latency on each channel: one cycle per relay or
    queue, `N_PIPE` per pipeline, `DEPTH` for the systolic queue;
  * a complete drain.

  It also counts how often each mechanism occurred and fails if any never
  did: relay back-pressure, reserve back-pressure, words arriving under
  stale back-pressure, the SRL+D bypass, join waiting, circular-buffer
  wrap, and each queue becoming full.
* **`tb_bursty`**: the producer sends 4 words in 4 cycles and then idles
  for 4; the consumer is ready every other cycle, so both average 1/2.
  With a queue between them, over 100 envelopes:
  * the producer never stalls;
  * the consumer never finds the queue empty;
  * at most 2 words are ever stored.

## Design choices and limits

* **Controllers.** The queue controllers implement the control tables
  above. Every decision depends on the producer's `i_v` and the consumer's
  `o_b`, never on the queue's own `o_v`.
* **Full flags need the state.** Every "full" flag of the SRL+D variants
  is qualified with state More. In Empty and One the address rests at 0,
  which equals `DEPTH-2` when `DEPTH = 2`.
* **Reset.** Reset is asynchronous and active low. Storage is not reset.
  The SRL+D output register is cleared on reset. `stream_pipe` resets its
  back-pressure registers to 1, so a producer sends nothing before the
  queue's real state has arrived.
* **Own choices.** The following are this design's choices, not given by
  the source:
  * the circular buffer's counter and asynchronous read;
  * the default depths of `q_systolic` and `q_circ` (16);
  * `N_PIPE` and `N_RELAY` (2);
  * the join's operation (pairing);
  * which queue variant sits behind each relay in `hwq_top`.
* **Area and speed not reproduced.** The queues were characterised as
  FPGA area and clock-to-output delay over depths 2–128 and widths
  1–128. Those figures are a property of a particular FPGA and tool flow
  and are not reproduced here. The RTL takes any point of that range
  through `DEPTH` and `WIDTH`.
* **Not included.** Producers, consumers, and the retiming of pipeline
  registers into them belong to the application and the synthesis tool.
  They are not part of this RTL.
