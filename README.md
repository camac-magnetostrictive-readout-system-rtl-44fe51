# Magnetostrictive spark-chamber readout with per-wand fast memories

A wire spark chamber read out by magnetostrictive wands turns each spark into
an acoustic pulse. The pulse runs along the wand and reaches a pickup after a
delay set by the spark's position. Finding the spark means measuring that delay.
This design does it with one free-running 20 MHz clock shared by every module.
At each start, every 4-channel time digitizer module ("ANNA") starts its own
16-bit counter from zero. Each spark on a wand writes the counter's value
straight into that wand's own 16-word x 16-bit memory, with no buffer in
between, so sparks are recorded at full clock rate. No fast data passes
between modules. The count resolution is one clock (50 ns). At a wand velocity
of 5 mm/us that is 0.25 mm.

After the event a processor reads every module over the CAMAC dataway. It
first collects each wand's word counter and the spark total. It then sends the
data words, each tagged with its wand address, as 32-bit words to a computer,
checking the data as it goes. A tester can stand in for the chamber and push
simulated sparks through every module.

The RTL is SystemVerilog (IEEE 1800-2017). All blocks are synthesizable. The
analog parts are not modelled: wand amplifiers, zero-crossing detectors, the
D/A converters and the scope. Neither are the standard CAMAC crate
controllers, the branch highway or the host computer. Their signals are ports
of the top module.

## One event, end to end

1. **Start.** The chamber trigger (or the tester) pulses the bridged START
   line. Every module synchronizes it and opens its clock gate. The 16-bit
   counter clears and starts counting, and the four wand inputs are enabled.
2. **Recording** (`anna_channel`). A spark on a wand writes the counter value
   at the wand's 4-bit address counter, which then steps by one. At 15 words
   the input is gated off. Later sparks on that wand are lost, and the
   processor flags this as word-counter overflow.
3. **End of cycle.** The counter overflows after 65536 clocks (3.28 ms). The
   gate closes, and one clock later an all-zero *last word* is written into
   every channel at its current address. Sixteen locations hold 15 sparks plus
   this marker. The inputs stay inhibited until the next start.
4. **Spark computation** (`readout_processor`, pass 1). The processor times the
   event with its own copy of the counter. After that it reads every wand's
   word counter with F(1). It stores each counter in a 16 x 64-bit memory
   (sixteen 4-bit counters per row) and adds it to the total. A station that
   does not answer with X is empty and is skipped. A wand with fewer than two
   words (the two fiducial sparks every wand must have) is flagged, and so is
   a wand whose counter is full.
5. **Header.** The spark total goes to the computer as the first word. The
   processor then waits until the computer has taken it.
6. **Readout** (pass 2). For each wand the processor reads, with F(0), as many
   words as its stored counter says. Each word must come with Q = 1. One more
   read must then return the last word with Q = 0. This way the Q line shows
   whether the counter and the memory agree. Every word is packed with its
   wand address into one 32-bit word in the buffer. The pass stalls while the
   buffer is full. It ends when every wand has been read, or earlier if the
   computer raises its memory-overflow flag.
7. **Display** (`display_controller`). Every data word is also stored as a
   point (wand index, time). After readout these points are replayed in a loop
   on the scope's x/y converter codes.

## The anticipated-carry counter

At 20 MHz the slow path of a cascade of 4-bit synchronous counters is the
first stage's carry-out. The carry-out must enable the upper stages within one
clock. `sync_counter` takes this path out of the critical loop. A flip-flop is
loaded on the edge at which the first stage goes from 14 to 15. Its output is
therefore high exactly while the first stage is all ones, and it comes straight
from a flip-flop. This flip-flop output enables the upper stages, which cascade
normally among themselves. An assertion checks that the flip-flop always equals
the carry it replaces. The stage count and the stage width are parameters
(default 4 x 4 bits).

## CAMAC usage and the 32-bit word

These encodings are this design's own (`anna_pkg`):

| Command | Response |
|---|---|
| F(0)·A(c) | R = word at channel c's read pointer, Q = word is non-zero; S2 steps the pointer |
| F(1)·A(c) | R = word counter of channel c (0..15), Q = 1 |
| X | 1 for either command addressed to the module, A0..A3 |
| Z | closes the gate and clears the counters |

Each channel has its own read pointer, cleared by start. Because of this the
word counter stays readable during readout. The dataway is treated as
synchronous to the system clock. One command is three clocks: setup, S1 (R, Q
and X sampled) and S2.

The computer word (`cpu_word_t`):

| bits | field |
|---|---|
| 31 | header (1 = spark-total word) |
| 30 | Q error (Q wrong on this read, or a non-zero word after the counted ones) |
| 29 | fiducial error (wand has fewer than 2 words) |
| 28 | overflow (wand counter full, later sparks lost) |
| 27:26 | spare, 0 |
| 25:23 | crate |
| 22:18 | station N |
| 17:16 | channel (subaddress) |
| 15:0 | time count, or the spark total in the header word |

## System tester

`anna_tester` drives START and the bridged TEST input. Each module ORs TEST
into all four wand inputs. START and TEST pass through identical
synchronizers, so a TEST pulse raised P+1 clocks after START is recorded as
time P.

* **Multiple-spark mode:** 1 to 15 sparks, the first at a programmed count,
  then one every 8 clocks (400 ns).
* **Memory-writing mode:** writes a 16-bit pattern into location *loc* of
  every channel. It sends *loc* filler pulses two clocks apart and then one
  pulse at count = pattern. The pattern must be at least 2·loc and below the
  last count. Otherwise `cfg_err` is raised and nothing is sent.

## Modules

| File | Role |
|---|---|
| `anna_pkg.sv` | widths, function codes, dataway command and computer word types |
| `sync_counter.sv` | time-base counter with anticipated carry |
| `input_sync.sv` | two-flop synchronizer with leading-edge pulse |
| `spark_memory.sv` | 16 x 16 memory of one wand (synchronous write, asynchronous read) |
| `anna_channel.sv` | address/word counter, 15-word gating, last word, read pointer |
| `anna_digitizer.sv` | the 4-channel module: gate, counter, channels, TEST OR, CAMAC decode |
| `camac_dataway.sv` | N decoding and wired-OR of R/Q/X for one crate |
| `wordcount_memory.sv` | the processor's 16 x 64 word-counter memory |
| `word_buffer.sv` | 32-bit FIFO toward the computer (valid/ready) |
| `readout_processor.sv` | the two-pass readout sequencer and its checks |
| `display_controller.sv` | point memory and scope replay |
| `anna_tester.sv` | system tester |
| `readout_system.sv` | top: tester, crates of modules, processor, buffer, display |

Top parameters: `NCRATES`=2, `SLOTS`=23 stations scanned per crate,
`MODS_PER_CRATE`=21, `N_MODULES`=41 (164 wands), `COUNT_STAGES`=4 (16-bit
count), `BUF_DEPTH`=16, `DISP_DEPTH`=4096, `DAC_W`=8. Module *m* sits in crate
*m* / 21 at station *m* mod 21 + 1, and the remaining stations are empty.

## Departures and limits

* **Spark pair resolution.** The inputs are edge detected after
  synchronization, so an input must be sampled low between two sparks. The
  smallest recorded separation is therefore 2 counts (0.5 mm), not one count.
* **Spark at time 0.** A spark on the first count is stored as an all-zero
  word. It is indistinguishable from the last word, so it reads with Q = 0 and
  is flagged as a Q error.
* **No branch highway or crate controllers.** The processor drives the crate
  number, N, A, F and the strobes directly. It also knows the event has ended
  from its own timer, not from a module signal.
* **Own choices:** the depth of the word buffer, the point memory and the
  x/y scaling of the display, the tester's memory-writing method, the
  function codes and the word layout.
* **Capacity.** The 16 x 64 word-counter memory holds 256 counters, which is
  64 modules. The crate field allows 7 crates, but a fully populated 7-crate
  system would need a larger memory.
* **Reset.** Registers reset asynchronously with `rst_n`. The memories are not
  reset, and every location that can be read is written during the event.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_readout_system` runs four events
end to end at reduced size: 5 modules, 8-bit counter and 4-word buffer. The
events are a tester multiple-spark event with overflowing wands, a random
chamber event with fiducial and Q errors, a memory-writing event and an event
cut short by computer memory overflow. The test also fails if any mechanism
never happened. `tb_readout_full` runs one complete event of the full-size
default system: 41 modules and a 65536-clock event, about 72,000 clocks,
taking a few seconds. `tb_system_tester_full` drives the full-size system
from the tester. It runs the heaviest event, 15 sparks on each of the 164
wands (2460 words), and two memory-writing events, 0xAAAA at location 5 and
0x5555 at location 14.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/anna_pkg.sv tb/tb_readout_full.sv --top-module tb_readout_full -o sim
./obj_dir/sim
```

Verilator has two-state simulation, so the testbenches run with random
initial values (`+verilator+rand+reset+2`). That is why every register that
is read is reset or written first.
