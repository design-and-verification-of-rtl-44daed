# Flight data acquisition path: ADC → SPI → FIFO → recorder RAM

An aircraft's data acquisition unit turns sensor readings (temperatures,
speeds, engine and airframe quantities) into numbers and keeps them until they
are read out. This RTL is the FPGA part of such a unit, reduced to its digital
core:

```
            +--------------------------------- data_acq ----------------------------------+
adc_data -->| spi (dut1)          fifo (dut2)              ram (dut3)                     |
  [15:0]    |  serialise, 16 b -> 32 x 16 b  -- drain --> 128 x 16 b  --> data_out [15:0]   |
            |  deserialise       ^ wr_en      (auto)       ^ rd_en                          |
            +--------------------------------------------------------------------------------+
```

* The **ADC** (outside the FPGA, not part of this RTL) presents a 16-bit
  conversion result on `adc_data`.
* The **SPI link** carries that code bit-serially over chip select, clock and
  data lines, and reassembles it into a parallel word once per frame.
* The **FIFO** (32 words) takes the latest received word whenever `wr_en` is
  pulsed.
* The **recorder RAM** (128 words) receives everything the FIFO holds, in
  order, and gives the oldest unread word back on `data_out` for each `rd_en`.

All words are 16 bits wide. Everything runs on one clock `clk`. `reset` is
synchronous and active high.

## Files

| file | contents |
|---|---|
| `rtl/fda_pkg.sv` | shared sizes (`SAMPLE_W`=16, `FIFO_DEPTH`=32, `RAM_DEPTH`=128), `sample_t`, the SPI state enum |
| `rtl/spi.sv` | SPI link |
| `rtl/fifo.sv` | 32-word FIFO |
| `rtl/ram.sv` | 128-word recorder memory |
| `rtl/data_acq.sv` | top: the three blocks plus the FIFO-to-RAM transfer |
| `tb/tb_spi.sv`, `tb/tb_fifo.sv`, `tb/tb_ram.sv` | self-checking block tests |
| `tb/tb_data_acq.sv` | end-to-end test of the top at its default sizes |
| `tb/fda_if.sv`, `tb/tb_fda_env.sv` | transaction-level test: driver, monitor and scoreboard around the top |

## The SPI link (`spi`)

The link sends one ADC code per **frame** of 16 bits, most significant bit
first. One bit takes two system clocks: a sequencer alternates between state
`LOW` (sclk = 0) and state `HIGH` (sclk = 1) on every clock, so `sclk` runs at
half the system clock. A 5-bit counter starts at 16 and steps down once per
bit. Within a bit:

* at the clock edge that raises sclk, the receive shift register takes the
  bit on `mosi`;
* at the clock edge that lowers sclk, the transmit shift register moves on to
  the next bit and the counter steps down.

When the counter has run through all 16 bits, the receive register is copied
to `data`, `data_valid` pulses for one clock, the transmit register loads the
current `adc_data`, and the next frame starts on the next clock. Frames follow
each other with no gap, so `cs_l` goes low one clock after reset and stays
low. Right after reset there is one `IDLE` clock, with `cs_l` still high, that
loads the first code.

Timing, at the default 16 bits:

| event | clock edge after reset is released |
|---|---|
| `adc_data` sampled | 0, 32, 64, … |
| that code on `data`, `data_valid` = 1 | 32, 64, 96, … (32 clocks later) |
| `sclk` high | after every odd edge |

So the link delivers one word every 32 clocks, and the word is always the code
`adc_data` had 32 clocks earlier. Both ends of the link are inside this
module; the bus lines are outputs only so that they can be observed. To talk
to a real SPI converter, the receive side would sample a `miso` input instead
of the internal `mosi`.

## The FIFO (`fifo`)

A circular buffer of 32 words addressed by two 5-bit pointers, with a 6-bit
count of stored words. `empty` is count = 0 and `full` is count = 32.

* `wr_en` stores `data` and advances the write pointer; refused while full.
* `rd_en` copies the oldest word to `fifo_data` (visible one clock later) and
  advances the read pointer; refused while empty. `fifo_data` holds its value
  between reads.
* A write and a read in the same clock leave the count unchanged.

`full` looks at the count before the clock edge. A write is therefore refused
in a clock in which a full FIFO also hands a word on, even though a slot frees
up at that same edge.

## The recorder RAM (`ram`)

128 words, cleared completely by `reset` (as is `data_out`). It has its own
write and read pointers (`wr_ptr_m`, `rd_ptr_m`, 7 bits) that advance after
each access and wrap, and an 8-bit count of unread words with `full` and
`empty`. A write while full is refused, so recorded data is never overwritten
before it has been read. A read while empty is refused and `data_out` keeps its
last value. A read shows its word on `data_out` one clock after `rd_en`.

## How the top moves data (`data_acq`)

The top adds one small piece of logic: the transfer from FIFO to RAM, which
needs no outside control.

1. While the FIFO is not empty and the RAM will have room, the top reads the
   FIFO (`pop`).
2. One clock later the word is on `fifo_data`, and the top writes it into the
   RAM (`pop_q`).

The room test is `ram_count + pop_q < 128`: it counts the write already in
flight, so the RAM is never asked to take a word when full. An assertion,
`a_no_ram_overrun`, checks this. The transfer moves one word per clock, far
faster than the link produces words (one per 32 clocks). In normal use the
FIFO therefore holds at most a word or two.

The FIFO matters when nobody reads. The RAM fills up to 128 unread words, the
transfer stops (**back-pressure**), and further `wr_en` pulses fill the FIFO.
After 32 more words, the FIFO refuses writes: `dropped` is high in every clock
in which `wr_en` meets a full FIFO. The chain thus holds up to 160 unread
words. Reading from the RAM frees room, and the transfer restarts by itself.

`wr_en` stores whatever word the link delivered last. It is not tied to
`data_valid`. Pulsing `wr_en` twice within one 32-clock frame stores the same
word twice. Pulsing it once per `sample_valid` records each sample exactly
once.

Latencies: a word accepted by `wr_en` at edge *k* can be read from the RAM
from edge *k* + 3 on (FIFO write, FIFO read, RAM write). `data_out` follows
`rd_en` by one clock.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `adc_data` | in | 16 | ADC conversion result |
| `wr_en` | in | 1 | store the latest SPI word into the FIFO |
| `rd_en` | in | 1 | read the oldest unread RAM word |
| `data_out` | out | 16 | last word read from the RAM |
| `spi_cs_l`, `spi_sclk`, `spi_mosi` | out | 1 | SPI bus, for observation |
| `sample_valid` | out | 1 | a new SPI word, once per 32 clocks |
| `fifo_cnt` / `fifo_empty` / `fifo_full` | out | 6 / 1 / 1 | FIFO fill level |
| `ram_count` / `ram_empty` / `ram_full` | out | 8 / 1 / 1 | unread words in the RAM |
| `dropped` | out | 1 | `wr_en` refused because the FIFO is full |

Parameters: `W` (16, at least 2), `FIFO_WORDS` (32), `RAM_WORDS` (128). The
pointers wrap explicitly at the last word, so the depths need not be powers of
two.

## Where this RTL goes beyond the design it follows

The source design fixes the chain ADC → SPI → FIFO → RAM, the 16-bit words,
the FIFO's 5-bit pointers and count that saturates at 32, a 2^7-word memory
cleared by reset, the SPI counter that counts 16 bits with a state that
toggles every clock, an active-low chip select, and single `wr_en`/`rd_en`
controls on the top. The following are choices made here:

* **A real serial link.** The original SPI stage only re-registered the
  parallel code every two clocks and held its clock line at 0. Here the code
  is actually shifted out and back in, so `data` changes once per 16-bit frame
  rather than whenever `adc_data` changes. Bit order (MSB first) and clock
  edges (SPI mode 0) are assumed.
* **Separate jobs for `wr_en` and `rd_en`.** Originally both signals went to
  the FIFO and to the RAM at once, so a RAM write stored whatever the FIFO had
  last output. Here `wr_en` feeds the FIFO, `rd_en` reads the RAM, and the
  FIFO drains into the RAM by itself.
* **Sizes.** The FIFO's storage was declared with 128 entries but addressed
  with 5-bit pointers and a count limited to 32. Here it holds 32 words. The
  RAM had inconsistent bounds (129, 256, 5-bit pointers); here it holds 128
  words with 7-bit pointers.
* **Flow control.** Refusing writes when full and reads when empty, the RAM's
  unread count, the back-pressure and the `dropped`, fill-level and SPI
  observation ports are additions.
* **Clocked storage.** Reads and writes happen on the clock edge, with
  registered outputs, instead of in level-sensitive (latching) logic.

Not built: the sensors, the ADC itself and the signal-conditioning stage ahead
of it. The source describes the last only as filtering and transforming
signals, with no filter specified. The top's `adc_data` input is where a
converter connects.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The testbenches use only `$urandom`, so they run on a two-state simulator.

* `tb_spi`: checks `cs_l`, `sclk`, every `mosi` bit and `data`/`data_valid`
  after every clock, for nine frames with a reset in mid-frame, against a model
  that only counts clocks. It also checks the rate of one word per 32 clocks.
* `tb_fifo`, `tb_ram`: random writes and reads, alternating between
  write-heavy and read-heavy phases, checked against a queue. Each requires
  that it has seen full, empty, a refused write, a refused read, and a
  simultaneous read and write.
* `tb_data_acq`: the whole chain at its default sizes. A clock-counting model
  predicts which ADC code each `wr_en` stores, and every word read back must
  match, in order. The test first writes on every clock with no reads, then
  mixes reads and writes at random, then only reads (past empty), then drains
  everything. It checks that words are dropped only when the chain is full,
  and that the fill levels agree with the model. It counts SPI frames, stored
  and read words, back-pressure clocks, dropped words and reads of an empty
  RAM, and fails if any of these never happens.

* `tb_fda_env`: a class-based environment (sequence item, driver, monitor,
  scoreboard, connected through the `fda_if` interface). The driver holds
  each random ADC code for two SPI frames, records it with one `wr_en`, and
  reads a whole batch back. The scoreboard compares each `data_out` with the
  code that was recorded. The first batch has 10 codes. The second has 160,
  which fills the RAM and the FIFO exactly and must not drop a word.

Each block test was also run against a copy of its block with one deliberate
bug (15-bit frames; `full` one word early; a RAM read pointer that never moves;
a transfer that ignores the write in flight), and each run failed.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fda_pkg.sv tb/tb_data_acq.sv \
          --top-module tb_data_acq -o sim
./obj_dir/sim
```

Replace `tb_data_acq` with `tb_spi`, `tb_fifo` or `tb_ram` to run a block
test. `tb_fda_env` also needs `-ytb`, so that Verilator finds `fda_if`. Each
test finishes in well under a second.
