# Run-length encoder for a bit stream

This design compresses a serial bit stream by run-length encoding. The stream
arrives as 8-bit segments. For every run of equal bits the encoder emits one
24-bit word: the value of the bits (the *bit ID*) and how many there were.

```
 out word:  [23]      bit ID   (0 or 1)
            [22:0]    count    (1 .. 2^23-1)
```

Long runs compress well: 800 equal bits become one word. Alternating bits are
the worst case. Each bit then becomes its own 24-bit word, so the output is 24
times the size of the input.

## Bit order and a worked example

Bit 0 (the LSB) of a segment is the earliest bit of the stream. The encoder
shifts the segment right and always looks at bit 0. Runs do not stop at
segment boundaries.

| stream order (bit 0 first) | segment value |
|---|---|
| 1 1 1 0 0 0 0 0 | `8'h07` |
| 0 0 1 1 1 1 0 0 | `8'h3C` |

These two segments encode to four words: `{1, 3}`, `{0, 7}`, `{1, 4}`,
`{0, 2}`. The zero run of five bits at the end of the first segment continues
into the second segment, which gives a count of 7. The last run (`{0, 2}`) is
written only when the producer signals the end of the stream.

## System structure

```
            in_wr/in_data          rd_req / in_data        wr_req / out_data          out_rd
 producer ───────────────► input FIFO ───────► rle_encoder ───────► output FIFO ───────► consumer
            in_full  ◄───   (8 x 16)  ─!empty─► recv_ready  send_ready ◄─!full─ (24 x 16)  ───► out_empty
                                         end_of_stream ──►
```

`rle_top` connects two `rle_fifo` instances and one `rle_encoder`. The
encoder's `recv_ready` is the input FIFO's `!empty`, and its `send_ready` is
the output FIFO's `!full`. `end_of_stream` goes straight from the top-level
port to the encoder.

## The controller

`rle_encoder` is a nine-state machine. Its registers are:

- `shift_buf`: the segment being counted.
- `shift_count`: how many bits of it have been consumed.
- `bit_count`: the length of the current run.
- `value_type`: the bit ID of the current run.
- `new_bitstream`: a flag.
- `rd_reg` and `wr_reg`: drive `rd_req` and `wr_req`.
- `last_run`: marks the final flush.

The next state is computed in an `always_comb` block. Every register is updated
in a single `always_ff` block.

```
INIT ─► REQUEST_INPUT ─(recv_ready)─► WAIT_INPUT ─► READ_INPUT ─► COUNT_BITS ◄─┐
            ▲   │                                                   │          │
            │   └─(!recv_ready & end_of_stream & bit_count!=0)─┐    ▼          │
            └────────────────(shift_count == 7)────────── SHIFT_BITS ──(else)──┘
                                                               │ (new_bitstream)
                                                               ▼
  INIT ◄─(final flush)── RESET_COUNT ◄── WAIT_OUTPUT ◄─(send_ready)── COUNT_DONE
                              └──────(otherwise)──► COUNT_BITS
```

### How runs are delimited: the `new_bitstream` flag

The flag has two jobs, and it is the least obvious part of the design.

- **In COUNT_BITS**, a set flag means "this bit starts a new run". The state
  copies `shift_buf[0]` into `value_type`, counts the bit, and clears the flag.
  With the flag clear, a matching bit is counted. A bit that does not match
  sets the flag and is *not* counted.
- **In SHIFT_BITS**, a set flag means "the run has ended". The segment is not
  shifted. The machine goes to COUNT_DONE and writes
  `{value_type, bit_count}`. RESET_COUNT clears the count and returns to
  COUNT_BITS. The bit that ended the run is still in `shift_buf[0]`, and the
  set flag makes it the first bit of the next run.

INIT sets the flag, so the first bit of a stream always starts a run.

A run break therefore costs five cycles:

1. COUNT_BITS detects the mismatch.
2. SHIFT_BITS sees the flag.
3. COUNT_DONE requests the write.
4. WAIT_OUTPUT holds `wr_req` high.
5. RESET_COUNT clears the count.

Only then is the bit counted again, which takes two more cycles.

### Ending a stream

In REQUEST_INPUT, new data takes priority. When the input FIFO is empty,
`end_of_stream` is high and a run is still open (`bit_count != 0`), the
machine sets `last_run` and goes straight to COUNT_DONE to write that run.
After this final write, RESET_COUNT returns to INIT, which re-initialises
everything for the next stream.

Only this flush path leads back to INIT. A run break inside the last segment
also passes through RESET_COUNT. The producer may already have raised
`end_of_stream` by then. Those visits continue counting, so the producer can
raise `end_of_stream` as soon as it has written its last segment. It does not
have to wait for the encoder to finish.

After the flush, and as long as `end_of_stream` stays high, the encoder waits
in REQUEST_INPUT. It starts a fresh stream when new segments arrive. Lower
`end_of_stream` before writing a new stream's first segment. Otherwise a
momentarily empty input FIFO is taken as the end of that stream.

## Handshake and timing

- **Reading a segment.** REQUEST_INPUT waits for `recv_ready`. On the edge that
  leaves it, `rd_reg` is set, so `rd_req` is high for exactly one cycle (during
  WAIT_INPUT). The FIFO pops on the edge that ends WAIT_INPUT and shows the
  entry on its output from the next cycle on. READ_INPUT samples `in_data`
  then.
- **Writing a word.** COUNT_DONE waits for `send_ready`. `wr_req` is then high
  for exactly one cycle (during WAIT_OUTPUT), and `out_data` is stable
  throughout.
- **Both requests are single-cycle pulses** and never occur together.
  Assertions in `rle_encoder` check this. They also check that no empty run is
  ever written.
- **Cost without stalls.** Each segment takes 3 + 2·8 = 19 cycles. Each run
  break adds 5 cycles. The flush takes 3 cycles from REQUEST_INPUT to the
  write. The worst case (alternating bits) therefore needs 59 cycles per
  segment and produces 8 words per segment.
- **Reset.** `rst` is synchronous and active high everywhere. It forces INIT
  and empties both FIFOs.

`rle_fifo` is a plain register-array FIFO with an occupancy counter. A read
registers the oldest entry onto `rd_data` (one cycle of latency), which is what
the controller expects. A write while full and a read while empty are ignored.
A read and a write in the same cycle are allowed even when the FIFO is full.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `rle_encoder`, `rle_top` | `SEG_WIDTH` | 8 | segment width; `shift_count` is `$clog2(SEG_WIDTH)+1` bits wide |
| `rle_encoder`, `rle_top` | `COUNT_WIDTH` | 23 | count field; the output word is `COUNT_WIDTH+1` bits wide |
| `rle_top` | `IN_DEPTH`, `OUT_DEPTH` | 16 | FIFO depths (this design's choice) |
| `rle_fifo` | `WIDTH`, `DEPTH` | 8, 16 | |

The state names and their order follow the original description, as do the
register names and widths, the word format and the FIFO handshake. The package
`rle_pkg` holds the state type (`rle_state_e`, 4 bits) and the two width
constants.

## Where this design makes its own choices

- **One request per handshake.** `rd_req` and `wr_req` are raised only on the
  cycle the machine actually leaves REQUEST_INPUT or COUNT_DONE. This is done
  with `rd_reg <= recv_ready` and `wr_reg <= send_ready`, rather than raising
  them on every cycle spent waiting. Without this, a request left high while
  waiting would pop a second segment, or push a word twice.
- **Priority in SHIFT_BITS.** The end of a run takes priority over the end of a
  segment. A run that ends on bit 7 is written first, and only then is the next
  segment fetched.
- **`last_run` register.** This is an extra register. It limits the return from
  RESET_COUNT to INIT to the final flush, as explained above.
- **Count overflow is not handled.** `bit_count` wraps after 2^23−1 equal bits.
  A run that long produces a wrong word.
- **FIFOs.** The depth, the full/empty behaviour and the implementation are
  this design's own. The encoder only relies on the read latency of one cycle.
- **State encoding.** INIT = 0 up to RESET_COUNT = 8, in the order listed
  above.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb/rle_encoder_tb.sv`** drives the encoder from queue-based FIFO models.
  It compares every word with a software run-length model. Without stalls, it
  also checks the exact clock cycle of every write against the cycle costs
  listed above. Its cases are:
  - the worked example;
  - long runs;
  - alternating bits;
  - breaks on bit 0 and bit 7;
  - 40 random streams, half with random `recv_ready`/`send_ready` stalls and an
    early `end_of_stream`.
- **`tb/rle_fifo_tb.sv`** checks `rle_fifo` against a queue model:
  - fill and drain;
  - the ignored write and read;
  - a read and write together while full;
  - 20 000 cycles of random traffic.
- **`tb/rle_test.sv`** is the end-to-end test of `rle_top` at its default
  parameters. It runs these streams back to back through the complete system:
  - the worked example;
  - a 64-segment alternating stream (512 words out);
  - two 800-bit runs;
  - 30 random streams.

  A random-rate producer and consumer sit at the two ends. The testbench counts
  how often each mechanism of the design occurred, and fails if any never did:
  - the input FIFO is full;
  - the encoder waits on an empty input FIFO;
  - the encoder waits on a full output FIFO;
  - a run ends inside a segment;
  - a run ends at a segment boundary;
  - a run continues into the next segment;
  - a run spans three or more segments;
  - the flush at the end of a stream;
  - `end_of_stream` arrives while the last segment is still being counted.

  It also prints the output/input size ratio of each stream, for example 6.0
  for the short example, 24.0 for alternating bits and 0.03 for long runs.

## Simulating

All sources are in `rtl/`, and the package must come first. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/rle_pkg.sv rtl/rle_fifo.sv rtl/rle_encoder.sv rtl/rle_top.sv \
  tb/rle_test.sv --top-module rle_test -Mdir obj_rle_test
./obj_rle_test/Vrle_test
```

Use `tb/rle_encoder_tb.sv` (with `rtl/rle_pkg.sv` and `rtl/rle_encoder.sv`) or
`tb/rle_fifo_tb.sv` (with `rtl/rle_fifo.sv`) in the same way. Each test runs in
well under a second.
