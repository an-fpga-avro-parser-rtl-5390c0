# Avro parse, project and select accelerators

Avro is a binary, schema-based serialization format: an object carries no
field names or tags, only the field values in the order the schema lists them.
Some values have variable length (zigzag varints, strings, maps), so the
meaning of a byte is only known once all earlier bytes have been read. That
makes Avro awkward for a CPU but natural for hardware: a small finite-state
machine, derived from the schema, walks the fields one byte per clock cycle.

This RTL implements that idea as published by Hahn, Schüll, Wildermann and
Teich ("An FPGA Avro Parser Generator for Accelerated Data Stream
Processing"). There, a generator builds the hardware from a schema and a
JSONPath-style query. Here the same building blocks are written by hand in
SystemVerilog, and three generated designs are assembled from them:

| accelerator | schema | query |
|---|---|---|
| car (running example) | `car{id:int, name:string, engine{serialNr:int, horsepower:float}}` | `$[?(id==42)].(id \| engine.horsepower)` |
| Yahoo Streaming Benchmark | 3 × `fixed(16)` UUIDs, 2 enums, `long` time, `string` IP | `$[?event_type='view'].(ad_id \| event_time)` |
| RIOTBench SmartCity | `long` timestamp, `map<union{fahrenheit, percentage}>` of sensors | five sensors projected, each checked against a range |

Each accelerator takes a 64-bit AXI-Stream of Avro objects in the Avro
*wire format*. It returns a stream of fixed-layout tuples that hold only the
projected fields of the objects that pass the selection. The top level,
`avro_top`, puts the three side by side.

## Structure

```
avro_top
 └─ avro_accel (×3: SCHEMA = car / Yahoo / RIOT)
     ├─ wire_splitter           wire-format decode, buffers → channels round robin
     ├─ per channel c = 0..7
     │   ├─ chan_fifo           up to 8 bytes in, 1 byte out per cycle
     │   ├─ car_pps | yahoo_pps | riot_pps   (one byte per cycle)
     │   │    object parser: record_ctrl / map_ctrl / union_ctrl
     │   │                   + int_parser, fixed_parser, string_parser(count_byte),
     │   │                     string_matcher
     │   │    stage 1 registers → selection compare (sel_cmp) → stage 2 registers
     │   └─ sync_fifo           result queue {last, keep, tuple}
     └─ rr_merger               results back in round-robin order, discards dropped
```

Shared types and constants are in `avro_pkg`: `schema_e`, the tuple widths,
and the comparator's type and operator enums (`cmp_type_e`, `cmp_op_e`).

## The parser block interface

This is the part to understand first; everything else is composed from it.
Every parser block has the same four signals:

| signal | dir | meaning |
|---|---|---|
| `in_valid` | in | the block is active in this cycle, and `in_byte` is the next byte of its field |
| `in_byte[7:0]` | in | shared by all blocks of an object parser |
| `out_valid` | out | this cycle's byte was the **last** byte of the field |
| `out_data[n-1:0]` | out | the decoded field, valid while `out_valid` is 1 |

`out_valid` and `out_data` are **combinational** and appear in the same cycle
as the field's last byte. A controller that sees `out_valid` from its active
child steers the very next byte to the next child. So an object is parsed
with no bubbles, one byte per cycle, and idle cycles (`in_valid` = 0) may come
anywhere. The cost is that chains of nested controllers form combinational
paths from `in_byte` to the final `out_valid`. No block is ever stalled
midway, and none needs a ready signal.

Elementary blocks:

* **`int_parser #(W)`**: the zigzag varint decoder used for `int`, `long`
  and `enum`, and for lengths, counts and union indexes. Bit 0 of the first
  byte is the sign. When the sign is 1, every payload bit is inverted, and
  the bits above the ones written so far are preset to 1 (sign extension).
  The first byte supplies 6 payload bits and each further byte 7. Bits above
  `W` are dropped, so an enum needs only `ceil(log2(#symbols))` bits.
* **`fixed_parser #(N)`**: a down counter and an (N−1)-byte shift register.
  `out_data = {in_byte, shift register}`, so the field's first byte lands in
  bits [7:0]. That is Avro's little-endian order for `float` (N=4) and
  `double` (N=8), so the IEEE word comes out unchanged. Also used for
  `boolean` (N=1) and for `fixed`.
* **`string_parser`**: an `int_parser` for the length, then **`count_byte`**.
  `count_byte` stays active for `len` bytes and shifts them into a 32-byte
  register. Bytes enter at the low end, so a parsed string equals the
  SystemVerilog string literal of the same text, zero-extended. Longer
  strings keep their last 32 bytes. A zero length ends the field with the
  length byte.
* **`string_matcher #(NKEYS, KEYS)`**: a string parser with one equality
  comparator per dictionary key. `match_now` is valid with the key's last
  byte. `key_match` is registered and held while the map value is parsed.

Complex blocks have no data path of their own. They only decide which child
gets `in_valid`:

* **`record_ctrl #(NCHILD)`**: an index register. `child_valid[i] =
  in_valid && idx == i`. The index advances when the active child completes,
  and the record completes with its last child. The top-level record wraps
  back to child 0, so consecutive objects parse back to back.
* **`map_ctrl`**: COUNT state (internal `int_parser`), then ITEMS state. In
  ITEMS, `kv_valid` drives an external key/value record (a `string_matcher`
  and the value's block), and a loop counter counts the items. Avro writers
  encode a map as one or more blocks closed by a zero count, so by default
  (`BLOCK_TERMINATED = 1`) the FSM returns to COUNT after each block and ends
  on a zero count. With `BLOCK_TERMINATED = 0` it ends after `obj_cnt`
  items. Negative (byte-sized) block counts are not supported: their absolute
  value is used as the item count.
* **`union_ctrl #(NBR)`**: an internal `int_parser` reads the branch index.
  Only `br_valid[sel]` is then driven, and `out_valid` is the OR of the
  branches' done signals. `sel` stays valid after the union so that it can
  qualify projection. An index outside 0..NBR−1 is treated as an empty
  branch (such as `null`).

## Parse, Project & Select (PPS) modules

`car_pps`, `yahoo_pps` and `riot_pps` each wire an object parser for one
schema to two register stages:

* **Stage 1** has one register per attribute the query references. Each
  register is written when that attribute's parser block raises `out_valid`.
  For a map value, the key's `key_match` must also be set. For a union, the
  parsed index must also be the branch the query names, so the output type
  stays fixed. A valid bit is set when the whole object has been read.
* **Stage 2** holds the selection, computed from the stage-1 registers, plus
  a copy of the projected registers.

Timing: `res_valid` pulses **two cycles after the object's last byte**, for
every object. `res_keep` tells whether the selection kept the object. Results
are produced even for discarded objects, because the merger needs one result
per buffer to keep the order.

Tuple layouts, with the first projected attribute in the lowest bits:

| module | `res_data` |
|---|---|
| `car_pps` (64 b) | `{horsepower[31:0], id[31:0]}` |
| `yahoo_pps` (192 b) | `{event_time[63:0], ad_id[127:0]}` (first UUID byte in bits [7:0]) |
| `riot_pps` (160 b) | `{airquality_raw, dust, light, humidity, temperature}` (IEEE singles) |

Schema details that the published description leaves open, and how they are
set here:

* **Yahoo.** `ad_type` has 5 symbols (banner, modal, sponsored-search, mail,
  mobile) and `event_type` has 3 (view, click, purchase), with `view` as
  index 0. These come from the benchmark itself. All three are parameters.
* **RIOTBench.** The union has two branches, `senml_fahrenheit` (0) and
  `senml_percentage` (1). Each is a record with one `float`. All ten range
  bounds are compared as floats, including 1345, 26282, 17 and 363. The float
  comparison is done by `sel_cmp` (below). A *seen* bit per sensor
  (this design's addition) makes an object that lacks a sensor, or carries it
  in the other branch, fail the selection. Without it, the selection would
  compare a stale value from an earlier object. The bounds are the
  parameters `LO` and `HI`.

The selection operators are instances of **`sel_cmp #(W, TYPE, OP)`**, a
combinational comparator for `==`, `<`, `>`, `<=` and `>=`. `TYPE` chooses
how the two operand words are read. `CMP_BITS` is for strings, booleans and
enums, and tests only bit-pattern equality, whatever `OP` says. `CMP_INT`
flips the sign bit, so two's-complement values order correctly. `CMP_FLOAT`
maps an IEEE word to a key that sorts in numeric order: negative numbers
have all bits inverted, positive ones get the sign bit set. That works for
`float` (W=32) and `double` (W=64) alike. Two side effects: −0 sorts below
+0 (so they are not equal), and NaN gets no special treatment.

## The accelerator: eight channels on a 64-bit stream

A PPS module takes one byte per cycle, so `avro_accel` runs `NCH = 8` of them
to match one 64-bit beat per cycle.

* **Wire format.** The input is a sequence of buffers. Each buffer is a
  4-byte big-endian length followed by that many bytes of Avro objects. A
  zero length marks the end of a message. `wire_splitter` decodes all 8 byte
  lanes of a beat in one cycle, so buffers need not be word-aligned, and
  lanes with `tkeep` = 0 are skipped. Each buffer goes to the next channel in
  round-robin order. Zero-length buffers use no channel and are counted.
* **Channel FIFOs.** A beat's bytes often all belong to one channel, while
  each channel drains only one byte per cycle. Each channel therefore has a
  128-byte `chan_fifo` that accepts up to 8 bytes per cycle. `s_tready` is
  low while any channel FIFO has fewer than 8 free bytes.
* **Results and order.** Each PPS writes `{last, keep, tuple}` into a
  4-entry result queue. A channel stops taking bytes while its queue could
  not hold the results still in its pipeline. `rr_merger` visits the channels
  in the same round-robin order as the splitter. It skips discarded results
  and emits kept tuples on `m_tdata`, one tuple per beat.
* **Buffer-end tag (this design's addition).** The splitter flags the last
  byte of every buffer (`lane_last`), and the channel FIFO stores the flag
  with the byte. A PPS result appears exactly two cycles after the object's
  last byte, so the flag, delayed by two cycles, marks the result of the
  buffer's last object (`last`). The merger stays on a channel until it has
  taken that result. The published scheme moves on after every result, which
  restores the order only if each buffer holds exactly one object. It also
  has a worse problem with several objects per buffer: a channel's result
  queue fills while the merger waits for a channel whose next buffer cannot
  enter, and the accelerator stalls for good. With the tag, the output order
  equals the input order for any number of objects per buffer. With one
  object per buffer, it behaves exactly like the plain scheme. A buffer must
  end where an object ends; an assertion checks this.
* **Counters.** `n_objects`, `n_dropped`, `n_stalls` (cycles with `s_tvalid`
  high and `s_tready` low) and `n_msg_end` are brought out for observation.
  On `avro_top` they appear as `*_events[0..3]`.

The throughput target is one 64-bit beat per cycle, about 1.6 GB/s at
200 MHz. Three testbenches measure it on a continuous stream:

| testbench | stream | objects | measured |
|---|---|---|---|
| `tb_avro_accel` | car objects, one per buffer | 400 | 1.000 beat/cycle |
| `tb_yahoo_workload` | 3.6 MB of Yahoo ad events, one in three a view | 48,460 | 1.000 beat/cycle |
| `tb_riot_workload` | 1.5 MB of SenML messages, 8 measurements each | 12,000 | 1.000 beat/cycle |

`rr_merger` takes one result per cycle. At one beat per cycle, the stream
must therefore carry at least 8 bytes per object on average, length fields
included, or the result path becomes the limit. All three streams above
meet that easily.

## What is not here

The evaluation platform around the accelerator is outside this RTL: the DMA
engines, crossbar, ARM CPU, RAM, 10G network, PCIe and NVMe interfaces, and
the join and window accelerators of later pipeline stages. The stream ports
of `avro_top` are where a DMA engine would connect. The schema/query
generator is also absent: the three PPS modules are written out by hand, in
the form the generator would produce. Avro `null` and `array` types are not
supported, which matches the published block set. Neither are negative map
block counts.

Other departures from the published design:

* Only the wire format is decoded. Avro's object container format, named as
  another possible wrapper, has no decoder here.
* The published text suggests splitting the 4-byte length into a 3-byte
  length and a 1-byte object count, so that buffers with several objects
  could be put back in order. That variant is not built. The length field is
  read as a plain 32-bit length, and the buffer-end tag above serves the
  same purpose without changing the format.
* The output is one tuple per AXI-Stream beat, as wide as the tuple (64, 192
  or 160 bits). A narrower output bus would need a width converter after
  `rr_merger`.
* String comparisons in a selection compare the 32-byte registers as whole
  words. A string longer than 32 bytes keeps only its last 32 bytes, so two
  long strings that differ only in their leading bytes compare equal.

## Simulation

All files are SystemVerilog-2017 and need no macros. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/avro_pkg.sv tb/avro_tb_pkg.sv tb/tb_avro_top.sv --top-module tb_avro_top
./obj_dir/Vtb_avro_top
```

* `tb/avro_tb_pkg.sv` is an independent reference Avro encoder. It writes
  varints, fixed and float fields, strings, the three object types, the
  wire-format framing and 64-bit beats with optional empty lanes.
* `tb/axis_port.sv` plays the DMA side. It sends beats with random idle
  cycles, applies random or held output back-pressure, and compares output
  tuples in order.
* There is one testbench per block (`tb_<module>.sv`). They check each value
  and the cycle in which `out_valid` or `res_valid` must appear.
* `tb_avro_top` runs the whole design at its default sizes. It sends 300
  buffers through each of the three accelerators; about a quarter of the car
  buffers hold two objects. Every tuple is checked, in order, against a
  reference query evaluation. The test also confirms that each mechanism
  occurred: selection discards, input stalls, output back-pressure, end
  markers, two-block maps, wrong union branches, missing keys and buffers
  with several objects. It runs in about fifteen seconds.
* `tb_yahoo_workload` and `tb_riot_workload` run one accelerator each on a
  benchmark-sized stream: 3.6 MB of Yahoo ad events and 1.5 MB of SmartCity
  sensor messages. They check every output tuple and the input rate. The
  plusarg `+nbytes=N` changes the stream size.

## Adapting to another schema

To handle another schema, write a new `*_pps` module in the same pattern:

1. Instantiate one controller per record, map and union.
2. Instantiate one elementary block per leaf field.
3. Connect `child_valid`/`child_done` (or `kv_*`, `br_*`) to the children's
   `in_valid`/`out_valid`.
4. Add stage-1 registers for the queried fields, and put the selection
   between stage 1 and stage 2.

Then add its tuple width to `avro_pkg` and a branch to the `SCHEMA` generate
case in `avro_accel`. The maximum string length is
`avro_pkg::STR_MAX_BYTES` (32). The channel count and FIFO depths are
parameters of `avro_accel` and `avro_top`.
