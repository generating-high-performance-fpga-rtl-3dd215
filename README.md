# Fletcher-style Arrow accelerator infrastructure in SystemVerilog

Apache Arrow stores a table column by column. Each column is a set of plain
memory buffers: a values buffer, an offsets buffer for variable-length fields
such as strings, and a validity bitmap for nullable fields. A kernel on an
FPGA would rather work with "rows 3 to 402 of column `name`" than with byte
addresses, bus bursts and word alignment. This design is the layer that does
that translation.

- A kernel sends a command holding a range of row indices.
- Hardware readers fetch the Arrow buffers over a wide burst bus and turn
  them into ready/valid streams of typed elements.
- Hardware writers do the reverse for result tables.
- The host sets buffer addresses and row ranges through 32-bit AXI4-lite
  registers, starts the kernel and polls until it is done.

The top level, `fletcher_top`, has two parts side by side:

1. **The Mantle for the "dinner" example.**
   - Input table `foods`: `id` uint16 and `name` string.
   - Input table `people`: `name` string, `age` uint8 and `food_id` uint16.
     `people.id` exists but has no hardware.
   - Output table `dinner`: `name` string and `food` string.
   - The kernel writes out every person younger than a programmable
     `age_threshold`, together with the name of their favourite food.
2. **Three ArrayReaders for a small example schema.**
   - A: nullable float32.
   - B: UTF-8 string.
   - C: struct of int16 E and float64 F.
   - They show the Null, List and Struct reader configurations. Each has its
     own command, unlock and bus ports.

The memory, the platform shell (the vendor wrapper that connects to DRAM or
host memory) and the host software are outside the design. Their signals are
ports of the top level.

## Streams and the bus

Every internal connection is a **ready/valid stream**:

- A transfer happens in any cycle in which both `valid` and `ready` are high.
- `valid` never depends on `ready`.
- Once `valid` is raised, the data holds until the transfer.

Data streams can be **multiple-element-per-handshake (MEPH)**:

- A beat carries up to `EPC` elements.
- A `count` field says how many of them are valid.
- `last` marks the end of a packet: a string, or a whole command.

With `EPC=1` a character stream moves one character per cycle. With `EPC=4`
the same strings take about a quarter as many beats. `EPC` is a parameter of
the top level. It is 1 by default and the unit testbenches also run 4.

The **memory bus** (`fletcher_pkg`) is AXI4-like:

- Independent request and data channels, each a ready/valid stream.
- 64-bit byte addresses, 512-bit data words and an 8-bit burst length field.
  A burst is 1 to 16 beats.
- Read data returns in request order, with `last` on the final beat of each
  burst.
- Write data carries a 64-bit byte strobe. There is no write-response channel.

Arrow buffers must start on a 64-byte boundary. This matches Arrow's
recommended alignment, so a buffer never starts in the middle of a bus word.
Bursts are not split at 4 KiB page boundaries. A platform that needs that
would have to split them.

## BufferReader: from a row range to aligned elements

`buffer_reader` is the heart of the design, and the subtlest part.

**Command and unlock.**

- A command gives an element range `[first_idx, last_idx)`, a buffer base
  address and a tag.
- When the last element of the range has left the reader, it returns the tag
  on the *unlock* stream.
- It handles one command at a time.

**Request generation.**

- With `E = 512/ELEM_W` elements per bus word, the range covers words
  `floor(first/E)` through `floor((last-1)/E)`. Validity bitmaps use
  `ELEM_W = 1`, so E = 512.
- Requests for those words go out in bursts of at most 16.
- The returning words wait in a 32-entry bus read buffer. That is two maximum
  bursts, so the bus is never held up by a short stall downstream.

**Alignment.**

- In the first word, the element at position `first mod E` has to become
  element 0.
- The alignment-and-count control computes a rotate amount for every word,
  plus the number of valid elements it contributes:
  - the first word gives `E - first mod E` elements;
  - middle words give `E`;
  - the final word gives whatever remains.
- `stream_barrel` rotates the word.
- `stream_reshaper` then collects the valid elements and cuts them into beats
  of at most `EPC` elements. Because the rotation removes the leading gap, the
  reshaper always starts at element 0 of its input.
- The final beat of the command carries `last`.

**Offsets mode** (`OFFSETS=1`). This is used by list and string columns.

- Row `i` of a string column has length `offset[i+1] - offset[i]`, and its
  characters are at `values[offset[i] ..]`.
- Before anything else, the offsets reader fetches the words that hold
  `offset[first]` and `offset[last]`, and sends them as one **child command**
  to the values reader. The values reader can then fetch all characters of
  the range in long bursts, without waiting for per-row offsets.
- After that the offsets reader reads `offset[first..last]` in bursts.
- It subtracts each pair of neighbouring offsets, giving one 32-bit length
  per row on its output.

If memory stalls, or the kernel does not accept elements, the read buffer
fills. New bursts are then held back, so no data is ever dropped.

## ArrayReaders: combining BufferReaders per Arrow type

| Configuration | Module | Inside |
|---|---|---|
| Prim | `buffer_reader` | One reader for fixed-width values. It is used directly, e.g. `foods.id`, `people.age`. |
| Null | `array_reader_null` | Validity reader (1-bit elements) and values reader. A `stream_sync` joins them element by element. |
| List | `array_reader_list` | Offsets reader whose child command starts the values reader. |
| Struct | `array_reader_struct` | One reader per field. A sync joins their streams into one struct stream. |

In every configuration, a `bus_read_arbiter` shares the array's single bus
port among its readers. A sync on the unlock streams signals completion only
when every reader is done.

More detail on the List reader:

- It gives the kernel a length stream and a character stream.
- Inside, a copy of the lengths goes through a FIFO to a **list cutter**.
  The cutter is a second reshaper that ends a beat at every string boundary
  and sets `last` there.
- An empty string gives one beat with `count = 0` and `last`. The kernel
  still sees every row, one to one with the lengths.
- The cutter loads the next string's length during the final beat of the
  current string. Back-to-back strings therefore stream without idle cycles.
  With an always-ready consumer, "apple" and "pear" take 9 consecutive
  cycles at `EPC=1` and 3 at `EPC=4` (2 + 1 beats, since a beat never holds
  characters of two strings).

## ArrayWriters and BufferWriters

`buffer_writer` is the mirror image of the reader:

- Elements arrive on an MEPH stream and are packed into 512-bit words.
- The first word starts at element `first_idx mod E`. Elements outside the
  written range get a cleared byte strobe, so memory around the range is left
  as it is.
- A write of 16 words is requested as soon as 16 words are buffered. A
  shorter burst follows after the input's `last`.
- The writer does not need to know how many elements will come. The output
  of a filter, such as the dinner list, is data-dependent.

In offsets mode the writer takes a stream of lengths and writes their running
sum:

- It writes `0, l0, l0+l1, ...`.
- One extra offset holding the total follows the final length.

`array_writer_list` pairs an offsets writer with a values writer behind a
`bus_write_arbiter`. The values writer gets a single command for the whole
character stream.

Writers cannot grow Arrow buffers. The host must allocate room for the worst
case.

## The Mantle and the Nucleus

The `mantle` holds:

- the `nucleus`;
- the RecordBatchReaders `rb_reader_foods` and `rb_reader_people`, and the
  RecordBatchWriter `rb_writer_dinner`. These group the ArrayReaders and
  ArrayWriters per table;
- the **read interconnect**: a 5-way round-robin `bus_read_arbiter`, a
  register slice on requests and a 4-deep buffer on read data;
- the **write interconnect**: a 2-way round-robin `bus_write_arbiter` and
  register slices on requests and data.

The `nucleus` holds:

- the `mmio` register file;
- the user `kernel`;
- two `stream_profiler`s on the `people.name` length and character streams;
- the **command accumulators**. The kernel's commands hold only row indices
  and a tag. For each of the seven fields, the accumulator adds that field's
  buffer addresses from the registers before passing the command on. The
  kernel therefore never handles a pointer.

Each field keeps its own command and unlock stream. There is no single
per-table command.

### Register map (`mantle_pkg`, byte address = 4 × index, all 32 bits)

| Index | Register |
|---|---|
| 0 | control: bit0 start, bit1 stop, bit2 reset. These bits clear themselves after one cycle. |
| 1 | status: bit0 idle, bit1 busy, bit2 done (read-only) |
| 2, 3 | result, low and high word (read-only) |
| 4, 5 | foods first and last row (last is exclusive) |
| 6, 7 | people first and last row |
| 8, 9 | dinner first row. Register 9 is unused: the kernel writes `result` rows. |
| 10/11 | foods.id values address (low/high) |
| 12/13, 14/15 | foods.name offsets and values addresses |
| 16/17, 18/19 | people.name offsets and values addresses |
| 20/21 | people.age values address |
| 22/23 | people.food_id values address |
| 24/25, 26/27 | dinner.name offsets and values addresses |
| 28/29, 30/31 | dinner.food offsets and values addresses |
| 32 | age_threshold (a custom register) |
| 33 | profile control: bit0 enable, bit1 clear |
| 34–39 | people.name length stream counters |
| 40–45 | people.name character stream counters |

Each set of six profile counters, in order:

1. elements transferred;
2. cycles with `valid` high;
3. cycles with `ready` high;
4. transfers;
5. packets (transfers with `last`);
6. cycles counted while enabled.

Comparing transfers with valid cycles and ready cycles shows which side of a
stream is the bottleneck. This is the information needed to decide whether a
field deserves a wider `EPC`.

The schema-derived registers follow a fixed order:

- Tables are sorted by name and then grouped by access mode, readers first.
  This gives foods, people, then dinner.
- Each table's row range comes first, then its buffer addresses.

## The example kernel

`kernel` is ordinary user logic, written against the stream interfaces. After
a start pulse it works in three phases:

1. **Load foods.**
   - It commands the whole `foods` range on `id` and `name`.
   - It stores up to 16 foods, each name up to 32 characters, in registers.
2. **Count.**
   - It reads `people.age` once and counts the `N` people younger than the
     threshold.
   - This count comes first because the output writer must know which dinner
     row is the last.
3. **Produce.**
   - It commands `people.name`, `age` and `food_id`, plus dinner rows
     `[dinner_first, dinner_first+N)`.
   - For each person it takes the age, food id and name length together.
   - For a match it forwards the name characters to `dinner.name`, then
     streams the stored food name to `dinner.food`.
   - A food id not in the table gives an empty food string.
   - For a non-match it drops the name characters.

When every command has unlocked, `status.done` is set and `result = N`. With
`N = 0`, no dinner command is issued. A stop or reset pulse returns the kernel
to idle at once.

## Simulating

All modules are in `rtl/`. Testbenches and the memory model are in `tb/`.
Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a cycle watchdog.

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fletcher_pkg.sv rtl/mantle_pkg.sv tb/tb_fletcher_top.sv \
    --top-module tb_fletcher_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_fletcher_top` with any other `tb_<module>` to test one block.

`tb_fletcher_top` runs the whole top level at its default parameters:

- A host model loads 4 foods and 410 people into a memory model, sets all
  registers over AXI4-lite, starts the kernel and checks the dinner table
  written back.
- It checks the result register and the profiler counters.
- It then runs again after a reset pulse, with no matches.
- It reads the three example fields and compares them row by row.

It also counts that each of these events happens at least once:

- multi-beat and maximum-length read bursts;
- arbitration contention;
- write bursts with partial strobes;
- memory stalls and kernel backpressure;
- empty names and unknown food ids;
- the zero-match path;
- null elements.

It simulates about 50 µs of bus time in seconds.

`tb_foods_name_meph` reads the four food names with one reader at `EPC=1`
and one at `EPC=4`. It checks the beat counts and the cycle counts given
above.

The unit testbenches use random valid/ready patterns and compare against
reference models written in the testbench. Where a block has more than one
width or `EPC`, the testbench runs several.

Verilator reports `UNOPTFLAT` for the arbiters and syncs. This is because a
vector of ready signals is computed from a vector of valid signals; no bit
depends on itself. It costs simulation speed only.

## Limits and departures

- **One command per reader or writer at a time, with a 1-bit tag.** This is
  enough for the example kernel. A kernel that pipelines commands would need
  deeper command handling.
- **No single command per table.** Each field takes its own command. A
  RecordBatch-level block that copies one command to all fields and merges
  their unlocks is not built.
- **No per-list padding mode in the writers.** Only the mode that writes
  lists back to back is built.
- **No write response.** Unlock means all data has been handed to the bus.
  It does not mean the data has reached memory.
- **No bus width converters.** Every reader and writer uses the full 512-bit
  bus, so the interconnect never converts widths.
- **Memory and host are outside the design.** The testbenches replace them
  with `tb/mem_model.sv` and host tasks that drive AXI4-lite.
- **The reshaper does not use the barrel.** `stream_reshaper` places elements
  with an index shift into a holding register, not with an instance of
  `stream_barrel`. The barrel is used only for alignment in the reader.
- **The profiler sits on `people.name`.** The profiling flag could also be
  placed on `foods.name`; this design profiles the people name streams, which
  carry far more data.
- **Kernel capacity.** The kernel keeps the food table in registers. It holds
  16 foods with names of up to 32 characters. Larger lookup tables would need
  a RAM, or a second pass over the data.
