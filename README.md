# Internal Interface (II) in SystemVerilog

The Internal Interface is a way to give an FPGA a register and memory map
without writing the address decoder by hand. A designer writes a list of
records: words, bit fields, memory areas, and the pages and vectors that
group them. Each record has a width, a repeat count and access rights. From
that list and the two bus widths, an *implementation table* is computed at
elaboration. The table fixes every record's addresses and where its bits sit
in one flat *interface vector*. A generic core serves a simple asynchronous
bus from that table. Small connection modules give the user logic each
record's data and access strobes. If the data bus is made narrower or wider,
or a record is added, the whole map is laid out again. No decoder code
changes.

This repository holds:

- the table builder, written as SystemVerilog constant functions;
- the core and the three kinds of connection module;
- the standard's 13-record test peripheral;
- a bus controller that runs the access cycle;
- a top level, `ii_system`, that puts the controller and the peripheral on
  one shared data bus.

Everything is synthesizable. The defaults are the standard's example: 4
address lines, 4 data lines and 8-bit test words.

## The bus and its access cycle

The II bus is asynchronous. It has no clock, only four active-low control
lines:

| signal | meaning |
|---|---|
| `II_resetN` | low clears the interface's internal registers, asynchronously |
| `II_operN` | low while an access is running |
| `II_writeN` | low = write cycle, high = read cycle |
| `II_strobeN` | falling edge: the address is valid; rising edge: the write data is valid, and registers take it |

There is also `II_addr[II_ADDR_WIDTH]`. Inside the FPGA the data bus is split
into `II_data_in` and `II_data_out`. On the board the two halves are one
bidirectional bus. `ii_data_buffer` drives that bus only while `II_operN` is
low and `II_writeN` is high, which is a read cycle.

The controller `ii_master` runs the cycle in eight steps:

1. Set up the address, write data and `II_writeN`.
2. `II_operN` falls.
3. `II_strobeN` falls.
4. The peripheral drives its read data.
5. `II_strobeN` rises, and the write is taken.
6. The controller samples the read data, and `II_operN` rises.
7. The peripheral releases the bus.
8. The address is released and `II_writeN` goes back high.

Each phase has its own parameter, in clocks:

| parameter | phase | default |
|---|---|---|
| `T12` | steps 1 to 2 | 3 |
| `T23` | steps 2 to 3 | 2 |
| `T35` | steps 3 to 5 | 3 |
| `T56` | steps 5 to 6 | 3 |
| `T68` | steps 6 to 8 | 2 |

The defaults assume a 100 MHz clock. The standard suggests 20-25 ns for
steps 1-2, 15-20 ns for 2-3, 20-30 ns for 3-5, 20-25 ns for 5-6 and 10-20 ns
for 6-8. The defaults round each of these up to whole clocks.

One access takes `1+T12+T23+T35+T56+T68` = 14 clocks from request to the
`done` pulse. The host side is synchronous:

- Raise `req` with `we`, `addr` and `wdata` while `busy` is low.
- `done` pulses for one clock at the end of the access.
- `rdata` holds the last value read.

The controller drives the data bus only during write cycles. Assertions
check two rules:

- the strobe is low only inside an operation;
- `II_writeN` does not change during one.

## Declaring an interface: records

A record, `ii_decl_t` in `ii_pkg`, has these fields:

- a type: `VII_PAGE`, `VII_VECT`, `VII_WORD`, `VII_BITS` or `VII_AREA`;
- an identifier;
- `width` and `number`: bits, and copies, or for an area the number of
  memory cells;
- the identifier of its parent group;
- a write right: `VII_WACCESS` or `VII_WNOACCESS`;
- a read right:
  - `VII_RNOACCESS`;
  - `VII_REXTERNAL`: the data lives in user logic outside the interface, and
    the interface only passes it through;
  - `VII_RINTERNAL`: the interface keeps a register and reads it back. This
    needs the write right.

The helper `ii_decl(...)` builds a record. A list is an array of up to
`II_MAX_ITEMS` = 32 records, passed to every module as the parameter `DECL`,
with `N_ITEMS` saying how many are used.

There are two grouping records:

- **PAGE** gives its members a common address prefix.
- **VECT** packs its BITS members into shared data words.

A group must be declared before its members.

A list that cannot be built stops elaboration with an `$error`. There are
four cases:

- a bit field wider than the data bus;
- pages that do not fit in the address space;
- internal read without the write right;
- a memory area declared as internally read.

## How the table is laid out (`ii_pkg::ii_build`)

This part of the design is the least obvious. It runs entirely at
elaboration. Each physical record gets an address block and one or two
vector slots.

**WORD.** A word is cut into bus-wide partitions, one address each. The
least significant partition is at the lowest address. The `number` copies
follow one another. An 18-bit word on an 8-bit bus takes 3 addresses per
copy, and the top partition holds 2 bits.

**BITS in a VECT.** The fields of one VECT are packed into data words from
bit 0 upwards, in declaration order. A field that does not fit in what is
left of the current word starts the next word. One address reads a whole
word of fields. Each field is shifted to its own bit position on the data
bus.

**AREA.** An area is an external memory of `number` cells of `width` bits.
The memory word is cut into bus-wide *sub-areas*:

- the low address lines select the cell;
- the lines above them select the sub-area, least significant partition
  first;
- the whole block is aligned to its own power-of-two size.

A 20-bit memory of 4 cells on an 8-bit bus uses 2 cell lines and 3
sub-areas. That is a block of 16 addresses.

**PAGE.** Each page is laid out from address 0. The largest page sets how
many low address lines a page uses. The lines above them number the pages.

**Vector slots.** Slots are handed out in declaration order:

- a writable record gets a *write slot*;
- an externally read record gets a separate *read slot*;
- an internally read record reads back its own write slot.

A WORD or BITS slot has `width*number` bits. An AREA slot has
`min(width, II_DATA_WIDTH)` bits, because only one sub-area is on the bus at
a time.

Entry `II_MAX_ITEMS` of the table describes the interface itself:

- the data width;
- the address width;
- the vector length;
- the highest address the map reserves.

`ii_locate(entry, addr, dw)` tells, for one address, whether it reaches a
record. If it does, it also gives the bit offset inside the record's slot,
how many bits are on the bus, and at which bus bit they start. The core and
the connection modules use it in their decoders.

## The core (`ii_core`)

The core keeps three vectors, each as long as the table's vector:

- **`vec_int`** holds the internally read records. On the rising edge of
  `II_strobeN` in a write cycle (`II_operN` low), the addressed bits take
  `II_data_in`. `II_resetN` low clears them. No other bit of this vector is
  ever a flip-flop.
- **`vec_all`** holds all interface data. It is the OR of three things:
  - `vec_int`;
  - the bus write data, placed in the addressed write slot of an external
    record while `II_operN` is low;
  - `vec_ext`, the read data that the user's connection modules put into
    their read slots.

  The write data follows the address and `II_operN` only, so it is also
  visible during a read cycle. The read and write paths are independent. The
  user logic decides when to take the data, using the save window.
- **`vec_ena`** is the access vector. It holds 1 on the bits the current
  cycle reaches:
  - write slots of external records during a write;
  - read slots during a read.

  Internally read records only report reads.

`II_data_out` is a multiplexer over `vec_all` driven by the address. It does
not depend on `II_operN` or `II_writeN`. Addresses with no readable record
return 0.

## Connection modules

There is one instance per record copy. Each takes the same `DECL`, the
record's `ID`, and `POS`, the copy index. With `POS = -1` an instance covers
all copies of the record at once. Its data and per-bit signals are then
`width*number` bits wide, with copy 0 in the lowest bits.

- **`ii_word_conn`**:
  - `put_vec`: external read data placed in the read slot. OR all `put_vec`
    outputs into `vec_ext`.
  - `data_out`: the write slot, that is, the register value, or the bus data
    of the running write.
  - Per-bit `read_ena`, `write_ena` and `enable`: `enable` is the read or
    the write enable, chosen by `II_writeN`. Because these are per bit, they
    show which partition of a wide word the address reaches.
  - `save`: `write_ena` while the strobe is low, the window in which an
    external register loads.
  - `cur_out`: the bus data on the bits being written, and the register's
    present value elsewhere.
- **`ii_bits_conn`** works the same way, with single-bit enables. A bit
  field is never split.
- **`ii_area_conn`**:
  - `enable`, `read_ena`, `write_ena`;
  - a `strobe` window, split into `write_str` and `read_str`.

  The memory takes its cell address and write data straight from the bus.
  Read data can be given two ways, as `data_in` or `mdata_in`:
  - `data_in`: the addressed sub-area, already selected by the user;
  - `mdata_in`: the whole memory word. The module then picks the sub-area
    that the upper address lines select.

## The test peripheral (`ii_test`)

`ii_test` is the standard's example: 4 address lines, 4 data lines and
`TEST_WIDTH` = 8. Its map, with the default parameters:

| address | record | content | vector bits (write / read) |
|---|---|---|---|
| 0 | WORD_CHK | read-only check code of the table | – / 3..0 |
| 1 | WORD_STAT | read-only constant `STAT_VALUE` = 6 | – / 7..4 |
| 2, 3 | WORD_INT copies 0, 1 | internal 4-bit registers | 11..8, 15..12 |
| 4, 5 | WORD_EXT | external 8-bit register, low nibble at 4 | 23..16 / 31..24 |
| 6 | VECT_INT: BITS_INT1 (bits 1..0), BITS_INT2 (bit 2) | internal bit fields | 33..32, 34 |
| 7 | VECT_EXT: BITS_EXT1 (bit 0, write only), BITS_EXT2 (bits 2..1) | external bit fields | 35, 37..36 / 39..38 |
| 8-11, 12-15 | AREA_EXT | 3-cell 8-bit memory: low nibble, then high nibble | 43..40 / 47..44 |

Addresses 0-7 are page PAGE_REG and 8-15 are page PAGE_AREA. The vector is
48 bits long.

The check code is the sum, modulo 2^`II_DATA_WIDTH`, of these table fields:

- the identifier, widths, counts, access types, slot positions and
  addresses of every physical record;
- the interface entry: data width, address width, vector length and
  highest used address.

The fields are counted as follows:

- A missing slot counts as -1.
- Access types count by their encoding:
  - write: no access 0, access 1;
  - read: no access 0, external 1, internal 2.
- The address-length field depends on the record type:
  - for a word, the addresses per copy;
  - for a bit field, its bit offset in the data word;
  - for an area, its number of sub-areas.

For this list the sum is 639, so the code is F. Software can compare the
code with the one it computes from its own copy of the list.

## Top level (`ii_system`)

`ii_system` connects `ii_master`, `ii_data_buffer` and `ii_test`. Its ports
are:

- the host interface;
- every user-side signal of the test peripheral;
- a copy of the bus lines, `bus_*`.

The shared data bus is modelled two-state:

- the driving side sets it;
- it reads 0 when nobody drives;
- an assertion forbids both sides driving at once.

The peripheral's pad input is taken from the controller's driver, not from
the merged bus. It therefore reads 0 during its own read cycles. This keeps
the model free of a combinational loop.

## Where this design departs from the standard, or fills gaps

- **Word partition order.** One sentence of the standard places partitions
  "from the most significant" at increasing addresses. Its layout tables and
  its example put the least significant partition first. This design follows
  the tables.
- **AREA slot width.** One passage reserves a full `width` of bits for an
  area. The example's table gives a bus-wide slot and a 48-bit vector. This
  design follows the example.
- **Highest address.** The example's prose calls 13 the highest address
  used. The table gives 15, the end of the last page's reserved block. The
  interface entry holds 15.
- **Check code formula.** The standard names a check-code function but gives
  no formula. The sum above is this design's own. It gives F for the
  example, where the standard's example shows D.
- **Write retransmission in read cycles.** External write slots are gated by
  `II_operN` and the address only. The example's waveform shows the written
  data on the external register's output during the read pass too.
- **Registered records report reads only.** `write_ena` and `save` are 0 for
  internally read records, as the standard says.
- **Read data when nothing drives.** The core outputs 0, not high impedance.
  Tri-stating is left to the pad buffer.
- **`II_writeN` polarity.** One step of the cycle description has the
  polarity reversed. The bus definition is followed: low = write.
- **Example data.** The prose of the example simulation quotes different
  data values from the waveform. The testbenches use the waveform's values:
  address *a* is written with 3*a*+15 mod 16.
- **Missing copy.** The example entity lists ports for a second copy of
  WORD_EXT, but the record is declared with one copy. Those ports are left
  out.
- **Not carried.** Record names, functional types and descriptions are only
  for monitoring software, so they are not carried.
- **Own choices.** The controller's phase lengths, the 100 MHz clock, the
  host request interface and the 32-record list limit are this design's
  choices.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. The package must be read first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/ii_pkg.sv \
    tb/ii_system_tb.sv --top-module ii_system_tb -o sim
./obj_dir/sim
```

Replace `ii_system_tb` with any other testbench:

| testbench | what it checks |
|---|---|
| `ii_core_tb` | the table of the example field by field. It also checks the layout examples: an 18-bit word, packed bit fields, a 20-bit memory, three pages on 8 address lines. Then bus traffic: writes, reads, random traffic, reset. |
| `ii_test_tb` | the example peripheral through a full write-then-read pass over all 16 addresses. It compares registers, enables, save and strobe windows and read data in every phase, then runs random traffic. |
| `ii_test_wide_tb` | the same 13-record list rebuilt for an 8-bit data bus. Each word now takes one address, the memory moves to addresses 8-11, the vector is 72 bits and the check code is 65h. The testbench has external register and memory models and checks every address and random traffic. |
| `ii_word_conn_tb`, `ii_bits_conn_tb`, `ii_area_conn_tb` | the connection modules, against random vectors |
| `ii_data_buffer_tb` | bus direction |
| `ii_master_tb` | every phase length, the 14-clock access time, read sampling |
| `ii_system_tb` | end to end at the default sizes |

In `ii_system_tb` the testbench provides behavioural models of the external
8-bit register, the external 2-bit register and the 3×8 memory. Each access
must take 14 clocks. The testbench counts each mechanism and fails if any
never happens:

- internal write;
- write without right;
- save of each half of the wide register;
- external read;
- bit-field read;
- read of a write-only field;
- memory write and read;
- peripheral bus drive;
- reset.

## Using it for another map

1. Write a function that returns an `ii_decl_list_t`, modelled on
   `ii_test_decl`.
2. Instantiate `ii_core` with it, along with one connection module per
   record copy.
3. OR their `put_vec` outputs into `vec_ext`.

The table, address decoding and read multiplexer follow from the list and
the bus widths. Lint warnings about unused bits of function arguments in
`ii_pkg`, and about unconnected connection-module outputs, are expected.
