# Vector element movement for the memory path of a decoupled vector unit

A vector processor keeps each vector register spread over several lanes.
Each lane's slice sits in a register file split into several banks. Memory
wants something else: whole cache lines, with every element at the byte its
address gives. For strided and indexed accesses that address can be far from
where the element sits in the register.

This RTL is the part of a vector load/store unit that moves elements between
those two layouts. It is built for a decoupled vector unit, where memory
instructions have a datapath of their own, separate from arithmetic. It has
two paths:

- **Store path.** Each lane reads the source register out of its register
  file slice. A central Store Management Unit (SMU) collects the lanes' words
  and builds, for every store request, the 64-byte L2 line that goes to
  memory. A request can be unit-stride, strided (positive, negative or
  stride ≥ 64 bytes) or indexed.
- **Index path.** For indexed (gather/scatter) accesses, each lane reads the
  index register the same way. A central Index Management Unit (IMU) hands
  the address generator one sign-extended 64-bit index per handshake.

The main configuration has:

- 4 lanes.
- ELEN = 64-bit elements at most.
- 5 register-file banks per lane.
- 40 physical vector registers.
- 512-bit L2 lines.
- 2-entry lane buffers.

Four things are outside this datapath: the address queue that starts and ends
instructions, the request queue that cuts instructions into per-line
requests, the address generator, and the L2/interconnect. Their signals are
the top's ports. The register file is filled through a plain write port. In a
full vector unit, the load and arithmetic paths do that.

## Files

| file | contents |
|---|---|
| `rtl/vlsu_pkg.sv` | all sizes, struct types, the register-file mapping functions |
| `rtl/vrf_slice.sv` | one lane's register file: 5 banks, line reads, shuffle, arbiter |
| `rtl/store_buffer.sv` | per-lane 3-stage reader of the store's source register |
| `rtl/index_buffer.sv` | the same reader for the index register |
| `rtl/pkg_line_buffer.sv` | 64-byte circular collection buffer shared by SMU and IMU |
| `rtl/smu.sv` | Store Management Unit: buffer plus the line-building datapath |
| `rtl/imu.sv` | Index Management Unit: buffer plus index select and sign extension |
| `rtl/vlsu_mem_datapath.sv` | top: 4 lanes of (VRF slice, store buffer, index buffer), one SMU, one IMU |
| `tb/tb_*.sv` | one self-checking testbench per module, plus an end-to-end one for the top |

## How a register is laid out

This layout underlies everything else, so it comes first.

**Cells.** A lane holds `CELLS_PER_REG = VLEN / (N_LANES*ELEN)` 64-bit cells
of each register. With the chosen VLEN of 4096 bits, that is 16 cells.
Registers are stored back to back in a lane-local linear cell space:

```
linear cell a = preg * CELLS_PER_REG + c      (c = cell within the register)
bank          = a % N_BANKS
row           = a / N_BANKS
```

**Lines.** A line is `N_BANKS` consecutive cells of a register. A line read
touches each bank exactly once, so all five banks are read in the same
cycle. This is why there are five banks: the file behaves like a 5-port
memory for a line read. A register whose first cell is not in bank 0 (for
example preg 1 starts at cell 16, which is in bank 1) has lines that span two
rows. Each bank then needs its own row address:

```
vrf_addr[b] = vrf_mapping(preg, b) + line_offset
vrf_mapping(preg, b) = row of the first cell of preg that lives in bank b
```

**Shuffle.** The banks return cells in bank order. The slice rotates them
back into cell order before returning the line:

```
cell j of the line = bank (first_bank(preg) + j) % N_BANKS
```

`vrf_mapping` and `first_bank` are functions in `vlsu_pkg`.

A small worked example uses 12 cells per register instead of the default 16,
which keeps the numbers small. Register 1 then starts at linear cell 12,
which is bank 2, row 2. Its first line is made of:

- cells 12, 13 and 14, in banks 2, 3 and 4 of row 2;
- cells 15 and 16, in banks 0 and 1 of row 3.

So `vrf_mapping` is (3, 3, 2, 2, 2) for banks 0 to 4. Line 1 of the register
adds 1 to each, reading rows (4, 4, 3, 3, 3). The shuffle then puts bank 2's
cell first.

**Packages.** Everything downstream of the lanes sees the register as one
byte stream, in vector order. Package k is one 64-bit word from every lane,
lane 0 lowest: 256 bits, covering stream bytes 32k to 32k+31. A "VRF line"
across all lanes is therefore 4 × 5 × 8 = 160 bytes.

**Row offset.** An instruction that does not start at element 0 (a non-zero
`vstart`) gets two values from the address queue:

- a *line offset*: the first register line the lane buffers read;
- a *row offset*: the byte within that 160-byte line where the first valid
  element sits.

The lane buffers start at the line. The SMU/IMU skip the bytes before the row
offset.

## The lane buffers (store buffer, index buffer)

Each lane has a store buffer and an index buffer. They are the same design
under different names, and each is a three-stage pipeline.

1. **comb stage.** Holds the physical register and line offset of the next
   line. A start loads them. Each granted register-file request moves to the
   next line.
2. **VRF stage.** Puts the five per-bank row addresses on the request. The
   slice answers a grant with the shuffled line one cycle later.
3. **buffer stage.** Two entries, each one line (5 words). It is written a
   whole line at a time and read one 64-bit word at a time by the SMU or IMU.
   `valid` means "not empty".

Stalls:

- **No grant.** If the slice does not grant the request (the other buffer of
  the lane won), the comb stage keeps its line and asks again.
- **Buffer full.** If the buffer cannot take a whole line, the VRF stage holds
  its line. No new request is made while it holds, because a line granted in
  that cycle would have nowhere to go. "Full" therefore means "less than one
  free line". Both of these rules are this design's choices.

The first word reaches the output two cycles after the first grant. After
that, one line can be read per cycle as long as there is room.

The buffers do not count lines. They keep streaming until their end signal
clears all three stages. For stores, that signal is the SMU's end-of-store
pulse. For indexes, it is the address queue's end signal. A start in the
same cycle as an end wins.

**Arbitration.** The slice's arbiter gives a lane's banks to one requester
per cycle, with a fixed priority: the index buffer first. The priority order
is this design's choice.

## The collection buffer of the SMU and IMU

Both central units keep the incoming packages in a 64-byte circular byte
buffer (`pkg_line_buffer`). It holds two 32-byte entries, which is exactly
one L2 line. Stream byte i always goes to slot i mod 64. A package therefore
lands on exactly one entry and never needs a shifter. Only the byte-enable
mask changes.

**Start.** The write and read pointers both start at `row mod 64`.

- *Drop.* A whole package that lies before the row offset is acknowledged
  without being written, and the remaining offset drops by 32.
- *Mask.* In the first package that is kept, the bytes below the offset are
  masked off.

**Write.** Each cycle writes min(bytes left in the package, free bytes). The
package is acknowledged only in the cycle that writes its last bytes. A
package that does not fit is therefore taken in two parts, and the lane
buffers keep offering it until the acknowledge.

**Read.** The owner checks that enough bytes are buffered, then consumes a
byte count from the read pointer. The end of an instruction empties the
buffer.

## Building a store line (SMU)

The hardest part of the design. The SMU holds one request at a time. A
request carries:

- `vsew`: the element width, 1, 2, 4 or 8 bytes.
- `elem_cnt`: how many elements go into this line.
- `elem_offset`: the byte position of the first element in the line.
- `stride`: signed, in bytes.
- `opmode`: unit-stride, strided or indexed.
- `kill` and `last`, plus `tag`, `vmot_id` and `line_mask`, which are copied
  to the response unchanged.

**When it answers.** The request is answered once
`elem_cnt << vsew` bytes are in the buffer. A killed request is answered at
once, and its data are meaningless. The line is built by four combinational
stages, which run in the same cycle the response is offered.

**1. Barrel shifter.** Rotates the 64-byte buffer right by the read pointer,
so the request's first byte becomes byte 0. The rotation is six 2:1 mux
stages, one per bit of the pointer (32, 16, 8, 4, 2 and 1 bytes). Bytes past
the request's byte count are then zeroed, so the following stages only move
the request's own bytes. The zeroing is this design's choice.

**2. Strider.** Spreads the elements for strided stores. Element e moves to
element slot `e * s`, where

```
s = max(1, min(|stride|, 64) / SEW)     for strided
s = 1                                    for unit-stride and indexed
```

Example: 32-bit elements with a 12-byte stride give s = 3, so elements land
at bytes 0, 12, 24 and so on. A stride of 64 bytes or more is saturated at
64. With saturation, only one element fits in the line, which is what the
request queue sends for such strides. Elements that would land beyond the
line are dropped. In hardware this is one multiplexer per output element
position, choosing among the inputs that can reach it.

**3. Shifter.** Shifts the line left (toward higher bytes) by `elem_offset`
bytes, which places the first element at its address within the line.

**4. Inverter.** For a strided store with a negative stride, the elements go
to decreasing addresses. The request queue describes such a line from its
low end. The inverter reverses the order of the SEW-sized elements across
the whole line: element slot q goes to slot `64/SEW - 1 - q`. Bytes within an
element keep their order.

The response is valid until it is acknowledged. On the acknowledge, the SMU
consumes the bytes from the buffer. If the request was `last` or `kill`, the
instruction ends in that same cycle:

- the buffer is cleared;
- `stbf_sync_end_o` pulses for one cycle and resets the store buffers of all
  lanes.

This pulse is combinational with the acknowledge, which is this design's
choice.

## Handing out indexes (IMU)

The IMU uses the same collection buffer. The row offset, dropping, masking
and partial writes all work the same. Its output datapath has two stages:

1. Shift the buffer so that the byte at the read pointer becomes byte 0,
   filling with zeros.
2. Sign-extend the low SEW bytes to 64 bits.

An index is offered whenever an instruction is active and at least SEW bytes
are buffered. Each acknowledge consumes SEW bytes. The address queue ends
the instruction. It is the only unit that knows when the address generator
has all the indexes it needs.

## The top (`vlsu_mem_datapath`)

The top holds four lanes. Each lane has a `vrf_slice`, a `store_buffer` and
an `index_buffer`. One `smu` and one `imu` serve all four lanes.

- **Lock step.** A package is offered to the SMU (or IMU) only when all four
  lanes have a word, and the one acknowledge goes to all four lanes at once.
  The lanes therefore stay in step.
- **Resets.** The store buffers are reset by the SMU's end-of-store signal,
  which is also an output of the top. The index buffers and the IMU are reset
  by `idx_mqueue_sync_end_i`.
- **Concurrency.** A store and an indexed instruction can run at the same
  time. They then compete for the register file banks of every lane.

**Latency of a store.** Counting from the cycle after the start:

1. The first line is granted.
2. It is in the VRF stage's output.
3. It is in the lane buffers, and its first package is offered to the SMU.

A request can be answered from the cycle after its last byte is written into
the SMU.

## Departures and own choices

These are the points where the design is this RTL's own choice rather than
taken from a specification:

- **VLEN = 4096 bits.** This gives 16 cells per lane per register, 128 rows
  per bank and 7-bit row addresses. Only `VLEN` in `vlsu_pkg` has to change
  for another size. `N_PREGS * CELLS_PER_REG` must stay a multiple of
  `N_BANKS`, or the last row is only partly used.
- **Arbiter and write port.** The register-file arbiter has only the two
  memory-path requesters, with a fixed priority. A single write port stands
  in for the load and arithmetic writers.
- **Lane-buffer stall rules.** The buffer counts as full when it has room for
  less than one line. The request is withheld while the VRF stage holds.
- **SMU line details.**
  - Bytes past a request's count are zeroed.
  - Stride 0 (not a supported stride) is treated like unit spacing, so it
    still gives a defined line.
  - The inverter acts only in strided mode.
- **One request at a time.** The SMU takes a new request only after the
  previous response has been acknowledged.
- **Immediate end pulse.** `stbf_sync_end_o` is raised in the cycle of the
  last response's handshake.
- **Id widths.** The request-queue tag is 4 bits and the `vmot_id` is 3 bits.
- **`elem_id` unused.** The SMU carries a request's `elem_id` but does not
  use it. Requests arrive in element order, so the buffer's read pointer is
  already at that element.

Not built:

- the load path (load management unit and load buffers);
- mask handling;
- the address queue and request queue;
- the address generator;
- the reorder buffer;
- the front end;
- the L2 interface.

## Verification

Every module has a self-checking testbench in `tb/`. Each works out its
expected values independently of the RTL.

- **`tb_vrf_slice`.** Fills the banks with random data and issues random line
  reads on both ports. The expected row of every cell comes from the cell
  numbering alone. It checks the grant order and the shuffled data.
- **`tb_store_buffer` and `tb_index_buffer`.**
  - A testbench register-file model grants at random.
  - The output side applies random backpressure.
  - Every word is checked against the linear-cell formula.
  - It checks the two-cycle first-word latency.
  - It requires that both kinds of stall occurred.
- **`tb_smu`.**
  - Builds every expected line byte by byte from the request fields.
  - Covers all SEWs, positive, negative and ≥ 64-byte strides, unit-stride,
    indexed, kills, dropped packages and waiting for data.
  - Uses random gaps on the package input and random backpressure on
    responses.
  - Also checks the end-of-store pulse, and that no response comes before its
    bytes arrived.
  - Ends with one hand-worked request: SEW 32, stride −12 bytes, first
    element 10, elem_offset 8 bytes. Elements 10 to 14 must land in 32-bit
    slots 13, 10, 7, 4 and 1 of the line.
- **`tb_imu`.** Random SEW and row offsets. Checks every index against a
  directly sign-extended reference, and requires negative indexes of every
  width.
  It also replays a fixed sign-extension table: the pattern
  `0FF00FF0F0F00FF0` must give `FFFFFFFFFFFFFFF0` at SEW 8,
  `0000000000000FF0` at SEW 16, `FFFFFFFFF0F00FF0` at SEW 32, and itself at
  SEW 64.
- **`tb_vlsu_mem_datapath`.** The full-size top with no parameter changes.
  - Fills all four register-file slices and runs random stores and indexed
    instructions at the same time.
  - Checks every store line and every index against a model of the register
    contents.
  - Counts each mechanism and fails if any never happened: lost register-file
    arbitration,
    buffer-full holds, dropped packages in the SMU and IMU, partial package
    writes, waits for data, negative and saturated strides, kills,
    end-of-store pulses and negative indexes.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` at the end and has
a cycle watchdog.

## Simulating

The package must come first. Everything else can be in any order.

```
verilator --binary --timing --assert --top-module tb_vlsu_mem_datapath \
    rtl/vlsu_pkg.sv rtl/pkg_line_buffer.sv rtl/vrf_slice.sv rtl/store_buffer.sv \
    rtl/index_buffer.sv rtl/smu.sv rtl/imu.sv rtl/vlsu_mem_datapath.sv \
    tb/tb_vlsu_mem_datapath.sv
./obj_dir/Vtb_vlsu_mem_datapath
```

For a single block, swap in its testbench and top module name, for example
`--top-module tb_smu ... tb/tb_smu.sv`. Each testbench runs in well under a
second.

To resize the design, edit the constants in `vlsu_pkg`. All modules and
testbenches take their sizes from there. Lane count, bank count, ELEN, VLEN
and buffer depth are all parameters of the package.
