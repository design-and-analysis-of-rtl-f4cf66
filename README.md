# Reconfigurable memory: an array of smart SRAM mats

Different applications want different on-chip memories: a cache for irregular
code, a software-managed scratchpad for streaming kernels, hardware FIFOs for
producer/consumer pipelines. This design builds all of them from one
substrate. The substrate is an array of identical small SRAM blocks ("mats").
Each mat adds a little logic around its array:

- a few meta-data bits per word;
- pointer registers;
- a masked comparator;
- a programmable logic array (PLA) for read-modify-write of the meta-data;
- a 2-bit link to its neighbours.

Software then decides by configuration alone what each mat is:

- A cache tag mat compares the tag on a read and keeps valid/dirty bits in the meta-data.
- A cache data mat reads or writes only when the tag mat signals a hit.
- A FIFO mat walks head and tail pointers.
- A scratchpad mat is a plain SRAM.

Two statically scheduled crossbars join the processor ports to the mats. A
one-bit-per-bus control network joins the mats to each other. Every request
has a fixed latency of four cycles from port to port.

The default configuration matches the prototype:

- two processor ports;
- four mats of 512 words;
- each word holds 32 data bits and 4 meta-data bits;
- one test vector memory per port.

## Files

| file | block |
|---|---|
| `rtl/rm_pkg.sv` | sizes, request/reply structs, opcode, configuration map |
| `rtl/rm_system.sv` | top: splitters, test vector memories, crossbars, mats, control network |
| `rtl/rm_mat.sv` | one mat: pipeline, conditions, RMW, write buffer, replies |
| `rtl/rm_sram_core.sv` | 512 x (32+4) array, meta-data second port, gang operations |
| `rtl/rm_gang_io.sv` | per-column gang set/clear decode |
| `rtl/rm_rmw_decoder.sv` | read-modify-write address pipeline and abort |
| `rtl/rm_pla.sv` | 16-term ternary-CAM / SRAM PLA |
| `rtl/rm_pointer_logic.sv` | 4 pointers with strides and the range check |
| `rtl/rm_comparator.sv` | maskable equality compare of data and meta-data |
| `rtl/rm_write_buffer.sv` | two-entry buffer for writes whose condition arrives late |
| `rtl/rm_imcn.sv` | inter-mat control network (4 segmented wired-OR buses) |
| `rtl/rm_req_xbar.sv` | request crossbar with multicast by mat-ID mask |
| `rtl/rm_rep_xbar.sv` | reply crossbar scheduled from the request crossbar |
| `rtl/rm_addr_splitter.sv` | virtual address to {mat ID, mask, mat address} |
| `rtl/rm_tvm.sv` | test vector memory: a 16-request on-chip port driver with scan chain |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.
`tb/tb_rm_system.sv` runs the whole system at its default parameters.
`tb/tb_rm_workloads.sv` runs a 16-mat system (8 x 2 array) through the
layouts used as address-splitter examples:

- contiguous and interleaved scratchpads over mats 0-3;
- a 2-way cache with tags in mats 0-1 and four-word lines in mats 8-15, with
  the lines both contiguous and interleaved;
- the power-measurement vector, which alternates compare-modify-writes with
  pointer writes while the PLA works as a 4-bit counter.
- a FIFO spanning mats 4-7, run through every mat and both pointer wraps;
- two FIFOs in one mat, one in the even words and one in the odd words (stride 2).

## The mat

### Operations

A request to a mat carries:

- a pre-decoded opcode;
- a 9-bit address field;
- a 5-bit mask: bit 0 selects the data word, bits 1..4 select the meta-data bits;
- 4 meta-data bits;
- 32 data bits.

See `payload_t` in `rm_pkg`. The opcode is a one-hot choice of five base
operations plus modifier bits:

| base | meaning | modifiers allowed |
|---|---|---|
| `rd` | read data and meta-data | `cmp`, `ptr`, `rmw`, `icond`, `xcond` |
| `wr` | write data and meta-data | `ptr`, `icond`, `xcond` |
| `gang` | set/clear whole meta-data columns in every word | `icond` (conditional gang) |
| `cfg_rd` / `cfg_wr` | read / write a configuration register | |

The modifiers:

- **`cmp`**: compares the stored word against the request's data and meta-data, under the mask.
  The reply is valid only on a match. In a multicast tag check, only the way that hits answers.
- **`ptr`**: the address field holds `{sub, upd, num}`. Pointer `num` supplies the word address.
  If `upd` is set, the pointer moves by its stride, up or down.
- **`rmw`**: after the read, the PLA computes new meta-data. It is written back two cycles later.
- **`icond`**: the operation runs only if the stored meta-data equals the request's meta-data
  under the mask.
- **`xcond`**: the operation runs only if an external bit from the control network is 1.
  The bit comes from a neighbouring mat, for example the tag mat's hit.

Gang operations put the column data in `addr[3:0]`, with `mask[4:1]` as the
column select. With `icond` set, a gang clears meta-data bit 0 in every word
whose bit 1 is set, as in clearing the valid bits of speculatively modified
cache lines. Only that one column pair is linked; the document's prototype
is limited the same way.

A reply carries:

- **`data`, `mdata`**: the word read;
- **`valid`**: data is present;
- **`match`**: the compare result;
- **`complete`**: the operation executed. This covers a condition met and a pointer in range.

### Configuration map

Configuration reads and writes use the address field as a register address:

| address | register |
|---|---|
| 0..3 | pointer values (11 bits) |
| 4..7 | pointer strides (4 bits) |
| 16..31 | PLA rows `{out[3:0], o[5:0], z[5:0]}` |
| 32 | mat control: `ext_out` sources, PLA and xcond `ext_in` selects, range check enable and range ID |
| 33 | control-network driver/receiver: bus links, `ext_in` bus selects, `ext_out` bus selects and enables |

### Pipeline and timing

A mat accepts one request per cycle and answers two cycles later:

- **T (pre-access)**:
  - Pointer operations read the pointer and form the word address.
  - The pointer update is written at the edge, so the next request already sees the new pointer.
  - Configuration registers are read and written.
- **T+1 (array access)**:
  - Read or write of the main port and gang operations.
  - The internal condition and the comparator.
  - Write-buffer search and push.
- **T+2 (output)**:
  - The registered reply is visible.
  - The external condition is applied here, because the deciding mat only knows its own result at this point.
  - For an `xcond` read, the condition gates `valid`, `match` and `complete`.
  - For an `xcond` write, it commits or drops the entry waiting in the write buffer.
  - The PLA runs on the read meta-data, the match bit and one `ext_in` bit.
- **T+3 (writeback)**:
  - The PLA result is written through the meta-data second port.
  - That port is separate from the main port, so the main port keeps accepting a new request every cycle.

### Keeping the mat coherent

This is the hardest part of the mat. Three mechanisms let a request's effect
reach the array late:

- RMW writeback (two cycles late);
- conditional writes held in the write buffer (at least one cycle late);
- gang operations, which touch every word at once.

The rule implemented is simple to state: **every request behaves as if it
executed atomically, in issue order.** The logic that enforces it is spread
over `rm_mat`, `rm_write_buffer`, `rm_rmw_decoder` and `rm_sram_core`.

Read forwarding: the meta-data a request sees is the newest of these sources,
oldest first:

1. the array;
2. a committed write-buffer entry for the same word;
3. the RMW value being written back this cycle;
4. the PLA output of an RMW in its modify cycle;
5. a write-buffer entry whose external condition arrives true in this very cycle.

Data follows the same order, limited to the write-buffer sources, since RMW
changes only meta-data.

RMW against writes:

- An ordinary write to the word during the modify cycle aborts the writeback,
  because the write is newer.
- A buffered conditional write that drains at that moment is older than the
  RMW. It does not abort it. Its meta-data is replaced by the writeback value.

Gang operations against pending work:

- A gang updates buffered entries, so a later drain does not bring back
  pre-gang meta-data.
- A gang in an RMW's modify cycle is applied to the value about to be written back.
- No drain takes place in a gang cycle.

Ordinary writes against the buffer: an ordinary write drops older buffered
entries of the same word.

Meta-data read address: the meta-data columns have their own read address, so
a request's internal condition is checked against its own word even while the
main port drains a buffered write to another word.

The write buffer has two entries. An entry waits one cycle for its condition
and then holds until the main port is free. At most one pending and one
committed entry exist at any time. A new push may take the slot that drains in
the same cycle.

`tb_rm_mat` checks all of this against a sequential model, which executes each
request completely before the next one. The check runs over four rounds of
6000 random requests per round. The requests mix:

- all operations;
- random PLA programs;
- random pointer and control settings;
- a random external condition.

Coverage counters make sure each forwarding and abort case occurs.

### PLA

The PLA is a NOR-NOR array with 16 product terms over 6 inputs: 4 meta-data
bits, the match bit and one `ext_in` bit. It has 4 outputs.

Each input trit is stored as two bits `(z, o)`:

| `z o` | matches |
|---|---|
| `00` | any input |
| `01` | input 1 |
| `10` | input 0 |
| `11` | nothing (row off) |

Output column c is 1 when a matching row has a 1 in column c. After reset every
row is off.

A 4-bit counter in the meta-data needs 10 rows. The mat testbench programs
that counter.

### Pointers

The mat has four 11-bit pointers with 4-bit strides. A pointer is 2 bits wider
than a word address. With the range check on, the mat acts only when those 2
upper bits equal its range ID. Up to four mats can then share one FIFO: every
mat receives each push and pop and keeps its pointers in step, and only the
mat that holds the word answers.

## Between mats: the control network

Four one-bit buses run along the row of mats. Each mat's bus register holds:

- a link bit per bus, which joins its segment to the next mat's, so the buses can be cut into independent groups;
- for each of its two `ext_out` bits, a bus select and an enable;
- for each of its two `ext_in` bits, a bus select.

A segment is a wired OR, written as the OR of the enabled drivers. The value
arrives in the same cycle. `ext_out` is driven from the mat's registered
outputs, so there is no combinational loop from `ext_in` through a mat back to
the network. The source is chosen per bit:

- match;
- valid;
- complete;
- one meta-data bit.

Typical use: the tag mat of a cache way drives its match onto a bus, and the
data mats of that way take it as `ext_in` and run `xcond` reads or writes.

## Between processor and mats: crossbars, splitter, test vectors

### Request crossbar

Each port sends a mat ID, a mat ID mask, a reply bit and the payload. A mat
takes the request when its number equals the ID in every bit the mask leaves
at 0. Mask bits set to 1 therefore multicast to a power-of-two group of mats,
for example every way of a cache at once.

The crossbar is registered and takes one cycle. Ports are scheduled
statically, so there is no arbitration. If two ports hit one mat in the same
cycle, the lower port wins, `xbar_conflict` rises, and an assertion fires in
simulation.

### Reply crossbar

The reply crossbar needs no arbitration either. It delays the request
crossbar's schedule by the two-cycle mat latency. For each port, it collects
the replies of the mats that port addressed:

- data and meta-data come from the one mat whose reply is valid;
- `valid`, `match` and `complete` are ORed;
- data is returned only when the request asked for a reply.

The reply crossbar is registered and takes one cycle.

Total latency:

| stage | cycles |
|---|---|
| request crossbar | 1 |
| mat | 2 |
| reply crossbar | 1 |
| **total** | **4** |

### Address splitter

The top 3 bits of a processor address select one of eight table entries per
port. Each entry describes how one logical memory is laid out over the mats:

- mat ID = `id_base + ((va >> id_shift) & (2^id_bits - 1))`;
- mat address = `addr_base + ((va >> addr_shift) & (2^addr_bits - 1))`;
- the entry's mat ID mask is used for multicast;
- optionally, the high address bits are sent as compare data (the cache tag).

A request with `hw_direct` set skips the table. Its address then holds
`{mask, id, address}`. The splitter is combinational.

### Test vector memory

Each port has a test vector memory. It holds 16 raw hardware requests
(`{valid, reply, mat ID, mask, payload}`, 66 bits) and 16 replies (39 bits).

- `run` sends the 16 requests back to back.
- `loop` repeats them.
- Replies are captured four cycles after their request, so after a burst, reply i belongs to request i.
- With `tvm_mode` set, the test vector memory replaces the splitter as the port's source.

All test vector memories form one scan chain: port 0 first, request register
then reply register. This chain loads vectors and unloads replies at low speed.

## What follows the document and what is this design's

Taken from the document:

- the mat geometry (512 x 32 + 4 meta-data bits);
- the operation set and which modifiers apply to which operation;
- the two-cycle mat pipeline and three-cycle RMW with second-port writeback;
- the abort of a writeback by a write in the modify cycle;
- forwarding of the updated meta-data to later reads;
- the PLA structure and trit coding, with 16 terms, 6 inputs and 4 outputs;
- four 11-bit pointers with 4-bit strides and multi-mat range checking;
- the maskable comparator;
- a write buffer for externally conditioned writes;
- four wired-OR control buses with configurable drivers and receivers;
- statically scheduled crossbars with multicast by mask and a fixed four-cycle latency;
- the table-driven address splitter;
- 16-entry test vector memories on a scan chain;
- two ports and four mats.

Choices of this design, where the document leaves the point open:

- the opcode encoding and the configuration address map;
- the register layouts;
- mask polarity (1 = compare or use the field);
- the one-link-bit-per-mat bus segmentation;
- the list of `ext_out` sources;
- the timing of the external condition (applied at the output stage);
- the write buffer depth (2);
- the exact forwarding order described above;
- the lowest-port-wins conflict fallback;
- the splitter table format and direct mode;
- the test vector entry layouts and scan order.

Departures and limits:

- **All four mat positions hold full mats.** The prototype used simpler test structures in two of them.
- **Circuit-level parts are not modelled.** These are the pulsed decoders, sense amplifiers, the
  replica timing path, the PLA's self-resetting matchlines, the low-swing crossbar signalling,
  voltage samplers and the process monitor. Where they have a logic function, it sits inside
  the modules above as plain logic: array decode, the bus wired-OR, the crossbar transfer.
- **Sizes the document evaluates that the default does not hold:**
  - the 16-mat array;
  - an 8192-word scratchpad made of 2048-word mats;
  - a 2-way cache with eight data mats.

  `NUM_MATS` is a parameter. The mat size is fixed at the prototype's 512 words by the package.
  The workload testbench runs these layouts with `NUM_MATS=16` and 512-word mats, so the
  scratchpad holds 2048 words and each cache way holds 512 lines.
- **An RMW with `xcond` still writes back when the condition is false.** The condition only
  gates the reply.
- **Ordinary writes write every bit.** The mask applies to compares, conditions and gangs.
- **Read-modify-write follows only a read or compare.** A write-modify-write, which the
  document mentions as possible, is not supported.
- **Multicast is limited to power-of-two groups.** A request reaches the mats that match its ID
  under the mask. The prototype crossbar could reach any combination of its four blocks.
- **Packet sizes differ slightly from the prototype.** A reply is 39 bits here; the prototype's
  was 40. A test-vector request entry is 66 bits here; the prototype's was 64. The bits are
  exactly the fields listed above.
- **The write buffer sits in the access stage.** The prototype placed it in the pre-access
  half-cycle. Neither placement changes the cycle counts.
- **A pointer moves even when the operation's condition fails.** The pointer update happens in
  the pre-access stage, before the internal or external condition is known. A conditional push
  to a full FIFO therefore still advances the tail, and the software that uses a FIFO must
  track its occupancy.
- **The one-transistor conditional gang is not built.** That variant also sets bit 1 as a side
  effect. Only the side-effect-free function is provided.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each has
a watchdog. For example, the top-level run at default parameters:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_rm_system \
    rtl/rm_pkg.sv $(ls rtl/*.sv | grep -v rm_pkg) tb/tb_rm_system.sv -o sim
./obj_dir/sim
```

It builds in a few seconds and runs in under a second. Pass `rm_pkg.sv`
first, then the other modules. For a block test, list the
package, the block and its sub-modules (for `tb_rm_mat`, every mat-level
file).

`tb_rm_system` covers each mechanism and counts it, failing if any count is
zero:

- scratchpad traffic through the splitter, and multicast;
- a two-way cache:
  - tags in mats 0-1 and data in mats 2-3;
  - the hit sent over the control network;
  - `xcond` reads and writes;
- gang and conditional gang invalidation;
- a PLA counter;
- a FIFO spread over two mats with range checking;
- configuration readback;
- test-vector scan-in, burst, loop and scan-out;
- the four-cycle reply latency.

Verilator is two-state. All state is reset, and the testbenches initialise
everything they read.

## How far it has been checked

| testbench | what it compares against |
|---|---|
| `tb_rm_mat` | a sequential model of the mat, on 24000 random requests plus a directed counter |
| `tb_rm_system` | expected replies in the exact arrival cycle, for every mechanism at default size |
| `tb_rm_workloads` | the same, with 16 mats, for the scratchpad, cache, FIFO and power-vector layouts |
| `tb_rm_write_buffer` | a model of pending and committed entries, kills, searches and meta-data updates |
| `tb_rm_pla` | a model of the trit table, on 20 random programs plus a counter |
| `tb_rm_pointer_logic` | a model of pointers and strides, with wrap, range check and random operations |
| other block testbenches | exhaustive or random stimulus against a small reference model |

A deliberately broken copy of each module has been run through its
testbench, and each testbench reported failures.

What simulation does not cover:

- timing;
- the circuit techniques the prototype relies on, such as pulsed decoders,
  self-resetting matchlines and low-swing wires;
- multi-clock virtual multi-porting.

The design is synchronous, single-clock logic. The synthesis front end
accepts every module and infers no latches.
