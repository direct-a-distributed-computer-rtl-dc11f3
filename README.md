# DIRECT back end in SystemVerilog

DIRECT is a back-end machine for a relational database. Many small query
processors run queries side by side (MIMD), and several processors can share
one query. The relations are cut into 16K-byte pages. The pages sit in CCD
page frames that are read like an associative memory: a processor does not
ask for a byte, it scans a whole page as the page goes by.

The hardware idea that makes this cheap is the interconnect. All page frames
are stepped by one clock, and a single address register names the byte that
every frame presents at that moment. So the path from a frame to a processor
needs no address lines and no arbitration. It is one wire. A processor that
wants a page selects that frame's wire and takes the bytes as they pass. Any
number of processors can listen to the same frame. Processors ask a back-end
controller which frame to use next (NEXTPAGE). The controller gives every
processor of a query a different page, and it pages relations in from disk
when they are not resident.

This RTL covers the memory side of DIRECT: the page frames, the address
register, the 1-bit cross-point switch, the DMA ports, and the controller's
paging and locking function. The processors, the host and the disk are
outside the top module. Their signals are ports, and the testbenches play
their parts.

## Blocks

```
                        addr_reg  (address register +1, byte-slot phase)
                            | addr, slot strobes (to everything below)
   query processor 0 --- qp_dma --+                      +-- ccd_page_frame 0
   query processor 1 --- qp_dma --+                      +-- ccd_page_frame 1
        ...                       +--- xpoint_switch ----+        ...
   query processor n-1 - qp_dma --+   (1-bit lines)      +-- ccd_page_frame m-1
   mass storage ------- qp_dma --+
                          ^
                          | page transfer commands
   query processors ==> bec_page_manager (NEXTPAGE / GETPAGE / RELEASE -> SEND)
```

| file | what it is |
|---|---|
| `rtl/direct_pkg.sv` | request/reply structs, opcodes, lock encodings, field widths |
| `rtl/addr_reg.sv` | the common address register and the byte-slot timer |
| `rtl/piso_sr.sv`, `rtl/sipo_sr.sv` | 8-bit parallel-to-serial and serial-to-parallel shift registers |
| `rtl/ccd_page_frame.sv` | one page frame with its read and write shift registers |
| `rtl/xpoint_switch.sv` | read selectors, write decoders, AND/OR gating, WRITE lines |
| `rtl/qp_dma.sv` | DMA port: waits for its start address, then moves bytes |
| `rtl/bec_page_manager.sv` | the controller's tables and paging state machine |
| `rtl/direct_top.sv` | everything wired together |

## The byte slot: how a byte crosses a 1-bit switch

This timing is the part that needs the most care. Each byte period is called
a slot. A slot is `BYTE_CLKS` cycles of the bit clock. During a slot the
address register holds one value, A. The register's phase counter produces
four strobes:

| phase | strobe | what happens |
|---|---|---|
| 0 | `slot_load` | each frame loads `mem[A]` into its read shift register. Each writing port loads its byte for A into its write shift register. |
| 1..8 | `shift_en` | eight bits cross the switch, most significant bit first. Every shift register on both sides shifts once per cycle. |
| 9 | `slot_cap` | the port-side read shift register now holds byte A. The DMA port hands it out on the next cycle as `rd_valid`, with `rd_addr = A`. |
| last | `slot_end` | a frame whose WRITE line is high stores its gathered byte at A. The address then steps to A+1, wrapping at the page size. |

By default `BYTE_CLKS = 30`. At a 25 ns bit clock that is one byte every
750 ns, the CCD byte rate of the original design, and a full 16384-byte page
goes by in 12.3 ms. The shift registers only need 8 of the 30 cycles. That is
why a one-bit path keeps up with the memory. The smallest legal `BYTE_CLKS`
is 10.

A read and a write in the same slot refer to the same address. The read sees
the old byte.

## The cross-point switch

For each port (row) and frame (column):

* Read: the port's selector picks `frame_sout[rd_sel]`. No gate ever blocks a
  reader, so many ports can read one frame at once.
* Write: the port's decoder, enabled by `wr_en`, raises output `wr_sel`. That
  output ANDs the port's serial data into the frame's data OR, and also feeds
  the frame's WRITE OR.

There is no arbitration. If two ports write the same frame in one slot, that
is a software error, and the controller is meant to prevent it. An assertion
in `xpoint_switch` reports it in simulation. The select width is
`$clog2(NFRAMES)`, which is 5 bits for 32 frames.

## DMA ports and zero-latency scans

A `qp_dma` takes a command with a frame, a direction, a byte count and either
a start address or `cmd_any`.

* With a start address, the port compares that address with the address
  register at the start of every slot. The transfer begins when they match.
* With `cmd_any`, the transfer begins at the next slot, whatever the address.
  A full-page transfer then wraps round the page. This is how a processor
  scans a page with no waiting. It also matters because a query processor
  does not care where in the page it starts.

The port moves one byte per slot:

* Reads come out as `rd_valid`/`rd_addr`/`rd_data`.
* For writes, the port pulses `wr_take` at phase 0. On that cycle the
  processor must present the byte for the current `addr` on `wr_data`.
* `done` pulses once, after the last byte has been delivered or stored.
* `cmd_ready` is high when the port is idle.

The mass-storage channel is just one more `qp_dma`, on switch port `NQP`. It
is run by the controller and always moves whole pages with `cmd_any`.

## The controller's paging unit (`bec_page_manager`)

In the original machine these primitives are software on the controller CPU.
Here they are one state machine that serves one request at a time. That makes
every request indivisible, and this matters: two processors running the same
query may ask for the next page of the same relation in the same cycle, and
they must get different pages.

### Tables

* **Relation table:** for each relation, its page count, a temporary flag, the
  lock (`UNLOCKED`, `IN_USE`, `LOCKED`) and the number of query packets using
  it.
* **Page table:** for each page, a presence bit, a dirty bit and a frame
  number. The disk address is `{relation, page}`.
* **Query packet task table:** for each (packet, relation), a currency
  pointer.
* **Frame table:** for each frame, the page it holds and a pin bit per
  processor. The pin bit means "this processor is working in this frame".

### Requests

Each processor drives a `ctl_req_t`. It holds the request until the one-cycle
`ctl_rep_t` reply (SEND) comes back, then drops `req_valid` for at least one
cycle.

* **NEXTPAGE(packet, relation, lock):** returns the page at the packet's
  currency pointer and advances the pointer.
* **GETPAGE(packet, relation, page, lock):** returns the named page and sets
  the pointer just past it.
* **RELEASE(packet, relation):** the packet has finished with the relation.
  Issue it once per packet, after all of that packet's processors are done.
  When the last packet releases a relation, its lock returns to `UNLOCKED`.

The reply carries the frame number, or `eor` (end of relation) when no such
page exists. Asking for the page just past the end of a temporary relation,
or of any relation held under an update lock, adds a new page in a fresh
frame. This is how query results grow and how INSERT gets an empty page.

### Locks

* A retrieve request is granted unless the relation is `LOCKED`.
* An update request is granted only on an `UNLOCKED` relation.
* A request that is not granted gets no reply and joins the relation's
  request queue. The processor keeps waiting.
* Queued requests are served in arrival order. Only the oldest request on a
  relation is retried, and it is served as soon as the lock allows it.
* A new request on a relation with queued requests joins the queue. The one
  exception is a retrieve from a packet numbered below a waiting updater: it
  is still granted.
* A request from a packet that already holds the relation is never queued.
* The queue keeps one entry per processor: a bit, the relation, and an age
  matrix that records which entries came first.

### Page faults and replacement

When a page is missing, the unit takes a frame:

1. It uses a free frame if there is one.
2. Otherwise a clock hand picks the next frame that no processor has pinned.

A processor's pin on a relation's page is dropped when it asks for another
page of that relation, or when the relation is released. If the victim is
dirty, it is written to disk first. Then the missing page is read in, and
only after that is the reply sent.

### Anticipatory paging

After each NEXTPAGE reply, the unit brings in the next *m* pages of the
relation before they are asked for. Here *m* is the number of processors
whose latest request was a NEXTPAGE on the same packet and relation. These
early page-ins take turns with waiting requests. If no frame can be had,
they stop until the next NEXTPAGE.

### Other ports

* `cfg_*` defines a relation, like CREATE: its page count (all pages on disk)
  and whether it is temporary.
* `cfg_valid` with `cfg_keep` turns the temporary relation `cfg_rel` into a
  permanent one. This is how a query result is added to the data base. Its
  pages and page table stay as they are, and it no longer grows.
* The `ev_*` outputs pulse once per page fault, eviction, write-back, new
  page, lock wait, no-frame retry, end of relation and early page-in.

## Top level (`direct_top`)

| parameter | default | meaning |
|---|---|---|
| `NQP` | 5 | query processors (the initial configuration) |
| `NFRAMES` | 32 | CCD page frames (the initial configuration) |
| `PAGE_BYTES` | 16384 | page and frame size; the address is 14 bits |
| `BYTE_CLKS` | 30 | bit clocks per byte (750 ns at 25 ns) |
| `NREL`, `NPAGES`, `NPKT` | 16, 64, 8 | relations, pages per relation, query packets (this design's choice) |

The request fields in `direct_pkg` are sized for these limits: 3-bit packet,
4-bit relation, 6-bit page and 5-bit frame numbers. If you raise `NFRAMES`
above 32 or the table sizes above these limits, widen those fields too. An
elaboration-time assertion catches the mismatch.

The ports, grouped:

* `qp_req` / `qp_rep`: one request/reply pair per query processor.
* `qp_cmd_*`, `qp_done`, `qp_rd_*`, `qp_wr_take`, `qp_wr_data`: one DMA port
  per query processor. The write data is the byte for the current `addr`.
* `ms_*`: the disk side of a page transfer.
  * `ms_active` is high during a transfer.
  * `ms_out` gives the direction (1 = frame to disk), and `ms_disk` gives the
    disk address.
  * A page-in takes `ms_wr_data`, the page's byte at `addr`, whenever
    `ms_wr_take` pulses.
  * A page-out delivers `ms_rd_valid`, `ms_rd_addr` and `ms_rd_data`.
* `cfg_*`: CREATE, as above.
* `ev_*`: the events, as above.

The memory is 32 x 16K bytes, written as arrays. Synthesis keeps them as
memories, not flip-flops.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Build and run any of them with plain
Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Itb \
    rtl/direct_pkg.sv tb/tb_direct_top.sv --top-module tb_direct_top -Mdir obj
./obj/Vtb_direct_top
```

`-Wno-fatal` is needed because the benches shrink the table sizes, and the
narrower table indices then draw width warnings.

| bench | what it shows |
|---|---|
| `tb_addr_reg` | address steps once per `BYTE_CLKS` cycles; strobe phases |
| `tb_piso_sr`, `tb_sipo_sr` | bit order, hold, load priority |
| `tb_ccd_page_frame` | serial write and read-back over several page turns; WRITE gating |
| `tb_xpoint_switch` | selector/decoder/AND-OR against a reference model, random stimulus |
| `tb_qp_dma` | address-matched start, zero-latency start, byte spacing of exactly one slot, wrap-around, partial writes |
| `tb_bec_page_manager` | distinct pages to two processors of one packet, end of relation, temporary relation growth, update held while IN-USE, retrieve held while LOCKED, queue served in arrival order with lower-numbered packets let through, eviction with write-back, early page-ins, a temporary relation kept as a permanent one |
| `tb_direct_top` | end to end at 3 processors x 4 frames of 64 bytes (see below) |
| `tb_direct_full` | the same run with `direct_top` at its defaults. Relation R has two 16K pages. The run takes a few seconds. |

The end-to-end run plays the published RESTRICT and INSERT procedures. Two
processors share one query packet. Each asks NEXTPAGE through relation R,
scans each page from wherever the frame is, and writes tuples with key < 100
into pages of a temporary relation. A third processor meanwhile tries to
INSERT into R under an update lock. It waits until the query packet releases
R, finds the last page full, gets a new page, and writes the tuple at its
place with address-matched DMA writes. Then two processors in different
packets read the result pages together. The tuples found are compared with
the ones the bench put on its disk. Finally the result is kept as a permanent
relation, and one more NEXTPAGE scan must find all its pages and then end of
relation, with no new page added.

The bench counts each of these mechanisms and fails if one never happens:

* page faults
* new pages
* lock waits
* end of relation
* early page-ins
* zero-latency starts
* address-matched starts
* two processors reading one frame in the same slot
* evictions and write-backs (in the reduced run)

It also times every whole-page read that starts at any address. Each must
take one page time (PAGE_BYTES x BYTE_CLKS clocks), give or take one byte
slot. At the defaults that is 491520 clocks of 25 ns, about 0.012 s.

In the bench pages, the first two bytes hold the tuple count, and tuples are
4 bytes. The original marks the start of a page and the end of its tuples
with two reserved characters (BOP and EOP). That is a data format for the
processors' software, and the hardware does not depend on it.

## Where this departs from, or goes beyond, the original design

* The CCD chips (eight per frame, one bit each) are modelled as one
  byte-wide array, read and written at the common address. This gives the
  same sequence of bytes. The analog CCD devices are not modelled.
* The bit clock, the phase layout of a slot, the bit order, the reset
  behaviour and the DMA command format are choices of this design.
* The mass-storage channel is one more switch port.
* In the original design, the controller's primitives are programs on a
  minicomputer. Here only the paging and locking part is hardware. ASSIGN,
  with its policy for how many processors a query gets, is not here. Neither
  are CREATEDB, DELETE and DESTROY with their authorization checks, the
  attribute catalogue, or the owner, tuple width and attribute count fields
  of the relation table. The per-page lock bit has no described use and is
  not kept.
* The request queue lives in the paging unit, not in the processors. A
  queued processor simply waits for its reply.
* RELEASE is an explicit request, issued once per packet. It stands in for
  the controller software's join on the processors' done signals, and it
  resets the packet's currency pointer.
* GETPAGE moves the currency pointer past the page it returns, so that a
  following NEXTPAGE continues from there. The original text does not say
  what GETPAGE does to the pointer.
* The replacement choice (free frame first, then a clock hand over unpinned
  frames) is this design's. So is the way *m* is counted for anticipatory
  paging. The original only says that a frame must be freed, and that *m*
  pages should be kept ahead.
* The query processors (LSI-11/03 class), their query operations (RESTRICT,
  PROJECT, JOIN, MODIFY, INSERT, COMPRESS, aggregates), the host and the disk
  are not hardware here. Their interfaces are the top's ports.
* The defaults match the initial 5 x 32 configuration. The 100 x 100
  configuration used in the original bandwidth argument (about 1 Gbit/s in
  total) needs wider frame fields in `direct_pkg`.
