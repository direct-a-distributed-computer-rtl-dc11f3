// tb_direct_top: end-to-end run of the DIRECT back end at reduced size
// (3 query processors, 4 frames of 64 bytes), with the query processors,
// the controller's software and the disk played by the bench.
//
// Page layout used by the bench: bytes 0-1 hold the tuple count, then 4-byte
// tuples; the first byte of a tuple is its key. The work:
//   1. RESTRICT(R, key < 100) by QP0 and QP1 together (one query packet):
//      each asks NEXTPAGE for R until end of relation, reads each page over
//      the switch starting wherever the frame is, and writes qualifying
//      tuples to pages of a temporary relation T that it obtains by NEXTPAGE.
//   2. Meanwhile QP2 runs INSERT(R, tuple) under an update lock: it must wait
//      until the RESTRICT packet releases R, then finds the last page full,
//      asks for the next (new) page and writes the tuple at its place in the
//      page (address-matched DMA starts).
//   3. QP0 and QP2, in two packets, read the temporary relation at once; the
//      tuples found must be exactly those of R with key < 100.
//   4. QP1 reads back R's new last page and finds the inserted tuple.
// With 4 frames the run forces page faults, evictions and write-backs of
// dirty temporary pages. Each of these, end of relation, lock waits, new
// pages, zero-latency reads, address-matched writes and two processors
// reading one frame in the same byte slot is counted; any that never happens
// is a failure.
module tb_direct_top;
  import direct_pkg::*;
  localparam int unsigned NQP = 3, NF = 4, PB = 64, BC = 12, NREL = 4, NPAGES = 8, NPKT = 4;
  localparam int unsigned R_PAGES = 6;
  localparam int unsigned WATCHDOG = 2_000_000;
`include "direct_top_bench.svh"
endmodule
