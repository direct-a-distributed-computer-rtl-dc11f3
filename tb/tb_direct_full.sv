// tb_direct_full: the end-to-end run of tb_direct_top with direct_top at its
// default size: five query processors, thirty-two 16K-byte frames, 30 bit
// clocks (750 ns) per byte. Relation R has two full pages (4095 tuples each);
// with 32 frames nothing has to be evicted, so evictions and write-backs are
// not required here. One page takes 16384 x 30 cycles to pass by.
module tb_direct_full;
  import direct_pkg::*;
  localparam int unsigned NQP = 5, NF = 32, PB = 16384, BC = 30, NREL = 16, NPAGES = 64, NPKT = 8;
  localparam int unsigned R_PAGES = 2;
  localparam int unsigned WATCHDOG = 40_000_000;
`define DIRECT_FULL_SIZE
`include "direct_top_bench.svh"
`undef DIRECT_FULL_SIZE
endmodule
