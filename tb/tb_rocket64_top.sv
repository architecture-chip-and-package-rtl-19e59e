// tb_rocket64_top: end-to-end test of ROCKET-64 with small L2 slices.
//
// Runs the shared harness (tb_rocket64_harness) with 16-line L2 slices
// (L2_IDX_BITS = 4), so the 64 cores' working sets overflow the caches and
// every L2 miss path, write-through and eviction is exercised, and with 60
// random accesses per core. Every other parameter keeps its default.
`timescale 1ns/1ps
module tb_rocket64_top;
  tb_rocket64_harness #(.IDX(4), .NOPS(60)) h ();
endmodule
