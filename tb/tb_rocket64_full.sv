// tb_rocket64_full: ROCKET-64 at its full default size.
//
// Runs the shared harness (tb_rocket64_harness) on rocket64_top with no
// parameter overrides: 64 cores, eight 1 MB L2 slices (2^18 one-word
// lines each, cleared in 262,144 cycles after reset), four DRAM channels.
// Each core makes 12 random accesses once the slices are ready.
`timescale 1ns/1ps
module tb_rocket64_full;
  tb_rocket64_harness #(.IDX(18), .NOPS(12)) h ();
endmodule
