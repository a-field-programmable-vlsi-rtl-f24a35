// tb_fpvlsi_full: the same end-to-end test on the full 20 x 30 array with
// every parameter of fpvlsi_top at its default.
module tb_fpvlsi_full;
  import fpvlsi_pkg::*;

  localparam int unsigned ROWS = 20;
  localparam int unsigned COLS = 30;

`include "fpvlsi_bench_body.svh"

  fpvlsi_top dut (.*);

endmodule
