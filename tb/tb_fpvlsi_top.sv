// tb_fpvlsi_top: end-to-end test of a reduced 4 x 6 array (the circuit and
// checks are described in fpvlsi_bench_body.svh).
module tb_fpvlsi_top;
  import fpvlsi_pkg::*;

  localparam int unsigned ROWS = 4;
  localparam int unsigned COLS = 6;

`include "fpvlsi_bench_body.svh"

  fpvlsi_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

endmodule
