// fpvlsi_cell: one cell of the array, a logic block with its switch block.
//
// The cell holds its configuration (a cell_cfg_t) in a shift register that is
// part of one chip-wide scan chain: while cfg_en is high every rising clock
// edge shifts cfg_in into the least significant bit and the most significant
// bit leaves on cfg_out, so the word for a cell is shifted in MSB first. The
// configuration memory has no reset; load it, then release rst_n so that the
// logic block resets to the state the configuration asks for (for instance an
// initial storage word). The configuration format and its loading are this
// design's own; the architecture does not describe them.
//
// Per side s (N, E, S, W) the cell receives the neighbour's output word
// nb_in[s] and returns nb_ack[s]; it sends its own word `out` to all four
// sides and receives one acknowledge per side in out_ack[s].
module fpvlsi_cell
  import fpvlsi_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  logic               cfg_in,
  output logic               cfg_out,
  input  ledr_t              nb_in   [NSIDES],
  output logic  [NSIDES-1:0] nb_ack,
  output ledr_t              out,
  input  logic  [NSIDES-1:0] out_ack,
  output logic               fire,
  output logic               stall
);

  logic [CFG_W-1:0] cfg_q;
  cell_cfg_t        cfg;
  ledr_t            u1, u2;
  logic             ack1, ack2;

  always_ff @(posedge clk) begin
    if (cfg_en) cfg_q <= {cfg_q[CFG_W-2:0], cfg_in};
  end

  assign cfg     = cell_cfg_t'(cfg_q);
  assign cfg_out = cfg_q[CFG_W-1];

  switch_block u_sb (
    .en(cfg.en), .src1(cfg.src1), .src2(cfg.src2),
    .nb_in, .nb_ack, .p1(ack1), .p2(ack2), .u1, .u2
  );

  logic_block u_lb (
    .clk, .rst_n, .cfg, .u1, .u2, .ack1, .ack2,
    .out, .ack(out_ack), .fire, .stall
  );

endmodule
