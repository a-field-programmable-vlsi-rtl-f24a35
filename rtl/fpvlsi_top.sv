// fpvlsi_top: the field-programmable VLSI, a mesh of ROWS x COLS bit-serial cells.
//
// Every cell connects only to its four adjacent cells through LEDR links (two
// wires V, R for the word, one wire back for the acknowledge). Cells on the
// border bring their outward links out as ports: for each border position the
// word entering the array (x_in) with its acknowledge (x_in_ack), and the word
// leaving it (x_out) with the acknowledge the outside returns (x_out_ack). An
// outside receiver that does not listen should return the phase of x_out.
// North/south ports are indexed by column, west/east ports by row.
//
// Configuration: one scan chain through all cells in row-major order, cell
// (0,0) first after cfg_in; each cell takes CFG_W bits (see fpvlsi_pkg), so
// the word for the last cell is shifted in first. Shift with cfg_en high and
// rst_n low, then release rst_n.
//
// Array size 20 x 30 (600 cells) as fabricated. The array is self-timed on the
// chip; here every handshake register updates on `clk`, and results do not
// depend on how many cycles a link or an outside partner takes.
// fire/stall give per cell whether a word left it and whether one waited.
module fpvlsi_top
  import fpvlsi_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 30
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_en,
  input  logic                 cfg_in,
  output logic                 cfg_out,
  input  ledr_t                n_in      [COLS],
  output logic  [COLS-1:0]     n_in_ack,
  output ledr_t                n_out     [COLS],
  input  logic  [COLS-1:0]     n_out_ack,
  input  ledr_t                s_in      [COLS],
  output logic  [COLS-1:0]     s_in_ack,
  output ledr_t                s_out     [COLS],
  input  logic  [COLS-1:0]     s_out_ack,
  input  ledr_t                w_in      [ROWS],
  output logic  [ROWS-1:0]     w_in_ack,
  output ledr_t                w_out     [ROWS],
  input  logic  [ROWS-1:0]     w_out_ack,
  input  ledr_t                e_in      [ROWS],
  output logic  [ROWS-1:0]     e_in_ack,
  output ledr_t                e_out     [ROWS],
  input  logic  [ROWS-1:0]     e_out_ack,
  output logic  [ROWS*COLS-1:0] fire,
  output logic  [ROWS*COLS-1:0] stall
);

  ledr_t             cout   [ROWS][COLS];
  logic [NSIDES-1:0] nb_ack [ROWS][COLS];
  logic              chain  [ROWS*COLS+1];

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      ledr_t             nin  [NSIDES];
      logic [NSIDES-1:0] oack;

      assign nin[SIDE_N] = (r > 0)        ? cout[r-1][c] : n_in[c];
      assign nin[SIDE_S] = (r < ROWS - 1) ? cout[r+1][c] : s_in[c];
      assign nin[SIDE_W] = (c > 0)        ? cout[r][c-1] : w_in[r];
      assign nin[SIDE_E] = (c < COLS - 1) ? cout[r][c+1] : e_in[r];

      assign oack[SIDE_N] = (r > 0)        ? nb_ack[r-1][c][SIDE_S] : n_out_ack[c];
      assign oack[SIDE_S] = (r < ROWS - 1) ? nb_ack[r+1][c][SIDE_N] : s_out_ack[c];
      assign oack[SIDE_W] = (c > 0)        ? nb_ack[r][c-1][SIDE_E] : w_out_ack[r];
      assign oack[SIDE_E] = (c < COLS - 1) ? nb_ack[r][c+1][SIDE_W] : e_out_ack[r];

      fpvlsi_cell u_cell (
        .clk, .rst_n, .cfg_en,
        .cfg_in (chain[r*COLS+c]),
        .cfg_out(chain[r*COLS+c+1]),
        .nb_in  (nin),
        .nb_ack (nb_ack[r][c]),
        .out    (cout[r][c]),
        .out_ack(oack),
        .fire   (fire[r*COLS+c]),
        .stall  (stall[r*COLS+c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_ns
    assign n_out[c]    = cout[0][c];
    assign s_out[c]    = cout[ROWS-1][c];
    assign n_in_ack[c] = nb_ack[0][c][SIDE_N];
    assign s_in_ack[c] = nb_ack[ROWS-1][c][SIDE_S];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_we
    assign w_out[r]    = cout[r][0];
    assign e_out[r]    = cout[r][COLS-1];
    assign w_in_ack[r] = nb_ack[r][0][SIDE_W];
    assign e_in_ack[r] = nb_ack[r][COLS-1][SIDE_E];
  end

endmodule
