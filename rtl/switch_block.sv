// switch_block: programmable connections of one cell to its four neighbours.
//
// Each cell talks only to its four adjacent cells. Every neighbour broadcasts
// its output word (V, R) to this cell; the switch block selects which of the
// four feeds logic-block input 1 and which feeds input 2 (cfg.src1/src2), and
// returns one acknowledge wire per side. The acknowledge for side s equals the
// phase of the incoming word once every input that selects s has taken it, and
// the opposite phase while one has not. A side no input selects (and every
// side of a disabled cell) acknowledges at once, so a neighbour's broadcast is
// never held up by a cell that does not listen. An unused input (SRC_NONE)
// gets a constant 0 that is always a new word, so a one-input function never
// waits on it. The cell's own output goes to the neighbours as plain wires.
//
// Restricting routing to the four neighbours (longer routes pass through
// cells used as buffers) and per-side wire pairs in both directions are this
// design's reading of the mesh; the selection encoding is its own. Purely
// combinational.
module switch_block
  import fpvlsi_pkg::*;
(
  input  logic              en,
  input  src_e              src1,
  input  src_e              src2,
  input  ledr_t             nb_in  [NSIDES],  // words from the neighbours
  output logic  [NSIDES-1:0] nb_ack,          // acknowledges to the neighbours
  input  logic              p1,               // phase held by input register 1
  input  logic              p2,               // phase held by input register 2
  output ledr_t             u1,
  output ledr_t             u2
);

  always_comb begin
    u1 = ledr_encode(1'b0, !p1);
    u2 = ledr_encode(1'b0, !p2);
    for (int s = 0; s < NSIDES; s++) begin
      if (src1 == src_e'(side_to_src(s))) u1 = nb_in[s];
      if (src2 == src_e'(side_to_src(s))) u2 = nb_in[s];
    end
  end

  always_comb begin
    for (int s = 0; s < NSIDES; s++) begin
      automatic logic ph   = ledr_phase(nb_in[s]);
      automatic logic took = !en ||
        ((src1 != src_e'(side_to_src(s)) || p1 == ph) &&
         (src2 != src_e'(side_to_src(s)) || p2 == ph));
      nb_ack[s] = took ? ph : !ph;
    end
  end

endmodule
