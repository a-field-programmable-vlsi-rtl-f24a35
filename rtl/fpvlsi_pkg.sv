// fpvlsi_pkg: shared types and constants of the asynchronous bit-serial FPVLSI.
//
// LEDR code word (level-encoded 2-phase dual-rail). A bit travels on two wires,
// V (the value itself) and R (redundant). R = V xor phase, so the phase of a
// word is V xor R and successive words on a link differ in exactly one wire:
//   phase 0: data 0 = (V,R) (0,0), data 1 = (1,1)
//   phase 1: data 0 = (0,1),       data 1 = (1,0)
// A receiver sees a new word when the phase changes; it returns ACK = phase of
// the word it has taken (2-phase acknowledge, one level per link).
//
// Cell configuration (this design's own format; the source architecture does
// not publish one) is a packed struct shifted in through a scan chain.
package fpvlsi_pkg;

  typedef struct packed {
    logic v;  // value rail
    logic r;  // redundant rail, v ^ phase
  } ledr_t;

  // Sides of a cell, in the order used for all per-side arrays.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;
  localparam int unsigned NSIDES = 4;

  // Source of a logic-block input.
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,  // unused: reads as a constant 0 that never stalls
    SRC_N    = 3'd1,
    SRC_E    = 3'd2,
    SRC_S    = 3'd3,
    SRC_W    = 3'd4
  } src_e;

  // Logic-block function.
  typedef enum logic {
    MODE_LUT = 1'b0,  // arbitrary 2-input function from lut[3:0]
    MODE_ADD = 1'b1   // bit-serial full adder, carry kept in the cell
  } mode_e;

  localparam int unsigned WLEN_W = 4;

  typedef struct packed {
    logic              en;        // cell takes part in the circuit
    src_e              src1;      // input 1 (a, the "V1/R1" input)
    src_e              src2;      // input 2 (b, the "V2/R2" input)
    mode_e             mode;
    logic [3:0]        lut;       // lut[{a,b}] = M_ab: M11 M10 M01 M00
    logic              init_tok;  // 1-bit storage: output holds a token after reset
    logic              init_val;  // value of that initial token
    logic [WLEN_W-1:0] wlen;      // adder: clear carry after every wlen bits, 0 = never
  } cell_cfg_t;

  localparam int unsigned CFG_W = $bits(cell_cfg_t);

  function automatic logic ledr_phase(ledr_t w);
    return w.v ^ w.r;
  endfunction

  function automatic ledr_t ledr_encode(logic value, logic phase);
    ledr_t w;
    w.v = value;
    w.r = value ^ phase;
    return w;
  endfunction

  function automatic logic [2:0] side_to_src(int unsigned s);
    return 3'(s + 1);
  endfunction

endpackage
