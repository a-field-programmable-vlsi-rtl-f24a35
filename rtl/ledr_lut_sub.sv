// ledr_lut_sub: one sub-module of the decoder/multiplexer LEDR look-up table.
//
// The sub-module owns one memory bit M_mn and answers only for the input values
// Va = m, Vb = n (parameters M_A, M_B). Its decoder has two product terms, one
// per phase: in phase 0 the inputs read (Va,Ra) = (m,m), (Vb,Rb) = (n,n); in
// phase 1 (m,~m), (n,~n). When the phase-0 term is true the multiplexer drives
// Vout = Rout = M_mn; when the phase-1 term is true it drives Vout = M_mn and
// Rout = ~M_mn through an inverter, so the output word carries the inputs'
// phase. For every other input combination, including inputs of different
// phases, neither term is true and the outputs are released (high impedance on
// the chip). Here "released" is the output `drive` = 0; the LUT that collects
// the four sub-modules ORs the driven values, which is how the shared wire
// behaves when at most one sub-module drives it.
//
// The structure for M11 (two AND terms, inverter on the R path) follows the
// published drawing of that sub-module; the other three are the same circuit
// with the V inputs inverted where m or n is 0, which is this design's reading.
// Purely combinational.
module ledr_lut_sub
  import fpvlsi_pkg::*;
#(
  parameter bit M_A = 1'b1,  // value of Va this sub-module decodes
  parameter bit M_B = 1'b1   // value of Vb this sub-module decodes
) (
  input  ledr_t a,      // (Va, Ra)
  input  ledr_t b,      // (Vb, Rb)
  input  logic  m,      // memory bit M_mn
  output logic  drive,  // the sub-module drives Vout/Rout
  output logic  vout,
  output logic  rout
);

  logic dec_ph0, dec_ph1;

  always_comb begin
    dec_ph0 = (a.v == M_A) && (a.r == M_A)  && (b.v == M_B) && (b.r == M_B);
    dec_ph1 = (a.v == M_A) && (a.r == !M_A) && (b.v == M_B) && (b.r == !M_B);
    drive   = dec_ph0 || dec_ph1;
    vout    = drive && m;
    rout    = (dec_ph0 && m) || (dec_ph1 && !m);
  end

endmodule
