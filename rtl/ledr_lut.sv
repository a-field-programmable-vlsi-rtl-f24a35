// ledr_lut: 2-input look-up table for LEDR-coded inputs.
//
// Four ledr_lut_sub sub-modules, one per memory bit M00, M01, M10, M11, share
// the Vout and Rout wires. For a valid input pair (both inputs in the same
// phase) exactly one sub-module drives them, with Vout = M[Va,Vb] and
// Rout = Vout xor phase. For an invalid pair (the two inputs in different
// phases, i.e. one input has already advanced to its next word) no sub-module
// drives and two latches keep the previous output word.
//
// The latches are modelled with a clock: `out` follows the driven value in the
// same cycle (transparent) and a register keeps it for the cycles in which no
// sub-module drives. Reset clears the held word to (0,0), data 0 in phase 0.
// m[{Va,Vb}] is memory bit M_VaVb.
module ledr_lut
  import fpvlsi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ledr_t      a,
  input  ledr_t      b,
  input  logic [3:0] m,       // m[2*Va+Vb] = M_VaVb
  output ledr_t      out,
  output logic       valid    // a sub-module drives the outputs this cycle
);

  logic [3:0] drv, vo, ro;
  ledr_t      held;

  for (genvar i = 0; i < 4; i++) begin : g_sub
    ledr_lut_sub #(.M_A(i[1]), .M_B(i[0])) u_sub (
      .a(a), .b(b), .m(m[i]), .drive(drv[i]), .vout(vo[i]), .rout(ro[i])
    );
  end

  always_comb begin
    valid = |drv;
    if (valid) begin
      out.v = |(drv & vo);
      out.r = |(drv & ro);
    end else begin
      out = held;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) held <= '0;
    else        held <= out;
  end

  // The decoders are mutually exclusive: never two drivers on the shared wires.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv));

endmodule
