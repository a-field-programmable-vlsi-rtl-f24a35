// tb_ledr_lut_sub: exhaustive test of the four LUT sub-modules (M00..M11).
// For every input pair (Va,Ra,Vb,Rb) and both memory-bit values, the expected
// outputs come from the LEDR code table: the sub-module for (m,n) drives only
// when Va = m, Vb = n and both words have the same phase (V xor R), and then
// sends V = M, R = M xor phase.
module tb_ledr_lut_sub;
  import fpvlsi_pkg::*;

  ledr_t a, b;
  logic  m;
  logic [3:0] drive, vout, rout;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 4; i++) begin : g_dut
    ledr_lut_sub #(.M_A(i[1]), .M_B(i[0])) dut (
      .a, .b, .m, .drive(drive[i]), .vout(vout[i]), .rout(rout[i])
    );
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      {a.v, a.r, b.v, b.r, m} = 5'(k);
      #1;
      for (int i = 0; i < 4; i++) begin
        bit pa, pb, exp_d, exp_v, exp_r;
        pa    = a.v ^ a.r;
        pb    = b.v ^ b.r;
        exp_d = (a.v == i[1]) && (b.v == i[0]) && (pa == pb);
        exp_v = exp_d ? m : 1'b0;
        exp_r = exp_d ? (m ^ pa) : 1'b0;
        checks++;
        if (drive[i] !== exp_d || vout[i] !== exp_v || rout[i] !== exp_r) begin
          failures++;
          $display("FAIL sub M%0d%0d a=%b%b b=%b%b m=%b: got d=%b v=%b r=%b exp %b %b %b",
                   i[1], i[0], a.v, a.r, b.v, b.r, m, drive[i], vout[i], rout[i],
                   exp_d, exp_v, exp_r);
        end
      end
      // At most one sub-module drives the shared wires.
      checks++;
      if ($countones(drive) > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
