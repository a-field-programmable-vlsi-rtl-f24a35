// tb_ledr_lut: random test of the LEDR look-up table with its output latches.
// Each cycle one input rail changes (as on real LEDR links, where words arrive
// one at a time), so the inputs pass through valid pairs (same phase) and
// invalid ones (different phases). Expected: for a valid pair the word
// (M[Va,Vb], M[Va,Vb] xor phase); for an invalid one the last valid word.
module tb_ledr_lut;
  import fpvlsi_pkg::*;

  logic clk = 0, rst_n = 0;
  ledr_t a, b, out;
  logic [3:0] m;
  logic valid;
  int checks = 0, failures = 0, n_hold = 0, n_valid = 0;
  ledr_t exp_held;

  always #5 clk = ~clk;

  ledr_lut dut (.clk, .rst_n, .a, .b, .m, .out, .valid);

  task automatic check_now();
    bit pa, pb, mv;
    ledr_t e;
    pa = a.v ^ a.r;
    pb = b.v ^ b.r;
    if (pa == pb) begin
      mv  = m[{a.v, b.v}];
      e   = '{v: mv, r: mv ^ pa};
      exp_held = e;
      n_valid++;
    end else begin
      e = exp_held;
      n_hold++;
    end
    checks++;
    if (out !== e || valid !== (pa == pb)) begin
      failures++;
      $display("FAIL a=%p b=%p m=%b out=%p valid=%b exp=%p", a, b, m, out, valid, e);
    end
  endtask

  initial begin
    a = '0; b = '0; m = 4'b0110;
    exp_held = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 50 == 0) m = 4'($urandom);
      // Send a new word on one input: new value, opposite phase.
      if ($urandom_range(1, 0) == 0) a = ledr_encode(1'($urandom), !ledr_phase(a));
      else                           b = ledr_encode(1'($urandom), !ledr_phase(b));
      #1 check_now();
    end
    checks++;
    if (n_hold == 0 || n_valid == 0) failures++;
    $display("valid pairs %0d, held (invalid) %0d", n_valid, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
