// tb_lb_output_ctrl: test of the Output Control and output register.
// Checks: reset word with and without the initial storage word; a load only
// when the input pair is valid, unconsumed and every acknowledge has returned;
// the LEDR word sent (value, toggled phase); pc follows the pair; stall is
// flagged while an acknowledge is missing; one rail changes per load.
module tb_lb_output_ctrl;
  import fpvlsi_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, init_tok = 0, init_val = 0;
  logic p1 = 0, p2 = 0, value = 0;
  logic [3:0] ack = '0;
  ledr_t out;
  logic pc, fire, stall;
  int checks = 0, failures = 0, n_stall = 0, n_fire = 0;

  always #5 clk = ~clk;

  lb_output_ctrl dut (.clk, .rst_n, .en, .init_tok, .init_val, .p1, .p2, .value,
                      .ack, .out, .pc, .fire, .stall);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: out=%p pc=%b fire=%b stall=%b", what, $time, out, pc, fire, stall);
    end
  endtask

  initial begin
    // Reset without a storage word.
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(out == '0 && pc == 0 && !fire && !stall, "empty after reset");
    // Only input 1 advanced: not a valid pair.
    p1 = 1;
    @(negedge clk) chk(out == '0 && !fire, "no load on an invalid pair");
    // Valid pair, acknowledges equal phase 0 of the empty register.
    p2 = 1; value = 1;
    #1 chk(fire && !stall, "fire on valid pair");
    @(negedge clk) chk(out == ledr_encode(1, 1) && pc == 1, "word (1, phase 1) sent");
    chk(!fire, "pair not consumed twice");
    // Next pair (phase 0) while receivers still hold the old acknowledge.
    p1 = 0; p2 = 0; value = 0;
    ack = 4'b0111;
    repeat (3) begin
      #1 chk(stall && !fire, "stall while a receiver has not acknowledged");
      @(negedge clk) chk(out == ledr_encode(1, 1), "word held during stall");
    end
    ack = 4'b1111;
    #1 chk(fire, "fire once all acknowledged");
    @(negedge clk) chk(out == ledr_encode(0, 0) && pc == 0, "word (0, phase 0) sent");
    // Disabled cell never fires.
    en = 0; p1 = 1; p2 = 1; ack = 4'b0000;
    repeat (2) @(negedge clk);
    chk(out == ledr_encode(0, 0) && !fire, "disabled: no load");
    en = 1;

    // Reset with a storage word of value 1: phase 1 word present at once.
    rst_n = 0; init_tok = 1; init_val = 1; p1 = 0; p2 = 0; ack = '0;
    @(negedge clk) rst_n = 1;
    chk(out == ledr_encode(1, 1) && pc == 0, "initial storage word (1, phase 1)");
    // A pair of phase 1 arrives; the word is not yet acknowledged.
    p1 = 1; p2 = 1; value = 0;
    @(negedge clk) chk(out == ledr_encode(1, 1) && stall, "pair waits behind the storage word");
    ack = 4'b1111;
    @(negedge clk) chk(out == ledr_encode(0, 0) && pc == 1, "first input word follows, phase 0");

    // Random run: count loads and stalls, check one rail per change.
    for (int t = 0; t < 2000; t++) begin
      ledr_t prev_out;
      @(negedge clk);
      prev_out = out;
      if ($urandom_range(3, 0) == 0) p1 = !p1;
      if ($urandom_range(3, 0) == 0) p2 = !p2;
      for (int s = 0; s < 4; s++)
        if ($urandom_range(2, 0) == 0) ack[s] = ledr_phase(out);
      value = 1'($urandom);
      #1;
      if (fire) n_fire++;
      if (stall) n_stall++;
      @(posedge clk) #1;
      if (out != prev_out) chk($countones(out ^ prev_out) == 1, "one rail changes per word");
    end
    chk(n_fire > 0 && n_stall > 0, "random run fired and stalled");
    $display("fires %0d stalls %0d", n_fire, n_stall);
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
