// tb_lb_input_ctrl: directed and random test of the logic-block input registers.
// Reference model: each input keeps a count of words offered and taken; a
// register may take a word only when the link phase is new and the word it
// holds has been consumed (its phase equals pc). The testbench plays the
// sender (new words only after the acknowledge) and the consumer (toggling pc
// once both registers hold an unconsumed word of the same phase).
module tb_lb_input_ctrl;
  import fpvlsi_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, pc = 0;
  ledr_t u1 = '0, u2 = '0, ir1, ir2;
  logic ack1, ack2, load1, load2;
  int checks = 0, failures = 0;
  bit q1[$], q2[$];
  int consumed = 0, blocked = 0;

  always #5 clk = ~clk;

  lb_input_ctrl dut (.clk, .rst_n, .en, .u1, .u2, .pc, .ir1, .ir2, .ack1, .ack2, .load1, .load2);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Disabled: a new word is not taken.
    u1 = ledr_encode(1, 1);
    @(negedge clk) chk(ir1 == '0 && ack1 == 0, "no load while disabled");
    en = 1;
    @(negedge clk) chk(ir1 == ledr_encode(1, 1) && ack1 == 1, "load word 1 on input 1");
    // Next word before the first was consumed: held back.
    u1 = ledr_encode(0, 0);
    repeat (3) @(negedge clk);
    chk(ir1 == ledr_encode(1, 1) && ack1 == 1, "second word waits for consumption");
    chk(ir2 == '0 && ack2 == 0, "input 2 untouched");
    u2 = ledr_encode(0, 1);
    @(negedge clk) chk(ir2 == ledr_encode(0, 1) && ack2 == 1, "load word 1 on input 2");
    pc = 1;  // consumer took the pair of phase 1
    @(negedge clk) chk(ir1 == ledr_encode(0, 0) && ack1 == 0, "second word taken after pc");

    // Random traffic with the reference model; ir1 still holds the unconsumed
    // second word (data 0).
    q1.push_back(1'b0);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Sender 1/2: offer the next word once the last one was acknowledged.
      if (ack1 == ledr_phase(u1) && $urandom_range(2, 0) == 0) begin
        automatic bit b = 1'($urandom);
        u1 = ledr_encode(b, !ledr_phase(u1));
        q1.push_back(b);
      end
      if (ack2 == ledr_phase(u2) && $urandom_range(2, 0) == 0) begin
        automatic bit b = 1'($urandom);
        u2 = ledr_encode(b, !ledr_phase(u2));
        q2.push_back(b);
      end
      // Consumer: both registers unconsumed and same phase.
      if (ledr_phase(ir1) == ledr_phase(ir2) && ledr_phase(ir1) != pc &&
          $urandom_range(1, 0) == 0) begin
        chk(q1.size() != 0 && q2.size() != 0 && ir1.v == q1[0] && ir2.v == q2[0],
            "consumed pair matches words sent in order");
        if (q1.size() != 0) void'(q1.pop_front());
        if (q2.size() != 0) void'(q2.pop_front());
        pc = !pc;
        consumed++;
      end
      if ((ledr_phase(u1) != ack1) && (ack1 != pc)) blocked++;
    end
    chk(consumed > 300, "enough pairs consumed");
    chk(blocked > 0, "backpressure seen");
    $display("pairs consumed %0d, cycles with a held-back word %0d", consumed, blocked);
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
