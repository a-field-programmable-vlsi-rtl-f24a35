// tb_switch_block: random test of the switch block against a reference written
// from its rules: input i carries the word of the selected side, or a constant
// 0 in the phase opposite to its register (always a new word) when unused;
// the acknowledge to a side is the incoming phase once every input selecting
// that side holds that phase (and for any side of a disabled cell), otherwise
// the opposite phase.
module tb_switch_block;
  import fpvlsi_pkg::*;

  logic en, p1, p2;
  src_e src1, src2;
  ledr_t nb_in[NSIDES];
  logic [NSIDES-1:0] nb_ack;
  ledr_t u1, u2;
  int checks = 0, failures = 0, n_join = 0, n_wait = 0;

  switch_block dut (.en, .src1, .src2, .nb_in, .nb_ack, .p1, .p2, .u1, .u2);

  function automatic ledr_t pick(src_e s, logic p);
    case (s)
      SRC_N:   return nb_in[0];
      SRC_E:   return nb_in[1];
      SRC_S:   return nb_in[2];
      SRC_W:   return nb_in[3];
      default: return '{v: 1'b0, r: !p};
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      en   = ($urandom_range(7, 0) != 0);
      src1 = src_e'($urandom_range(4, 0));
      src2 = (t % 5 == 0) ? src1 : src_e'($urandom_range(4, 0));
      p1   = 1'($urandom);
      p2   = 1'($urandom);
      for (int s = 0; s < NSIDES; s++) nb_in[s] = 2'($urandom);
      #1;
      checks++;
      if (u1 != pick(src1, p1) || u2 != pick(src2, p2)) begin
        failures++;
        $display("FAIL route src1=%0d src2=%0d u1=%p u2=%p", src1, src2, u1, u2);
      end
      for (int s = 0; s < NSIDES; s++) begin
        automatic logic ph = nb_in[s].v ^ nb_in[s].r;
        automatic bit by1 = en && (int'(src1) == s + 1);
        automatic bit by2 = en && (int'(src2) == s + 1);
        automatic bit taken = (!by1 || p1 == ph) && (!by2 || p2 == ph);
        if (by1 && by2) n_join++;
        if (!taken) n_wait++;
        checks++;
        if (nb_ack[s] != (taken ? ph : !ph)) begin
          failures++;
          $display("FAIL ack side %0d en=%b src1=%0d src2=%0d p1=%b p2=%b ph=%b got %b",
                   s, en, src1, src2, p1, p2, ph, nb_ack[s]);
        end
      end
    end
    checks++;
    if (n_join == 0 || n_wait == 0) failures++;
    $display("joined acknowledges %0d, withheld %0d", n_join, n_wait);
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
