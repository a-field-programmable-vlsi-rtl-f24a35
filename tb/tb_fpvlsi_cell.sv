// tb_fpvlsi_cell: one cell with its configuration chain and four neighbours.
//   * The configuration word shifted in comes out of cfg_out unchanged
//     CFG_W clocks later (scan chain).
//   * Adder: input 1 from the east, input 2 from the south, 4-bit words;
//     the output is read by two receivers (north and west) with independent
//     random delays, so the cell must wait for both acknowledges.
//   * LUT mode: NAND of the two inputs.
//   * The acknowledges to the two sides nobody selects follow their words.
module tb_fpvlsi_cell;
  import fpvlsi_pkg::*;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  ledr_t nb_in[NSIDES], out, le, ls;
  logic [NSIDES-1:0] nb_ack, out_ack;
  logic ack_n, ack_w, fire, stall;
  int unsigned gap = 3, se, ss, gn, gw;
  int checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  ledr_src  src_e (.clk, .rst_n, .max_gap(gap), .ack(nb_ack[SIDE_E]), .link(le), .sent(se));
  ledr_src  src_s (.clk, .rst_n, .max_gap(gap), .ack(nb_ack[SIDE_S]), .link(ls), .sent(ss));
  ledr_sink snk_n (.clk, .rst_n, .max_gap(gap), .link(out), .ack(ack_n), .got(gn));
  ledr_sink snk_w (.clk, .rst_n, .max_gap(gap * 2), .link(out), .ack(ack_w), .got(gw));

  assign nb_in[SIDE_E] = le;
  assign nb_in[SIDE_S] = ls;
  assign nb_in[SIDE_N] = ledr_encode(1, 1);
  assign nb_in[SIDE_W] = ledr_encode(0, 1);
  assign out_ack = {ack_w, ledr_phase(out), ledr_phase(out), ack_n};  // W S E N

  fpvlsi_cell dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .nb_in, .nb_ack, .out, .out_ack,
                   .fire, .stall);

  always @(posedge clk) if (rst_n && stall) n_stall++;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic shift_cfg(cell_cfg_t c, output logic [CFG_W-1:0] seen);
    logic [CFG_W-1:0] w = c;
    rst_n = 0;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      seen[i] = cfg_out;
      cfg_en  = 1;
      cfg_in  = w[i];
    end
    @(negedge clk) cfg_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    cell_cfg_t c1, c2;
    logic [CFG_W-1:0] seen;
    c1 = '{en: 1'b1, src1: SRC_E, src2: SRC_S, mode: MODE_ADD, lut: 4'b0000,
           init_tok: 1'b0, init_val: 1'b0, wlen: 4'd4};
    c2 = c1;
    c2.mode = MODE_LUT; c2.lut = 4'b0111; c2.wlen = '0;

    shift_cfg(c1, seen);
    shift_cfg(c2, seen);
    chk(seen == c1, "configuration word leaves cfg_out unchanged");
    shift_cfg(c1, seen);
    chk(seen == c2, "second configuration word leaves cfg_out");

    // Adder, 4-bit words.
    begin
      logic [3:0] wa[32], wb[32];
      for (int w = 0; w < 32; w++) begin
        wa[w] = 4'($urandom); wb[w] = 4'($urandom);
        for (int i = 0; i < 4; i++) begin src_e.push(wa[w][i]); src_s.push(wb[w][i]); end
      end
      for (int t = 0; t < 20000 && (snk_n.count() < 128 || snk_w.count() < 128); t++)
        @(posedge clk);
      chk(snk_n.count() == 128 && snk_w.count() == 128, "both receivers got every bit");
      for (int w = 0; w < 32; w++) begin
        automatic logic [3:0] s = wa[w] + wb[w];
        logic [3:0] rn, rw;
        for (int i = 0; i < 4; i++) begin rn[i] = snk_n.pop(); rw[i] = snk_w.pop(); end
        chk(rn == s && rw == s, $sformatf("4-bit sum %h+%h=%h got %h/%h", wa[w], wb[w], s, rn, rw));
      end
    end
    chk(nb_ack[SIDE_N] == ledr_phase(nb_in[SIDE_N]) &&
        nb_ack[SIDE_W] == ledr_phase(nb_in[SIDE_W]), "unselected sides acknowledge at once");

    // NAND.
    shift_cfg(c2, seen);
    begin
      bit a[$], b[$];
      for (int i = 0; i < 50; i++) begin
        a.push_back(1'($urandom)); b.push_back(1'($urandom));
        src_e.push(a[i]); src_s.push(b[i]);
      end
      for (int t = 0; t < 20000 && (snk_w.count() < 50 || snk_n.count() < 50); t++) @(posedge clk);
      for (int i = 0; i < 50; i++) begin
        chk(snk_n.pop() == !(a[i] && b[i]), $sformatf("NAND (north) bit %0d", i));
        chk(snk_w.pop() == !(a[i] && b[i]), "NAND (west)");
      end
    end
    chk(n_stall > 0, "slow receiver stalled the cell");
    $display("stall cycles %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
