// tb_logic_block: end-to-end test of one logic block between two LEDR senders
// and one LEDR receiver, all with random delays.
//   1. LUT mode, several random truth tables: out[i] = f(a[i], b[i]).
//   2. ADD mode, 8-bit words LSB first, carry cleared every 8 bits:
//      each output word is (A + B) mod 256.
//   3. ADD mode with wlen = 0: one 24-bit addition, carry kept throughout.
//   4. 1-bit storage: the stream comes out delayed by one initial bit.
//   5. Rate with no delays anywhere: one bit every 2 clock cycles.
// The other three acknowledge inputs echo the output phase (no listener).
module tb_logic_block;
  import fpvlsi_pkg::*;

  logic clk = 0, rst_n = 0;
  cell_cfg_t cfg;
  ledr_t ua, ub, out;
  logic ack1, ack2, sink_ack, fire, stall;
  logic [3:0] ack;
  int unsigned gap = 0, sent_a, sent_b, got;
  int checks = 0, failures = 0, n_stall = 0;

  always #5 clk = ~clk;

  ledr_src  src_a (.clk, .rst_n, .max_gap(gap), .ack(ack1), .link(ua), .sent(sent_a));
  ledr_src  src_b (.clk, .rst_n, .max_gap(gap), .ack(ack2), .link(ub), .sent(sent_b));
  ledr_sink snk   (.clk, .rst_n, .max_gap(gap), .link(out), .ack(sink_ack), .got(got));

  assign ack = {ledr_phase(out), ledr_phase(out), ledr_phase(out), sink_ack};

  logic_block dut (.clk, .rst_n, .cfg, .u1(ua), .u2(ub), .ack1, .ack2, .out, .ack, .fire, .stall);

  always @(posedge clk) if (rst_n && stall) n_stall++;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic restart(cell_cfg_t c, int unsigned g);
    rst_n = 0;
    cfg   = c;
    gap   = g;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  endtask

  task automatic wait_bits(int unsigned n);
    int unsigned t = 0;
    while (snk.count() < n && t < 100000) begin
      @(posedge clk);
      t++;
    end
    chk(snk.count() == n, "all bits arrived");
  endtask

  cell_cfg_t base;
  bit a[$], b[$];

  initial begin
    base = '{en: 1'b1, src1: SRC_W, src2: SRC_N, mode: MODE_LUT, lut: 4'b0000,
             init_tok: 1'b0, init_val: 1'b0, wlen: '0};

    // 1. Random truth tables.
    for (int k = 0; k < 6; k++) begin
      automatic cell_cfg_t c = base;
      c.lut = (k == 0) ? 4'b0110 : 4'($urandom);
      restart(c, 4);
      a.delete(); b.delete();
      for (int i = 0; i < 64; i++) begin
        a.push_back(1'($urandom)); b.push_back(1'($urandom));
        src_a.push(a[i]); src_b.push(b[i]);
      end
      wait_bits(64);
      for (int i = 0; i < 64; i++) chk(snk.pop() == c.lut[{a[i], b[i]}], "LUT output");
    end

    // 2. 8-bit words, carry cleared at every word boundary.
    begin
      automatic cell_cfg_t c = base;
      logic [7:0] wa[16], wb[16];
      c.mode = MODE_ADD; c.wlen = 4'd8;
      restart(c, 3);
      for (int w = 0; w < 16; w++) begin
        wa[w] = (w == 0) ? 8'hFF : 8'($urandom);
        wb[w] = (w == 0) ? 8'h01 : 8'($urandom);
        for (int i = 0; i < 8; i++) begin src_a.push(wa[w][i]); src_b.push(wb[w][i]); end
      end
      wait_bits(128);
      for (int w = 0; w < 16; w++) begin
        automatic logic [7:0] s = wa[w] + wb[w];
        logic [7:0] r;
        for (int i = 0; i < 8; i++) r[i] = snk.pop();
        chk(r == s, $sformatf("8-bit sum word %0d: %h + %h = %h got %h", w, wa[w], wb[w], s, r));
      end
    end

    // 3. One long addition, carry never cleared.
    begin
      automatic cell_cfg_t c = base;
      logic [23:0] la, lb, s, r;
      c.mode = MODE_ADD;
      restart(c, 2);
      la = 24'($urandom); lb = 24'($urandom); s = la + lb;
      for (int i = 0; i < 24; i++) begin src_a.push(la[i]); src_b.push(lb[i]); end
      wait_bits(24);
      for (int i = 0; i < 24; i++) r[i] = snk.pop();
      chk(r == s, "24-bit serial sum");
    end

    // 4. 1-bit storage: pass input a, initial word 1.
    begin
      automatic cell_cfg_t c = base;
      c.lut = 4'b1100; c.init_tok = 1'b1; c.init_val = 1'b1;
      restart(c, 3);
      a.delete();
      for (int i = 0; i < 40; i++) begin a.push_back(1'($urandom)); src_a.push(a[i]); src_b.push(1'($urandom)); end
      wait_bits(41);
      chk(snk.pop() == 1'b1, "initial storage word first");
      for (int i = 0; i < 40; i++) chk(snk.pop() == a[i], "delayed stream");
    end

    // 5. Rate with zero delays.
    begin
      automatic cell_cfg_t c = base;
      int t0, t1;
      c.lut = 4'b1000;
      restart(c, 0);
      for (int i = 0; i < 101; i++) begin src_a.push(1); src_b.push(1); end
      while (snk.count() < 1) @(posedge clk);
      t0 = $time / 10;
      while (snk.count() < 101) @(posedge clk);
      t1 = $time / 10;
      $display("100 bits in %0d cycles", t1 - t0);
      chk(t1 - t0 == 200, "one bit per 2 cycles");
      for (int i = 0; i < 101; i++) void'(snk.pop());
    end

    chk(n_stall > 0, "receiver back-pressure stalled the block");
    $display("stall cycles %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
