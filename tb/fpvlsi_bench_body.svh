// Shared body of the array testbenches (tb_fpvlsi_top, tb_fpvlsi_full). The
// including module declares ROWS, COLS and instantiates fpvlsi_top as `dut`
// with the port signals declared here.
//
// Circuit mapped onto the array (needs ROWS >= 4, COLS >= 3):
//   row 1: B enters from the west; cell (1,0) buffers it and feeds both
//          cell (0,0) and cell (2,0) (one output, two receivers).
//   row 0: cell (0,0) adds A (west edge) and B bit-serially, 8-bit words;
//          cells (0,1..) carry the sum east to e_out[0].
//   row 2: cell (2,0) = B AND C (C from the west edge); cell (2,1) is a 1-bit
//          storage cell holding a 1; cells (2,2..) carry the stream east.
//   row 3: D enters from the east and travels west along row 3; cell (3,0)
//          inverts it and column 0 carries ~D south to s_out[0].
// Cells off these paths are disabled. The whole run is made twice, with no
// delays and with random delays at all edge senders and receivers; both must
// give the expected streams. Mechanisms counted: back-pressure stalls, adder
// carries, carry clears at word boundaries, acknowledges joined from two
// receivers, cycles in which a LUT holds on an invalid input pair, and the
// storage word.

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  ledr_t n_in[COLS], n_out[COLS], s_in[COLS], s_out[COLS];
  ledr_t w_in[ROWS], w_out[ROWS], e_in[ROWS], e_out[ROWS];
  logic [COLS-1:0] n_in_ack, n_out_ack, s_in_ack, s_out_ack;
  logic [ROWS-1:0] w_in_ack, w_out_ack, e_in_ack, e_out_ack;
  logic [ROWS*COLS-1:0] fire, stall;

  localparam int WORDS = 12;
  localparam int NB    = WORDS * 8;

  int unsigned gap = 0;
  int unsigned sa, sb, sc, sd, g0, g2, gs;
  logic ack_a, ack_b, ack_c, ack_d, ack_r0, ack_r2, ack_s0;
  ledr_t la, lb, lc, ld;
  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_clear = 0, n_join_wait = 0, n_lut_hold = 0;

  always #5 clk = ~clk;

  ledr_src  src_a (.clk, .rst_n, .max_gap(gap), .ack(ack_a), .link(la), .sent(sa));
  ledr_src  src_b (.clk, .rst_n, .max_gap(gap), .ack(ack_b), .link(lb), .sent(sb));
  ledr_src  src_c (.clk, .rst_n, .max_gap(gap), .ack(ack_c), .link(lc), .sent(sc));
  ledr_src  src_d (.clk, .rst_n, .max_gap(gap), .ack(ack_d), .link(ld), .sent(sd));
  ledr_sink snk_0 (.clk, .rst_n, .max_gap(gap), .link(e_out[0]), .ack(ack_r0), .got(g0));
  ledr_sink snk_2 (.clk, .rst_n, .max_gap(gap), .link(e_out[2]), .ack(ack_r2), .got(g2));
  ledr_sink snk_s (.clk, .rst_n, .max_gap(gap), .link(s_out[0]), .ack(ack_s0), .got(gs));

  // Edge wiring: senders on w_in[0..2] and e_in[3], receivers on e_out[0],
  // e_out[2], s_out[0]; every other edge input is idle and every other edge
  // output is acknowledged at once.
  for (genvar c = 0; c < COLS; c++) begin : g_ns_edge
    assign n_in[c] = '0;
    assign s_in[c] = '0;
    assign n_out_ack[c] = ledr_phase(n_out[c]);
    assign s_out_ack[c] = (c == 0) ? ack_s0 : ledr_phase(s_out[c]);
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_we_edge
    assign w_in[r] = (r == 0) ? la : (r == 1) ? lb : (r == 2) ? lc : '0;
    assign e_in[r] = (r == 3) ? ld : '0;
    assign w_out_ack[r] = ledr_phase(w_out[r]);
    assign e_out_ack[r] = (r == 0) ? ack_r0 : (r == 2) ? ack_r2 : ledr_phase(e_out[r]);
  end
  assign ack_a = w_in_ack[0];
  assign ack_b = w_in_ack[1];
  assign ack_c = w_in_ack[2];
  assign ack_d = e_in_ack[3];

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    n_stall += $countones(stall);
    if (dut.g_row[0].g_col[0].u_cell.fire && dut.g_row[0].g_col[0].u_cell.u_lb.carry) n_carry++;
    if (dut.g_row[0].g_col[0].u_cell.fire && dut.g_row[0].g_col[0].u_cell.u_lb.bitcnt == 4'd7)
      n_clear++;
    // Cell (1,0) has a word ready but one of its two receivers still holds the last.
    if (dut.g_row[1].g_col[0].u_cell.stall) n_join_wait++;
    if (!dut.g_row[0].g_col[0].u_cell.u_lb.u_lut.valid) n_lut_hold++;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic cell_cfg_t cfg_of(int r, int c);
    cell_cfg_t k;
    localparam logic [3:0] PASS_A = 4'b1100, AND_AB = 4'b1000, NOT_A = 4'b0011;
    k = '{en: 1'b0, src1: SRC_NONE, src2: SRC_NONE, mode: MODE_LUT, lut: PASS_A,
          init_tok: 1'b0, init_val: 1'b0, wlen: '0};
    if (r == 0) begin
      k.en = 1; k.src1 = SRC_W;
      if (c == 0) begin k.src2 = SRC_S; k.mode = MODE_ADD; k.wlen = 4'd8; end
    end else if (r == 1 && c == 0) begin
      k.en = 1; k.src1 = SRC_W;
    end else if (r == 2) begin
      k.en = 1; k.src1 = SRC_W;
      if (c == 0) begin k.src1 = SRC_N; k.src2 = SRC_W; k.lut = AND_AB; end
      if (c == 1) begin k.init_tok = 1; k.init_val = 1; end
    end else if (r == 3) begin
      k.en = 1; k.src1 = SRC_E;
      if (c == 0) k.lut = NOT_A;
    end else if (c == 0) begin
      k.en = 1; k.src1 = SRC_N;
    end
    return k;
  endfunction

  task automatic configure();
    rst_n = 0;
    for (int k = ROWS * COLS - 1; k >= 0; k--) begin
      logic [CFG_W-1:0] w = cfg_of(k / COLS, k % COLS);
      for (int i = CFG_W - 1; i >= 0; i--) begin
        @(negedge clk);
        cfg_en = 1;
        cfg_in = w[i];
      end
    end
    @(negedge clk) cfg_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  task automatic run(int unsigned g);
    logic [7:0] wa[WORDS], wb[WORDS];
    bit c_bits[NB], d_bits[NB];
    int t;
    configure();
    gap = g;
    for (int w = 0; w < WORDS; w++) begin
      wa[w] = (w == 0) ? 8'hFF : 8'($urandom);
      wb[w] = (w == 0) ? 8'h01 : 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        c_bits[w*8+i] = 1'($urandom);
        d_bits[w*8+i] = 1'($urandom);
        src_a.push(wa[w][i]); src_b.push(wb[w][i]);
        src_c.push(c_bits[w*8+i]); src_d.push(d_bits[w*8+i]);
      end
    end
    for (t = 0; t < 200000 && (snk_0.count() < NB || snk_2.count() < NB + 1 || snk_s.count() < NB); t++)
      @(posedge clk);
    chk(snk_0.count() == NB && snk_2.count() == NB + 1 && snk_s.count() == NB,
        $sformatf("all streams arrived (gap %0d): %0d %0d %0d", g, snk_0.count(), snk_2.count(), snk_s.count()));
    $display("gap %0d: %0d bits through the array in %0d cycles", g, NB, t);
    for (int w = 0; w < WORDS; w++) begin
      automatic logic [7:0] s = wa[w] + wb[w];
      logic [7:0] r;
      for (int i = 0; i < 8; i++) r[i] = snk_0.pop();
      chk(r == s, $sformatf("row 0 sum word %0d: %h + %h = %h, got %h", w, wa[w], wb[w], s, r));
    end
    chk(snk_2.pop() == 1'b1, "row 2 starts with the storage word");
    for (int i = 0; i < NB; i++) begin
      chk(snk_2.pop() == (wb[i/8][i%8] & c_bits[i]), $sformatf("row 2 B AND C bit %0d", i));
      chk(snk_s.pop() == !d_bits[i], $sformatf("column 0 NOT D bit %0d", i));
    end
    // Drain what a sink may still hold (nothing, if all went right).
    while (snk_0.count() != 0) void'(snk_0.pop());
    while (snk_2.count() != 0) void'(snk_2.pop());
    while (snk_s.count() != 0) void'(snk_s.pop());
  endtask

  initial begin
    run(0);
    run(5);
    $display("stalls %0d, carries %0d, carry clears %0d, two-receiver waits %0d, LUT holds %0d",
             n_stall, n_carry, n_clear, n_join_wait, n_lut_hold);
    chk(n_stall > 0, "a stall happened");
    chk(n_carry > 0, "a carry was stored");
    chk(n_clear > 0, "a carry was cleared at a word boundary");
    chk(n_join_wait > 0, "a broadcast waited for one of two receivers");
    chk(n_lut_hold > 0, "a LUT held its output on an invalid input pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
