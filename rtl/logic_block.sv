// logic_block: the fine-grain logic block of one cell.
//
// Three functions, as the architecture specifies for its logic block:
//   * any logic function of two inputs (MODE_LUT, truth table cfg.lut),
//   * 1-bit addition with carry storage (MODE_ADD): a bit-serial full adder
//     that keeps its carry inside the cell, so words of any length are added
//     LSB first on a single cell with no carry ripple between cells,
//   * 1-bit storage (cfg.init_tok): the output register leaves reset holding
//     one word, so the cell delays its stream by one bit.
// Data path: two input registers (lb_input_ctrl) -> LEDR LUT (ledr_lut) ->
// output register (lb_output_ctrl), as in the block diagram of the logic block.
// In MODE_ADD the LUT's four memory bits are loaded with the sum function for
// the present carry (c ? XNOR : XOR), so the sum still comes out of the LUT;
// the carry register takes majority(a, b, c) whenever the output fires. With
// cfg.wlen = W > 0 the carry is cleared after every W bits (word boundary);
// with 0 it is cleared only by reset. Feeding the adder through the LUT and
// the word-length counter are this design's choices.
//
// Interface: u1/u2 are the links selected by the switch block, ack1/ack2 go
// back to it; `out` is broadcast to the four neighbours and ack[side] is the
// acknowledge each neighbour returns for it. Handshakes are evaluated on `clk`.
module logic_block
  import fpvlsi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cell_cfg_t         cfg,
  input  ledr_t             u1,
  input  ledr_t             u2,
  output logic              ack1,   // acknowledge of input 1 = phase of input register 1
  output logic              ack2,   // acknowledge of input 2 = phase of input register 2
  output ledr_t             out,
  input  logic [NSIDES-1:0] ack,
  output logic              fire,   // a word left the cell
  output logic              stall   // a word waits for a receiver
);

  ledr_t             ir1, ir2, lut_out;
  logic              p1, p2, pc, lut_valid, load1, load2;
  logic [3:0]        lut_m;
  logic              carry;
  logic [WLEN_W-1:0] bitcnt;

  lb_input_ctrl u_in (
    .clk, .rst_n, .en(cfg.en), .u1, .u2, .pc,
    .ir1, .ir2, .ack1, .ack2, .load1, .load2
  );

  always_comb begin
    p1 = ledr_phase(ir1);
    p2 = ledr_phase(ir2);
    // M00 = c, M01 = ~c, M10 = ~c, M11 = c : a ^ b ^ c
    lut_m = (cfg.mode == MODE_ADD) ? {carry, !carry, !carry, carry} : cfg.lut;
  end

  ledr_lut u_lut (
    .clk, .rst_n, .a(ir1), .b(ir2), .m(lut_m), .out(lut_out), .valid(lut_valid)
  );

  lb_output_ctrl #(.NACK(NSIDES)) u_out (
    .clk, .rst_n, .en(cfg.en), .init_tok(cfg.init_tok), .init_val(cfg.init_val),
    .p1, .p2, .value(lut_out.v), .ack, .out, .pc, .fire, .stall
  );

  // Carry storage and word-length counter of the bit-serial adder.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carry  <= 1'b0;
      bitcnt <= '0;
    end else if (fire && cfg.mode == MODE_ADD) begin
      if (cfg.wlen != '0 && bitcnt == cfg.wlen - 1'b1) begin
        carry  <= 1'b0;
        bitcnt <= '0;
      end else begin
        carry  <= (ir1.v & ir2.v) | (ir1.v & carry) | (ir2.v & carry);
        bitcnt <= bitcnt + 1'b1;
      end
    end
  end

  // The output only fires on a pair the LUT decodes as valid, and the LUT's
  // word then carries the phase of that pair.
  a_fire_valid: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> lut_valid && ledr_phase(lut_out) == p1);

  // A disabled cell takes no words.
  a_idle_when_off: assert property (@(posedge clk) disable iff (!rst_n)
    !cfg.en |-> !(load1 || load2 || fire));

endmodule
