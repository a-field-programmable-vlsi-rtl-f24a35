// lb_output_ctrl: Output Control and output register of a logic block.
//
// The output register holds the LEDR word the cell sends to its neighbours.
// It loads a new word when
//   * both input registers hold the same phase (the LUT drives a valid word),
//   * that pair has not been consumed yet (its phase differs from `pc`), and
//   * every acknowledge coming back from the neighbours equals the phase of the
//     word now in the output register (all receivers have taken it).
// On a load the output phase toggles, the new word is encode(value, new phase)
// and `pc` takes the phase of the pair, which lets the input registers accept
// their next words. Consecutive output words therefore differ in one rail.
//
// 1-bit storage: with init_tok set the output register leaves reset holding a
// word (value init_val, phase 1) that no input produced, so the cell delays
// its input stream by one bit. Without it the register resets to (0,0) and
// holds no word. Which neighbours listen is decided in the neighbours; an
// unused link acknowledges by itself, so all NACK acknowledges are joined.
//
// Handshake evaluated on `clk`; on the chip it is self-timed. `stall` reports a
// cycle in which a new word is ready but a receiver has not yet taken the last.
module lb_output_ctrl
  import fpvlsi_pkg::*;
#(
  parameter int unsigned NACK = NSIDES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            init_tok,
  input  logic            init_val,
  input  logic            p1,        // phase of input register 1
  input  logic            p2,        // phase of input register 2
  input  logic            value,     // data value to send with the next word
  input  logic [NACK-1:0] ack,       // acknowledges from the receivers
  output ledr_t           out,       // (Vout, Rout)
  output logic            pc,        // phase of the last consumed input pair
  output logic            fire,      // output register loads in this cycle
  output logic            stall      // ready, but waiting for an acknowledge
);

  logic po, pair_ready, acked;

  always_comb begin
    po         = ledr_phase(out);
    pair_ready = en && (p1 == p2) && (p1 != pc);
    acked      = (ack == {NACK{po}});
    fire       = pair_ready && acked;
    stall      = pair_ready && !acked;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out <= ledr_encode(init_val && init_tok, init_tok);
      pc  <= 1'b0;
    end else if (fire) begin
      out <= ledr_encode(value, !po);
      pc  <= p1;
    end
  end

  // LEDR: successive words on the output differ in exactly one rail.
  a_hamming1: assert property (@(posedge clk) disable iff (!rst_n)
    fire |=> $countones(out ^ $past(out)) == 1);

endmodule
