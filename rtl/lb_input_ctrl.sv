// lb_input_ctrl: the two input registers of a logic block and their Input Control.
//
// Each input register holds one LEDR word. Register i takes the word on its
// link when the link shows a new phase (phase(u_i) != phase of the register)
// and the word it holds has been used, i.e. its phase equals `pc`, the phase of
// the last input pair the Output Control consumed. The acknowledge returned to
// the sender is the phase of the register, so the sender sees ACK = its own
// phase exactly when its word has been taken. The two registers load
// independently; the LUT behind them waits until both hold the same phase.
//
// Handshake is evaluated on `clk` (one register update per rising edge); on the
// chip these are self-timed latches. Reset empties both registers to (0,0),
// data 0 in phase 0. The registers only load when the cell is enabled.
module lb_input_ctrl
  import fpvlsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,     // cell enabled by its configuration
  input  ledr_t u1,     // link into input 1
  input  ledr_t u2,     // link into input 2
  input  logic  pc,     // phase of the last consumed input pair (from Output Control)
  output ledr_t ir1,    // input register 1 (Vi1, Ri1)
  output ledr_t ir2,    // input register 2 (Vi2, Ri2)
  output logic  ack1,   // acknowledge of input 1 (phase of ir1)
  output logic  ack2,   // acknowledge of input 2 (phase of ir2)
  output logic  load1,  // register 1 loads in this cycle
  output logic  load2   // register 2 loads in this cycle
);

  always_comb begin
    load1 = en && (ledr_phase(u1) != ledr_phase(ir1)) && (ledr_phase(ir1) == pc);
    load2 = en && (ledr_phase(u2) != ledr_phase(ir2)) && (ledr_phase(ir2) == pc);
    ack1  = ledr_phase(ir1);
    ack2  = ledr_phase(ir2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir1 <= '0;
      ir2 <= '0;
    end else begin
      if (load1) ir1 <= u1;
      if (load2) ir2 <= u2;
    end
  end

  // Handshake rule for the senders: a word stays on the link until it has been
  // acknowledged, i.e. the link only changes while ACK equals its phase (ACK
  // cannot move in that cycle, since the register holds that phase already).
  a_u1_held: assert property (@(posedge clk) disable iff (!rst_n)
    (u1 != $past(u1)) |-> ack1 == ledr_phase($past(u1)));
  a_u2_held: assert property (@(posedge clk) disable iff (!rst_n)
    (u2 != $past(u2)) |-> ack2 == ledr_phase($past(u2)));

endmodule
