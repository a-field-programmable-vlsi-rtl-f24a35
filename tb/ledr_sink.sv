// ledr_sink: testbench receiver for one LEDR link.
//
// A word is new when the phase on the link differs from the acknowledge last
// returned. After a random wait of 0..max_gap cycles the sink stores the value
// rail and returns ACK = the word's phase. Received bits are read with pop().
module ledr_sink
  import fpvlsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned max_gap,
  input  ledr_t       link,
  output logic        ack,
  output int unsigned got
);
  bit          q[$];
  int unsigned wait_cnt;

  function automatic bit pop();
    return q.pop_front();
  endfunction

  function automatic int unsigned count();
    return q.size();
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      got      <= 0;
      wait_cnt <= 0;
    end else if (ledr_phase(link) != ack) begin
      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        q.push_back(link.v);
        ack      <= ledr_phase(link);
        got      <= got + 1;
        wait_cnt <= (max_gap == 0) ? 0 : $urandom_range(max_gap, 0);
      end
    end
  end
endmodule
