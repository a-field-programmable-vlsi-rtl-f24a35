// ledr_src: testbench sender for one LEDR link (V, R word out, ACK in).
//
// Bits queued with push() are sent in order. A new word (next bit, opposite
// phase) is put on the link only after the receiver's acknowledge equals the
// phase of the word on the link, and after a random wait of 0..max_gap cycles,
// which stands for an arbitrary wire and sender delay. `sent` counts words.
module ledr_src
  import fpvlsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned max_gap,
  input  logic        ack,
  output ledr_t       link,
  output int unsigned sent
);
  bit          q[$];
  int unsigned wait_cnt;

  function automatic void push(bit b);
    q.push_back(b);
  endfunction

  function automatic int unsigned pending();
    return q.size();
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link     <= '0;
      sent     <= 0;
      wait_cnt <= 0;
    end else if (q.size() != 0 && ack == ledr_phase(link)) begin
      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        link     <= ledr_encode(q.pop_front(), !ledr_phase(link));
        sent     <= sent + 1;
        wait_cnt <= (max_gap == 0) ? 0 : $urandom_range(max_gap, 0);
      end
    end
  end
endmodule
