// Behavioural model of the stimulation-pattern generator, the
// microcontroller that programs the stimulator. It is a testbench part,
// not hardware of this design.
//
// Words queued with send_word() leave as UART frames (start bit 0, eight
// data bits LSB first, stop bit 1, idle 1), one bit per bit strobe of the
// Manchester encoder: at each strobe the encoder takes tx_o and the model
// presents the next bit. send_word() can also produce a frame with a bad
// stop bit, and send_command() queues a whole four-word command.
module pattern_gen_model (
  input  logic clk,
  input  logic bit_strobe_i,
  output logic tx_o
);

  bit q[$];

  initial tx_o = 1'b1;

  always @(posedge clk) begin
    if (bit_strobe_i) tx_o <= (q.size() > 0) ? q.pop_front() : 1'b1;
  end

  task automatic send_word(input logic [7:0] w, input bit good_stop = 1'b1);
    q.push_back(1'b0);
    for (int i = 0; i < 8; i++) q.push_back(w[i]);
    q.push_back(good_stop);
  endtask

  task automatic send_command(input bit pol, input int ch, input int amp, input int pw, input int per);
    send_word({4'b1000, pol, 3'(ch)});
    send_word(8'(amp));
    send_word(8'(pw));
    send_word(8'(per));
  endtask

  // Waits until everything queued has gone out, plus a few idle bits.
  task automatic drain();
    while (q.size() > 0) @(posedge clk);
    repeat (4) begin
      @(posedge clk iff bit_strobe_i);
    end
  endtask

endmodule
