// Self-checking testbench of the Manchester decoder.
//
// A reference transmitter in the testbench builds the line signal
// directly from the Manchester rule (data in the first half of a bit,
// complement in the second) on its own time base, 2 % and 10 % slower and
// faster than the decoder's nominal bit period. It sends a run of idle
// ones, which must not give lock (their transitions are all half a bit
// apart), then random bits. The decoder must lock on the first 0 after the
// ones and then deliver every later bit in order. A silent line must drop
// the lock.
module tb_manchester_decoder;

  localparam int unsigned OS = 16;

  logic clk = 1'b0, rst_n = 1'b0, med = 1'b0;
  logic bv, b, locked;
  int   checks = 0, failures = 0;
  bit   sent[$];
  bit   got[$];
  int   locks = 0;

  manchester_decoder #(.OVERSAMPLE(OS)) dut (
    .clk(clk), .rst_n(rst_n), .med_i(med), .bit_valid_o(bv), .bit_o(b), .locked_o(locked)
  );

  always #5 clk = ~clk;   // 10 ns: one bit is nominally 160 ns

  always @(posedge clk) if (bv) got.push_back(b);
  always @(posedge locked) locks++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send_bit(input bit v, input realtime half);
    med = v;
    #(half);
    med = !v;
    #(half);
  endtask

  task automatic run(input realtime half, input int nbits);
    int ones = 12;
    sent.delete();
    got.delete();
    for (int i = 0; i < ones; i++) begin
      send_bit(1'b1, half);
    end
    check(!locked, "no lock on idle ones");
    check(got.size() == 0, "no bits before lock");
    sent.push_back(1'b0);
    send_bit(1'b0, half);
    for (int i = 0; i < nbits; i++) begin
      bit v = 1'($urandom);
      sent.push_back(v);
      send_bit(v, half);
    end
    // trailing bit so the last data bit's centre is seen
    send_bit(1'b1, half);
    sent.push_back(1'b1);
    #(half * 2);
    check(got.size() == sent.size(), "number of decoded bits");
    for (int i = 0; i < got.size() && i < sent.size(); i++)
      check(got[i] == sent[i], "decoded bit");
    // silence: line stays low
    med = 1'b0;
    #(half * 10);
    check(!locked, "lock lost on a silent line");
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #33 rst_n = 1'b1;
    #100;
    run(81.6ns, 300);   // transmitter 2 % slow
    run(78.4ns, 300);   // transmitter 2 % fast
    run(88.0ns, 300);   // transmitter 10 % slow
    run(72.0ns, 300);   // transmitter 10 % fast
    check(locks == 4, "one lock per burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
