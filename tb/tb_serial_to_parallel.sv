// Self-checking testbench of the serial-to-parallel converter.
//
// Drives decoded bits directly: UART frames of random words (start bit 0,
// eight data bits LSB first, stop bit 1) separated by idle ones, some with
// a bad stop bit, and one frame cut off by a loss of decoder lock. Checks
// every word delivered against the word sent, that bad frames give a
// frame error and no word, and that the converter restarts cleanly after
// the lock loss.
module tb_serial_to_parallel;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       bv = 1'b0, b = 1'b1, locked = 1'b0;
  logic       wv, ferr;
  logic [7:0] w;
  int         checks = 0, failures = 0;
  int         n_words = 0, n_ferr = 0;
  logic [7:0] last_word;

  serial_to_parallel #(.DATA_BITS(8)) dut (
    .clk(clk), .rst_n(rst_n), .bit_valid_i(bv), .bit_i(b), .locked_i(locked),
    .byte_valid_o(wv), .byte_o(w), .frame_err_o(ferr)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (wv) begin
      n_words++;
      last_word = w;
    end
    if (ferr) n_ferr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic put_bit(input bit v);
    @(negedge clk);
    b  = v;
    bv = 1'b1;
    @(negedge clk);
    bv = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic frame(input logic [7:0] d, input bit stop);
    put_bit(1'b0);
    for (int i = 0; i < 8; i++) put_bit(d[i]);
    put_bit(stop);
    repeat (2) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int         w0, f0;
    bit         good;
    repeat (3) @(negedge clk);
    rst_n  = 1'b1;
    locked = 1'b1;
    repeat (3) put_bit(1'b1);
    for (int n = 0; n < 200; n++) begin
      good = ($urandom % 8) != 0;
      d  = 8'($urandom);
      w0 = n_words;
      f0 = n_ferr;
      frame(d, good);
      if (good) begin
        check(n_words == w0 + 1 && n_ferr == f0, "one word per good frame");
        check(last_word == d, "word value");
      end else begin
        check(n_words == w0 && n_ferr == f0 + 1, "bad stop bit flagged, no word");
      end
      repeat ($urandom % 3) put_bit(1'b1);
    end
    // lock lost in the middle of a frame: the partial frame is discarded
    w0 = n_words;
    f0 = n_ferr;
    put_bit(1'b0);
    put_bit(1'b0);
    put_bit(1'b1);
    @(negedge clk) locked = 1'b0;
    repeat (4) @(negedge clk);
    locked = 1'b1;
    put_bit(1'b1);
    frame(8'hA5, 1'b1);
    check(n_words == w0 + 1 && n_ferr == f0, "clean restart after lock loss");
    check(last_word == 8'hA5, "word after lock loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
