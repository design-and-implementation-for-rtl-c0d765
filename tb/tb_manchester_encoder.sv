// Self-checking testbench of the Manchester encoder.
//
// Feeds random bits, one per bit strobe, and checks MED against the
// Manchester rule worked out here: in each bit the line carries the data
// in the first half and its complement in the second, with the bit lasting
// exactly 2*HALF_BIT_CYCLES clocks. The strobe spacing is checked too.
module tb_manchester_encoder;

  localparam int unsigned HB = 4;

  logic clk = 1'b0, rst_n = 1'b0, data = 1'b0;
  logic strobe, med;
  int   checks = 0, failures = 0;

  manchester_encoder #(.HALF_BIT_CYCLES(HB)) dut (
    .clk(clk), .rst_n(rst_n), .data_i(data), .bit_strobe_o(strobe), .med_o(med)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit b;
    int last_strobe;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last_strobe = -1;
    cyc = 0;
    for (int n = 0; n < 200; n++) begin
      // wait for the strobe that takes the next bit
      do begin @(posedge clk); cyc++; end while (!strobe);
      if (last_strobe >= 0) check(cyc - last_strobe == 2 * HB, "strobe period");
      last_strobe = cyc;
      b = data;                 // the bit taken at this strobe
      #1 data = 1'($urandom);   // present the next bit right after the strobe
      // MED changes one clock after the strobe: sample the middle of each half
      repeat (1 + HB / 2) begin @(posedge clk); cyc++; end
      #1 check(med == b, "first half carries the data");
      repeat (HB) begin @(posedge clk); cyc++; end
      #1 check(med == !b, "second half carries the complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
