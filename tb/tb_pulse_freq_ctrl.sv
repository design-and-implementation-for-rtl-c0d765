// Self-checking testbench of the pulse-frequency controller.
//
// The testbench plays the pulse-width controller: a base-period strobe
// every 20 clocks and a 5-clock pulse at the start of each period. For a
// series of period settings it checks that the output pulses are 5 clocks
// wide and exactly per * 20 clocks apart, that the first pulse comes at
// the first base period after stimulation is switched on, and that
// per = 0 gives no pulse at all.
module tb_pulse_freq_ctrl;

  localparam int unsigned P = 20;   // base period, clocks
  localparam int unsigned W = 5;    // pulse width, clocks

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [6:0] per = '0;
  logic       start, pin, pout;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  pulse_freq_ctrl #(.PER_BITS(7)) dut (
    .clk(clk), .rst_n(rst_n), .per_i(per), .period_start_i(start), .pulse_i(pin), .pulse_o(pout)
  );

  always #5 clk = ~clk;

  assign start = rst_n && (cyc % P == 0);
  assign pin   = rst_n && (cyc % P < W);

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // measure output pulses
  int rises[$];
  int widths[$];
  int cur_w = 0;
  logic pout_d = 1'b0;
  always @(posedge clk) begin
    if (pout && !pout_d) rises.push_back(cyc);
    if (pout) cur_w++;
    if (!pout && pout_d) begin
      widths.push_back(cur_w);
      cur_w = 0;
    end
    pout_d <= pout;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p, input int nper);
    int t_on;
    // switch on just before a base period starts
    while ((cyc + 1) % P != 0) @(negedge clk);
    rises.delete();
    widths.delete();
    per  = 7'(p);
    t_on = cyc + 1;
    repeat (nper * P * p - 2) @(negedge clk);
    per = '0;
    repeat (2 * P) @(negedge clk);
    check(rises.size() == nper, "number of pulses");
    if (rises.size() > 0) check(rises[0] == t_on + 1, "first pulse at the next base period");
    for (int i = 1; i < rises.size(); i++) check(rises[i] - rises[i-1] == p * P, "pulse spacing");
    foreach (widths[i]) check(widths[i] == W, "pulse width");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rises.delete();
    repeat (5 * P) @(negedge clk);
    check(rises.size() == 0, "no pulse while off");
    run(1, 10);
    run(50, 3);
    run(3, 8);
    for (int i = 0; i < 10; i++) run($urandom_range(1, 127), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
