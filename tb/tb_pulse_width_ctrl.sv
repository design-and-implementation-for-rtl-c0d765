// Self-checking testbench of the pulse-width controller.
//
// Runs the controller at its default sizes (10-clock unit, 100-unit base
// period) and changes the width setting at random moments. For every base
// period it checks that the period lasts 1000 clocks, that the pulse
// starts with the period, and that it stays high for exactly
// min(pw, 100) * 10 clocks, where pw is the setting at the period's start.
// Widths 0, 30 (300 us at 1 MHz), 100 and 127 are always included.
module tb_pulse_width_ctrl;

  localparam int unsigned UNIT = 10;
  localparam int unsigned BASE = 100;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [6:0] pw = 7'd30;
  logic       pwm, start;
  int         checks = 0, failures = 0;

  pulse_width_ctrl #(.PW_UNIT_CYCLES(UNIT), .BASE_UNITS(BASE), .PW_BITS(7)) dut (
    .clk(clk), .rst_n(rst_n), .pw_i(pw), .pwm_o(pwm), .period_start_o(start)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // monitor
  logic [6:0] pw_prev;
  int         cyc = 0, last_start = -1, high = 0, exp_pw = 0, periods = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (start) begin
        if (last_start >= 0) begin
          check(cyc - last_start == UNIT * BASE, "base period length");
          check(high == ((exp_pw > BASE) ? BASE : exp_pw) * UNIT, "pulse width");
          periods++;
        end
        last_start = cyc;
        exp_pw     = int'(pw_prev);
        high       = 0;
        check(pwm == (pw_prev != 0), "pulse starts with the period");
      end
      if (pwm) high++;
      cyc++;
    end
    pw_prev <= pw;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] fixed [4] = '{7'd0, 7'd30, 7'd100, 7'd127};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      pw = fixed[i];
      repeat (2 * UNIT * BASE) @(negedge clk);
    end
    for (int i = 0; i < 40; i++) begin
      pw = 7'($urandom);
      repeat ($urandom_range(300, 2500)) @(negedge clk);
    end
    repeat (UNIT * BASE + 5) @(negedge clk);
    check(periods > 40, "enough periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
