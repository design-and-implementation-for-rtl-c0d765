// Self-checking testbench of the current-mode DAC model: all 32 codes give
// code * 108 uA (full scale 3.348 mA, within the 3.5 mA range), and a Vref
// of 0 gives no current.
module tb_current_dac;
  import microstim_pkg::na_t;

  logic [4:0] d;
  logic       vref;
  na_t        iref;
  int         checks = 0, failures = 0;

  current_dac dut (.d_i(d), .vref_i(vref), .iref_na_o(iref));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vref = 1'b1;
    for (int c = 0; c < 32; c++) begin
      d = 5'(c);
      #10;
      check(iref == c * 108000, "level");
    end
    check(iref <= 3500000, "full scale within 3.5 mA");
    vref = 1'b0;
    #10;
    check(iref == 0, "off without Vref");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
