// Self-checking testbench of the current mirror model: the output copies
// the reference current times the gain (1 and 3 are tried) and is limited
// at the 5 mA compliance.
module tb_current_mirror;
  import microstim_pkg::na_t;

  na_t iref, iout1, iout3;
  int  checks = 0, failures = 0;

  current_mirror dut1 (.iref_na_i(iref), .iout_na_o(iout1));
  current_mirror #(.GAIN(3)) dut3 (.iref_na_i(iref), .iout_na_o(iout3));

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
    for (int c = 0; c < 32; c++) begin
      iref = c * 108000;
      #10;
      check(iout1 == c * 108000, "unity copy");
      check(iout3 == ((c * 324000 > 5000000) ? 5000000 : c * 324000), "gain 3 with compliance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
