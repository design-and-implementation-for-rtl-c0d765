// Self-checking testbench of the output bridge model: Sign passes the
// current forward, Unsign reverses it, neither gives none.
module tb_output_bridge;
  import microstim_pkg::na_t;

  na_t  iin, iload;
  logic s, u;
  int   checks = 0, failures = 0;

  output_bridge dut (.iout_na_i(iin), .sign_i(s), .unsign_i(u), .iload_na_o(iload));

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
    for (int n = 0; n < 50; n++) begin
      iin = na_t'($urandom_range(0, 3500000));
      s = 1'b1; u = 1'b0; #10;
      check(iload == iin, "Sign: forward");
      s = 1'b0; u = 1'b1; #10;
      check(iload == -iin, "Unsign: reverse");
      s = 1'b0; u = 1'b0; #10;
      check(iload == 0, "open");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
