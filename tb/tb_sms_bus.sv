// tb_sms_bus: test of the wired-OR bus line group.
//
// Drives random patterns in which at most one of the N = 4 nodes drives a
// nonzero value (the scheduler's use) and checks that the bus carries that
// value, or 0 when nobody drives; then drives arbitrary patterns and checks
// the bitwise OR of all drivers, computed independently in the testbench.
module tb_sms_bus;

  int checks = 0, failures = 0;

  logic [3:0][2:0] drv;
  logic [2:0]      bus;

  sms_bus #(.W(3)) dut (.drv_i(drv), .bus_o(bus));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      automatic int who = int'($urandom_range(4, 0));  // 4: nobody drives
      automatic logic [2:0] val = 3'($urandom_range(7, 1));
      drv = '0;
      if (who < 4) drv[who] = val;
      #1;
      if (who < 4) check(bus == val, $sformatf("node %0d drives %0d, bus %0d", who, val, bus));
      else check(bus == '0, "idle bus is 0");
    end
    for (int t = 0; t < 500; t++) begin
      automatic logic [2:0] exp = '0;
      for (int k = 0; k < 4; k++) begin
        drv[k] = 3'($urandom);
        exp = exp | drv[k];
      end
      #1;
      check(bus == exp, $sformatf("OR of drivers %h: bus %0d expected %0d", drv, bus, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
