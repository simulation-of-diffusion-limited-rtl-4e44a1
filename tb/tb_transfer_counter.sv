// tb_transfer_counter: pulses the host clock and checks that the read address
// steps through every one of the 16,384 cells once and wraps to zero, and that
// the asynchronous reset clears it without a clock.
module tb_transfer_counter;
  logic pc_clk = 1'b0, rst;
  logic [13:0] addr;
  int checks = 0, failures = 0;

  transfer_counter dut (.pc_clk(pc_clk), .rst(rst), .addr(addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse();
    #7 pc_clk = 1'b1;
    #7 pc_clk = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; #1 rst = 1'b1; #5 rst = 1'b0; #1;
    check(addr == 0, "reset value");
    for (int k = 1; k <= 16384 + 5; k++) begin
      pulse();
      check(addr == 14'(k), $sformatf("after %0d pulses addr=%0d", k, addr));
    end
    // Asynchronous reset with the clock stopped.
    #3 rst = 1'b1; #1;
    check(addr == 0, "async reset");
    rst = 1'b0;
    pulse();
    check(addr == 1, "counts after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
