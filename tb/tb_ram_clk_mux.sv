// tb_ram_clk_mux: drives the two clocks with unrelated periods and checks that
// the output follows the master clock when sel_pc = 0 and the host clock when
// sel_pc = 1, and that edges seen downstream come from the selected clock.
module tb_ram_clk_mux;
  timeunit 1ns;
  timeprecision 1ps;
  logic master_clk = 1'b0, pc_clk = 1'b0, sel_pc = 1'b0, ram_clk;
  int checks = 0, failures = 0;
  int ram_edges = 0;

  ram_clk_mux dut (.master_clk(master_clk), .pc_clk(pc_clk), .sel_pc(sel_pc), .ram_clk(ram_clk));

  always #5  master_clk = ~master_clk;
  always #37 pc_clk     = ~pc_clk;
  always @(posedge ram_clk) ram_edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i % 400 == 0) sel_pc = ~sel_pc;
      #3.5;   // sample half-way between the integer times at which clocks toggle
      check(ram_clk == (sel_pc ? pc_clk : master_clk),
            $sformatf("t=%0t sel=%0b ram_clk=%0b", $time, sel_pc, ram_clk));
      #0.5;
    end
    // Edge count over a window with each selection.
    sel_pc = 1'b0; #1 ram_edges = 0; #1000;
    check(ram_edges == 100, $sformatf("master edges %0d, expected 100", ram_edges));
    sel_pc = 1'b1; #1 ram_edges = 0; #740;
    check(ram_edges == 10, $sformatf("pc edges %0d, expected 10", ram_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
