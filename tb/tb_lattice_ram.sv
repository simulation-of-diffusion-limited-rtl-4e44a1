// tb_lattice_ram: fills the full 16,384 x 1 lattice RAM with a random pattern,
// reads every cell back (one-clock latency), and checks read-first behaviour
// (a write returns the old contents at the same edge).
module tb_lattice_ram;
  logic clk = 1'b0;
  logic we, din, dout;
  logic [13:0] addr;
  logic model [16384];
  int checks = 0, failures = 0;

  lattice_ram dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; din = 1'b0; addr = '0;
    @(negedge clk);
    for (int i = 0; i < 16384; i++) begin
      model[i] = 1'($urandom);
      we = 1'b1; addr = 14'(i); din = model[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 16384; i++) begin
      addr = 14'(i);
      @(negedge clk);
      check(dout == model[i], $sformatf("read %0d: got %0b expected %0b", i, dout, model[i]));
    end
    // Read-first: write the inverse, the same edge returns the old bit.
    for (int i = 0; i < 200; i++) begin
      int a = $urandom_range(16383);
      we = 1'b1; addr = 14'(a); din = ~model[a];
      @(negedge clk);
      check(dout == model[a], $sformatf("read-first at %0d", a));
      model[a] = ~model[a];
      we = 1'b0;
      @(negedge clk);
      check(dout == model[a], $sformatf("new value at %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
