// tb_control_unit: runs the control unit on a 16 x 16 lattice with a short
// cycle limit. The testbench plays the RAM (clocked by the unit's ram_clk,
// read-first, one clock latency) and the two RNGs ($urandom words). Checked:
// the display shows 0 while idle, 1 while running and E at the end; the RAM
// clock follows the master clock in DLA mode and the host clock in transfer
// mode; the lattice is cleared and seeded; every walker that sticks has an
// occupied neighbour; the process uses exactly MAX_CYCLES master clocks; in
// transfer mode no write reaches the RAM and the host receives cell k-1 after
// pulse k, for all cells, in address order.
module tb_control_unit;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int CW = 4;
  localparam int AW = 2 * CW;
  localparam int N  = 1 << CW;
  localparam int MAXC = 20000;

  logic master_clk = 1'b0, pc_clk = 1'b0, reset, dla_dt;
  logic [29:0] rng_a, rng_b;
  logic ram_clk, ram_we, ram_din, ram_dout, pc_data, done;
  logic [AW-1:0] ram_addr;
  logic [6:0] seg;
  logic [31:0] cycles;

  logic mem [1 << AW];
  int checks = 0, failures = 0;
  int n_clear_writes = 0, n_seed = 0, n_stick = 0, run_clocks = 0;

  control_unit #(.COORD_W(CW), .MAX_CYCLES(MAXC)) dut (
    .master_clk, .pc_clk, .reset, .dla_dt, .rng_a, .rng_b,
    .ram_clk, .ram_addr, .ram_we, .ram_din, .ram_dout, .pc_data, .seg, .done, .cycles);

  always #5 master_clk = ~master_clk;

  always @(posedge ram_clk) begin
    if (ram_we) mem[ram_addr] <= ram_din;
    ram_dout <= mem[ram_addr];
  end

  always @(posedge master_clk) begin
    #1;
    rng_a = {$urandom, $urandom}[29:0];
    rng_b = {$urandom, $urandom}[29:0];
  end

  // Clocks in which the display shows "1" (running).
  always @(negedge master_clk) if (seg == 7'b000_0110) run_clocks++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic bit occ(int x, int y);
    return mem[AW'(((y & (N - 1)) << CW) | (x & (N - 1)))];
  endfunction

  // Classify every RAM write made in DLA mode, half a clock before it lands.
  always @(negedge master_clk) begin
    if (!dla_dt && ram_we) begin
      automatic int x = int'(ram_addr[CW-1:0]);
      automatic int y = int'(ram_addr[AW-1:CW]);
      if (ram_din == 1'b0) n_clear_writes++;
      else if (x == N / 2 && y == N / 2 && n_seed == 0) n_seed++;
      else begin
        n_stick++;
        check(occ(x, y - 1) || occ(x, y + 1) || occ(x - 1, y) || occ(x + 1, y),
              $sformatf("walker stuck at (%0d,%0d) with no occupied neighbour", x, y));
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic snap [1 << AW];
    reset = 1'b0; dla_dt = 1'b1;
    #1 reset = 1'b1;   // a rising edge for the asynchronous reset
    repeat (3) @(negedge master_clk);
    reset = 1'b0;
    @(negedge master_clk);
    check(seg == 7'b011_1111, $sformatf("idle display %b", seg));
    check(!done, "not done while idle");
    // Clock select in DLA mode.
    dla_dt = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(posedge master_clk) #1 check(ram_clk == 1'b1, "ram_clk follows master_clk (high)");
      @(negedge master_clk) #1 check(ram_clk == 1'b0, "ram_clk follows master_clk (low)");
    end
    // Run to the end, counting the clocks with the display on "1".
    while (!done && run_clocks < 3 * MAXC) @(negedge master_clk);
    check(done, "process ended");
    check(seg == 7'b111_1001, $sformatf("end display %b", seg));
    check(cycles == MAXC, $sformatf("cycle counter %0d, expected %0d", cycles, MAXC));
    check(run_clocks == MAXC, $sformatf("display showed running for %0d clocks, expected %0d", run_clocks, MAXC));
    check(n_clear_writes == N * N, $sformatf("%0d clear writes", n_clear_writes));
    check(n_seed == 1 && n_stick > 0, $sformatf("seed %0d, sticks %0d", n_seed, n_stick));
    snap = mem;
    // Transfer mode: host clock pulses, one bit per pulse.
    dla_dt = 1'b1;
    #20;
    for (int k = 1; k <= N * N; k++) begin
      #40 pc_clk = 1'b1;
      #1  check(ram_clk == 1'b1 && !ram_we, "ram_clk follows pc_clk, no write");
      #59 pc_clk = 1'b0;
      #1  check(ram_clk == 1'b0, "ram_clk low with pc_clk");
      check(pc_data == snap[k - 1], $sformatf("transfer bit %0d: %0b expected %0b", k - 1, pc_data, snap[k - 1]));
    end
    check(mem == snap, "lattice unchanged by the transfer");
    check(seg == 7'b111_1001, "display still E");
    $display("clear writes=%0d seed=%0d sticks=%0d run clocks=%0d", n_clear_writes, n_seed, n_stick, run_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
