// tb_dla_system: end-to-end test of the DLA machine on a 32 x 32 lattice.
//
// Run 1 grows a cluster until the cycle limit, then the testbench acts as the
// host: it raises DLA/DT, pulses the transfer clock once per cell and collects
// the lattice bit by bit. Run 2 is ended early by raising DLA/DT and is read
// out the same way. For each read-out the testbench checks that every bit
// equals the lattice RAM, that the centre seed is set, that the number of set
// cells equals the seed plus the distinct cells written by sticking walkers,
// and that every set cell is joined to the seed through set neighbours (the
// defining property of a DLA cluster). It also checks the cycle count, the
// display, and counts each mechanism: lattice clear, seed, stick, moves in the
// four directions, wrap-around at an edge, stop by cycle limit, stop by DLA/DT,
// RAM clock switched to the host clock, complete read-outs.
module tb_dla_system;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int CW   = 5;
  localparam int N    = 1 << CW;
  localparam int MAXC = 400_000;

  logic master_clk = 1'b0, reset, dla_dt, pc_clk = 1'b0, pc_data, done;
  logic [6:0] seg;

  int checks = 0, failures = 0;
  int n_clear, n_seed, n_stick, n_wrap, n_stop_limit, n_stop_dt, n_switch, n_readout;
  int n_move [4];
  bit written [N * N];
  bit got [N * N];

  dla_system #(.COORD_W(CW), .MAX_CYCLES(MAXC)) dut (
    .master_clk, .reset, .dla_dt, .pc_clk, .pc_data, .seg, .done);

  always #5 master_clk = ~master_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Mechanism monitor, sampled half a clock before each master clock edge.
  always @(negedge master_clk) if (!reset && !dla_dt) begin
    automatic string st = dut.u_cu.u_walker.state.name();
    automatic int wx = int'(dut.u_cu.u_walker.wx);
    automatic int wy = int'(dut.u_cu.u_walker.wy);
    if (st == "S_CLEAR" && dut.u_cu.u_walker.clr_addr == 0) n_clear++;
    if (st == "S_SEED") n_seed++;
    if (st == "S_EVAL") begin
      if (dut.u_cu.u_walker.stick) begin
        n_stick++;
        written[wy * N + wx] = 1'b1;
      end else begin
        automatic int d = int'(dut.u_cu.u_walker.dir);
        n_move[d]++;
        if ((d == 0 && wy == 0) || (d == 1 && wy == N - 1) ||
            (d == 2 && wx == 0) || (d == 3 && wx == N - 1)) n_wrap++;
      end
    end
  end

  // Count switches of the RAM clock to the host clock.
  always @(posedge dla_dt) n_switch++;

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start_run();
    reset = 1'b0; dla_dt = 1'b0;
    #1 reset = 1'b1;   // a rising edge for the asynchronous reset
    foreach (written[i]) written[i] = 1'b0;
    repeat (3) @(negedge master_clk);
    reset = 1'b0;
  endtask

  // Host side: read the whole lattice, one bit per transfer clock pulse.
  task automatic read_out();
    int set_cells = 0, expect_cells = 1, reached = 0;
    int queue [$];
    bit seen [N * N];
    dla_dt = 1'b1;
    #100;
    check(dut.ram_clk == pc_clk, "RAM clocked by the host clock");
    for (int k = 1; k <= N * N; k++) begin
      #50 pc_clk = 1'b1;
      #50 pc_clk = 1'b0;
      got[k - 1] = pc_data;
      check(pc_data == dut.u_ram.mem[k - 1], $sformatf("read-out bit %0d", k - 1));
    end
    n_readout++;
    foreach (got[i]) set_cells += got[i];
    foreach (written[i]) if (written[i] && i != (N / 2) * N + N / 2) expect_cells++;
    check(got[(N / 2) * N + N / 2], "seed cell set");
    check(set_cells == expect_cells, $sformatf("%0d set cells, expected %0d", set_cells, expect_cells));
    // Flood fill from the seed over set cells, four neighbours, torus.
    queue.push_back((N / 2) * N + N / 2);
    seen[(N / 2) * N + N / 2] = 1'b1;
    while (queue.size() > 0) begin
      int c = queue.pop_front();
      int x = c % N, y = c / N;
      int nb [4] = '{((y + N - 1) % N) * N + x, ((y + 1) % N) * N + x,
                     y * N + (x + N - 1) % N, y * N + (x + 1) % N};
      reached++;
      foreach (nb[j]) if (got[nb[j]] && !seen[nb[j]]) begin
        seen[nb[j]] = 1'b1;
        queue.push_back(nb[j]);
      end
    end
    check(reached == set_cells, $sformatf("%0d of %0d set cells joined to the seed", reached, set_cells));
    $display("read-out %0d: %0d cells in the cluster", n_readout, set_cells);
    // Print the cluster.
    for (int y = 0; y < N; y++) begin
      string row = "";
      for (int x = 0; x < N; x++) row = {row, got[y * N + x] ? "#" : "."};
      $display("  %s", row);
    end
  endtask

  initial begin
    int clocks;
    // Run 1: to the cycle limit.
    start_run();
    clocks = 0;
    while (!done && clocks < 2 * MAXC) begin @(negedge master_clk); clocks++; end
    check(done, "run 1 ended");
    if (done && dut.u_cu.cycles == MAXC) n_stop_limit++;
    check(dut.u_cu.cycles == MAXC, $sformatf("run 1 used %0d cycles, expected %0d", dut.u_cu.cycles, MAXC));
    check(clocks == MAXC + 3, $sformatf("run 1 took %0d clocks from reset, expected %0d", clocks, MAXC + 3));
    check(seg == 7'b111_1001, "display shows E");
    read_out();
    // Run 2: ended early by DLA/DT.
    start_run();
    repeat (MAXC / 4) @(negedge master_clk);
    check(!done && seg == 7'b000_0110, "run 2 still running, display shows 1");
    dla_dt = 1'b1;
    repeat (4) @(negedge master_clk);
    check(done, "DLA/DT ends the run");
    if (done && dut.u_cu.cycles < MAXC) n_stop_dt++;
    dla_dt = 1'b0;
    repeat (4) @(negedge master_clk);
    check(done, "run stays ended when DLA/DT falls again");
    read_out();
    $display("clear=%0d seed=%0d stick=%0d moves T/B/L/R=%0d/%0d/%0d/%0d wrap=%0d stop_limit=%0d stop_dt=%0d clk_switch=%0d readouts=%0d",
             n_clear, n_seed, n_stick, n_move[0], n_move[1], n_move[2], n_move[3], n_wrap,
             n_stop_limit, n_stop_dt, n_switch, n_readout);
    check(n_clear == 2 && n_seed == 2, "clear and seed in each run");
    check(n_stick > 0, "stick happened");
    foreach (n_move[i]) check(n_move[i] > 0, $sformatf("move %0d happened", i));
    check(n_wrap > 0, "wrap-around happened");
    check(n_stop_limit == 1 && n_stop_dt == 1, "both stop conditions happened");
    check(n_switch >= 2 && n_readout == 2, "clock switch and read-outs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
