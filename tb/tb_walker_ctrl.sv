// tb_walker_ctrl: cycle-by-cycle check of the DLA sequencer on a 16 x 16
// lattice. The testbench plays the RAM (one-clock read latency), both random
// number generators ($urandom words every clock) and the cycle counter. A
// reference model written as a plain sequence of expected RAM accesses follows
// the process description: clear every cell, write the centre seed, place a
// walker on the boundary, read top/bottom/right/left in four consecutive
// clocks, then stick (write 1) if any neighbour is set or move one cell by the
// two random bits (00 top, 01 bottom, 10 left, 11 right) with wrap-around.
// Every clock the address, write enable and data are compared. Run 1 ends on
// the cycle limit (exactly LIMIT running cycles), run 2 on DLA/DT going high.
// Counted mechanisms: clears, seeds, starts on each edge, sticks, moves in each
// direction, wraps, stop by limit, stop by DLA/DT.
module tb_walker_ctrl;
  import dla_pkg::*;
  localparam int CW = 4;
  localparam int AW = 2 * CW;
  localparam int N  = 1 << CW;
  localparam int LIMIT = 30000;

  logic clk = 1'b0, rst, dla_dt, limit;
  logic [29:0] rng_a, rng_b;
  logic [AW-1:0] ram_addr;
  logic ram_we, ram_din, ram_dout, running, done;
  phase_e phase;

  logic mem [1 << AW];
  int checks = 0, failures = 0;
  int run_count;          // running cycles seen in this run
  bit stopped;
  bit dt_q1, dt_q2;       // DLA/DT as seen through the two-flop synchroniser
  int n_clear, n_seed, n_stick, n_wrap, n_stop_limit, n_stop_dt;
  int n_move [4];
  int n_edge [4];         // starts on y=0, y=max, x=0, x=max

  walker_ctrl #(.COORD_W(CW)) dut (
    .clk, .rst, .dla_dt, .limit, .rng_a, .rng_b,
    .ram_addr, .ram_we, .ram_din, .ram_dout, .running, .done, .phase);

  always #5 clk = ~clk;

  // RAM model, read-first, one clock latency.
  always @(posedge clk) begin
    if (ram_we) mem[ram_addr] <= ram_din;
    ram_dout <= mem[ram_addr];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [AW-1:0] adr(int x, int y);
    return AW'(((y & (N - 1)) << CW) | (x & (N - 1)));
  endfunction

  // Move to the next clock: new random words, the limit for the coming clock.
  task automatic next_cycle();
    @(negedge clk);
    rng_a = {$urandom, $urandom}[29:0];
    rng_b = {$urandom, $urandom}[29:0];
    dt_q2 = dt_q1;
    dt_q1 = dla_dt;
    limit = running && (run_count == LIMIT - 1);
    #1;
  endtask

  // One expected running clock of the process.
  task automatic expect_cycle(logic [AW-1:0] a, bit we, bit din, bit chk_addr, string what);
    bit stop_now;
    if (stopped) return;
    check(running && !done && phase == PH_RUNNING, {what, ": running"});
    check(ram_we == we, $sformatf("%s: we=%0b expected %0b", what, ram_we, we));
    if (chk_addr || we)
      check(ram_addr == a, $sformatf("%s: addr=%h expected %h", what, ram_addr, a));
    if (we) check(ram_din == din, $sformatf("%s: din=%0b expected %0b", what, ram_din, din));
    stop_now = limit || dt_q2;
    if (limit) n_stop_limit++;
    else if (dt_q2) n_stop_dt++;
    run_count++;
    next_cycle();
    if (stop_now) stopped = 1;
  endtask

  task automatic run_process(int abort_after);
    int x, y, sum, waited;
    rst = 1'b1; dla_dt = 1'b1; limit = 1'b0; dt_q1 = 1; dt_q2 = 1;
    repeat (2) next_cycle();
    rst = 1'b0;
    repeat (3) next_cycle();
    check(!running && !done && phase == PH_IDLE, "idle while DLA/DT high");
    dla_dt = 1'b0;
    // Two synchroniser clocks, then the process starts.
    waited = 0;
    while (!running && waited < 10) begin next_cycle(); waited++; end
    check(waited == 3, $sformatf("start latency %0d clocks, expected 3", waited));
    run_count = 0; stopped = 0;
    for (int i = 0; i < N * N; i++) expect_cycle(AW'(i), 1, 0, 1, "clear");
    if (!stopped) n_clear++;
    expect_cycle(adr(N / 2, N / 2), 1, 1, 1, "seed");
    if (!stopped) n_seed++;
    while (!stopped) begin
      if (abort_after > 0 && run_count >= abort_after) dla_dt = 1'b1;
      // Boundary start from the current random words.
      x = int'(rng_a[CW-1:0]);
      y = int'(rng_b[CW-1:0]);
      if (rng_a[CW]) begin x = rng_b[CW] ? N - 1 : 0; n_edge[rng_b[CW] ? 3 : 2]++; end
      else           begin y = rng_b[CW] ? N - 1 : 0; n_edge[rng_b[CW] ? 1 : 0]++; end
      expect_cycle('0, 0, 0, 0, "start");
      forever begin
        if (stopped) break;
        sum = mem[adr(x, y - 1)] + mem[adr(x, y + 1)] + mem[adr(x - 1, y)] + mem[adr(x + 1, y)];
        expect_cycle(adr(x, y - 1), 0, 0, 1, "read top");
        expect_cycle(adr(x, y + 1), 0, 0, 1, "read bottom");
        expect_cycle(adr(x + 1, y), 0, 0, 1, "read right");
        expect_cycle(adr(x - 1, y), 0, 0, 1, "read left");
        if (stopped) break;
        if (sum > 0) begin
          expect_cycle(adr(x, y), 1, 1, 1, "stick");
          n_stick++;
          break;
        end else begin
          logic [1:0] d = rng_a[1:0];
          expect_cycle('0, 0, 0, 0, "move");
          n_move[d]++;
          case (d)
            2'b00: y = y - 1;
            2'b01: y = y + 1;
            2'b10: x = x - 1;
            2'b11: x = x + 1;
          endcase
          if (x < 0 || x >= N || y < 0 || y >= N) n_wrap++;
          x = x & (N - 1);
          y = y & (N - 1);
        end
      end
    end
    // After the stop: done, not running, no writes, for a while.
    for (int i = 0; i < 20; i++) begin
      check(done && !running && !ram_we && phase == PH_DONE, "holds in done");
      next_cycle();
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sticks_before;
    rng_a = '0; rng_b = '0;
    // Run 1: ends on the cycle limit.
    run_process(0);
    check(run_count == LIMIT, $sformatf("run 1 used %0d cycles, expected %0d", run_count, LIMIT));
    // Run 2: ended by DLA/DT part way.
    sticks_before = n_stick;
    run_process(N * N + 2000);
    check(run_count < LIMIT, "run 2 ended by DLA/DT before the limit");
    $display("clears=%0d seeds=%0d sticks=%0d wraps=%0d moves T/B/L/R=%0d/%0d/%0d/%0d starts=%0d/%0d/%0d/%0d stop_limit=%0d stop_dt=%0d",
             n_clear, n_seed, n_stick, n_wrap, n_move[0], n_move[1], n_move[2], n_move[3],
             n_edge[0], n_edge[1], n_edge[2], n_edge[3], n_stop_limit, n_stop_dt);
    check(n_clear == 2 && n_seed == 2, "clear and seed in both runs");
    check(n_stick > 0 && n_wrap > 0, "stick and wrap happened");
    check(n_stick > sticks_before, "sticks in run 2");
    foreach (n_move[i]) check(n_move[i] > 0, $sformatf("move %0d happened", i));
    foreach (n_edge[i]) check(n_edge[i] > 0, $sformatf("start edge %0d happened", i));
    check(n_stop_limit == 1 && n_stop_dt == 1, "one stop by limit and one by DLA/DT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
