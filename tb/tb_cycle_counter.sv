// tb_cycle_counter: enables the counter on random cycles and checks the count,
// that limit rises exactly in the MAX_CYCLES-th enabled cycle, that the count
// then holds at MAX_CYCLES, and that reset clears it. Run once with a small limit.
module tb_cycle_counter;
  localparam int unsigned MAXC = 37;
  logic clk = 1'b0, rst, en;
  logic [31:0] count;
  logic limit;
  int checks = 0, failures = 0;

  cycle_counter #(.MAX_CYCLES(MAXC)) dut (.clk(clk), .rst(rst), .en(en), .count(count), .limit(limit));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int run = 0; run < 3; run++) begin
      rst = 1'b1; en = 1'b0;
      @(negedge clk);
      rst = 1'b0;
      expected = 0;
      check(count == 0, "count cleared by reset");
      for (int i = 0; i < 150; i++) begin
        en = 1'($urandom);
        #1;
        check(limit == (en && expected == MAXC - 1),
              $sformatf("limit=%0b at count %0d en=%0b", limit, expected, en));
        @(negedge clk);
        if (en && expected < MAXC) expected++;
        check(count == 32'(expected), $sformatf("count %0d expected %0d", count, expected));
      end
      check(expected == MAXC, "limit reached in the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
