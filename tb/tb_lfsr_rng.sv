// tb_lfsr_rng: checks the 30-bit LFSR against an independent model of the
// feedback x^30 + x^6 + x^4 + x + 1 (next bit = q[29]^q[5]^q[3]^q[0]) for many
// steps from two seeds, checks the reset value, and checks that a 5-bit
// instance (x^5 + x^3 + 1) has the maximal period 31 and never reaches zero.
module tb_lfsr_rng;
  logic clk = 1'b0;
  logic rst;
  logic [29:0] q, q2;
  logic [4:0]  s;
  int checks = 0, failures = 0;

  lfsr_rng #(.SEED(30'h2AB1_F00D)) dut  (.clk(clk), .rst(rst), .q(q));
  lfsr_rng #(.SEED(30'h0000_0001)) dut2 (.clk(clk), .rst(rst), .q(q2));
  lfsr_rng #(.WIDTH(5), .TAPS(5'h14), .SEED(5'h01)) dut5 (.clk(clk), .rst(rst), .q(s));

  always #5 clk = ~clk;

  function automatic logic [29:0] step30(logic [29:0] v);
    return {v[28:0], v[29] ^ v[5] ^ v[3] ^ v[0]};
  endfunction

  function automatic logic [4:0] step5(logic [4:0] v);
    return {v[3:0], v[4] ^ v[2]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    logic [29:0] m, m2;
    logic [4:0]  m5;
    int period;
    rst = 1'b1;
    @(posedge clk); @(negedge clk);
    check(q == 30'h2AB1_F00D, "reset loads SEED");
    check(q2 == 30'h1, "reset loads SEED (second)");
    rst = 1'b0;
    m = q; m2 = q2; m5 = s;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      m = step30(m); m2 = step30(m2); m5 = step5(m5);
      check(q == m,   $sformatf("step %0d: q=%h expected %h", i, q, m));
      check(q2 == m2, $sformatf("step %0d: q2=%h expected %h", i, q2, m2));
      check(s == m5,  $sformatf("step %0d: s=%h expected %h", i, s, m5));
    end
    // Period of the 5-bit instance: restart and count until the seed recurs.
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      check(s != 5'h0, "5-bit LFSR reached zero");
    end while (s != 5'h01 && period < 100);
    check(period == 31, $sformatf("5-bit period %0d, expected 31", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
