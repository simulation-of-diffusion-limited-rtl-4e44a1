// cycle_counter: counts the clock cycles used by the DLA process.
//
// count increments on every clock with en high and is cleared by rst. limit
// is high during the last cycle the process may use, i.e. while count equals
// MAX_CYCLES - 1 and en is high, so a controller that stops on limit runs for
// exactly MAX_CYCLES enabled cycles. The counter then holds at MAX_CYCLES. The default of
// 51,005,100 cycles (510 ms at 100 MHz) is the run length the design was timed
// with; the 32-bit width is this implementation's choice.
module cycle_counter #(
  parameter int unsigned MAX_CYCLES = dla_pkg::MAX_CYCLES_DEF,
  parameter int unsigned CNT_W      = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [CNT_W-1:0] count,
  output logic             limit
);

  always_comb limit = en && (count == CNT_W'(MAX_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst)                 count <= '0;
    else if (en && count != CNT_W'(MAX_CYCLES)) count <= count + 1'b1;
  end

  initial assert (MAX_CYCLES >= 1 && MAX_CYCLES < 2.0**CNT_W)
    else $error("cycle_counter: MAX_CYCLES out of range");

endmodule
