// transfer_counter: address generator of the host (computer) interface.
//
// During read-out the host supplies one transfer clock pulse per lattice bit.
// This counter, clocked by that pulse, steps the RAM address through all
// 2**ADDR_W cells (16,384 for the default) and wraps back to zero, so one full
// read-out leaves it ready for the next. With the one-clock read latency of
// the RAM, the bit seen by the host after pulse k (k = 1, 2, ...) is cell k-1.
// The 14-bit counter stepped once per host clock follows the design; the
// asynchronous reset is this implementation's choice, made because the
// transfer clock may be stopped while the system is reset.
module transfer_counter #(
  parameter int unsigned ADDR_W = 2 * dla_pkg::COORD_W_DEF
) (
  input  logic              pc_clk,
  input  logic              rst,
  output logic [ADDR_W-1:0] addr
);

  always_ff @(posedge pc_clk or posedge rst) begin
    if (rst) addr <= '0;
    else     addr <= addr + 1'b1;
  end

endmodule
