// lattice_ram: the DLA lattice, one bit per cell (1 = occupied, 0 = empty).
//
// A single-port synchronous RAM of 2**ADDR_W x 1 bit, written as an array so
// that FPGA tools map it to one block RAM (16,384 bits for the default 14-bit
// address). Read-first: on every rising clock dout takes the old contents of
// addr; when we is high, din is written at the same edge. Read latency is one
// clock. The contents are not reset; the controller clears the lattice before
// each run. Separate din/dout replace a bidirectional one-bit data line.
module lattice_ram #(
  parameter int unsigned ADDR_W = 2 * dla_pkg::COORD_W_DEF
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic              din,
  output logic              dout
);

  logic mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
