// dla_system: diffusion-limited aggregation machine, top level.
//
// Grows a DLA cluster on a 2**COORD_W x 2**COORD_W lattice (128 x 128 by
// default) held one bit per cell in a block RAM, then lets a host read the
// lattice out one bit per host clock pulse. Blocks, as in the system diagram:
// the control unit, two 30-bit LFSR random number generators clocked by the
// master clock, and the lattice memory clocked through the control unit's
// clock multiplexer.
//
// Use: hold dla_dt low and pulse reset; the machine clears the lattice, seeds
// the centre and releases walkers one after another for MAX_CYCLES master
// clocks (51,005,100 by default, 510 ms at 100 MHz), then raises done and
// shows E on the display. Raising dla_dt also ends the run early. With dla_dt
// high, each rising edge of pc_clk advances the read-out: after pulse k,
// pc_data holds cell k-1 in address order {y,x} (x fastest); 2**(2*COORD_W)
// pulses read the whole lattice. The RNG seeds are this implementation's
// choice; changing them gives a different cluster.
module dla_system
  import dla_pkg::*;
#(
  parameter int unsigned      COORD_W    = COORD_W_DEF,
  parameter int unsigned      MAX_CYCLES = MAX_CYCLES_DEF,
  parameter logic [RNG_W_DEF-1:0] SEED_A = 30'h2AB1_F00D,
  parameter logic [RNG_W_DEF-1:0] SEED_B = 30'h1C3E_5A97
) (
  input  logic       master_clk,
  input  logic       reset,
  input  logic       dla_dt,
  input  logic       pc_clk,
  output logic       pc_data,
  output logic [6:0] seg,
  output logic       done
);

  localparam int unsigned ADDR_W = 2 * COORD_W;

  logic [RNG_W_DEF-1:0] rng_a, rng_b;
  logic                 ram_clk, ram_we, ram_din, ram_dout;
  logic [ADDR_W-1:0]    ram_addr;

  lfsr_rng #(.WIDTH(RNG_W_DEF), .SEED(SEED_A)) u_rng_a (
    .clk (master_clk),
    .rst (reset),
    .q   (rng_a)
  );

  lfsr_rng #(.WIDTH(RNG_W_DEF), .SEED(SEED_B)) u_rng_b (
    .clk (master_clk),
    .rst (reset),
    .q   (rng_b)
  );

  control_unit #(
    .COORD_W    (COORD_W),
    .RNG_W      (RNG_W_DEF),
    .MAX_CYCLES (MAX_CYCLES)
  ) u_cu (
    .master_clk (master_clk),
    .pc_clk     (pc_clk),
    .reset      (reset),
    .dla_dt     (dla_dt),
    .rng_a      (rng_a),
    .rng_b      (rng_b),
    .ram_clk    (ram_clk),
    .ram_addr   (ram_addr),
    .ram_we     (ram_we),
    .ram_din    (ram_din),
    .ram_dout   (ram_dout),
    .pc_data    (pc_data),
    .seg        (seg),
    .done       (done),
    .cycles     ()
  );

  lattice_ram #(.ADDR_W(ADDR_W)) u_ram (
    .clk  (ram_clk),
    .we   (ram_we),
    .addr (ram_addr),
    .din  (ram_din),
    .dout (ram_dout)
  );

endmodule
