// dla_pkg: types and constants shared by the DLA (diffusion-limited
// aggregation) machine.
//
// The lattice is a square torus of 2**COORD_W cells per side held one bit per
// cell in a RAM. A cell (x,y) lives at address {y,x}: the y coordinate forms the
// upper half of the address word and x the lower half, so no multiplier or
// adder is needed to find a cell. With the default COORD_W = 7 the lattice is
// 128 x 128 and the address is 14 bits wide, e.g. cell (10,5) sits at
// 14'b0000101_0001010.
//
// The two-bit move code follows the step table of the design:
// 00 top, 01 bottom, 10 left, 11 right. "Top" is taken as decreasing y (row 0
// is the top row); that orientation is this design's own choice.
package dla_pkg;

  // Default geometry and generator width.
  localparam int unsigned COORD_W_DEF    = 7;          // 128 cells per side
  localparam int unsigned RNG_W_DEF      = 30;         // 30-bit LFSR words
  localparam int unsigned MAX_CYCLES_DEF = 51_005_100; // default run length

  // Random step direction, encoded as the two random bits that select it.
  typedef enum logic [1:0] {
    DIR_TOP    = 2'b00,
    DIR_BOTTOM = 2'b01,
    DIR_LEFT   = 2'b10,
    DIR_RIGHT  = 2'b11
  } dir_e;

  // Coarse phase of the process, shown on the seven-segment display.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_RUNNING = 2'd1,
    PH_DONE    = 2'd2
  } phase_e;

  // Digits shown on the display for each phase.
  localparam logic [3:0] DIGIT_IDLE    = 4'h0;
  localparam logic [3:0] DIGIT_RUNNING = 4'h1;
  localparam logic [3:0] DIGIT_DONE    = 4'hE;   // "E" for end of execution

endpackage
