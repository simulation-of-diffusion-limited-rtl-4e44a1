// lfsr_rng: Fibonacci linear feedback shift register random number generator.
//
// Every clock the register shifts left by one and the new bit 0 is the XOR of
// the tapped bits. With the default 30-bit width and taps at stages 30, 6, 4
// and 1 (mask 30'h2000_0029) the sequence is maximal: it repeats after
// 2**30 - 1 = 1,073,741,823 clocks. The 30-bit width is the design's; the tap
// set and the seed values are this implementation's choice. The all-zero state
// is the one state never reached, so SEED must not be zero.
//
// Interface: q is the full register, valid from the first clock after reset
// (synchronous, active high, loads SEED). One new bit enters per clock, so
// words read k >= WIDTH clocks apart share no bits.
module lfsr_rng #(
  parameter int unsigned      WIDTH = dla_pkg::RNG_W_DEF,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(30'h2000_0029),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= SEED;
    else     q <= {q[WIDTH-2:0], ^(q & TAPS)};
  end

  // A zero seed would lock the register at zero.
  initial assert (SEED != '0) else $error("lfsr_rng: SEED must be non-zero");

endmodule
