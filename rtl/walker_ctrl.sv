// walker_ctrl: sequencer of the diffusion-limited aggregation process.
//
// The lattice is a 2**COORD_W square torus kept one bit per cell in an
// external single-port RAM with one clock of read latency; a cell (x,y) is at
// address {y,x}. The process, started when dla_dt is low after reset:
//
//   CLEAR   write 0 to every cell, one per clock (2**(2*COORD_W) clocks)
//   SEED    write 1 to the centre cell (2**(COORD_W-1), 2**(COORD_W-1))
//   START   place a new walker on the lattice boundary, from the two RNG words
//   CHK_T.. read the top, bottom, right and left neighbours in four
//   CHK_L   consecutive clocks; each read result is added to the sum register
//   EVAL    the last read arrives; if any neighbour is occupied the walker
//           sticks (its cell is written to 1) and a new walker STARTs,
//           otherwise it moves one cell in the direction given by rng_a[1:0]
//           (00 top, 01 bottom, 10 left, 11 right) and CHK_T follows.
//
// A step therefore takes five clocks. Coordinates are COORD_W-bit values, so a
// walker leaving one edge re-enters at the opposite edge, and the cells across
// an edge count as neighbours. The process ends (DONE) when the cycle counter
// raises limit or when dla_dt goes high; DONE holds until reset. running is
// high in every clock the process uses, so the cycle counter counts exactly
// the process's clocks.
//
// Starting position: x0 = rng_a[COORD_W-1:0] and y0 = rng_b[COORD_W-1:0];
// rng_a[COORD_W] chooses whether y (0) or x (1) is pushed onto an edge, and
// rng_b[COORD_W] chooses the low (0) or high (1) edge. The four sequential
// neighbour reads, the sum register, the move table, the wrap-around, the
// centre seed, the initial clear and the two stop conditions follow the
// design; the boundary placement rule, the walker's torus neighbourhood, the
// two-flop synchroniser on dla_dt and the hold in DONE are this
// implementation's choices.
module walker_ctrl
  import dla_pkg::*;
#(
  parameter int unsigned COORD_W = COORD_W_DEF,
  parameter int unsigned RNG_W   = RNG_W_DEF,
  localparam int unsigned ADDR_W = 2 * COORD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              dla_dt,     // 0 = run, 1 = stop / transfer (async)
  input  logic              limit,      // from the cycle counter
  input  logic [RNG_W-1:0]  rng_a,
  input  logic [RNG_W-1:0]  rng_b,
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we,
  output logic              ram_din,
  input  logic              ram_dout,
  output logic              running,
  output logic              done,
  output phase_e            phase
);

  typedef logic [COORD_W-1:0] coord_t;

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_SEED, S_START,
    S_CHK_T, S_CHK_B, S_CHK_R, S_CHK_L, S_EVAL, S_DONE
  } state_e;

  localparam coord_t CENTRE = coord_t'(2 ** (COORD_W - 1));

  state_e            state;
  coord_t            wx, wy;        // walker position
  logic [ADDR_W-1:0] clr_addr;      // clear pointer
  logic [2:0]        sum;           // occupied neighbours seen so far
  logic [1:0]        dt_sync;
  logic              dt;

  logic [2:0] sum_total;
  logic       stick;
  dir_e       dir;
  coord_t     sx, sy;               // boundary start position

  always_comb begin
    dt        = dt_sync[1];
    sum_total = sum + {2'b00, ram_dout};
    stick     = (sum_total != 3'd0);
    dir       = dir_e'(rng_a[1:0]);

    sx = rng_a[COORD_W-1:0];
    sy = rng_b[COORD_W-1:0];
    if (rng_a[COORD_W]) sx = rng_b[COORD_W] ? '1 : '0;
    else                sy = rng_b[COORD_W] ? '1 : '0;
  end

  // RAM port: address, write enable and data for the current state.
  always_comb begin
    ram_addr = {wy, wx};
    ram_we   = 1'b0;
    ram_din  = 1'b0;
    unique case (state)
      S_CLEAR: begin ram_addr = clr_addr;         ram_we = 1'b1; ram_din = 1'b0; end
      S_SEED:  begin ram_addr = {CENTRE, CENTRE}; ram_we = 1'b1; ram_din = 1'b1; end
      S_CHK_T: ram_addr = {coord_t'(wy - 1'b1), wx};
      S_CHK_B: ram_addr = {coord_t'(wy + 1'b1), wx};
      S_CHK_R: ram_addr = {wy, coord_t'(wx + 1'b1)};
      S_CHK_L: ram_addr = {wy, coord_t'(wx - 1'b1)};
      S_EVAL:  begin ram_addr = {wy, wx}; ram_we = stick; ram_din = 1'b1; end
      default: ;
    endcase
  end

  always_comb begin
    running = !(state inside {S_IDLE, S_DONE});
    done    = (state == S_DONE);
    phase   = (state == S_IDLE) ? PH_IDLE : (done ? PH_DONE : PH_RUNNING);
  end

  always_ff @(posedge clk) begin
    if (rst) dt_sync <= 2'b11;
    else     dt_sync <= {dt_sync[0], dla_dt};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      clr_addr <= '0;
      sum      <= '0;
      wx       <= '0;
      wy       <= '0;
    end else if (running && (dt || limit)) begin
      state <= S_DONE;
    end else begin
      unique case (state)
        S_IDLE: if (!dt) begin
          state    <= S_CLEAR;
          clr_addr <= '0;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == '1) state <= S_SEED;
        end
        S_SEED:  state <= S_START;
        S_START: begin
          wx    <= sx;
          wy    <= sy;
          state <= S_CHK_T;
        end
        S_CHK_T: begin sum <= '0;        state <= S_CHK_B; end
        S_CHK_B: begin sum <= sum_total; state <= S_CHK_R; end  // + top
        S_CHK_R: begin sum <= sum_total; state <= S_CHK_L; end  // + bottom
        S_CHK_L: begin sum <= sum_total; state <= S_EVAL;  end  // + right
        S_EVAL: begin                                             // + left
          if (stick) begin
            state <= S_START;
          end else begin
            unique case (dir)
              DIR_TOP:    wy <= wy - 1'b1;
              DIR_BOTTOM: wy <= wy + 1'b1;
              DIR_LEFT:   wx <= wx - 1'b1;
              DIR_RIGHT:  wx <= wx + 1'b1;
            endcase
            state <= S_CHK_T;
          end
        end
        S_DONE:  ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The sum register never holds more than three neighbours before EVAL.
  a_sum_range: assert property (@(posedge clk) disable iff (rst) sum <= 3'd3);
  // Writes happen only while the process runs.
  a_we_running: assert property (@(posedge clk) disable iff (rst) ram_we |-> running);

endmodule
