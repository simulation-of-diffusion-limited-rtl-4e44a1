// control_unit: the control block of the DLA machine.
//
// It joins the walker sequencer (walker_ctrl), the cycle counter, the host
// interface address counter (transfer_counter), the RAM clock multiplexer and
// the seven-segment display, and decides who drives the lattice RAM:
//
//   dla_dt = 0  DLA process: RAM clocked by master_clk, address, write enable
//               and data from the sequencer; the sequencer runs until the
//               cycle counter reaches MAX_CYCLES or dla_dt rises.
//   dla_dt = 1  transfer: RAM clocked by the host's pc_clk, address from the
//               14-bit transfer counter, writes blocked; each pc_clk pulse
//               presents the next lattice bit on pc_data (one-pulse latency:
//               after pulse k the host sees cell k-1).
//
// The two RNGs are clocked by master_clk outside this block; their words come
// in on rng_a and rng_b. The display shows 0 while idle, 1 while running and E
// once the process has ended. Blocking writes while dla_dt is high and the
// digit coding are this implementation's choices; the clock multiplexer, the
// counters and the roles of the two modes follow the design.
module control_unit
  import dla_pkg::*;
#(
  parameter int unsigned COORD_W    = COORD_W_DEF,
  parameter int unsigned RNG_W      = RNG_W_DEF,
  parameter int unsigned MAX_CYCLES = MAX_CYCLES_DEF,
  localparam int unsigned ADDR_W    = 2 * COORD_W
) (
  input  logic              master_clk,
  input  logic              pc_clk,
  input  logic              reset,
  input  logic              dla_dt,
  input  logic [RNG_W-1:0]  rng_a,
  input  logic [RNG_W-1:0]  rng_b,
  output logic              ram_clk,
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we,
  output logic              ram_din,
  input  logic              ram_dout,
  output logic              pc_data,
  output logic [6:0]        seg,
  output logic              done,
  output logic [31:0]       cycles
);

  logic [ADDR_W-1:0] walk_addr, xfer_addr;
  logic              walk_we, walk_din;
  logic              running, limit;
  phase_e            phase;
  logic [3:0]        digit;

  walker_ctrl #(.COORD_W(COORD_W), .RNG_W(RNG_W)) u_walker (
    .clk      (master_clk),
    .rst      (reset),
    .dla_dt   (dla_dt),
    .limit    (limit),
    .rng_a    (rng_a),
    .rng_b    (rng_b),
    .ram_addr (walk_addr),
    .ram_we   (walk_we),
    .ram_din  (walk_din),
    .ram_dout (ram_dout),
    .running  (running),
    .done     (done),
    .phase    (phase)
  );

  cycle_counter #(.MAX_CYCLES(MAX_CYCLES), .CNT_W(32)) u_cycles (
    .clk   (master_clk),
    .rst   (reset),
    .en    (running),
    .count (cycles),
    .limit (limit)
  );

  transfer_counter #(.ADDR_W(ADDR_W)) u_xfer (
    .pc_clk (pc_clk),
    .rst    (reset),
    .addr   (xfer_addr)
  );

  ram_clk_mux u_clk_mux (
    .master_clk (master_clk),
    .pc_clk     (pc_clk),
    .sel_pc     (dla_dt),
    .ram_clk    (ram_clk)
  );

  always_comb begin
    ram_addr = dla_dt ? xfer_addr : walk_addr;
    ram_we   = !dla_dt && walk_we;
    ram_din  = walk_din;
    pc_data  = ram_dout;
    unique case (phase)
      PH_IDLE:    digit = DIGIT_IDLE;
      PH_RUNNING: digit = DIGIT_RUNNING;
      default:    digit = DIGIT_DONE;
    endcase
  end

  seg7_display u_seg (
    .digit (digit),
    .seg   (seg)
  );

endmodule
