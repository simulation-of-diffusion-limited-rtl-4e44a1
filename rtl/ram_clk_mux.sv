// ram_clk_mux: clock selector for the lattice RAM.
//
// While the DLA process runs (sel_pc = 0) the RAM is clocked by the 100 MHz
// master clock; while the host reads the lattice out (sel_pc = 1, the DLA/DT
// input) it is clocked by the host's slow transfer clock. This is a plain
// two-input multiplexer as in the design; the select only changes while the
// write enable is held off (see control_unit), so a short pulse at the switch
// can at most cause a harmless extra read. On an FPGA this maps to a clock
// multiplexer primitive.
module ram_clk_mux (
  input  logic master_clk,
  input  logic pc_clk,
  input  logic sel_pc,
  output logic ram_clk
);

  always_comb ram_clk = sel_pc ? pc_clk : master_clk;

endmodule
