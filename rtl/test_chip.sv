// test_chip: the logic content of the fabricated NMOS demonstration chip.
//
// The chip carries the parts of the image processor needed to prove them in silicon, each
// with its own pins:
//   - a three-cell linear pattern matching array (pm_linear_array), first cell fed with 3;
//   - a single pattern matching cell (pm_cell) with In1 and In2 brought out;
//   - two dual multiplexers, i.e. four independent T gates (t_gate);
//   - a three-digit quaternary shift register (dyn_shift_reg).
// The chip's test circuits are not included; what they do is not known. Reading the two
// "dual multiplexer" areas of the floorplan as two pairs of T gates is this RTL's choice.
// All parts share one clock and reset, standing for the chip's two-phase clock (see
// dyn_shift_reg).
//
// Interface: one group of ports per part, named after it. Timing: as for each part
// (linear array out[k] k+1 clocks, PM cell 1 clock, shift register 3 clocks, T gates
// combinational).
module test_chip
  import qmvl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // three-cell linear array
  input  quat_t   la_in,
  input  tconst_t la_alpha [3],
  output quat_t   la_out   [3],
  // single PM cell
  input  quat_t   pm_in1,
  input  quat_t   pm_in2,
  input  tconst_t pm_alpha,
  output quat_t   pm_out,
  // two dual multiplexers (four T gates)
  input  tconst_t mux_p [4],
  input  quat_t   mux_x [4],
  output quat_t   mux_out [4],
  // three-digit shift register
  input  quat_t   sr_in,
  output quat_t   sr_out
);

  pm_linear_array #(.STAGES(3)) u_linear (
    .clk(clk), .rst_n(rst_n), .a(la_in), .alpha(la_alpha), .out(la_out)
  );

  pm_cell u_cell (
    .clk(clk), .rst_n(rst_n), .in1(pm_in1), .in2(pm_in2), .alpha(pm_alpha), .out(pm_out)
  );

  for (genvar g = 0; g < 4; g++) begin : g_mux
    t_gate u_t (.p(mux_p[g]), .x(mux_x[g]), .tout(mux_out[g]));
  end

  dyn_shift_reg #(.DEPTH(3)) u_sr (.clk(clk), .rst_n(rst_n), .din(sr_in), .dout(sr_out));

endmodule
