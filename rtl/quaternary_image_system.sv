// quaternary_image_system: top level holding the two designs side by side.
//
//   u_proc  image_processor: the pipelined quaternary image processor for 3x3 near-neighbour
//           operations (data shifter, STAGES stages of PM array + output selector). Its
//           ports appear here with the prefix ip_.
//   u_chip  test_chip: the logic of the fabricated demonstration chip (three-cell linear
//           PM array, a single PM cell, four T gates, a three-digit shift register). Its
//           ports appear here with the prefix tc_.
// The two share only clock and reset. The master control processor that would feed the
// image processor, load its templates and close the recursive loop is outside this RTL;
// its connections are the ip_ ports. Parameters N and STAGES pass through to the image
// processor (defaults 64 and 2, this RTL's choices).
module quaternary_image_system
  import qmvl_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned STAGES = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  // image processor
  input  quat_t   ip_in1,
  input  quat_t   ip_in2,
  input  tconst_t ip_b0    [STAGES],
  input  tconst_t ip_alpha [STAGES][9],
  input  quat_t   ip_v     [STAGES][3],
  output quat_t   ip_out,
  output quat_t   ip_c5    [STAGES],
  // demonstration chip
  input  quat_t   tc_la_in,
  input  tconst_t tc_la_alpha [3],
  output quat_t   tc_la_out   [3],
  input  quat_t   tc_pm_in1,
  input  quat_t   tc_pm_in2,
  input  tconst_t tc_pm_alpha,
  output quat_t   tc_pm_out,
  input  tconst_t tc_mux_p [4],
  input  quat_t   tc_mux_x [4],
  output quat_t   tc_mux_out [4],
  input  quat_t   tc_sr_in,
  output quat_t   tc_sr_out
);

  image_processor #(.N(N), .STAGES(STAGES)) u_proc (
    .clk(clk), .rst_n(rst_n), .in1(ip_in1), .in2(ip_in2), .b0(ip_b0), .alpha(ip_alpha),
    .v(ip_v), .out(ip_out), .c5(ip_c5)
  );

  test_chip u_chip (
    .clk(clk), .rst_n(rst_n),
    .la_in(tc_la_in), .la_alpha(tc_la_alpha), .la_out(tc_la_out),
    .pm_in1(tc_pm_in1), .pm_in2(tc_pm_in2), .pm_alpha(tc_pm_alpha), .pm_out(tc_pm_out),
    .mux_p(tc_mux_p), .mux_x(tc_mux_x), .mux_out(tc_mux_out),
    .sr_in(tc_sr_in), .sr_out(tc_sr_out)
  );

endmodule
