// pm_stage: one stage of the pipelined image processor, handling two templates.
//
// A stage holds:
//   - T2, a one-digit comparator on the In2 stream with constants b0, followed by one
//     shift-register element; its result enters the PM chain as c0. For a plain operation
//     b0 = (3,3,3,3) and c0 is always 3. For a recursive operation In1 carries the present
//     state R and In2 the original image A, and b0 sets the condition on the centre pixel a0.
//   - the 3x3 PM array (pm_array), whose result is c5;
//   - the output selector, which replaces d_prev by this stage's transition value when one of
//     its templates matched.
// In2 must present a0 one clock before PM1 reads the first pixel of the window; producing
// that alignment is the job of whoever drives In1/In2.
//
// Interface: row[3] (window row streams for this stage), in2, b0, alpha[9] (comparator
// constants by window position), v[3] (transition values for c5 = 1, 2, 3), d_prev, d,
// c5 (the stage's match result, brought out for observation).
// Latency: d is valid 10 clocks after PM1 read the window's first pixel.
module pm_stage
  import qmvl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  quat_t   row   [3],
  input  quat_t   in2,
  input  tconst_t b0,
  input  tconst_t alpha [9],
  input  quat_t   v     [3],
  input  quat_t   d_prev,
  output quat_t   d,
  output quat_t   c5
);

  quat_t t2_out, c0;

  digit_comparator u_t2   (.alpha(b0), .a(in2), .b(t2_out));
  dyn_shift_reg #(.DEPTH(1)) u_t2_reg (.clk(clk), .rst_n(rst_n), .din(t2_out), .dout(c0));

  pm_array u_array (
    .clk(clk), .rst_n(rst_n), .row(row), .c0(c0), .alpha(alpha), .c5(c5)
  );

  output_selector u_os (
    .clk(clk), .rst_n(rst_n), .d_prev(d_prev), .c5(c5), .v(v), .d(d)
  );

endmodule
