// data_shifter: turns one raster-scanned pixel stream into the three row streams that a 3x3
// window needs.
//
// The input stream enters window register 0. Its output feeds a line delay of N+2 elements
// and window register 1; that output feeds a second N+2-element delay and window register 2.
// Consecutive window registers are therefore N+3 clocks apart. The PM array that follows
// reads row r of the window three cells (three clocks) later than row r-1, so the net offset
// between rows is exactly N pixels: one scan line of an image N pixels wide. The shift
// registers are dyn_shift_reg elements. Taking the first line delay from the output of the
// first window register (rather than from the raw input) is this RTL's reading of the block
// diagram; it is the choice that makes the row offset equal to the line length.
//
// Interface: in1 (pixel stream, one pixel per clock), row[r] (window register r output).
// Timing: row[0](t) = in1(t-1), row[1](t) = in1(t-1-(N+3)), row[2](t) = in1(t-1-2(N+3)).
module data_shifter
  import qmvl_pkg::*;
#(
  parameter int unsigned N = 64            // pixels per scan line
) (
  input  logic  clk,
  input  logic  rst_n,
  input  quat_t in1,
  output quat_t row [3]
);

  quat_t line_out [2];

  dyn_shift_reg #(.DEPTH(1))   u_win0  (.clk(clk), .rst_n(rst_n), .din(in1),         .dout(row[0]));
  dyn_shift_reg #(.DEPTH(N+2)) u_line0 (.clk(clk), .rst_n(rst_n), .din(row[0]),      .dout(line_out[0]));
  dyn_shift_reg #(.DEPTH(1))   u_win1  (.clk(clk), .rst_n(rst_n), .din(line_out[0]), .dout(row[1]));
  dyn_shift_reg #(.DEPTH(N+2)) u_line1 (.clk(clk), .rst_n(rst_n), .din(row[1]),      .dout(line_out[1]));
  dyn_shift_reg #(.DEPTH(1))   u_win2  (.clk(clk), .rst_n(rst_n), .din(line_out[1]), .dout(row[2]));

endmodule
