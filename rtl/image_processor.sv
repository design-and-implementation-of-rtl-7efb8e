// image_processor: pipelined quaternary image processor for 3x3 near-neighbour operations.
//
// Every pixel is one quaternary digit (four gray levels or colours), so the image is
// processed directly, with no binary encoding. Each stage matches the 3x3 window around every
// pixel against two templates at once and, on a match, replaces the centre pixel by that
// template's transition value. STAGES stages in a row handle 2*STAGES templates; a later
// stage's match overrides the result of the earlier ones.
//
// Structure (one clock = one pixel):
//   data_shifter  in1 -> three row streams, N+3 clocks apart (N pixels per line)
//   centre delay  5 elements from the middle row stream -> d_prev of stage 0 (the pixel that
//                 is output unchanged when nothing matches)
//   stage skew    stage i reads the three row streams and in2 delayed by i further elements,
//                 since the output selector chain adds one clock per stage
//   pm_stage[i]   T2 comparator on in2, PM array, output selector
// The two streams: for a plain operation in1 carries the image and b0 = (3,3,3,3) makes in2
// irrelevant. For a recursive operation in1 carries the present state R and in2 the input
// image A, sent N-1 clocks later than R (in2(t) = A[t-N+1] when in1(t) = R[t]); the caller
// feeds the output back into in1 for the next pass until it no longer changes.
//
// Window and timing: with in1(t) = s[t] (raster order, N per line, s = 0 before the first
// pixel), out at clock t is the new value of centre pixel c = t - N - 10 - (STAGES-1), whose
// window is x0 = s[c], x8/x4 = s[c-1]/s[c+1], x1 x2 x3 = s[c+N-1..c+N+1] (the following
// scan line) and x7 x6 x5 = s[c-N-1..c-N+1] (the preceding one). Windows at the ends of a
// line wrap into the neighbouring line; border handling is left to the caller.
//
// Defaults: N = 64 and STAGES = 2 are this RTL's choices (the original leaves both open).
module image_processor
  import qmvl_pkg::*;
#(
  parameter int unsigned N      = 64,      // pixels per scan line
  parameter int unsigned STAGES = 2        // PM array + OS stages (two templates each)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  quat_t   in1,                     // image (or present state R), one pixel per clock
  input  quat_t   in2,                     // input image A for recursive operation
  input  tconst_t b0    [STAGES],          // T2 constants per stage (centre-pixel condition)
  input  tconst_t alpha [STAGES][9],       // comparator constants per stage and position x_j
  input  quat_t   v     [STAGES][3],       // transition values for c5 = 1, 2, 3 per stage
  output quat_t   out,                     // transformed pixel stream
  output quat_t   c5    [STAGES]           // match result of each stage
);

  quat_t row [3];
  quat_t centre;
  quat_t d [STAGES+1];

  data_shifter #(.N(N)) u_shifter (.clk(clk), .rst_n(rst_n), .in1(in1), .row(row));

  dyn_shift_reg #(.DEPTH(5)) u_centre (
    .clk(clk), .rst_n(rst_n), .din(row[1]), .dout(centre)
  );
  assign d[0] = centre;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    quat_t srow [3];
    quat_t sin2;

    if (i == 0) begin : g_direct
      assign srow = row;
      assign sin2 = in2;
    end else begin : g_skew
      for (genvar r = 0; r < 3; r++) begin : g_row
        dyn_shift_reg #(.DEPTH(i)) u_skew (
          .clk(clk), .rst_n(rst_n), .din(row[r]), .dout(srow[r])
        );
      end
      dyn_shift_reg #(.DEPTH(i)) u_skew2 (
        .clk(clk), .rst_n(rst_n), .din(in2), .dout(sin2)
      );
    end

    pm_stage u_stage (
      .clk(clk), .rst_n(rst_n),
      .row(srow), .in2(sin2), .b0(b0[i]), .alpha(alpha[i]), .v(v[i]),
      .d_prev(d[i]), .d(d[i+1]), .c5(c5[i])
    );
  end

  assign out = d[STAGES];

endmodule
