// pm_array: nine PM cells that match a 3x3 window against two templates at once.
//
// The window positions are numbered as in the usual near-neighbour notation:
//     x1 x2 x3
//     x8 x0 x4
//     x7 x6 x5
// The cells form one chain, in the order PM1 PM2 PM3 PM8 PM0 PM4 PM7 PM6 PM5, snaking
// through the three rows. Cells of window row r take their pixel from row stream r. Each cell
// adds one clock, and the data shifter offsets the row streams so that, along the chain, the
// nine cells see the nine pixels of one and the same window. The final cell PM5 delivers c5:
// 1 = the window matches only the first template, 2 = only the second, 3 = both, 0 = none.
// The chain input c0 is 3 for a plain (non-recursive) operation; a recursive operation feeds
// in a comparator result on the original input pixel instead (see pm_stage).
//
// Window geometry, with the stream convention of data_shifter (N pixels per line): if PM1
// reads stream pixel s at clock t0, the window is x1,x2,x3 = s, s+1, s+2; x8,x0,x4 = s-N ..
// s-N+2; x7,x6,x5 = s-2N .. s-2N+2, so the row of PM1..PM3 is the most recently scanned one.
// c5 is valid at clock t0+9.
//
// Interface: row[r] (window row streams), c0 (chain input), alpha[j] (comparator constants
// for window position x_j, j = 0..8), c5 (registered result). Latency: 9 clocks from PM1.
module pm_array
  import qmvl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  quat_t   row   [3],
  input  quat_t   c0,
  input  tconst_t alpha [9],
  output quat_t   c5
);

  // Window position handled by each chain link.
  localparam int unsigned CHAIN [9] = '{1, 2, 3, 8, 0, 4, 7, 6, 5};

  quat_t c [10];
  assign c[0] = c0;

  for (genvar k = 0; k < 9; k++) begin : g_pm
    pm_cell u_cell (
      .clk(clk), .rst_n(rst_n),
      .in1(c[k]), .in2(row[k/3]), .alpha(alpha[CHAIN[k]]),
      .out(c[k+1])
    );
  end

  assign c5 = c[9];

endmodule
