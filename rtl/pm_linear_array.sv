// pm_linear_array: linear array of PM cells that detects two digit patterns at once in a
// serial stream of quaternary pixels.
//
// All cells see the same input stream; cell k compares it with template position k and
// passes its registered match digit to cell k+1. The first cell's match input is tied to 3
// ("both templates still possible"). Because each cell adds one clock, out[k] at clock t
// reports whether stream digits a(t-k-1) .. a(t-1) match positions 0..k of the templates:
// out[STAGES-1] is 1, 2 or 3 exactly when the last STAGES digits match the first template,
// the second, or both. STAGES = 3 is the array built on the original chip; the comparator
// constants per cell are inputs (qmvl_pkg::alpha_from_sets computes them from the template
// sets).
//
// Interface: a (input stream), alpha[k] (constants of cell k), out[k] (match digit of cell
// k, Out_{k+1} in the original numbering). Latency: out[k] lags by k+1 clocks.
module pm_linear_array
  import qmvl_pkg::*;
#(
  parameter int unsigned STAGES = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  quat_t   a,
  input  tconst_t alpha [STAGES],
  output quat_t   out   [STAGES]
);

  for (genvar k = 0; k < STAGES; k++) begin : g_cell
    quat_t cin;
    if (k == 0) begin : g_first
      assign cin = MATCH_BOTH;
    end else begin : g_next
      assign cin = out[k-1];
    end
    pm_cell u_cell (
      .clk(clk), .rst_n(rst_n), .in1(cin), .in2(a), .alpha(alpha[k]), .out(out[k])
    );
  end

endmodule
