// pm_cell: quaternary double pattern matching (PM) cell.
//
// The cell compares one incoming pixel digit (in2) with one position of two templates at the
// same time and folds the result into the match digit coming from the previous cell (in1):
//     b   = T(alpha; in2)                      one-digit comparator
//     c   = accumulator(in1, b)                Table IV
//     out = c, one clock later                 quantizer stage
// out is 1 when the pixels seen so far along the chain match only the first template, 2 when
// they match only the second, 3 when both, 0 otherwise. In the original, in1 is sampled on
// phi1 and the accumulator output is passed to the quantizer T gate on phi2; here one rising
// edge of clk does both, so the cell is one pipeline register (reset to 0, this RTL's choice).
// in2 is not registered inside the cell: it comes from a window register that holds it for
// the clock period, as in the original.
//
// Interface: in1 (match digit from the previous cell), in2 (pixel), alpha (comparator
// constants), out (registered match digit). Latency: 1 clock.
module pm_cell
  import qmvl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  quat_t   in1,
  input  quat_t   in2,
  input  tconst_t alpha,
  output quat_t   out
);

  quat_t b, c;

  digit_comparator u_cmp (.alpha(alpha), .a(in2), .b(b));
  accumulator      u_acc (.c_prev(in1), .b(b), .c(c));

  // Quantizer stage: T(0,1,2,3; c) stored once per clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= NO_MATCH;
    else        out <= t_fn(QUANT_CONST, c);
  end

endmodule
