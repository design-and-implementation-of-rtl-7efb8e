// accumulator: combines the match result arriving from the previous cell, c_prev, with this
// cell's comparator result b (Table IV of the design):
//     c = T(0, T(0,1,0,1; c_prev), T(0,0,2,2; c_prev), c_prev; b)
// A digit keeps "matches the first template" only if both c_prev and b say so, and likewise
// for the second template, so on the 2-bit code the function equals c_prev & b. The module
// is built, as in the original, from three T gates; the storage that the original puts on
// the control node of the first two gates is the pipeline register in pm_cell.
//
// Interface: c_prev, b (digits), c (accumulated digit). Timing: combinational, two T gates
// deep.
module accumulator
  import qmvl_pkg::*;
(
  input  quat_t c_prev,
  input  quat_t b,
  output quat_t c
);

  // T(0,1,0,1; .) keeps the first-template bit, T(0,0,2,2; .) the second-template bit.
  localparam tconst_t KEEP_P = {MATCH_P, NO_MATCH, MATCH_P, NO_MATCH};
  localparam tconst_t KEEP_Q = {MATCH_Q, MATCH_Q, NO_MATCH, NO_MATCH};

  quat_t only_p, only_q;

  t_gate u_p (.p(KEEP_P), .x(c_prev), .tout(only_p));
  t_gate u_q (.p(KEEP_Q), .x(c_prev), .tout(only_q));
  t_gate u_c (.p({c_prev, only_q, only_p, NO_MATCH}), .x(b), .tout(c));

endmodule
