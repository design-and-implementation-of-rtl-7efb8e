// digit_comparator: one-digit comparator of the double pattern matching cell.
//
// One T gate whose control input is the incoming pixel digit a and whose data inputs are the
// programmed constants alpha_0..alpha_3: b = T(alpha; a). The constants hold, per possible
// pixel value, the match result for both templates at once: 1 = the value matches only the
// first template, 2 = only the second, 3 = both, 0 = neither (rule (7); see
// qmvl_pkg::alpha_from_sets for deriving them, including "don't care" sets such as "0 or 1").
//
// Interface: alpha (tconst_t), a (pixel digit), b (match digit). Timing: combinational.
module digit_comparator
  import qmvl_pkg::*;
(
  input  tconst_t alpha,
  input  quat_t   a,
  output quat_t   b
);

  t_gate u_t (.p(alpha), .x(a), .tout(b));

endmodule
