// qmvl_pkg: shared types and functions for the quaternary (four-valued) image processor.
//
// A quaternary digit takes one of the logical values L = {0,1,2,3}. On silicon such a digit
// is one wire carrying one of four voltage levels; in this RTL it is carried as a 2-bit
// unsigned binary code whose numeric value is the logical value (0..3). That encoding is a
// choice of this RTL; the level-to-value mapping itself (image gray level or colour per
// value) is left to the user, as in the original design.
//
// The central primitive is the quaternary T gate, a multiplexer:
//     T(p0, p1, p2, p3; x) = p_i  if x == i.
// Its four data inputs are bundled as tconst_t, element [i] being p_i.
//
// Double pattern matching encodes a match result in one digit: bit 0 set means "matches the
// first template (P)", bit 1 set means "matches the second template (Q)". With that reading
// the comparator constants of rule (7) follow from the two sets of accepted input values per
// template digit (alpha_from_sets), and the accumulator reduces to a bitwise AND.
package qmvl_pkg;

  typedef logic [1:0] quat_t;           // one quaternary digit, value 0..3
  typedef quat_t [3:0] tconst_t;        // T-gate data inputs, [i] = p_i

  // Match-result digits (rule (5)).
  localparam quat_t NO_MATCH   = 2'd0;
  localparam quat_t MATCH_P    = 2'd1;
  localparam quat_t MATCH_Q    = 2'd2;
  localparam quat_t MATCH_BOTH = 2'd3;

  // Identity constants of the quantizer T(0,1,2,3; x).
  localparam tconst_t QUANT_CONST = {2'd3, 2'd2, 2'd1, 2'd0};

  // Quaternary T gate (multiplexer) as a function.
  function automatic quat_t t_fn(tconst_t p, quat_t x);
    return p[x];
  endfunction

  // Comparator constants alpha_0..alpha_3 from the sets of input values accepted by the
  // first (pset) and second (qset) template at one pixel position. pset[v] = 1 means value v
  // matches the first template. Single-valued sets give rule (7) exactly: alpha = 3 at p = q,
  // alpha_p = 1 and alpha_q = 2 when they differ, 0 elsewhere.
  function automatic tconst_t alpha_from_sets(logic [3:0] pset, logic [3:0] qset);
    tconst_t a;
    for (int v = 0; v < 4; v++) a[v] = {qset[v], pset[v]};
    return a;
  endfunction

  // Single-valued template digits p and q (rule (7) as printed).
  function automatic tconst_t alpha_from_digits(quat_t p, quat_t q);
    return alpha_from_sets(4'b0001 << p, 4'b0001 << q);
  endfunction

endpackage
