// output_selector (OS): applies the state transition chosen by a PM array's match result.
//
//     d = d_prev  if c5 = 0 (no template matched)
//         v[0]    if c5 = 1 (first template:  V^(2i-1))
//         v[1]    if c5 = 2 (second template: V^(2i))
//         v[2]    if c5 = 3 (both matched; the user programs V^(2i-1) or V^(2i) here)
// This is one T gate controlled by c5 with d_prev and the three transition values on its data
// inputs, followed by a quantizer T gate. In the original, d_prev is sampled on phi1 and the
// selected level passed to the quantizer on phi2; here both happen on one clock edge, so d is
// registered (reset to 0, this RTL's choice). The OS of the first stage receives the window's
// centre pixel as d_prev, which leaves the pixel unchanged when nothing matches.
//
// Interface: d_prev, c5, v[3] (transition values), d (registered output). Latency: 1 clock.
module output_selector
  import qmvl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  quat_t d_prev,
  input  quat_t c5,
  input  quat_t v [3],
  output quat_t d
);

  quat_t sel;

  t_gate u_sel (.p({v[2], v[1], v[0], d_prev}), .x(c5), .tout(sel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d <= '0;
    else        d <= t_fn(QUANT_CONST, sel);
  end

endmodule
