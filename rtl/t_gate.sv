// t_gate: quaternary T gate, the basic building block of the whole processor.
//
// Function: tout = T(p0, p1, p2, p3; x) = p_x, a four-way multiplexer whose data inputs and
// control input are all quaternary digits. In the NMOS original, x drives a ladder of
// inverters and NOR gates with three different enhancement thresholds that turns on exactly
// one of four pass transistors, and the selected p_i is passed to the output as an analog
// level without any binary decoding. This RTL keeps only the logic function: digits are
// 2-bit codes (see qmvl_pkg) and the multiplexer is combinational. Threshold voltages,
// implants and the roughly 150 ns propagation delay of the silicon gate have no RTL meaning.
//
// Interface: p (tconst_t, [i] = p_i), x (control digit), tout (selected digit).
// Timing: purely combinational.
module t_gate
  import qmvl_pkg::*;
(
  input  tconst_t p,
  input  quat_t   x,
  output quat_t   tout
);

  always_comb begin
    unique case (x)
      2'd0: tout = p[0];
      2'd1: tout = p[1];
      2'd2: tout = p[2];
      default: tout = p[3];
    endcase
  end

endmodule
