// dyn_shift_reg: quaternary shift register of DEPTH digits.
//
// Each digit element of the original is a pair of T gates wired as quantizers,
// T(0,1,2,3; x), separated by pass transistors driven by a two-phase non-overlapping clock:
// on phi1 the input level is stored as charge on the control node of the first T gate, on
// phi2 the first gate's output is passed on to the second. One phi1/phi2 period therefore
// moves every digit one element forward. This RTL replaces the phi1/phi2 pair by one clock,
// clk, whose rising edge stands for the end of phi2: each element is one 2-bit register
// whose next value is the quantizer output of its input (the quantizer restores levels in
// silicon and is the identity on logical values). The asynchronous active-low reset that
// clears all elements to 0 is this RTL's choice; the dynamic original has none.
//
// Interface: din enters element 0; dout is element DEPTH-1. DEPTH defaults to 3, the size of
// the shift register on the fabricated chip; the image processor uses DEPTH = N+2 for line
// delays, 5 for the centre-pixel delay and 1 for window registers and stage skew.
// Timing: dout(t) = din(t - DEPTH) in clock cycles.
module dyn_shift_reg
  import qmvl_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  quat_t din,
  output quat_t dout
);

  quat_t elem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) elem[i] <= '0;
    end else begin
      elem[0] <= t_fn(QUANT_CONST, din);
      for (int i = 1; i < int'(DEPTH); i++) elem[i] <= t_fn(QUANT_CONST, elem[i-1]);
    end
  end

  assign dout = elem[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("dyn_shift_reg: DEPTH must be at least 1");

endmodule
